// tb_pool_engine: self-checking test of the max-pooling engine.
//
// Runs a 2x2 pooling of a 6x8x3 map, a 2x2 pooling of the network's
// 14x14x8 map and the global 7x7 pooling of a 7x7x16 map on a modelled buffer
// (one cycle read latency). Each output byte and the cycle count from start to
// done are compared with a direct computation.
`timescale 1ns/1ps
module tb_pool_engine;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, rd_en, wr_en;
  layer_cfg_t cfg;
  logic [FM_AW-1:0] rd_addr, wr_addr;
  act_t rd_data, wr_data;

  pool_engine dut (.*);

  act_t src [FM_DEPTH];
  act_t dst [FM_DEPTH];
  int   nwrites;

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= src[rd_addr];
    if (wr_en) begin dst[wr_addr] <= wr_data; nwrites <= nwrites + 1; end
  end

  task automatic run_pool(int p, int h, int w, int ch);
    int cyc, oh = h / p, ow = w / p;
    cfg = mk_layer(L_POOL, p, h, w, ch, ch, 0, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < FM_DEPTH; i++) begin
      src[i] = act_t'($urandom_range(0, 255));
      dst[i] = 8'h00;
    end
    nwrites = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ch * oh * ow * p * p + 3) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc, ch * oh * ow * p * p + 3);
    end
    checks++;
    if (nwrites != ch * oh * ow) begin
      failures++;
      $display("FAIL writes %0d expected %0d", nwrites, ch * oh * ow);
    end
    for (int c = 0; c < ch; c++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          int m = 0;
          for (int py = 0; py < p; py++)
            for (int px = 0; px < p; px++) begin
              int v = src[(c * h + oy * p + py) * w + ox * p + px];
              if (v > m) m = v;
            end
          checks++;
          if (int'(dst[(c * oh + oy) * ow + ox]) != m) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d c=%0d (%0d,%0d) got %0d exp %0d",
                                        p, c, oy, ox, dst[(c * oh + oy) * ow + ox], m);
          end
        end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pool(2, 6, 8, 3);
    run_pool(2, 14, 14, 8);
    run_pool(7, 7, 7, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
