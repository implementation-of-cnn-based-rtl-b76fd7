// tb_conv_engine: self-checking test of the shared convolution engine.
//
// Runs three layer shapes on the engine: a 3x3 layer with 3 input and 11
// output channels (two groups, the second only partly used) on a 5x6 map, a
// 3x3 layer with one input channel (the tightest output timing), and a 1x1
// "dense" layer. The feature and weight memories are modelled here with one
// cycle of read latency. Every written byte, every raw score and the cycle
// count from start to done are compared with a direct computation.
`timescale 1ns/1ps
module tb_conv_engine;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start;
  layer_cfg_t cfg;
  logic busy, done, rd_en, w_en, wr_en, score_valid;
  logic [FM_AW-1:0] rd_addr, wr_addr;
  logic [W_AW-1:0] w_addr;
  act_t rd_data, wr_data;
  logic [W_WORD-1:0] w_data;
  logic [5:0] score_ch;
  acc_t score;

  conv_engine dut (.*);

  act_t              src [FM_DEPTH];
  act_t              dst [FM_DEPTH];
  logic [W_WORD-1:0] wm  [W_DEPTH];
  logic              written [FM_DEPTH];
  acc_t              scores [64];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= src[rd_addr];
    if (w_en)  w_data  <= wm[w_addr];
    if (wr_en) begin dst[wr_addr] <= wr_data; written[wr_addr] <= 1'b1; end
  end

  // last written score of each channel (the dense layer has one pixel)
  always_ff @(posedge clk) if (score_valid) scores[score_ch] <= score;

  function automatic int ref_acc(layer_cfg_t c, int co, int y, int x);
    int s = 0, pad = (c.ksize == 3) ? 1 : 0;
    for (int ci = 0; ci < c.cin; ci++)
      for (int ky = 0; ky < c.ksize; ky++)
        for (int kx = 0; kx < c.ksize; kx++) begin
          int iy = y + ky - pad, ix = x + kx - pad, a, w, widx;
          if (iy < 0 || ix < 0 || iy >= c.in_h || ix >= c.in_w) continue;
          a = src[(ci * c.in_h + iy) * c.in_w + ix];
          widx = c.wbase + ((co / 8) * c.cin + ci) * c.ksize * c.ksize + ky * c.ksize + kx;
          w = $signed(wm[widx][(co % 8) * 8 +: 8]);
          s += a * w;
        end
    return s;
  endfunction

  function automatic int ref_q(int s);
    int q = s >>> 7;
    if (q < 0) q = 0;
    if (q > 255) q = 255;
    return q;
  endfunction

  task automatic run_layer(int k, int h, int w, int ci, int co, int wb);
    int cyc = 0, groups, expect_cyc, lanes;
    cfg = mk_layer(L_CONV, k, h, w, ci, co, wb, 1'b1, 1'b0, 1'b0);
    for (int i = 0; i < FM_DEPTH; i++) begin
      src[i] = act_t'($urandom_range(0, 255));
      written[i] = 1'b0;
    end
    for (int i = 0; i < W_DEPTH; i++)
      for (int l = 0; l < 8; l++) wm[i][l*8 +: 8] = 8'($urandom_range(0, 255));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    groups = (co + 7) / 8;
    lanes  = co - (groups - 1) * 8;
    expect_cyc = groups * h * w * ci * k * k + lanes + 2;
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL cycles %0d expected %0d (k=%0d)", cyc, expect_cyc, k);
    end
    for (int c = 0; c < co; c++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int a = (c * h + y) * w + x;
          int r = ref_acc(cfg, c, y, x);
          checks++;
          if (!written[a] || int'(dst[a]) != ref_q(r)) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d c=%0d y=%0d x=%0d got %0d exp %0d (acc %0d)",
                                        k, c, y, x, dst[a], ref_q(r), r);
          end
          if (h == 1 && w == 1) begin
            checks++;
            if (scores[c] != r) begin
              failures++;
              $display("FAIL score ch %0d got %0d exp %0d", c, scores[c], r);
            end
          end
        end
  endtask

  initial begin
    start = 0;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer(3, 5, 6, 3, 11, 10);
    run_layer(3, 4, 4, 1, 8, 0);
    run_layer(1, 1, 1, 16, 11, 585);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
