// tb_frame_buffer_ctrl: self-checking test of the ping-pong frame cache.
//
// Uses 16x8 frames (two 16-beat bursts per frame) and a behavioural AXI
// memory with random back-pressure. Writes frame 0, then reads it back while
// frame 1 is being written into the other bank, then reads frame 1. Checks
// every pixel that comes out (value, sof, eof), the burst counts, the bank
// base addresses in the memory, that the read during the concurrent write
// still returns the older, complete frame, and that no AXI rule or overflow
// flag fired.
`timescale 1ns/1ps
module tb_frame_buffer_ctrl;
  localparam int W = 16, H = 8, N = W * H;
  localparam logic [31:0] B0 = 32'h0000_0000, B1 = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pix_valid, sof, wr_overflow, frame_dropped, axi_error, frame_ready, rd_frame_start;
  logic out_valid, out_ready, out_sof, out_eof;
  logic [15:0] pix, out_pix;
  logic [31:0] m_awaddr, m_araddr;
  logic [7:0] m_awlen, m_arlen, m_wstrb;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [63:0] m_wdata, m_rdata;

  frame_buffer_ctrl #(.FRAME_W(W), .FRAME_H(H), .BASE0(B0), .BASE1(B1)) dut (.*);

  axi_mem_model mem (
    .clk, .rst_n,
    .s_awaddr(m_awaddr), .s_awlen(m_awlen), .s_awvalid(m_awvalid), .s_awready(m_awready),
    .s_wdata(m_wdata), .s_wlast(m_wlast), .s_wvalid(m_wvalid), .s_wready(m_wready),
    .s_bresp(m_bresp), .s_bvalid(m_bvalid), .s_bready(m_bready),
    .s_araddr(m_araddr), .s_arlen(m_arlen), .s_arvalid(m_arvalid), .s_arready(m_arready),
    .s_rdata(m_rdata), .s_rresp(m_rresp), .s_rlast(m_rlast), .s_rvalid(m_rvalid), .s_rready(m_rready)
  );

  logic [15:0] frames [4][N];
  bit hold = 0;
  int n_drop = 0;
  always @(posedge clk) if (rst_n && frame_dropped) n_drop++;
  logic [15:0] expect_f [N];
  int n_out;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_pix != expect_f[n_out] || out_sof != (n_out == 0) || out_eof != (n_out == N - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL pixel %0d got %h exp %h sof %0d eof %0d", n_out, out_pix, expect_f[n_out], out_sof, out_eof);
    end
    n_out++;
  end

  always @(negedge clk) out_ready = !hold && ($urandom_range(0, 99) < 60);

  task automatic write_frame(int f);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      pix_valid = 1; pix = frames[f][i]; sof = (i == 0);
      @(negedge clk);
      pix_valid = 0; sof = 0;
      repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask

  task automatic read_frame(int f);
    for (int i = 0; i < N; i++) expect_f[i] = frames[f][i];
    n_out = 0;
    @(negedge clk); rd_frame_start = 1;
    @(negedge clk); rd_frame_start = 0;
  endtask

  task automatic wait_read();
    int t = 0;
    while (n_out < N && t < 20000) begin @(negedge clk); t++; end
    checks++;
    if (n_out != N) begin failures++; $display("FAIL read stalled at %0d pixels", n_out); end
  endtask

  initial begin
    pix_valid = 0; pix = 0; sof = 0; rd_frame_start = 0;
    for (int f = 0; f < 4; f++) for (int i = 0; i < N; i++) frames[f][i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // no frame yet: a read request does nothing
    @(negedge clk); rd_frame_start = 1; @(negedge clk); rd_frame_start = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (mem.n_rbursts != 0 || out_valid) begin failures++; $display("FAIL read without a frame"); end
    write_frame(0);
    while (!frame_ready) @(negedge clk);
    // read frame 0 while frame 1 goes into the other bank
    read_frame(0);
    fork
      write_frame(1);
      wait_read();
    join
    repeat (200) @(negedge clk);
    read_frame(1);
    wait_read();
    // frame 2 goes to bank 0; while it is being read (display stalled),
    // frame 3 fills bank 1 and frame 0's bank would be next: that frame is dropped
    write_frame(2);
    repeat (200) @(negedge clk);
    hold = 1;
    read_frame(2);
    repeat (50) @(negedge clk);
    write_frame(3);
    repeat (200) @(negedge clk);
    write_frame(0);
    repeat (50) @(negedge clk);
    checks++;
    if (n_drop != 1) begin failures++; $display("FAIL %0d frames dropped, expected 1", n_drop); end
    hold = 0;
    wait_read();
    frames[1] = frames[3];
    frames[0] = frames[2];
    checks++;
    if (mem.n_wbursts != 8 || mem.n_rbursts != 6) begin
      failures++; $display("FAIL bursts w %0d r %0d", mem.n_wbursts, mem.n_rbursts);
    end
    // the two banks hold the two frames
    for (int i = 0; i < N / 4; i++) begin
      checks += 2;
      if (mem.rd(B0 + 32'(8 * i)) != {frames[0][4*i+3], frames[0][4*i+2], frames[0][4*i+1], frames[0][4*i]}) begin
        failures++; $display("FAIL bank 0 word %0d", i);
      end
      if (mem.rd(B1 + 32'(8 * i)) != {frames[1][4*i+3], frames[1][4*i+2], frames[1][4*i+1], frames[1][4*i]}) begin
        failures++; $display("FAIL bank 1 word %0d", i);
      end
    end
    checks++;
    if (wr_overflow || axi_error || mem.lastfail != 0) begin failures++; $display("FAIL flags"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
