// tb_cam_capture: self-checking test of the camera byte-to-pixel receiver.
//
// Sends two 16x6 frames as the sensor would: VSYNC pulse, then per line HREF
// high for two bytes per pixel (high byte first) with random idle cycles
// inside and between lines. Checks every pixel value and position, the pixel
// count per frame and the sof/eof flags.
`timescale 1ns/1ps
module tb_cam_capture;
  localparam int W = 16, H = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cam_vsync, cam_href, pix_valid, sof, eof;
  logic [7:0] cam_data;
  logic [15:0] pix;
  logic [3:0] pix_x;
  logic [2:0] pix_y;

  cam_capture #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  logic [15:0] frame [H][W];
  int n_pix, n_sof, n_eof;

  always @(posedge clk) if (rst_n && pix_valid) begin
    checks++;
    if (pix != frame[pix_y][pix_x]) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) got %h exp %h", pix_y, pix_x, pix, frame[pix_y][pix_x]);
    end
    checks++;
    if (sof != (pix_x == 0 && pix_y == 0) || eof != (int'(pix_x) == W - 1 && int'(pix_y) == H - 1)) begin
      failures++;
      $display("FAIL flags at (%0d,%0d)", pix_y, pix_x);
    end
    n_pix++;
    if (sof) n_sof++;
    if (eof) n_eof++;
  end

  initial begin
    cam_vsync = 0; cam_href = 0; cam_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) frame[y][x] = 16'($urandom);
      n_pix = 0; n_sof = 0; n_eof = 0;
      cam_vsync = 1; repeat (5) @(negedge clk); cam_vsync = 0;
      repeat (4) @(negedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          cam_href = 1; cam_data = frame[y][x][15:8]; @(negedge clk);
          cam_data = frame[y][x][7:0]; @(negedge clk);
        end
        cam_href = 0;
        repeat ($urandom_range(2, 6)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (n_pix != W * H || n_sof != 1 || n_eof != 1) begin
        failures++;
        $display("FAIL frame %0d: %0d pixels, %0d sof, %0d eof", f, n_pix, n_sof, n_eof);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
