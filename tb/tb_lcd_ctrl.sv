// tb_lcd_ctrl: self-checking test of the display controller.
//
// Uses a 40x20 panel (50x26 with blanking), a 24x20 image area and an 8x16
// digit box with 2-pixel segments. Over several frames it checks the sync
// pulse widths and periods, DE, the frame_start pulse, that every image pixel
// is pulled once and shown unchanged one cycle later, black for a missing
// pixel, and every pixel of the digit area against a drawing of the seven
// segments made here, for several classes including the dash of class 10
// and the empty panel before the first result.
`timescale 1ns/1ps
module tb_lcd_ctrl;
  localparam int HA = 40, HF = 2, HS = 3, HB = 5, VA = 20, VF = 2, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int IW = 24, IH = 20, DX = 28, DY = 2, DW = 8, DH = 16, T = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic result_valid, in_valid, in_ready, frame_start, lcd_hsync, lcd_vsync, lcd_de;
  logic [3:0] result_class;
  logic [15:0] in_pix, lcd_rgb;

  lcd_ctrl #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
             .IMG_W(IW), .IMG_H(IH), .DIG_X(DX), .DIG_Y(DY), .DIG_W(DW), .DIG_H(DH),
             .SEG_T(T)) dut (.*);

  function automatic bit seg_on(int cls, int s);  // s: 0=a .. 6=g
    bit [6:0] tbl [11] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001, 7'b0110011,
                            7'b1011011, 7'b1011111, 7'b1110000, 7'b1111111, 7'b1111011,
                            7'b0000001};
    return tbl[cls][6 - s];
  endfunction

  function automatic bit glyph(int cls, int x, int y);
    bit r = 0;
    if (seg_on(cls, 0) && y < T) r = 1;
    if (seg_on(cls, 1) && x >= DW - T && y < DH / 2) r = 1;
    if (seg_on(cls, 2) && x >= DW - T && y >= DH / 2) r = 1;
    if (seg_on(cls, 3) && y >= DH - T) r = 1;
    if (seg_on(cls, 4) && x < T && y >= DH / 2) r = 1;
    if (seg_on(cls, 5) && x < T && y < DH / 2) r = 1;
    if (seg_on(cls, 6) && y >= (DH - T) / 2 && y < (DH + T) / 2) r = 1;
    return r;
  endfunction

  // n counts rising edges since reset release; between edges the internal
  // counters are at position n, the registered outputs show position n-1.
  int n = 0, cls_shown = 0, de_count = 0, frames = 0;
  bit have = 0, prev_img = 0, prev_valid = 0;
  logic [15:0] prev_pix;

  always @(posedge clk) if (rst_n) n <= n + 1;

  initial begin
    result_valid = 0; result_class = 0; in_valid = 0; in_pix = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      int p, x, y, q, qx, qy;
      p = n % (HT * VT); x = p % HT; y = p / HT;
      // results arrive in the vertical blanking of frames 1..4
      result_valid = 0;
      if (x == 0 && y == VA + 1 && n / (HT * VT) >= 1 && n / (HT * VT) <= 4) begin
        int cl [4] = '{8, 1, 10, 4};
        result_valid = 1;
        result_class = 4'(cl[n / (HT * VT) - 1]);
      end
      checks++;
      if (in_ready != (x < IW && y < IH)) begin failures++; $display("FAIL ready at %0d,%0d", x, y); end
      if (n > 0) begin
        q = (n - 1) % (HT * VT); qx = q % HT; qy = q / HT;
        checks++;
        if (lcd_de != (qx < HA && qy < VA) ||
            lcd_hsync != !(qx >= HA + HF && qx < HA + HF + HS) ||
            lcd_vsync != !(qy >= VA + VF && qy < VA + VF + VS) ||
            frame_start != (qx == 0 && qy == VA)) begin
          failures++;
          if (failures < 10) $display("FAIL timing at %0d,%0d", qx, qy);
        end
        if (qx < HA && qy < VA) begin
          logic [15:0] e;
          de_count++;
          if (prev_img) e = prev_valid ? prev_pix : 16'h0000;
          else if (have && qx >= DX && qx < DX + DW && qy >= DY && qy < DY + DH &&
                   glyph(cls_shown, qx - DX, qy - DY)) e = 16'hFFFF;
          else e = 16'h0008;
          checks++;
          if (lcd_rgb != e) begin
            failures++;
            if (failures < 10) $display("FAIL rgb at %0d,%0d class %0d got %h exp %h", qx, qy, cls_shown, lcd_rgb, e);
          end
        end
        if (q == HT * VT - 1) begin
          checks++;
          if (de_count != HA * VA) begin failures++; $display("FAIL de count %0d", de_count); end
          de_count = 0;
          frames++;
          if (frames == 6) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
      in_valid = ($urandom_range(0, 9) != 0);
      in_pix = 16'($urandom);
      prev_img = (x < IW && y < IH);
      prev_valid = in_valid;
      prev_pix = in_pix;
      @(negedge clk);
      if (result_valid) begin have = 1; cls_shown = result_class; end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
