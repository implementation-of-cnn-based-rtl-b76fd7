// lcd_ctrl: display controller for the live image and the recognised digit.
//
// Generates the sync timing of an RGB565 LCD panel (H_ACTIVE x V_ACTIVE with
// front porch, sync and back porch, syncs active low, DE high on active
// pixels). The left IMG_W x IMG_H area shows the live camera frame, pulled
// from the frame cache with a valid/ready stream (in_ready is high exactly on
// those pixels; a pixel not available in time is shown black). On the right
// side the latest result of the CNN is drawn as a large seven-segment digit
// (white on dark blue); class 10, the network's eleventh output, is drawn as a
// dash, and nothing is drawn before the first result. frame_start pulses once
// per frame at the start of vertical blanking so that the frame cache can
// start fetching the next frame. The panel size, timings and the way the
// digit is drawn are this design's choices; the system only says that the
// image and the result are shown on the LCD, the result on its right side.
// Outputs are registered: they lag the internal counters by one cycle.
module lcd_ctrl #(
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 40,
  parameter int unsigned H_SYNC   = 48,
  parameter int unsigned H_BP     = 88,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 13,
  parameter int unsigned V_SYNC   = 3,
  parameter int unsigned V_BP     = 32,
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned IMG_H    = 480,
  parameter int unsigned DIG_X    = 680,  // top-left corner of the digit
  parameter int unsigned DIG_Y    = 160,
  parameter int unsigned DIG_W    = 80,
  parameter int unsigned DIG_H    = 160,
  parameter int unsigned SEG_T    = 12,   // segment thickness
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        result_valid,   // one-cycle pulse with a new class
  input  logic [3:0]  result_class,
  input  logic        in_valid,
  input  logic [15:0] in_pix,
  output logic        in_ready,
  output logic        frame_start,
  output logic        lcd_hsync,
  output logic        lcd_vsync,
  output logic        lcd_de,
  output logic [15:0] lcd_rgb
);
  localparam logic [15:0] BG_COLOUR  = 16'h0008;
  localparam logic [15:0] SEG_COLOUR = 16'hFFFF;

  logic [HW-1:0] hc;
  logic [VW-1:0] vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (32'(hc) == H_TOTAL - 1) begin
      hc <= '0;
      vc <= (32'(vc) == V_TOTAL - 1) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  wire active = (32'(hc) < H_ACTIVE) && (32'(vc) < V_ACTIVE);
  wire in_img = (32'(hc) < IMG_W) && (32'(vc) < IMG_H);
  assign in_ready = in_img;

  // latest result
  logic [3:0] shown;
  logic       have;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shown <= '0;
      have  <= 1'b0;
    end else if (result_valid) begin
      shown <= result_class;
      have  <= 1'b1;
    end
  end

  // segments a..g as bits 6..0
  logic [6:0] segs;
  always_comb begin
    case (shown)
      4'd0: segs = 7'b1111110;
      4'd1: segs = 7'b0110000;
      4'd2: segs = 7'b1101101;
      4'd3: segs = 7'b1111001;
      4'd4: segs = 7'b0110011;
      4'd5: segs = 7'b1011011;
      4'd6: segs = 7'b1011111;
      4'd7: segs = 7'b1110000;
      4'd8: segs = 7'b1111111;
      4'd9: segs = 7'b1111011;
      default: segs = 7'b0000001;
    endcase
  end

  // position inside the digit box
  logic signed [HW:0] lx;
  logic signed [VW:0] ly;
  logic in_box, top_band, mid_band, bot_band, left_band, right_band, upper, lower;
  assign lx = $signed({1'b0, hc}) - $signed((HW + 1)'(DIG_X));
  assign ly = $signed({1'b0, vc}) - $signed((VW + 1)'(DIG_Y));
  assign in_box     = (lx >= 0) && (lx < $signed((HW + 1)'(DIG_W))) &&
                      (ly >= 0) && (ly < $signed((VW + 1)'(DIG_H)));
  assign top_band   = (ly < $signed((VW + 1)'(SEG_T)));
  assign bot_band   = (ly >= $signed((VW + 1)'(DIG_H - SEG_T)));
  assign mid_band   = (ly >= $signed((VW + 1)'((DIG_H - SEG_T) / 2))) &&
                      (ly <  $signed((VW + 1)'((DIG_H + SEG_T) / 2)));
  assign left_band  = (lx < $signed((HW + 1)'(SEG_T)));
  assign right_band = (lx >= $signed((HW + 1)'(DIG_W - SEG_T)));
  assign upper      = (ly < $signed((VW + 1)'(DIG_H / 2)));
  assign lower      = !upper;

  logic lit;
  always_comb begin
    lit = 1'b0;
    if (in_box && have) begin
      if (segs[6] && top_band)             lit = 1'b1;  // a
      if (segs[5] && right_band && upper)  lit = 1'b1;  // b
      if (segs[4] && right_band && lower)  lit = 1'b1;  // c
      if (segs[3] && bot_band)             lit = 1'b1;  // d
      if (segs[2] && left_band && lower)   lit = 1'b1;  // e
      if (segs[1] && left_band && upper)   lit = 1'b1;  // f
      if (segs[0] && mid_band)             lit = 1'b1;  // g
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcd_hsync   <= 1'b1;
      lcd_vsync   <= 1'b1;
      lcd_de      <= 1'b0;
      lcd_rgb     <= '0;
      frame_start <= 1'b0;
    end else begin
      lcd_hsync   <= !((32'(hc) >= H_ACTIVE + H_FP) && (32'(hc) < H_ACTIVE + H_FP + H_SYNC));
      lcd_vsync   <= !((32'(vc) >= V_ACTIVE + V_FP) && (32'(vc) < V_ACTIVE + V_FP + V_SYNC));
      lcd_de      <= active;
      frame_start <= (32'(vc) == V_ACTIVE) && (hc == '0);
      if (!active)     lcd_rgb <= '0;
      else if (in_img) lcd_rgb <= in_valid ? in_pix : 16'h0000;
      else if (lit)    lcd_rgb <= SEG_COLOUR;
      else             lcd_rgb <= BG_COLOUR;
    end
  end
endmodule
