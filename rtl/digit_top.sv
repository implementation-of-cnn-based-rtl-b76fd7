// digit_top: camera-to-display handwritten digit recogniser.
//
// Data flow:
//   camera bytes -> cam_capture (16-bit pixels) -> frame_buffer_ctrl, which
//   stores frames in external memory through AXI4 with two alternating frame
//   areas (ping-pong) and reads the last whole frame back. The read stream goes
//   to the LCD (lcd_ctrl pulls it at pixel rate) and, in parallel, into
//   preproc, which extracts the character and writes a 28x28 image into the
//   CNN processor (cnn_core). When the image is complete the CNN runs, and its
//   class is drawn on the right side of the LCD.
// A frame is handed to the recogniser only if the CNN is idle when it starts;
// one CNN run (about 83,200 cycles) is shorter than a frame, so at most every
// other frame is skipped.
//
// External parts are reached through ports: the camera's pixel bus, the
// memory's AXI4 slave port (the DDR3 controller), the LCD's RGB565 bus and a
// port for loading the trained weights (617 words of 8 signed bytes, see
// cnn_pkg) before the first run. The whole design runs on one clock; in a
// board the camera's pixel clock, the memory controller's clock and the
// panel's clock would be separate and need clock-domain crossings, which are
// not part of this design.
module digit_top
  import cnn_pkg::*;
#(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 40,
  parameter int unsigned H_SYNC   = 48,
  parameter int unsigned H_BP     = 88,
  parameter int unsigned V_FP     = 13,
  parameter int unsigned V_SYNC   = 3,
  parameter int unsigned V_BP     = 32,
  parameter int unsigned DIG_X    = 680,
  parameter int unsigned DIG_Y    = 160,
  parameter int unsigned DIG_W    = 80,
  parameter int unsigned DIG_H    = 160,
  parameter int unsigned SEG_T    = 12,
  parameter int unsigned THRESH   = 128,
  localparam int unsigned XW = $clog2(FRAME_W),
  localparam int unsigned YW = $clog2(FRAME_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // camera
  input  logic              cam_vsync,
  input  logic              cam_href,
  input  logic [7:0]        cam_data,
  // weight loading
  input  logic              wld_we,
  input  logic [W_AW-1:0]   wld_addr,
  input  logic [W_WORD-1:0] wld_data,
  // AXI4 master to the frame memory
  output logic [31:0]       m_awaddr,
  output logic [7:0]        m_awlen,
  output logic [2:0]        m_awsize,
  output logic [1:0]        m_awburst,
  output logic              m_awvalid,
  input  logic              m_awready,
  output logic [63:0]       m_wdata,
  output logic [7:0]        m_wstrb,
  output logic              m_wlast,
  output logic              m_wvalid,
  input  logic              m_wready,
  input  logic [1:0]        m_bresp,
  input  logic              m_bvalid,
  output logic              m_bready,
  output logic [31:0]       m_araddr,
  output logic [7:0]        m_arlen,
  output logic [2:0]        m_arsize,
  output logic [1:0]        m_arburst,
  output logic              m_arvalid,
  input  logic              m_arready,
  input  logic [63:0]       m_rdata,
  input  logic [1:0]        m_rresp,
  input  logic              m_rlast,
  input  logic              m_rvalid,
  output logic              m_rready,
  // LCD
  output logic              lcd_hsync,
  output logic              lcd_vsync,
  output logic              lcd_de,
  output logic [15:0]       lcd_rgb,
  // status
  output logic              result_valid,
  output logic [3:0]        result_class,
  output acc_t              result_score,
  output logic              cnn_busy,
  output logic              frame_ready,
  output logic              frame_dropped,
  output logic              wr_overflow,
  output logic              axi_error
);
  // ---------------- camera ----------------
  logic          c_valid, c_sof, c_eof;
  logic [15:0]   c_pix;
  logic [XW-1:0] c_x;
  logic [YW-1:0] c_y;

  cam_capture #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_cam (
    .clk, .rst_n, .cam_vsync, .cam_href, .cam_data,
    .pix_valid(c_valid), .pix(c_pix), .pix_x(c_x), .pix_y(c_y), .sof(c_sof), .eof(c_eof)
  );

  // ---------------- frame cache ----------------
  logic        rd_frame_start, f_valid, f_ready, f_sof, f_eof;
  logic [15:0] f_pix;

  frame_buffer_ctrl #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_fb (
    .clk, .rst_n,
    .pix_valid(c_valid), .pix(c_pix), .sof(c_sof),
    .wr_overflow, .axi_error, .frame_ready, .frame_dropped,
    .rd_frame_start, .out_valid(f_valid), .out_ready(f_ready),
    .out_pix(f_pix), .out_sof(f_sof), .out_eof(f_eof),
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready
  );

  // ---------------- display ----------------
  lcd_ctrl #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(FRAME_H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .IMG_W(FRAME_W), .IMG_H(FRAME_H),
    .DIG_X(DIG_X), .DIG_Y(DIG_Y), .DIG_W(DIG_W), .DIG_H(DIG_H), .SEG_T(SEG_T)
  ) u_lcd (
    .clk, .rst_n, .result_valid, .result_class,
    .in_valid(f_valid), .in_pix(f_pix), .in_ready(f_ready),
    .frame_start(rd_frame_start),
    .lcd_hsync, .lcd_vsync, .lcd_de, .lcd_rgb
  );

  // position of each pixel of the read stream
  wire           f_fire = f_valid && f_ready;
  logic [XW-1:0] f_x;
  logic [YW-1:0] f_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_x <= '0;
      f_y <= '0;
    end else if (f_fire) begin
      if (f_eof || 32'(f_x) == FRAME_W - 1) begin
        f_x <= '0;
        f_y <= f_eof ? '0 : f_y + 1'b1;
      end else begin
        f_x <= f_x + 1'b1;
      end
    end
  end

  // ---------------- recogniser ----------------
  logic       p_we, p_busy, p_done, p_found;
  logic [9:0] p_addr;
  act_t       p_data;
  logic       cnn_start, cnn_done;
  logic [3:0] cnn_layer;

  preproc #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .THRESH(THRESH)) u_pre (
    .clk, .rst_n, .accept(!cnn_busy && !cnn_start),
    .pix_valid(f_fire), .pix(f_pix), .pix_x(f_x), .pix_y(f_y), .sof(f_sof), .eof(f_eof),
    .img_we(p_we), .img_addr(p_addr), .img_data(p_data),
    .busy(p_busy), .done(p_done), .found(p_found)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnn_start <= 1'b0;
    else        cnn_start <= p_done && p_found;
  end

  cnn_core u_cnn (
    .clk, .rst_n,
    .img_we(p_we), .img_addr(FM_AW'(p_addr)), .img_data(p_data),
    .wld_we, .wld_addr, .wld_data,
    .start(cnn_start), .busy(cnn_busy), .done(cnn_done), .layer(cnn_layer),
    .class_idx(result_class), .class_score(result_score)
  );
  assign result_valid = cnn_done;

  // The pre-processor only writes the CNN's image while the CNN is idle.
  assert property (@(posedge clk) disable iff (!rst_n) p_we |-> !cnn_busy)
    else $error("digit_top: image written while the CNN runs");
endmodule
