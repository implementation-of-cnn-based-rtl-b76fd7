// cam_capture: camera pixel-bus receiver.
//
// The image sensor sends each RGB565 pixel as two bytes, high byte first, on
// an 8-bit bus qualified by HREF (line valid), with VSYNC marking the frame
// gap. This block stitches the byte pairs into 16-bit pixels and tags them
// with their column and row, which is the "stitch into 16 bit" step of the
// system. Polarities (VSYNC high during the frame gap, HREF high on active
// bytes) and the byte order are assumptions of this design. The block runs on
// the sensor's pixel clock; inputs are sampled on its rising edge.
//
// Output: pix_valid for one cycle per pixel with pix, pix_x, pix_y; sof
// (start of frame) comes with the first pixel of a frame, eof with the last
// pixel of the last line (row FRAME_H-1, column FRAME_W-1).
module cam_capture #(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  localparam int unsigned XW = $clog2(FRAME_W),
  localparam int unsigned YW = $clog2(FRAME_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cam_vsync,
  input  logic          cam_href,
  input  logic [7:0]    cam_data,
  output logic          pix_valid,
  output logic [15:0]   pix,
  output logic [XW-1:0] pix_x,
  output logic [YW-1:0] pix_y,
  output logic          sof,
  output logic          eof
);
  logic          phase;        // 0: expecting high byte
  logic [7:0]    hi_byte;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          href_q;
  logic          first;        // next pixel is the first of the frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      hi_byte   <= '0;
      x         <= '0;
      y         <= '0;
      href_q    <= 1'b0;
      first     <= 1'b0;
      pix_valid <= 1'b0;
      pix       <= '0;
      pix_x     <= '0;
      pix_y     <= '0;
      sof       <= 1'b0;
      eof       <= 1'b0;
    end else begin
      href_q    <= cam_href;
      pix_valid <= 1'b0;
      sof       <= 1'b0;
      eof       <= 1'b0;
      if (cam_vsync) begin
        x     <= '0;
        y     <= '0;
        phase <= 1'b0;
        first <= 1'b1;
      end else begin
        // end of a line: next line
        if (href_q && !cam_href) begin
          x     <= '0;
          phase <= 1'b0;
          if (32'(y) < FRAME_H - 1) y <= y + 1'b1;
        end
        if (cam_href) begin
          phase <= ~phase;
          if (!phase) hi_byte <= cam_data;
          else begin
            pix_valid <= 1'b1;
            pix       <= {hi_byte, cam_data};
            pix_x     <= x;
            pix_y     <= y;
            sof       <= first;
            eof       <= (32'(x) == FRAME_W - 1) && (32'(y) == FRAME_H - 1);
            first     <= 1'b0;
            if (32'(x) < FRAME_W - 1) x <= x + 1'b1;
          end
        end
      end
    end
  end
endmodule
