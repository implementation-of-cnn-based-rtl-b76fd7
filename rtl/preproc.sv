// preproc: turns a camera frame into the 28x28 input image of the CNN.
//
// Steps, following the pre-processing chain of the system:
//   1. capture: every RGB565 pixel is converted to grey
//      (grey = (77 R + 150 G + 29 B) / 256 on 8-bit channels), its histogram
//      is normalised (the grey range of the previous frame in the stream is
//      stretched to 0..255, which makes the threshold follow the lighting)
//      and it is thresholded into a binary image (ink = stretched grey <
//      THRESH: dark writing on light paper), stored one bit per pixel.
//      At the same time the ink is labelled into 8-connected components in a
//      single pass: a line buffer holds the labels of the row above, and each
//      label keeps a pixel count and a bounding box. The parent table is kept
//      flat (a merge rewrites every entry of the absorbed label in one cycle),
//      so finding a label's root is a single lookup and the stream runs at one
//      pixel per cycle.
//   2. resample: the character's box, grown by one pixel for the dilation and
//      made square around its centre, is mapped onto a 24x24 grid by
//      nearest-neighbour sampling (source = box origin + (2i+1)*side/48), and
//      the grid is padded with a 2-pixel border to 28x28. Each sample is the OR
//      of the 3x3 neighbourhood of the sampled point, i.e. the dilated image is
//      sampled without storing it. Ink becomes 255, background 0, as in MNIST.
// The character is the union of the components with at least MIN_PIX pixels;
// smaller ones are specks of dirt and are dropped. One character per frame is
// recognised, as the display shows one result. NLAB - 1 labels are available
// per frame; ink that finds no free label is kept in the character box.
// These rules, the sizes and the order of the steps are this design's choices;
// the steps themselves follow the system's pre-processing chain. The grey range used for normalisation is measured on every
// frame of the stream and applied to the next one, since the frame itself is
// not stored in grey.
//
// Interface: pixel stream from cam_capture or the frame reader. A frame is
// taken only if it starts (sof) while accept is high (the CNN is idle) and the
// block is idle. After the frame's eof the 784 output bytes are written on
// img_* (address = row*28 + column); done pulses 784*9 + 4 cycles after eof with
// found = 1; a frame without ink gives done with found = 0 and no writes.
module preproc #(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned THRESH  = 128,
  parameter int unsigned NLAB    = 64,
  parameter int unsigned MIN_PIX = 8,
  localparam int unsigned XW = $clog2(FRAME_W),
  localparam int unsigned YW = $clog2(FRAME_H),
  localparam int unsigned NPIX = FRAME_W * FRAME_H,
  localparam int unsigned PAW = $clog2(NPIX),
  localparam int unsigned LW  = $clog2(NLAB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          accept,
  input  logic          pix_valid,
  input  logic [15:0]   pix,
  input  logic [XW-1:0] pix_x,
  input  logic [YW-1:0] pix_y,
  input  logic          sof,
  input  logic          eof,
  output logic          img_we,
  output logic [9:0]    img_addr,
  output logic [7:0]    img_data,
  output logic          busy,
  output logic          done,
  output logic          found
);
  localparam int unsigned OUT  = 28;
  localparam int unsigned CORE = 24;
  localparam int unsigned PADW = (OUT - CORE) / 2;

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_SETUP, S_RESAMPLE} state_e;
  state_e state;

  // ---------------- binary image ----------------
  logic bitmap [NPIX];
  logic bm_we, bm_wbit, bm_rbit;
  logic [PAW-1:0] bm_waddr, bm_raddr;

  always_ff @(posedge clk) begin
    if (bm_we) bitmap[bm_waddr] <= bm_wbit;
    bm_rbit <= bitmap[bm_raddr];
  end

  // grey and threshold
  logic [7:0]  r8, g8, b8;
  logic [17:0] grey_w;
  logic [7:0]  grey;
  logic        ink;
  assign r8 = {pix[15:11], pix[15:13]};
  assign g8 = {pix[10:5], pix[10:9]};
  assign b8 = {pix[4:0], pix[4:2]};
  assign grey_w = 18'(r8) * 18'd77 + 18'(g8) * 18'd150 + 18'(b8) * 18'd29;
  assign grey   = grey_w[15:8];

  // Histogram normalisation: the grey range [gmin, gmax] of the previous frame
  // is stretched to 0..255 before the threshold, i.e.
  //   ink  <=>  (grey - gmin) * 255 < THRESH * (gmax - gmin),
  // which needs no divider. Until a first frame has been seen the range is
  // 0..255 (no stretch).
  logic [7:0]  gmin_r, gmax_r, gmin_c, gmax_c;
  logic [15:0] lhs, rhs;
  assign lhs = 16'(grey - gmin_r) * 16'd255;
  assign rhs = 16'(THRESH) * 16'(gmax_r - gmin_r);
  assign ink = (grey < gmin_r) || (lhs < rhs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gmin_r <= 8'd0;
      gmax_r <= 8'd255;
      gmin_c <= 8'd255;
      gmax_c <= 8'd0;
    end else if (pix_valid) begin
      logic [7:0] mn, mx;
      mn = (sof || grey < gmin_c) ? grey : gmin_c;
      mx = (sof || grey > gmax_c) ? grey : gmax_c;
      gmin_c <= mn;
      gmax_c <= mx;
      if (eof) begin
        gmin_r <= mn;
        gmax_r <= mx;
      end
    end
  end

  wire take_frame = (state == S_IDLE) && accept && pix_valid && sof;
  wire capturing  = pix_valid && (take_frame || state == S_CAPTURE);

  assign bm_we    = capturing;
  assign bm_waddr = PAW'(32'(pix_y) * FRAME_W + 32'(pix_x));
  assign bm_wbit  = ink;

  // ---------------- connected-component labelling ----------------
  // Single pass, 8-connected. lbuf holds the labels of the row above (entries
  // left of the current column already hold the current row). parent[] is
  // kept flat: every label points straight at its root, so a merge rewrites
  // all entries of the absorbed root in the same cycle. Label 0 means none.
  logic [LW-1:0]  lbuf   [FRAME_W];
  logic [LW-1:0]  parent [NLAB];
  logic [XW-1:0]  c_minx [NLAB], c_maxx [NLAB];
  logic [YW-1:0]  c_miny [NLAB], c_maxy [NLAB];
  logic [PAW:0]   c_cnt  [NLAB];
  logic [LW:0]    next_lab;
  logic [LW-1:0]  l_prev, u_prev;
  logic           ovf;                 // ran out of labels (sticky per frame)
  logic [XW-1:0]  o_minx, o_maxx;      // box of pixels that got no label
  logic [YW-1:0]  o_miny, o_maxy;

  logic [LW:0]    nl;                  // next free label, as seen by this pixel
  logic           ovf_e;
  assign nl    = take_frame ? (LW + 1)'(1) : next_lab;
  assign ovf_e = take_frame ? 1'b0 : ovf;

  logic [LW-1:0]  n_u, n_ur, n_ul, n_l, r_a, r_b, keep, drop, cur;
  logic           new_lab, merge, full;
  always_comb begin
    n_u  = (pix_y != '0) ? lbuf[pix_x] : '0;
    n_ur = (pix_y != '0 && 32'(pix_x) < FRAME_W - 1) ? lbuf[XW'(pix_x + 1'b1)] : '0;
    n_ul = (pix_x != '0) ? u_prev : '0;
    n_l  = (pix_x != '0) ? l_prev : '0;
    // left, upper-left and upper neighbours are always one component already
    r_a  = (n_l  != '0) ? parent[n_l]  :
           (n_ul != '0) ? parent[n_ul] :
           (n_u  != '0) ? parent[n_u]  : '0;
    r_b  = (n_ur != '0) ? parent[n_ur] : '0;
    full    = (32'(nl) >= NLAB);
    new_lab = ink && (r_a == '0) && (r_b == '0) && !full;
    merge   = ink && (r_a != '0) && (r_b != '0) && (r_a != r_b);
    keep    = (r_a == '0) ? r_b : (r_b == '0) ? r_a : (r_a < r_b) ? r_a : r_b;
    drop    = (r_a < r_b) ? r_b : r_a;
    cur     = !ink ? '0 : new_lab ? LW'(nl) : keep;
  end

  // character box: union of the components with at least MIN_PIX pixels,
  // plus any pixels that found no free label
  logic [XW-1:0] minx, maxx;
  logic [YW-1:0] miny, maxy;
  logic          any_ink;
  always_comb begin
    any_ink = ovf;
    minx = o_minx; maxx = o_maxx; miny = o_miny; maxy = o_maxy;
    for (int i = 1; i < NLAB; i++) begin
      if (i < 32'(next_lab) && parent[i] == LW'(i) && 32'(c_cnt[i]) >= MIN_PIX) begin
        if (!any_ink || c_minx[i] < minx) minx = c_minx[i];
        if (!any_ink || c_maxx[i] > maxx) maxx = c_maxx[i];
        if (!any_ink || c_miny[i] < miny) miny = c_miny[i];
        if (!any_ink || c_maxy[i] > maxy) maxy = c_maxy[i];
        any_ink = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take_frame) begin
      next_lab <= (LW + 1)'(1);
      ovf      <= 1'b0;
    end
    if (capturing) begin
      lbuf[pix_x] <= cur;
      l_prev      <= cur;
      u_prev      <= n_u;
      if (new_lab) begin
        parent[cur] <= cur;
        c_minx[cur] <= pix_x; c_maxx[cur] <= pix_x;
        c_miny[cur] <= pix_y; c_maxy[cur] <= pix_y;
        c_cnt[cur]  <= (PAW + 1)'(1);
        next_lab    <= nl + 1'b1;
      end else if (ink && cur != '0) begin
        logic [XW-1:0] mnx, mxx;
        logic [YW-1:0] mny, mxy;
        logic [PAW:0]  cn;
        mnx = c_minx[keep]; mxx = c_maxx[keep];
        mny = c_miny[keep]; mxy = c_maxy[keep];
        cn  = c_cnt[keep] + 1'b1;
        if (merge) begin
          if (c_minx[drop] < mnx) mnx = c_minx[drop];
          if (c_maxx[drop] > mxx) mxx = c_maxx[drop];
          if (c_miny[drop] < mny) mny = c_miny[drop];
          if (c_maxy[drop] > mxy) mxy = c_maxy[drop];
          cn = cn + c_cnt[drop];
          for (int i = 0; i < NLAB; i++)
            if (parent[i] == drop) parent[i] <= keep;
        end
        if (pix_x < mnx) mnx = pix_x;
        if (pix_x > mxx) mxx = pix_x;
        if (pix_y < mny) mny = pix_y;
        if (pix_y > mxy) mxy = pix_y;
        c_minx[keep] <= mnx; c_maxx[keep] <= mxx;
        c_miny[keep] <= mny; c_maxy[keep] <= mxy;
        c_cnt[keep]  <= cn;
      end else if (ink) begin
        if (!ovf_e || pix_x < o_minx) o_minx <= pix_x;
        if (!ovf_e || pix_x > o_maxx) o_maxx <= pix_x;
        if (!ovf_e || pix_y < o_miny) o_miny <= pix_y;
        if (!ovf_e || pix_y > o_maxy) o_maxy <= pix_y;
        ovf <= 1'b1;
      end
    end
  end

  // resampling geometry, fixed in S_SETUP
  logic signed [12:0] org_x, org_y;    // origin of the square box
  logic        [11:0] side;

  // resample counters and pipeline
  logic [4:0] oy, ox;
  logic [3:0] tap;
  logic       iss;        // issuing taps
  logic       m_valid, m_inb, m_first, m_last;
  logic [9:0] m_addr;
  logic       acc_or;

  // sample point of output (oy, ox)
  logic [4:0]  ci, cj;
  logic        inner;
  logic [16:0] num_y, num_x;
  logic signed [12:0] sy, sx, ry, rx;
  logic signed [2:0]  dy, dx;
  logic        tap_inb;

  assign inner = (oy >= 5'(PADW)) && (oy < 5'(PADW + CORE)) &&
                 (ox >= 5'(PADW)) && (ox < 5'(PADW + CORE));
  assign ci    = oy - 5'(PADW);
  assign cj    = ox - 5'(PADW);
  assign num_y = (17'(ci) * 17'd2 + 17'd1) * 17'(side);
  assign num_x = (17'(cj) * 17'd2 + 17'd1) * 17'(side);
  assign sy    = org_y + $signed({1'b0, 12'(num_y / 17'(2 * CORE))});
  assign sx    = org_x + $signed({1'b0, 12'(num_x / 17'(2 * CORE))});
  assign dy    = 3'(tap / 4'd3) - 3'sd1;
  assign dx    = 3'(tap % 4'd3) - 3'sd1;
  assign ry    = sy + 13'(dy);
  assign rx    = sx + 13'(dx);
  assign tap_inb = inner && (ry >= 0) && (ry < $signed(13'(FRAME_H))) &&
                   (rx >= 0) && (rx < $signed(13'(FRAME_W)));
  assign bm_raddr = PAW'(32'(ry[11:0]) * FRAME_W + 32'(rx[11:0]));

  // box grown by one pixel (dilation), clipped to the frame
  logic [11:0] bx0, bx1, by0, by1, bw, bh, bside;
  assign bx0   = (minx == '0) ? 12'd0 : 12'(minx) - 12'd1;
  assign by0   = (miny == '0) ? 12'd0 : 12'(miny) - 12'd1;
  assign bx1   = (32'(maxx) == FRAME_W - 1) ? 12'(maxx) : 12'(maxx) + 12'd1;
  assign by1   = (32'(maxy) == FRAME_H - 1) ? 12'(maxy) : 12'(maxy) + 12'd1;
  assign bw    = bx1 - bx0 + 12'd1;
  assign bh    = by1 - by0 + 12'd1;
  assign bside = (bw > bh) ? bw : bh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      org_x   <= '0; org_y <= '0; side <= '0;
      oy      <= '0; ox <= '0; tap <= '0;
      iss     <= 1'b0;
      done    <= 1'b0;
      found   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (take_frame) state <= S_CAPTURE;
        S_CAPTURE: ;
        S_SETUP: begin
          if (!any_ink) begin
            state <= S_IDLE;
            done  <= 1'b1;
            found <= 1'b0;
          end else begin
            side  <= bside;
            org_x <= $signed({1'b0, bx0}) - $signed({1'b0, (bside - bw) >> 1});
            org_y <= $signed({1'b0, by0}) - $signed({1'b0, (bside - bh) >> 1});
            oy    <= '0; ox <= '0; tap <= '0;
            iss   <= 1'b1;
            state <= S_RESAMPLE;
          end
        end
        S_RESAMPLE: begin
          if (iss) begin
            tap <= (tap == 4'd8) ? 4'd0 : tap + 4'd1;
            if (tap == 4'd8) begin
              ox <= (ox == 5'(OUT - 1)) ? 5'd0 : ox + 5'd1;
              if (ox == 5'(OUT - 1)) begin
                oy <= oy + 5'd1;
                if (oy == 5'(OUT - 1)) iss <= 1'b0;
              end
            end
          end else if (!m_valid && !img_we) begin
            state <= S_IDLE;
            done  <= 1'b1;
            found <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase

      if (capturing) begin
        if (eof) state <= S_SETUP;
      end
    end
  end

  // OR of the 3x3 neighbourhood, one tap per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_inb <= 1'b0; m_first <= 1'b0; m_last <= 1'b0;
      m_addr  <= '0;
      acc_or  <= 1'b0;
      img_we  <= 1'b0; img_addr <= '0; img_data <= '0;
    end else begin
      m_valid <= iss;
      m_inb   <= tap_inb;
      m_first <= (tap == 4'd0);
      m_last  <= (tap == 4'd8);
      m_addr  <= 10'(32'(oy) * OUT + 32'(ox));
      img_we  <= 1'b0;
      if (m_valid) begin
        logic v;
        v = (m_inb && bm_rbit) || (!m_first && acc_or);
        acc_or <= v;
        if (m_last) begin
          img_we   <= 1'b1;
          img_addr <= m_addr;
          img_data <= v ? 8'd255 : 8'd0;
        end
      end
    end
  end

  assign busy = (state != S_IDLE);
endmodule
