// conv_engine: the shared convolution unit of the CNN processor.
//
// One instance serves all six 3x3 convolution layers and the dense layer (run
// as a 1x1 convolution over a 1x1 image), which is the resource-reuse idea of
// the design: the layer shape arrives as a runtime configuration (cfg) instead
// of being built into hardware per layer. PAR = 8 kernels (output channels) are
// computed in parallel: every cycle one input activation is read and multiplied
// by 8 weights (one weight-memory word), and 8 accumulators add the products.
// There are no bias terms.
//
// Loop order, outermost first: output-channel group g, row y, column x, input
// channel c, kernel row ky, kernel column kx. Convolutions use stride 1 and
// "same" zero padding; the padding is not stored anywhere: an edge detector
// flags a tap that falls outside the image and a zero is multiplied instead of
// a memory read.
//
// Pipeline (2 stages): issue (address generation, memory reads) -> MAC (read
// data times weights, accumulate). After the last tap of an output pixel the 8
// sums move to an output register and are written one channel per cycle to the
// destination buffer, requantised (shift right by QSHIFT, clamp to 0..255; the
// clamp is the ReLU), while the next pixel is already accumulating. Each pixel
// takes CIN*K*K >= 9 (3x3) or 16 (dense) cycles, so the 8 writes always finish
// in time and the engine never stalls. The raw sums are also given out on the
// score port (used by the classifier after the dense layer).
//
// Timing: start is a one-cycle pulse with cfg valid until done. done pulses one
// cycle after the last write; a layer takes
//   groups * H * W * CIN * K*K + lanes_of_last_group + 2 cycles
// from the start pulse to the done pulse. Read ports have one cycle of latency.
// The fixed-point format and the loop order are this design's own choices.
module conv_engine
  import cnn_pkg::*;
#(
  parameter int unsigned QSHIFT = 7   // weights are read as Q1.7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  layer_cfg_t         cfg,
  output logic               busy,
  output logic               done,
  // source feature map
  output logic               rd_en,
  output logic [FM_AW-1:0]   rd_addr,
  input  act_t               rd_data,
  // weight memory
  output logic               w_en,
  output logic [W_AW-1:0]    w_addr,
  input  logic [W_WORD-1:0]  w_data,
  // destination feature map
  output logic               wr_en,
  output logic [FM_AW-1:0]   wr_addr,
  output act_t               wr_data,
  // raw scores, one per written output channel
  output logic               score_valid,
  output logic [5:0]         score_ch,
  output acc_t               score
);
  // ---------------- issue stage ----------------
  logic       run;
  logic [5:0] g, y, x, c;
  logic [3:0] ky, kx;
  logic [5:0] groups;
  logic [3:0] kmax;          // ksize - 1

  assign groups = (cfg.cout + 6'(PAR - 1)) / 6'(PAR);
  assign kmax   = cfg.ksize - 4'd1;

  wire last_kx = (kx == kmax);
  wire last_ky = (ky == kmax);
  wire last_c  = (c == cfg.cin - 6'd1);
  wire last_x  = (x == cfg.in_w - 6'd1);
  wire last_y  = (y == cfg.in_h - 6'd1);
  wire last_g  = (g == groups - 6'd1);
  wire last_tap_pix = last_kx && last_ky && last_c;

  // Edge detection for the zero padding: input coordinate = out + k - pad.
  logic signed [7:0] iy, ix;
  logic [3:0] pad;
  logic inb;
  assign pad = kmax >> 1;
  assign iy  = $signed({2'b00, y}) + $signed({4'b0, ky}) - $signed({4'b0, pad});
  assign ix  = $signed({2'b00, x}) + $signed({4'b0, kx}) - $signed({4'b0, pad});
  assign inb = (iy >= 0) && (iy < $signed({2'b00, cfg.in_h})) &&
               (ix >= 0) && (ix < $signed({2'b00, cfg.in_w}));

  logic [15:0] fm_addr_full;
  logic [15:0] w_off;
  assign fm_addr_full = (16'(c) * 16'(cfg.in_h) + 16'(iy[5:0])) * 16'(cfg.in_w) + 16'(ix[5:0]);
  assign w_off        = (16'(g) * 16'(cfg.cin) + 16'(c)) * 16'(cfg.ksize) * 16'(cfg.ksize)
                        + 16'(ky) * 16'(cfg.ksize) + 16'(kx);

  assign rd_en   = run && inb;
  assign rd_addr = FM_AW'(fm_addr_full);
  assign w_en    = run;
  assign w_addr  = cfg.wbase + W_AW'(w_off);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      {g, y, x, c} <= '0;
      {ky, kx} <= '0;
    end else if (start && !busy) begin
      run <= 1'b1;
      {g, y, x, c} <= '0;
      {ky, kx} <= '0;
    end else if (run) begin
      kx <= last_kx ? 4'd0 : kx + 4'd1;
      if (last_kx) begin
        ky <= last_ky ? 4'd0 : ky + 4'd1;
        if (last_ky) begin
          c <= last_c ? 6'd0 : c + 6'd1;
          if (last_c) begin
            x <= last_x ? 6'd0 : x + 6'd1;
            if (last_x) begin
              y <= last_y ? 6'd0 : y + 6'd1;
              if (last_y) begin
                g <= g + 6'd1;
                if (last_g) run <= 1'b0;
              end
            end
          end
        end
      end
    end
  end

  // ---------------- MAC stage ----------------
  logic       m_valid, m_inb, m_first, m_last;
  logic [5:0] m_g, m_y, m_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_inb   <= 1'b0;
      m_first <= 1'b0;
      m_last  <= 1'b0;
      {m_g, m_y, m_x} <= '0;
    end else begin
      m_valid <= run;
      m_inb   <= inb;
      m_first <= (c == 6'd0) && (ky == 4'd0) && (kx == 4'd0);
      m_last  <= last_tap_pix;
      m_g     <= g;
      m_y     <= y;
      m_x     <= x;
    end
  end

  acc_t acc      [PAR];
  acc_t acc_next [PAR];

  always_comb begin
    for (int l = 0; l < PAR; l++) begin
      acc_t prod;
      prod = m_inb ? acc_t'($signed({1'b0, rd_data}) * $signed(w_data[l*WGT_W +: WGT_W]))
                   : '0;
      acc_next[l] = m_first ? prod : acc[l] + prod;
    end
  end

  always_ff @(posedge clk) begin
    if (m_valid)
      for (int l = 0; l < PAR; l++) acc[l] <= acc_next[l];
  end

  // ---------------- output serialiser ----------------
  acc_t       o_acc [PAR];
  logic       o_busy;
  logic [3:0] o_idx, o_lanes;
  logic [5:0] o_ch0, o_y, o_x;

  logic [5:0] lanes_left;
  assign lanes_left = cfg.cout - m_g * 6'(PAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_busy  <= 1'b0;
      o_idx   <= '0;
      o_lanes <= '0;
      {o_ch0, o_y, o_x} <= '0;
    end else begin
      if (o_busy) begin
        o_idx <= o_idx + 4'd1;
        if (o_idx == o_lanes - 4'd1) o_busy <= 1'b0;
      end
      if (m_valid && m_last) begin
        o_busy  <= 1'b1;
        o_idx   <= '0;
        o_lanes <= (lanes_left > 6'(PAR)) ? 4'(PAR) : lanes_left[3:0];
        o_ch0   <= m_g * 6'(PAR);
        o_y     <= m_y;
        o_x     <= m_x;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (m_valid && m_last)
      for (int l = 0; l < PAR; l++) o_acc[l] <= acc_next[l];
  end

  logic [5:0] o_ch;
  assign o_ch = o_ch0 + 6'(o_idx);

  logic [15:0] wr_addr_full;
  assign wr_addr_full = (16'(o_ch) * 16'(cfg.in_h) + 16'(o_y)) * 16'(cfg.in_w) + 16'(o_x);

  assign wr_en       = o_busy;
  assign wr_addr     = FM_AW'(wr_addr_full);
  assign wr_data     = requant(o_acc[o_idx[2:0]], QSHIFT);
  assign score_valid = o_busy;
  assign score_ch    = o_ch;
  assign score       = o_acc[o_idx[2:0]];

  // ---------------- status ----------------
  assign busy = run || m_valid || o_busy;

  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign done = busy_q && !busy;

  // A new pixel may only finish once the previous one has been written out.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_valid && m_last) |-> (!o_busy || o_idx == o_lanes - 4'd1))
    else $error("conv_engine: output serialiser overrun");
endmodule
