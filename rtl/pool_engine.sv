// pool_engine: max-pooling unit of the CNN processor.
//
// Serves the two 2x2 max-pool layers and the global max-pool layer, which is
// the same operation with a window covering the whole 7x7 map. The window size
// P (= stride) comes with the runtime configuration (cfg.ksize); the output map
// is (H/P) x (W/P) with cfg.cin channels. Max pooling, not averaging, is the
// design's choice because it needs only a comparator.
//
// Loop order, outermost first: channel, output row, output column, window row,
// window column. One input byte is read per cycle; a running maximum is kept in
// the stage after the read and written to the destination buffer one cycle
// after the last byte of its window. Inputs are ReLU outputs (unsigned).
//
// Timing: start is a one-cycle pulse, cfg is held until done. A layer takes
//   C * H/P * W/P * P*P + 3 cycles
// from the start pulse to the done pulse. Reads have one cycle of latency.
module pool_engine
  import cnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  output logic              rd_en,
  output logic [FM_AW-1:0]  rd_addr,
  input  act_t              rd_data,
  output logic              wr_en,
  output logic [FM_AW-1:0]  wr_addr,
  output act_t              wr_data
);
  logic       run;
  logic [5:0] c, oy, ox;
  logic [3:0] py, px;
  logic [5:0] oh, ow;
  logic [3:0] pmax;

  assign pmax = cfg.ksize - 4'd1;
  assign oh   = cfg.in_h / 6'(cfg.ksize);
  assign ow   = cfg.in_w / 6'(cfg.ksize);

  wire last_px = (px == pmax);
  wire last_py = (py == pmax);
  wire last_ox = (ox == ow - 6'd1);
  wire last_oy = (oy == oh - 6'd1);
  wire last_c  = (c == cfg.cin - 6'd1);

  logic [15:0] iy, ix, raddr_full;
  assign iy = 16'(oy) * 16'(cfg.ksize) + 16'(py);
  assign ix = 16'(ox) * 16'(cfg.ksize) + 16'(px);
  assign raddr_full = (16'(c) * 16'(cfg.in_h) + iy) * 16'(cfg.in_w) + ix;

  assign rd_en   = run;
  assign rd_addr = FM_AW'(raddr_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      {c, oy, ox} <= '0;
      {py, px} <= '0;
    end else if (start && !busy) begin
      run <= 1'b1;
      {c, oy, ox} <= '0;
      {py, px} <= '0;
    end else if (run) begin
      px <= last_px ? 4'd0 : px + 4'd1;
      if (last_px) begin
        py <= last_py ? 4'd0 : py + 4'd1;
        if (last_py) begin
          ox <= last_ox ? 6'd0 : ox + 6'd1;
          if (last_ox) begin
            oy <= last_oy ? 6'd0 : oy + 6'd1;
            if (last_oy) begin
              c <= c + 6'd1;
              if (last_c) run <= 1'b0;
            end
          end
        end
      end
    end
  end

  // compare stage
  logic       m_valid, m_first, m_last;
  logic [5:0] m_c, m_oy, m_ox;
  act_t       mx, mx_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_first <= 1'b0;
      m_last  <= 1'b0;
      {m_c, m_oy, m_ox} <= '0;
    end else begin
      m_valid <= run;
      m_first <= (py == 4'd0) && (px == 4'd0);
      m_last  <= last_px && last_py;
      m_c     <= c;
      m_oy    <= oy;
      m_ox    <= ox;
    end
  end

  assign mx_next = (m_first || rd_data > mx) ? rd_data : mx;

  always_ff @(posedge clk) begin
    if (m_valid) mx <= mx_next;
  end

  // write stage
  logic [15:0] waddr_full;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en      <= 1'b0;
      waddr_full <= '0;
      wr_data    <= '0;
    end else begin
      wr_en      <= m_valid && m_last;
      waddr_full <= (16'(m_c) * 16'(oh) + 16'(m_oy)) * 16'(ow) + 16'(m_ox);
      wr_data    <= mx_next;
    end
  end
  assign wr_addr = FM_AW'(waddr_full);

  assign busy = run || m_valid || wr_en;

  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign done = busy_q && !busy;
endmodule
