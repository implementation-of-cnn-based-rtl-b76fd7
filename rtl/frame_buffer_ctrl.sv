// frame_buffer_ctrl: ping-pong frame cache in external DDR3 memory.
//
// Camera frames are written to one of two frame areas of the memory (bank 0 at
// BASE0, bank 1 at BASE1) while the last completed frame is read back from the
// other, so that the display and the recogniser always see a whole frame and
// never one being overwritten (ping-pong operation). The memory is reached
// through an AXI4 master port (in the system, the DDR3 controller's slave
// port). Bank selection follows the system description; the burst length,
// data width, FIFO sizes and bank addresses are this design's choices.
//
// Write side: 16-bit pixels (pix_valid/pix/sof, from cam_capture) are
// packed four to a 64-bit word (first pixel in the low bits) into a write
// FIFO; each time BURST words are there, one INCR burst of BURST beats is
// written. A frame's sof restarts at the base of the write bank; once the last
// burst of the frame is acknowledged, that bank becomes the read bank and
// writing moves to the other bank (frame_ready goes high after the first one).
// The camera must not run faster than the memory drains the FIFO; an overflow
// is reported on wr_overflow and drops data; an error response from the
// memory sets axi_error (both sticky until reset). Read bursts are counted by
// beats, so RLAST is not needed.
//
// A camera frame whose sof arrives while the write bank is still being read
// out is dropped whole (frame_dropped pulses), so a frame is never torn.
//
// Read side: rd_frame_start (e.g. the display's vertical sync) latches the
// read bank and starts reading one whole frame with BURST-beat read bursts into
// a read FIFO, issued whenever the FIFO has room for a whole burst. The frame
// leaves as a pixel stream with a valid/ready handshake (out_valid, out_ready)
// and out_sof/out_eof. Without a completed frame nothing is read.
// FRAME_W*FRAME_H must be a multiple of 4*BURST.
module frame_buffer_ctrl #(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned BURST   = 16,
  parameter logic [31:0] BASE0   = 32'h0000_0000,
  parameter logic [31:0] BASE1   = 32'h0010_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // camera pixels
  input  logic        pix_valid,
  input  logic [15:0] pix,
  input  logic        sof,
  output logic        wr_overflow,
  output logic        axi_error,
  output logic        frame_ready,
  output logic        frame_dropped,
  // read stream
  input  logic        rd_frame_start,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_pix,
  output logic        out_sof,
  output logic        out_eof,
  // AXI4 master
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [63:0] m_wdata,
  output logic [7:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [63:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready
);
  localparam int unsigned NWORDS  = FRAME_W * FRAME_H / 4;
  localparam int unsigned NBURSTS = NWORDS / BURST;
  localparam int unsigned FDEPTH  = 4 * BURST;
  localparam int unsigned BW      = $clog2(NBURSTS + 1);
  localparam int unsigned PW      = $clog2(FRAME_W * FRAME_H + 1);
  localparam logic [31:0] BSTEP   = 32'(BURST * 8);

  assign m_awlen   = 8'(BURST - 1);
  assign m_awsize  = 3'd3;
  assign m_awburst = 2'b01;
  assign m_wstrb   = 8'hFF;
  assign m_arlen   = 8'(BURST - 1);
  assign m_arsize  = 3'd3;
  assign m_arburst = 2'b01;

  logic wr_bank, rd_bank;
  logic cur_bank;      // bank being read

  // ================= write side =================
  logic [47:0] pack;
  logic [1:0]  pack_n;
  logic        wf_push, wf_pop, wf_full, wf_empty;
  logic [63:0] wf_wdata, wf_rdata;
  logic [$clog2(FDEPTH):0] wf_count;

  // A frame that would overwrite the bank still being read out is dropped.
  logic rd_active;     // a frame is being read, from rd_start to its last pixel
  logic drop;
  wire  drop_now = pix_valid && sof && rd_active && (cur_bank == wr_bank);
  wire  pix_in   = pix_valid && !(sof ? drop_now : drop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop          <= 1'b0;
      frame_dropped <= 1'b0;
    end else begin
      frame_dropped <= drop_now;
      if (pix_valid && sof) drop <= drop_now;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack   <= '0;
      pack_n <= '0;
    end else if (pix_in) begin
      if (sof) begin
        pack   <= {pix, 32'b0};
        pack_n <= 2'd1;
      end else begin
        pack   <= {pix, pack[47:16]};
        pack_n <= pack_n + 2'd1;
      end
    end
  end
  assign wf_push  = pix_in && !sof && (pack_n == 2'd3);
  assign wf_wdata = {pix, pack[47:0]};

  sync_fifo #(.WIDTH(64), .DEPTH(FDEPTH)) u_wfifo (
    .clk, .rst_n, .push(wf_push), .wdata(wf_wdata), .pop(wf_pop),
    .rdata(wf_rdata), .full(wf_full), .empty(wf_empty), .count(wf_count)
  );

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  wstate_e     wst;
  logic [31:0] waddr;
  logic [7:0]  wbeat;
  logic [BW-1:0] wbursts;    // bursts done in this frame

  assign m_awvalid = (wst == W_ADDR);
  assign m_awaddr  = waddr;
  assign m_wvalid  = (wst == W_DATA) && !wf_empty;
  assign m_wdata   = wf_rdata;
  assign m_wlast   = (wbeat == 8'(BURST - 1));
  assign m_bready  = (wst == W_RESP);
  assign wf_pop    = m_wvalid && m_wready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst         <= W_IDLE;
      waddr       <= BASE0;
      wbeat       <= '0;
      wbursts     <= '0;
      wr_bank     <= 1'b0;
      rd_bank     <= 1'b1;
      frame_ready <= 1'b0;
      wr_overflow <= 1'b0;
      axi_error   <= 1'b0;
    end else begin
      if (wf_push && wf_full) wr_overflow <= 1'b1;
      if ((m_bvalid && m_bready && m_bresp != 2'b00) ||
          (m_rvalid && m_rready && m_rresp != 2'b00)) axi_error <= 1'b1;
      case (wst)
        W_IDLE: if (32'(wf_count) >= BURST) begin
                  waddr <= (wr_bank ? BASE1 : BASE0) + BSTEP * 32'(wbursts);
                  wst   <= W_ADDR;
                end
        W_ADDR: if (m_awready) begin
                  wst   <= W_DATA;
                  wbeat <= '0;
                end
        W_DATA: if (m_wvalid && m_wready) begin
                  wbeat <= wbeat + 8'd1;
                  if (m_wlast) wst <= W_RESP;
                end
        W_RESP: if (m_bvalid) begin
                  wst <= W_IDLE;
                  if (32'(wbursts) == NBURSTS - 1) begin
                    wbursts     <= '0;
                    rd_bank     <= wr_bank;
                    wr_bank     <= ~wr_bank;
                    frame_ready <= 1'b1;
                  end else begin
                    wbursts <= wbursts + 1'b1;
                  end
                end
        default: wst <= W_IDLE;
      endcase
    end
  end

  // ================= read side =================
  logic        rf_pop, rf_full, rf_empty;
  logic [63:0] rf_rdata;
  logic [$clog2(FDEPTH):0] rf_count;

  sync_fifo #(.WIDTH(64), .DEPTH(FDEPTH)) u_rfifo (
    .clk, .rst_n, .push(m_rvalid && m_rready), .wdata(m_rdata), .pop(rf_pop),
    .rdata(rf_rdata), .full(rf_full), .empty(rf_empty), .count(rf_count)
  );

  logic          reading, ar_pend;
  logic [BW-1:0] rbursts;          // bursts requested
  logic [$clog2(FDEPTH):0] inflight;  // words requested, not yet received
  logic [1:0]    lane;
  logic [PW-1:0] opix;             // pixels sent in this frame

  assign m_arvalid = ar_pend;
  assign m_araddr  = (cur_bank ? BASE1 : BASE0) + BSTEP * 32'(rbursts);
  assign m_rready  = !rf_full;

  wire [$clog2(FDEPTH)+1:0] room = ($clog2(FDEPTH)+2)'(FDEPTH) -
                                   ($clog2(FDEPTH)+2)'(rf_count) -
                                   ($clog2(FDEPTH)+2)'(inflight);
  wire ar_fire = m_arvalid && m_arready;
  wire r_fire  = m_rvalid && m_rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      ar_pend  <= 1'b0;
      cur_bank <= 1'b0;
      rbursts  <= '0;
      inflight <= '0;
    end else begin
      inflight <= inflight + (ar_fire ? ($clog2(FDEPTH)+1)'(BURST) : '0) - (r_fire ? ($clog2(FDEPTH)+1)'(1) : '0);
      if (rd_frame_start && frame_ready && !reading && !rd_active) begin
        reading  <= 1'b1;
        cur_bank <= rd_bank;
        rbursts  <= '0;
      end else if (reading) begin
        if (ar_fire) begin
          ar_pend <= 1'b0;
          rbursts <= rbursts + 1'b1;
          if (32'(rbursts) == NBURSTS - 1) reading <= 1'b0;
        end else if (!ar_pend && 32'(room) >= BURST) begin
          ar_pend <= 1'b1;
        end
      end
    end
  end

  // unpack words into pixels
  assign out_valid = !rf_empty;
  assign out_pix   = rf_rdata[16*lane +: 16];
  assign out_sof   = (opix == '0);
  assign out_eof   = (32'(opix) == FRAME_W * FRAME_H - 1);
  assign rf_pop    = out_valid && out_ready && (lane == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane      <= '0;
      opix      <= '0;
      rd_active <= 1'b0;
    end else begin
      if (rd_frame_start && frame_ready && !reading && !rd_active) rd_active <= 1'b1;
      if (out_valid && out_ready) begin
        lane <= lane + 2'd1;
        opix <= out_eof ? '0 : opix + 1'b1;
        if (out_eof) rd_active <= 1'b0;
      end
    end
  end

  // AXI rules: a request is held until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_awvalid && !m_awready) |=> (m_awvalid && $stable(m_awaddr)))
    else $error("frame_buffer_ctrl: AW dropped");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_arvalid && !m_arready) |=> (m_arvalid && $stable(m_araddr)))
    else $error("frame_buffer_ctrl: AR dropped");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_wvalid && !m_wready) |=> (m_wvalid && $stable(m_wdata)))
    else $error("frame_buffer_ctrl: W dropped");
endmodule
