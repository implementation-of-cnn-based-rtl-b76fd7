// cnn_core: the CNN processor for 28x28 handwritten-digit images.
//
// Instead of one hardware stage per network layer, a single convolution engine
// (3x3 kernels, 8 kernels in parallel, also used for the dense layer as a 1x1
// convolution) and a single max-pooling engine are reused for all ten steps of
// the network. A small sequencer walks the layer table of cnn_pkg, hands each
// step's shape to the engine that runs it and switches the two feature-map
// buffers between source and destination (ping-pong) after every step:
//
//   conv1 A->B, conv2 B->A, pool1 A->B, conv3 B->A, conv4 A->B,
//   pool2 B->A, conv5 A->B, conv6 B->A, global pool A->B, dense B->(A, classifier)
//
// The scores of the dense layer go to an arg-max unit, which stands in for the
// final softmax; its winner is the recognised class (0..10).
//
// Interface:
//   img_*   writes the 28x28 input image (one byte per pixel, row-major) into
//           buffer A; only while the core is idle.
//   wld_*   writes the weight memory (layout in cnn_pkg); only while idle.
//   start   one-cycle pulse; busy stays high during the run, done pulses once
//           when class_idx/class_score are valid. They stay valid until the
//           next start.
//   layer   index of the step being run (for observation).
// One image takes about 83,200 cycles (sum of the engines' cycle counts plus
// two cycles per step for the sequencer).
module cnn_core
  import cnn_pkg::*;
#(
  parameter int unsigned QSHIFT = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              img_we,
  input  logic [FM_AW-1:0]  img_addr,
  input  act_t              img_data,
  input  logic              wld_we,
  input  logic [W_AW-1:0]   wld_addr,
  input  logic [W_WORD-1:0] wld_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [3:0]        layer,
  output logic [3:0]        class_idx,
  output acc_t              class_score
);
  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_e;
  state_e     state;
  layer_cfg_t cfg;
  assign cfg = layer_table(32'(layer));

  logic conv_start, conv_busy, conv_done;
  logic pool_start, pool_busy, pool_done;

  assign conv_start = (state == S_LAUNCH) && (cfg.kind == L_CONV);
  assign pool_start = (state == S_LAUNCH) && (cfg.kind == L_POOL);
  wire step_done = conv_done || pool_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      layer <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:   if (start) begin
                    layer <= '0;
                    state <= S_LAUNCH;
                  end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT:   if (step_done) begin
                    if (32'(layer) == NUM_LAYERS - 1) begin
                      state <= S_IDLE;
                      done  <= 1'b1;
                    end else begin
                      layer <= layer + 4'd1;
                      state <= S_LAUNCH;
                    end
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

  // ---------------- engines ----------------
  logic              c_rd_en, c_w_en, c_wr_en, c_sv;
  logic [FM_AW-1:0]  c_rd_addr, c_wr_addr;
  logic [W_AW-1:0]   c_w_addr;
  act_t              c_wr_data, fm_rd_data;
  logic [W_WORD-1:0] w_rd_data;
  logic [5:0]        c_sch;
  acc_t              c_score;

  conv_engine #(.QSHIFT(QSHIFT)) u_conv (
    .clk, .rst_n, .start(conv_start), .cfg, .busy(conv_busy), .done(conv_done),
    .rd_en(c_rd_en), .rd_addr(c_rd_addr), .rd_data(fm_rd_data),
    .w_en(c_w_en), .w_addr(c_w_addr), .w_data(w_rd_data),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_data(c_wr_data),
    .score_valid(c_sv), .score_ch(c_sch), .score(c_score)
  );

  logic             p_rd_en, p_wr_en;
  logic [FM_AW-1:0] p_rd_addr, p_wr_addr;
  act_t             p_wr_data;

  pool_engine u_pool (
    .clk, .rst_n, .start(pool_start), .cfg, .busy(pool_busy), .done(pool_done),
    .rd_en(p_rd_en), .rd_addr(p_rd_addr), .rd_data(fm_rd_data),
    .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_data(p_wr_data)
  );

  // ---------------- buffer switching ----------------
  logic             e_rd_en, e_wr_en;
  logic [FM_AW-1:0] e_rd_addr, e_wr_addr;
  act_t             e_wr_data;

  always_comb begin
    if (cfg.kind == L_CONV) begin
      e_rd_en = c_rd_en; e_rd_addr = c_rd_addr;
      e_wr_en = c_wr_en; e_wr_addr = c_wr_addr; e_wr_data = c_wr_data;
    end else begin
      e_rd_en = p_rd_en; e_rd_addr = p_rd_addr;
      e_wr_en = p_wr_en; e_wr_addr = p_wr_addr; e_wr_data = p_wr_data;
    end
  end

  logic             a_we, b_we;
  logic [FM_AW-1:0] a_waddr;
  act_t             a_wdata, a_rdata, b_rdata;

  always_comb begin
    if (busy) begin
      a_we    = e_wr_en && cfg.src_b;
      a_waddr = e_wr_addr;
      a_wdata = e_wr_data;
    end else begin
      a_we    = img_we;
      a_waddr = img_addr;
      a_wdata = img_data;
    end
  end
  assign b_we = busy && e_wr_en && !cfg.src_b;

  fm_ram u_buf_a (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .re(e_rd_en && !cfg.src_b), .raddr(e_rd_addr), .rdata(a_rdata)
  );
  fm_ram u_buf_b (
    .clk, .we(b_we), .waddr(e_wr_addr), .wdata(e_wr_data),
    .re(e_rd_en && cfg.src_b), .raddr(e_rd_addr), .rdata(b_rdata)
  );
  assign fm_rd_data = cfg.src_b ? b_rdata : a_rdata;

  weight_ram u_wgt (
    .clk, .we(wld_we && !busy), .waddr(wld_addr), .wdata(wld_data),
    .re(c_w_en), .raddr(c_w_addr), .rdata(w_rd_data)
  );

  // ---------------- classifier ----------------
  logic [5:0] best;
  logic       best_any;
  argmax_unit u_argmax (
    .clk, .rst_n, .clear(start && !busy),
    .in_valid(c_sv && cfg.final_layer), .in_idx(c_sch), .in_score(c_score),
    .best_idx(best), .best_score(class_score), .any_valid(best_any)
  );
  assign class_idx = best[3:0];

  assert property (@(posedge clk) disable iff (!rst_n) !(conv_busy && pool_busy))
    else $error("cnn_core: both engines active");
  assert property (@(posedge clk) disable iff (!rst_n) done |-> best_any)
    else $error("cnn_core: finished without a score");
endmodule
