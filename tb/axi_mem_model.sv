// axi_mem_model: behavioural model of the external frame memory (the DDR3
// chip behind its vendor controller), seen as a 64-bit AXI4 slave.
//
// Not synthesizable design logic: a sparse word array with random
// back-pressure on every channel. It serves one write burst and one read burst
// at a time (INCR bursts only) and answers OKAY. Reads of never-written words
// return zero. Used only by testbenches.
module axi_mem_model #(
  parameter int unsigned READY_PCT = 70
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_awaddr,
  input  logic [7:0]  s_awlen,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [63:0] s_wdata,
  input  logic        s_wlast,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic [7:0]  s_arlen,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [63:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rlast,
  output logic        s_rvalid,
  input  logic        s_rready
);
  logic [63:0] mem [int unsigned];
  int unsigned n_wbursts = 0, n_rbursts = 0, lastfail = 0;

  logic        w_act, r_act;
  logic [31:0] w_addr, r_addr;
  logic [7:0]  w_left, r_left;

  function automatic bit coin();
    return $urandom_range(0, 99) < READY_PCT;
  endfunction

  function automatic logic [63:0] rd(logic [31:0] a);
    if (mem.exists(a >> 3)) return mem[a >> 3];
    return '0;
  endfunction

  assign s_bresp = 2'b00;
  assign s_rresp = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_awready <= 1'b0; s_wready <= 1'b0; s_bvalid <= 1'b0;
      s_arready <= 1'b0; s_rvalid <= 1'b0; s_rlast <= 1'b0; s_rdata <= '0;
      w_act <= 1'b0; r_act <= 1'b0;
      w_addr <= '0; r_addr <= '0; w_left <= '0; r_left <= '0;
    end else begin
      // write address
      s_awready <= !w_act && !s_bvalid && coin();
      if (s_awvalid && s_awready) begin
        w_act <= 1'b1; w_addr <= s_awaddr; w_left <= s_awlen;
        s_awready <= 1'b0;
      end
      s_wready <= w_act && coin();
      if (s_wvalid && s_wready && w_act) begin
        mem[w_addr >> 3] = s_wdata;
        w_addr <= w_addr + 32'd8;
        w_left <= w_left - 8'd1;
        if (s_wlast != (w_left == 8'd0)) lastfail <= lastfail + 1;
        if (w_left == 8'd0) begin
          w_act <= 1'b0; s_wready <= 1'b0; s_bvalid <= 1'b1;
          n_wbursts <= n_wbursts + 1;
        end
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      // read
      s_arready <= !r_act && coin();
      if (s_arvalid && s_arready) begin
        r_act <= 1'b1; r_addr <= s_araddr; r_left <= s_arlen;
        s_arready <= 1'b0;
        n_rbursts <= n_rbursts + 1;
      end
      if (r_act && (!s_rvalid || s_rready)) begin
        if (coin()) begin
          s_rvalid <= 1'b1;
          s_rdata  <= rd(r_addr);
          s_rlast  <= (r_left == 8'd0);
          r_addr   <= r_addr + 32'd8;
          r_left   <= r_left - 8'd1;
          if (r_left == 8'd0) r_act <= 1'b0;
        end else s_rvalid <= 1'b0;
      end else if (s_rvalid && s_rready) s_rvalid <= 1'b0;
    end
  end
endmodule
