// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits, a power-of-two depth. push writes when not
// full, pop removes the head when not empty; the head is visible on rdata
// whenever empty is low (first-word fall-through, read from a register array).
// count gives the number of stored entries. Reset empties it.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count = wp - rp;
  assign full  = (count == (AW + 1)'(DEPTH));
  assign empty = (count == '0);
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (push && !full) mem[wp[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");
endmodule
