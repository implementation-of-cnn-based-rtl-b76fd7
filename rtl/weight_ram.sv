// weight_ram: kernel store of the CNN processor.
//
// Holds the 4676 fixed-point weights of the network (no bias terms) as 617
// words of PAR = 8 signed bytes; one word feeds the eight kernels that the
// convolution engine computes in parallel (layout in cnn_pkg). The weights are
// trained off-line and written once through the load port; reads have one
// cycle of latency. Contents are not reset.
module weight_ram #(
  parameter int unsigned DEPTH = cnn_pkg::W_DEPTH,
  parameter int unsigned WIDTH = cnn_pkg::W_WORD,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
