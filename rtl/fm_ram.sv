// fm_ram: feature-map buffer of the CNN processor.
//
// A simple dual-port memory: one write port and one read port with a single
// cycle of read latency (the registered output of a block RAM). The processor
// holds two of them and alternates them as source and destination from layer
// to layer (ping-pong), so every layer runs out of on-chip memory. The default
// depth holds the largest feature map of the network, 28 x 28 x 4 bytes.
// Memory contents are not reset.
module fm_ram #(
  parameter int unsigned DEPTH = cnn_pkg::FM_DEPTH,
  parameter int unsigned WIDTH = cnn_pkg::ACT_W,
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
