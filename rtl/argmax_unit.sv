// argmax_unit: classifier at the output of the dense layer.
//
// The network ends in a softmax. Softmax is monotonic, so the most probable
// class is the one with the largest raw score, and the hardware only needs a
// running maximum; computing the probabilities themselves (exponentials and a
// division) is left out, which is this design's choice. Scores arrive as a
// stream (valid, class index, signed score) after a clear pulse; on a tie the
// lower index wins. The result is valid from the cycle after the last score.
module argmax_unit
  import cnn_pkg::*;
#(
  parameter int unsigned IDX_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  acc_t             in_score,
  output logic [IDX_W-1:0] best_idx,
  output acc_t             best_score,
  output logic             any_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_idx   <= '0;
      best_score <= '0;
      any_valid  <= 1'b0;
    end else if (clear) begin
      best_idx   <= '0;
      best_score <= '0;
      any_valid  <= 1'b0;
    end else if (in_valid && (!any_valid || in_score > best_score)) begin
      best_idx   <= in_idx;
      best_score <= in_score;
      any_valid  <= 1'b1;
    end
  end
endmodule
