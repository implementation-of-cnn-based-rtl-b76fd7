// tb_argmax_unit: self-checking test of the classifier.
//
// Streams 200 random sets of 11 signed scores (with forced ties in some sets)
// and compares the winning index and score with a direct search in which the
// lowest index wins a tie.
`timescale 1ns/1ps
module tb_argmax_unit;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, in_valid, any_valid;
  logic [5:0] in_idx, best_idx;
  acc_t in_score, best_score;

  argmax_unit dut (.*);

  initial begin
    clear = 0; in_valid = 0; in_idx = 0; in_score = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      acc_t sc [11];
      int bi;
      for (int i = 0; i < 11; i++) sc[i] = acc_t'($urandom) >>> $urandom_range(0, 24);
      if (t % 4 == 0) sc[$urandom_range(6, 10)] = sc[$urandom_range(0, 5)];
      bi = 0;
      for (int i = 1; i < 11; i++) if (sc[i] > sc[bi]) bi = i;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      checks++;
      if (any_valid) begin failures++; $display("FAIL valid after clear"); end
      for (int i = 0; i < 11; i++) begin
        in_valid = 1; in_idx = 6'(i); in_score = sc[i];
        @(negedge clk);
        in_valid = 0; in_score = acc_t'($urandom);
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
      checks++;
      if (!any_valid || best_idx != 6'(bi) || best_score != sc[bi]) begin
        failures++;
        $display("FAIL set %0d: got %0d/%0d exp %0d/%0d", t, best_idx, best_score, bi, sc[bi]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
