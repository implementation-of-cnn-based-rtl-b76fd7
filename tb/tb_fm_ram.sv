// tb_fm_ram: self-checking test of the fm_ram memory at its full size.
//
// Fills every word with a pseudo-random pattern, reads all of them back in a
// shuffled order while writing other words, and checks the data that appears
// one cycle after each read (the read latency of the memory) and that a read
// without its enable keeps the previous output.
`timescale 1ns/1ps
module tb_fm_ram;
  localparam int unsigned DEPTH = 3136;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  fm_ram dut (.*);

  function automatic logic [WIDTH-1:0] pat(int a, int salt);
    logic [63:0] v = {32'(a * 32'h9E3779B1 + salt), 32'(a ^ (salt * 7919))};
    return WIDTH'(v);
  endfunction

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = pat(a, 1); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 3 * DEPTH; n++) begin
      int a, b;
      a = $urandom_range(0, DEPTH - 1);
      b = $urandom_range(0, DEPTH - 1);
      re = 1; raddr = AW'(a);
      we = (b != a); waddr = AW'(b); wdata = pat(b, n + 2);
      @(negedge clk);
      if (we) model[b] = wdata;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
      we = 0; re = 0; raddr = AW'(b);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL hold addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
