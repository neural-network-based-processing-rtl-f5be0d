// tb_sig_rom: checks the sigmoid table for every index of the default
// 5-bit, Q1.11 configuration (values computed here from 1/(1+exp(-v)) and
// three worked by hand: index -16 -> v=-2 -> 244, index 0 -> 1024,
// index 15 -> v=1.875 -> 1776), monotonicity, and the one-cycle latency.
module tb_sig_rom;
  import nn_model_pkg::*;
  localparam int S = 5;
  localparam int D = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [S-1:0] x;
  logic [D-1:0] out, prev;

  sig_rom #(.IN_W(S), .DATA_W(D), .INT_BITS(2)) dut (.clk, .x, .out);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    x = '0;
    @(negedge clk);
    x = 5'b10000; @(negedge clk); check("index -16", out, 244);
    x = 5'b00000; @(negedge clk); check("index 0", out, 1024);
    x = 5'b01111; @(negedge clk); check("index 15", out, 1776);
    prev = '0;
    for (int i = -16; i < 16; i++) begin
      x = S'(i);
      @(negedge clk);
      check($sformatf("index %0d", i), out, sigmoid_entry(i, D, S, 2, D-1));
      checks++;
      if (out < prev) begin failures++; $display("FAIL not monotonic at %0d", i); end
      prev = out;
    end
    // latency
    x = 5'b10000;
    @(negedge clk);
    x = 5'b01111;
    #1;
    check("output holds before the edge", out, 244);
    @(negedge clk);
    check("output after the edge", out, 1776);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
