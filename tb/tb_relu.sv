// tb_relu: checks the ReLU activation against min(x >> (D-W), 2**(D-1)-1)
// for non-negative x and 0 for negative x, at two integer widths, including
// the saturation boundary, and checks its one-cycle latency.
module tb_relu;
  import nn_model_pkg::*;
  localparam int D = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0, neg_seen = 0, dummy = 0;

  logic [2*D-1:0] x;
  logic [D-1:0]   out1, out2;

  relu #(.DATA_W(D), .WEIGHT_INT_W(1)) dut1 (.clk, .x, .out(out1));
  relu #(.DATA_W(D), .WEIGHT_INT_W(2)) dut2 (.clk, .x, .out(out2));

  task automatic apply(longint v);
    longint xs, e1, e2;
    int s1;
    x = (2*D)'(v);
    xs = sx(v, 2*D);
    s1 = 0;
    e1 = relu_ref(xs, D, 1, s1);
    e2 = relu_ref(xs, D, 2, dummy);
    if (s1 != 0) sat_seen++;
    if (xs < 0) neg_seen++;
    @(negedge clk);
    checks += 2;
    if (longint'(out1) != e1) begin failures++; $display("FAIL W=1 x=%0d got %0d exp %0d", xs, out1, e1); end
    if (longint'(out2) != e2) begin failures++; $display("FAIL W=2 x=%0d got %0d exp %0d", xs, out2, e2); end
  endtask

  initial begin
    x = '0;
    @(negedge clk);
    apply(0);
    apply(1 << 11);             // 1 LSB of the output
    apply((1 << 22) - 1);       // largest value that fits for W=1
    apply(1 << 22);             // first saturating value for W=1
    apply((1 << 23) - 1);       // largest accumulator
    apply(-1);
    apply(-(1 << 23));
    apply(12345);
    for (int i = 0; i < 300; i++) apply(longint'($urandom));
    // latency: output must not change before the clock edge
    x = (2*D)'(1 << 20);
    #1;
    checks++;
    if (out1 == D'(1 << 9)) begin failures++; $display("FAIL output is not registered"); end
    @(negedge clk);
    checks++;
    if (out1 != D'(1 << 9)) begin failures++; $display("FAIL registered value %0d", out1); end
    checks++;
    if (sat_seen == 0 || neg_seen == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
