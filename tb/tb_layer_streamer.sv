// tb_layer_streamer: checks that a captured vector comes out element 0 first,
// one element per cycle with out_valid, exactly NUM_ELEM elements, that busy
// covers the replay, and that a new capture in the middle restarts the replay.
module tb_layer_streamer;
  localparam int E = 5;
  localparam int D = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                rst, in_valid, out_valid, busy;
  logic [E-1:0][D-1:0] in_data;
  logic [D-1:0]        out_data;

  layer_streamer #(.NUM_ELEM(E), .DATA_W(D)) dut (
    .clk, .rst, .in_data, .in_valid, .out_data, .out_valid, .busy);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  logic [E-1:0][D-1:0] v1, v2;

  initial begin
    rst = 1; in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("idle valid", out_valid, 0);
    check("idle busy", busy, 0);
    for (int k = 0; k < E; k++) begin v1[k] = D'($urandom); v2[k] = D'($urandom); end
    // full replay
    in_data = v1; in_valid = 1;
    @(negedge clk);
    in_valid = 0; in_data = '0;
    #1;
    for (int k = 0; k < E; k++) begin
      check($sformatf("valid %0d", k), out_valid, 1);
      check($sformatf("busy %0d", k), busy, 1);
      check($sformatf("element %0d", k), out_data, v1[k]);
      @(negedge clk);
    end
    check("valid after the last element", out_valid, 0);
    check("busy after the last element", busy, 0);
    repeat (2) @(negedge clk);
    // restart after two elements
    in_data = v1; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    repeat (2) @(negedge clk);
    in_data = v2; in_valid = 1;
    #1;
    check("no valid during capture", out_valid, 0);
    @(negedge clk);
    in_valid = 0;
    #1;
    for (int k = 0; k < E; k++) begin
      check($sformatf("restart element %0d", k), out_data, v2[k]);
      check($sformatf("restart valid %0d", k), out_valid, 1);
      @(negedge clk);
    end
    check("valid after restart", out_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
