// tb_max_finder: checks the sequential argmax on random signed vectors, on
// ties (the lowest index must win), with the maximum in the first and in the
// last lane, and the latency (o_valid NUM_INPUT clocks after the capture).
module tb_max_finder;
  localparam int N  = 7;
  localparam int D  = 12;
  localparam int IW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                rst, i_valid, o_valid;
  logic [N-1:0][D-1:0] i_data;
  logic [IW-1:0]       o_idx;

  max_finder #(.NUM_INPUT(N), .IN_W(D)) dut (.clk, .rst, .i_data, .i_valid, .o_idx, .o_valid);

  int cyc = 0, cap = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (i_valid) cap <= cyc;
  end

  task automatic run(logic [N-1:0][D-1:0] v);
    int exp_idx;
    longint best;
    exp_idx = 0; best = $signed(v[0]);
    for (int k = 1; k < N; k++)
      if (longint'($signed(v[k])) > best) begin best = $signed(v[k]); exp_idx = k; end
    @(negedge clk);
    i_data = v; i_valid = 1;
    @(negedge clk);
    i_valid = 0; i_data = '0;
    while (!o_valid) @(negedge clk);
    checks += 2;
    if (int'(o_idx) != exp_idx) begin failures++; $display("FAIL index %0d expected %0d", o_idx, exp_idx); end
    if (cyc - 1 - cap != N) begin failures++; $display("FAIL latency %0d", cyc - 1 - cap); end
    @(negedge clk);
    checks++;
    if (o_valid) begin failures++; $display("FAIL o_valid longer than one cycle"); end
  endtask

  logic [N-1:0][D-1:0] v;

  initial begin
    rst = 1; i_valid = 0; i_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < N; k++) v[k] = D'($urandom);
      run(v);
    end
    for (int k = 0; k < N; k++) v[k] = D'(100);
    run(v);                                   // all equal: index 0
    for (int k = 0; k < N; k++) v[k] = D'(k % 3);
    run(v);                                   // tie between 2 and 5: index 2
    for (int k = 0; k < N; k++) v[k] = D'(-5);
    v[N-1] = D'(-4);
    run(v);                                   // negative values, last lane
    for (int k = 0; k < N; k++) v[k] = D'(k);
    v[0] = D'(2047);
    run(v);                                   // first lane
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
