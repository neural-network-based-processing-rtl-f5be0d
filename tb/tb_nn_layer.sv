// tb_nn_layer: checks a layer of 4 ReLU neurons with 6 inputs each.
// Loads distinct weights and biases into every neuron through the broadcast
// configuration port, streams several input vectors (with and without gaps)
// and compares the whole output vector with the reference model; checks that
// out_valid pulses once per vector, 5 clocks after the last sample.
module tb_nn_layer;
  import nn_model_pkg::*;
  import nn_pkg::*;
  localparam int M = 4;
  localparam int N = 6;
  localparam int D = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, acc_sat = 0, act_sat = 0, pulses = 0;

  logic                 rst, in_valid, weight_valid, bias_valid;
  logic [D-1:0]         in_data;
  logic [31:0]          weight_value, bias_value, cfg_layer, cfg_neuron;
  logic [M-1:0][D-1:0]  out_data;
  logic                 out_valid;

  nn_layer #(.LAYER_NO(1), .NUM_NEURON(M), .NUM_WEIGHT(N), .DATA_W(D), .ACT(ACT_RELU)) dut (
    .clk, .rst, .in_data, .in_valid, .weight_valid, .bias_valid, .weight_value, .bias_value,
    .cfg_layer, .cfg_neuron, .out_data, .out_valid);

  int cyc = 0, last_in = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) last_in <= cyc;
    if (out_valid) pulses <= pulses + 1;
  end

  longint w[M][];
  longint b[M];
  longint x[] = new[N];

  initial begin
    rst = 1; in_valid = 0; in_data = 0; weight_valid = 0; bias_valid = 0;
    weight_value = 0; bias_value = 0; cfg_layer = 1; cfg_neuron = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < M; j++) begin
      w[j] = new[N];
      cfg_neuron = 32'(j);
      for (int i = 0; i < N; i++) begin
        w[j][i] = sx($urandom, D);
        weight_value = 32'(w[j][i]); weight_valid = 1;
        @(negedge clk);
        weight_valid = 0;
      end
      b[j] = sx($urandom_range(0, 400), D) - 200;
      bias_value = 32'(b[j]); bias_valid = 1;
      @(negedge clk);
      bias_valid = 0;
    end
    for (int v = 0; v < 8; v++) begin
      int p0;
      longint e;
      p0 = pulses;
      for (int i = 0; i < N; i++) x[i] = (v < 6) ? sx($urandom, D) : 2047;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_data = D'(x[i]); in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        repeat (v % 3) @(negedge clk);
      end
      while (!out_valid) @(negedge clk);
      checks++;
      if (cyc - 1 - last_in != 5) begin failures++; $display("FAIL latency %0d", cyc - 1 - last_in); end
      for (int j = 0; j < M; j++) begin
        e = neuron_ref(x, w[j], b[j], N, D, 1'b0, 5, 1, 1, acc_sat, act_sat);
        checks++;
        if (longint'(out_data[j]) != e) begin
          failures++; $display("FAIL vector %0d neuron %0d: got %0d expected %0d", v, j, out_data[j], e);
        end
      end
      @(negedge clk);
      checks++;
      if (pulses - p0 != 1) begin failures++; $display("FAIL %0d out_valid pulses", pulses - p0); end
    end
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
