// tb_neuron: checks the streaming MAC neuron with both activations.
// Two neurons of layer 2 (ReLU as neuron 0, sigmoid as neuron 1) share the
// input stream. Weights and biases are loaded through the configuration port,
// with words addressed to other neurons interleaved that must be ignored.
// Vectors are streamed back to back and with gaps; results are compared with
// the reference model, including accumulator and ReLU saturation, and the
// out_valid pulse is checked to come exactly 5 clocks after the last sample.
// A third, never configured neuron takes its weights and bias from the files
// tb/weight_init.mem and tb/bias_init.mem (pretrained build) and must produce
// the model's result for those values on every vector.
module tb_neuron;
  import nn_model_pkg::*;
  import nn_pkg::*;
  localparam int N = 8;
  localparam int D = 12;
  localparam int LATENCY = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int acc_sat = 0, act_sat = 0, gaps = 0, vectors = 0;

  logic          rst, in_valid, weight_valid, bias_valid;
  logic [D-1:0]  in_data;
  logic [31:0]   weight_value, bias_value, cfg_layer, cfg_neuron;
  logic [D-1:0]  out0, out1, out2;
  logic          ov0, ov1, ov2;

  neuron #(.LAYER_NO(2), .NEURON_NO(0), .NUM_WEIGHT(N), .DATA_W(D), .ACT(ACT_RELU)) dut0 (
    .clk, .rst, .in_data, .in_valid, .weight_valid, .bias_valid, .weight_value, .bias_value,
    .cfg_layer, .cfg_neuron, .out(out0), .out_valid(ov0));
  neuron #(.LAYER_NO(2), .NEURON_NO(1), .NUM_WEIGHT(N), .DATA_W(D), .ACT(ACT_SIGMOID)) dut1 (
    .clk, .rst, .in_data, .in_valid, .weight_valid, .bias_valid, .weight_value, .bias_value,
    .cfg_layer, .cfg_neuron, .out(out1), .out_valid(ov1));
  neuron #(.LAYER_NO(9), .NEURON_NO(0), .NUM_WEIGHT(N), .DATA_W(D), .ACT(ACT_RELU),
           .WEIGHT_FILE("tb/weight_init.mem"), .BIAS_FILE("tb/bias_init.mem")) dut2 (
    .clk, .rst, .in_data, .in_valid, .weight_valid, .bias_valid, .weight_value, .bias_value,
    .cfg_layer, .cfg_neuron, .out(out2), .out_valid(ov2));

  // Cycle counter and the cycle of the last accepted sample.
  int cyc = 0, last_in = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) last_in <= cyc;
  end

  longint w0[] = new[N];
  longint w1[] = new[N];
  longint x[]  = new[N];
  longint b0, b1;
  // contents of the two preload files, as signed values
  longint wf[] = '{1, 2, 2047, -2048, -1, 1365, -1366, 240};
  longint bf = -100;

  task automatic cfg_word(int layer, int neuron, bit is_bias, longint v);
    @(negedge clk);
    cfg_layer = 32'(layer); cfg_neuron = 32'(neuron);
    if (is_bias) begin bias_value = 32'(v); bias_valid = 1; end
    else begin weight_value = 32'(v); weight_valid = 1; end
    @(negedge clk);
    weight_valid = 0; bias_valid = 0;
  endtask

  task automatic load(longint lo, longint hi);
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < N; i++) begin
      w0[i] = lo + longint'($urandom_range(0, 32'(hi - lo)));
      w1[i] = lo + longint'($urandom_range(0, 32'(hi - lo)));
      cfg_word(2, 0, 0, w0[i]);
      cfg_word(3, 0, 0, 1234);        // other layer: ignored
      cfg_word(2, 1, 0, w1[i]);
      cfg_word(2, 2, 0, -77);         // other neuron: ignored
    end
    b0 = sx($urandom, D); b1 = sx($urandom, D);
    cfg_word(2, 0, 1, b0);
    cfg_word(2, 1, 1, b1);
    cfg_word(2, 5, 1, 999);           // ignored
  endtask

  // Stream x, optionally with gaps, and check outputs and timing.
  task automatic run_vector(bit with_gaps);
    longint e0, e1, e2;
    e0 = neuron_ref(x, w0, b0, N, D, 1'b0, 5, 1, 1, acc_sat, act_sat);
    e1 = neuron_ref(x, w1, b1, N, D, 1'b1, 5, 1, 1, acc_sat, act_sat);
    e2 = neuron_ref(x, wf, bf, N, D, 1'b0, 5, 1, 1, acc_sat, act_sat);
    fork
      begin
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          in_data = D'(x[i]); in_valid = 1;
          @(negedge clk);
          in_valid = 0;
          if (with_gaps) begin
            gaps++;
            repeat (i % 4) @(negedge clk);   // gaps of 0 to 3 idle cycles
          end
        end
      end
      begin
        forever begin
          @(negedge clk);
          if (ov0 || ov1 || ov2) break;
        end
      end
    join
    checks += 5;
    if (!(ov0 && ov1 && ov2)) begin failures++; $display("FAIL outvalid not together"); end
    if (cyc - 1 - last_in != LATENCY) begin
      failures++; $display("FAIL latency %0d cycles", cyc - 1 - last_in);
    end
    if (longint'(out0) != e0) begin failures++; $display("FAIL relu out %0d exp %0d", out0, e0); end
    if (longint'(out1) != e1) begin failures++; $display("FAIL sigmoid out %0d exp %0d", out1, e1); end
    if (longint'(out2) != e2) begin failures++; $display("FAIL preloaded out %0d exp %0d", out2, e2); end
    @(negedge clk);
    checks++;
    if (ov0 || ov1 || ov2) begin failures++; $display("FAIL outvalid longer than one cycle"); end
    vectors++;
  endtask

  initial begin
    rst = 1; in_valid = 0; in_data = 0; weight_valid = 0; bias_valid = 0;
    weight_value = 0; bias_value = 0; cfg_layer = 0; cfg_neuron = 0;
    repeat (3) @(negedge clk);
    // moderate weights and inputs
    load(-600, 600);
    for (int v = 0; v < 6; v++) begin
      for (int i = 0; i < N; i++) x[i] = sx($urandom, D);
      run_vector(v[0]);
    end
    // large positive products: the accumulator saturates, ReLU saturates
    load(1500, 2047);
    for (int i = 0; i < N; i++) x[i] = 2047 - i;
    b0 = 0; b1 = 0;
    cfg_word(2, 0, 1, 0); cfg_word(2, 1, 1, 0);
    run_vector(1'b0);
    // large negative accumulation
    for (int i = 0; i < N; i++) x[i] = -2048;
    run_vector(1'b1);
    // small positive result below the saturation limit
    load(100, 300);
    for (int i = 0; i < N; i++) x[i] = longint'($urandom_range(0, 400));
    run_vector(1'b0);
    checks++;
    if (acc_sat == 0 || act_sat == 0 || gaps == 0) begin
      failures++; $display("FAIL coverage acc_sat=%0d act_sat=%0d gaps=%0d", acc_sat, act_sat, gaps);
    end
    $display("vectors=%0d accumulator_saturations=%0d relu_saturations=%0d gaps=%0d",
             vectors, acc_sat, act_sat, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
