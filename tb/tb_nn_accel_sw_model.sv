// tb_nn_accel_sw_model: the accelerator configured as the four-layer software
// model of the classifier, 784 -> 30 -> 30 -> 343 -> 343, with sigmoid in every
// layer, 12-bit Q1.11 data and a 2**5-entry sigmoid table. It has 746 neurons
// against the 250 of the default build, and is reached only through the
// top-level parameters; layer sizes and the sigmoid activation follow the
// software model, the data format follows the default build.
//
// The testbench drives the AXI4-Lite port as a host would: release the soft
// reset, load all 152,359 weights and 746 biases layer by layer, then for each
// image write the 784 samples, wait for the interrupt and read STATUS, OUTPUT
// and CHAR. Images are synthetic grayscale pictures (strokes along random rows
// and columns) quantised to Q1.11. Weights are random; in the layers after the
// first, each neuron's weights are shifted to sum to about zero so that the
// outputs depend on the image. The bit-accurate reference model computes the
// four layers in turn and the argmax (lowest index on ties). The cycle count
// from the last sample to the interrupt is checked against
// 5 + sum over layers 2..4 of (previous layer size + 6) + 343 + 2 clocks, and
// a failure is counted if no neuron ever reaches the top table entry.
module tb_nn_accel_sw_model;
  import nn_model_pkg::*;
  import nn_pkg::*;

  localparam int NI = 784;
  localparam int NL = 4;
  localparam int unsigned LN [NL] = '{30, 30, 343, 343};
  localparam act_e LA [NL] = '{ACT_SIGMOID, ACT_SIGMOID, ACT_SIGMOID, ACT_SIGMOID};
  localparam int NC = 343;
  localparam int D  = 12;
  localparam int IMAGES = 3;
  // clocks from the edge accepting the last sample to the completion flag
  localparam int LATENCY = 5 + (30 + 6) + (30 + 6) + (343 + 6) + NC + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic irq;

  int checks = 0, failures = 0, acc_sat = 0, act_sat = 0;

  axil_if #(.AW(REG_ADDR_W), .DW(REG_DATA_W)) bus (.clk);

  nn_accel #(
    .N_LAYERS(NL), .NUM_INPUT(NI), .LAYER_NEURONS(LN), .LAYER_ACT(LA)
  ) dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awprot(bus.awprot), .s_axi_awvalid(bus.awvalid),
    .s_axi_awready(bus.awready), .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb),
    .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp),
    .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr),
    .s_axi_arprot(bus.arprot), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid),
    .s_axi_rready(bus.rready), .irq);

  int cyc = 0, last_wr = 0, irq_rise = 0;
  logic irq_d = 1'b0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    irq_d <= irq;
    if (bus.wvalid && bus.wready && bus.awaddr == REG_INPUT) last_wr <= cyc;
    if (irq && !irq_d) irq_rise <= cyc;
  end

  // W[l][j][i]: weight i of neuron j in layer l (layer l = 0 is register layer 1)
  longint W [NL][][];
  longint B [NL][];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // Grayscale [0,255] -> [-1,1] -> Q1.11, saturated.
  function automatic longint quantise(int p);
    real r;
    longint q;
    r = (real'(p) / 255.0) * 2.0 - 1.0;
    q = longint'($floor(r * 2048.0 + 0.5));
    if (q > 2047) q = 2047;
    if (q < -2048) q = -2048;
    return q;
  endfunction

  longint x[], y[];
  logic [31:0] d;
  int exp_idx, fan_in, top_entries = 0;
  int rp, rq, cp, cq;
  longint best, top_val;

  initial begin
    bus.idle();
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    bus.write(REG_CTRL, 0);
    fan_in = NI;
    for (int l = 0; l < NL; l++) begin
      int span;
      longint wsum;
      // weight range per layer (in LSBs) chosen so that the sums spread over
      // the sigmoid table's input range for every fan-in
      span = (l == 0) ? 256 : (l == NL - 1) ? 192 : 1024;
      W[l] = new[LN[l]];
      B[l] = new[LN[l]];
      bus.write(REG_LAYER, 32'(l + 1));
      for (int j = 0; j < int'(LN[l]); j++) begin
        W[l][j] = new[fan_in];
        bus.write(REG_NEURON, 32'(j));
        wsum = 0;
        for (int i = 0; i < fan_in; i++) begin
          W[l][j][i] = longint'($urandom_range(0, 2 * span - 1)) - span;
          wsum += W[l][j][i];
        end
        // layers after the first: remove each neuron's mean weight, so that
        // the outputs depend on the image rather than on a fixed offset per
        // neuron (their inputs are sigmoid outputs, all positive)
        if (l > 0)
          for (int i = 0; i < fan_in; i++) W[l][j][i] -= wsum / fan_in;
        for (int i = 0; i < fan_in; i++) bus.write(REG_WEIGHT, 32'(W[l][j][i]));
        B[l][j] = (l > 0) ? longint'($urandom_range(0, 63)) - 32
                          : longint'($urandom_range(0, 511)) - 256;
        bus.write(REG_BIAS, 32'(B[l][j]));
      end
      fan_in = int'(LN[l]);
    end
    $display("weights loaded at cycle %0d", cyc);
    top_val = sigmoid_entry((1 << (SIGMOID_SIZE_DEF - 1)) - 1, D, SIGMOID_SIZE_DEF,
                            WEIGHT_INT_W_DEF + INPUT_INT_W_DEF, D - 1);
    for (int t = 0; t < IMAGES; t++) begin
      x = new[NI];
      // bright strokes along randomly chosen rows and columns
      rp = $urandom_range(3, 9); rq = $urandom_range(0, rp - 1);
      cp = $urandom_range(3, 9); cq = $urandom_range(0, cp - 1);
      for (int i = 0; i < NI; i++) begin
        int r, c;
        r = i / 28; c = i % 28;
        x[i] = quantise((r % rp == rq || c % cp == cq)
                        ? 190 + int'($urandom_range(0, 65)) : int'($urandom_range(0, 50)));
      end
      for (int i = 0; i < NI; i++) bus.write(REG_INPUT, 32'(x[i]) & 32'hFFFF);
      // reference: the four layers in turn, then the argmax
      fan_in = NI;
      for (int l = 0; l < NL; l++) begin
        y = new[LN[l]];
        for (int j = 0; j < int'(LN[l]); j++) begin
          y[j] = neuron_ref(x, W[l][j], B[l][j], fan_in, D, 1'b1, SIGMOID_SIZE_DEF,
                            WEIGHT_INT_W_DEF, INPUT_INT_W_DEF, acc_sat, act_sat);
          if (y[j] == top_val) top_entries++;
        end
        x = y;
        fan_in = int'(LN[l]);
      end
      exp_idx = 0; best = x[0];
      for (int j = 1; j < NC; j++) if (x[j] > best) begin best = x[j]; exp_idx = j; end
      while (!irq) @(negedge clk);
      @(negedge clk);
      // data handshake -> register strobe -> sample accepted (+2), network and
      // hardmax (LATENCY), recorded on the next clock (+1)
      check($sformatf("image %0d latency", t), irq_rise - last_wr, 2 + LATENCY + 1);
      bus.read(REG_STATUS, d);
      check("status done", d, 1);
      bus.read(REG_OUTPUT, d);
      check($sformatf("image %0d class", t), d, exp_idx);
      bus.read(REG_CHAR, d);
      check($sformatf("image %0d character", t), d, 'h1200 + exp_idx);
      bus.read(REG_STATUS, d);
      check("status cleared by read", d, 0);
      $display("image %0d: class %0d (max activation %0d)", t, exp_idx, best);
    end
    check("bus responses", longint'(bus.resp_errors), 0);
    if (top_entries == 0) begin
      failures++;
      $display("FAIL no neuron reached the top of the sigmoid table");
    end
    $display("sigmoid_top_entries=%0d accumulator_saturation=%0d", top_entries, acc_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
