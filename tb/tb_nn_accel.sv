// tb_nn_accel: end-to-end test of the accelerator through its AXI4-Lite port,
// at reduced size: 16 inputs, three layers of 8 (sigmoid), 6 (ReLU) and 5
// (ReLU) neurons, so that both activations and both inter-layer streamers are
// used. The host model releases the soft reset, loads every weight and bias,
// then classifies a series of images: it writes the samples, waits for the
// interrupt, checks the read-to-clear STATUS flag, and compares OUTPUT and
// CHAR with a bit-accurate reference model of the whole network. It also
// aborts one image half way with the soft reset and repeats it, and checks
// the cycle count from the last input sample to the interrupt.
// Each mechanism (accumulator and ReLU saturation, sigmoid lookup, layer
// streaming, soft reset abort, read-to-clear, interrupt) is counted and must
// occur at least once.
module tb_nn_accel;
  import nn_model_pkg::*;
  import nn_pkg::*;

  localparam int NL = 3;
  localparam int NI = 16;
  localparam int unsigned LN [NL] = '{8, 6, 5};
  localparam act_e        LA [NL] = '{ACT_SIGMOID, ACT_RELU, ACT_RELU};
  localparam int D = 12;
  localparam int IMAGES = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic irq;

  int checks = 0, failures = 0;

  axil_if #(.AW(REG_ADDR_W), .DW(REG_DATA_W)) bus (.clk);

  nn_accel #(
    .N_LAYERS(NL), .NUM_INPUT(NI), .LAYER_NEURONS(LN), .LAYER_ACT(LA), .DATA_W(D)
  ) dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awprot(bus.awprot), .s_axi_awvalid(bus.awvalid),
    .s_axi_awready(bus.awready), .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb),
    .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp),
    .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr),
    .s_axi_arprot(bus.arprot), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid),
    .s_axi_rready(bus.rready), .irq);

  // Mechanism counters
  int acc_sat = 0, act_sat = 0, sig_used = 0, streamed = 0, aborts = 0;
  int rtc_seen = 0, irq_seen = 0;

  int cyc = 0, last_in = 0, irq_rise = 0;
  logic irq_d = 1'b0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    irq_d <= irq;
    if (dut.stream_valid[0]) last_in <= cyc;
    if (irq && !irq_d) begin irq_rise <= cyc; irq_seen <= irq_seen + 1; end
    if (rst_n && (dut.stream_valid[1] || dut.stream_valid[2])) streamed <= streamed + 1;
  end

  longint W [NL][][];
  longint B [NL][];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int fan_in(int l);
    return (l == 0) ? NI : int'(LN[l-1]);
  endfunction

  // Reference classification of one image.
  function automatic int classify(longint img[]);
    longint x[], y[];
    longint best;
    int idx;
    x = img;
    for (int l = 0; l < NL; l++) begin
      y = new[LN[l]];
      for (int j = 0; j < int'(LN[l]); j++) begin
        y[j] = neuron_ref(x, W[l][j], B[l][j], fan_in(l), D, LA[l] == ACT_SIGMOID,
                          SIGMOID_SIZE_DEF, WEIGHT_INT_W_DEF, INPUT_INT_W_DEF, acc_sat, act_sat);
        if (LA[l] == ACT_SIGMOID) sig_used++;
      end
      x = y;
    end
    idx = 0; best = x[0];
    for (int j = 1; j < x.size(); j++) if (x[j] > best) begin best = x[j]; idx = j; end
    return idx;
  endfunction

  task automatic load_network();
    for (int l = 0; l < NL; l++) begin
      W[l] = new[LN[l]];
      B[l] = new[LN[l]];
      bus.write(REG_LAYER, 32'(l + 1));
      for (int j = 0; j < int'(LN[l]); j++) begin
        W[l][j] = new[fan_in(l)];
        bus.write(REG_NEURON, 32'(j));
        for (int i = 0; i < fan_in(l); i++) begin
          W[l][j][i] = sx($urandom, D);
          bus.write(REG_WEIGHT, 32'(W[l][j][i]));
        end
        B[l][j] = sx($urandom, D) / 4;
        bus.write(REG_BIAS, 32'(B[l][j]));
      end
    end
  endtask

  task automatic run_image(longint img[], int n_send);
    for (int i = 0; i < n_send; i++) bus.write(REG_INPUT, 32'(img[i]) & 32'hFFFF);
  endtask

  longint img[];
  logic [31:0] d;
  int exp_idx, exp_lat;

  initial begin
    bus.idle();
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    bus.read(REG_CTRL, d);
    check("soft reset set after reset", d, 1);
    bus.write(REG_CTRL, 0);
    load_network();
    // cycles from the last accepted sample to the interrupt
    exp_lat = 5;
    for (int l = 1; l < NL; l++) exp_lat += int'(LN[l-1]) + 6;
    exp_lat += int'(LN[NL-1]) + 2;
    exp_lat += 1;   // the interrupt edge is recorded on the following clock
    img = new[NI];
    for (int t = 0; t < IMAGES; t++) begin
      for (int i = 0; i < NI; i++) img[i] = sx($urandom, D);
      if (t == 3) begin
        // abort half way with the soft reset, then send the whole image
        run_image(img, NI / 2);
        bus.write(REG_CTRL, 1);
        bus.write(REG_CTRL, 0);
        aborts++;
        check("no completion after abort", irq, 0);
      end
      exp_idx = classify(img);
      run_image(img, NI);
      while (!irq) @(negedge clk);
      @(negedge clk);
      check($sformatf("image %0d latency", t), irq_rise - last_in, exp_lat);
      bus.read(REG_STATUS, d);
      check("status done", d, 1);
      bus.read(REG_OUTPUT, d);
      check($sformatf("image %0d class", t), d, exp_idx);
      bus.read(REG_CHAR, d);
      check($sformatf("image %0d character", t), d, 'h1200 + exp_idx);
      bus.read(REG_STATUS, d);
      check("status cleared by read", d, 0);
      check("irq cleared by read", irq, 0);
      if (d == 0) rtc_seen++;
    end
    check("bus responses", longint'(bus.resp_errors), 0);
    checks++;
    if (acc_sat == 0 || act_sat == 0 || sig_used == 0 || streamed == 0 || aborts == 0 ||
        rtc_seen == 0 || irq_seen == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    if (streamed != (IMAGES) * (int'(LN[0]) + int'(LN[1]))) begin
      failures++; $display("FAIL streamed %0d elements", streamed);
    end
    $display("mechanisms: accumulator_saturation=%0d relu_saturation=%0d sigmoid_lookups=%0d streamed_elements=%0d soft_reset_aborts=%0d read_to_clear=%0d interrupts=%0d",
             acc_sat, act_sat, sig_used, streamed, aborts, rtc_seen, irq_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
