// tb_nn_accel_full: the accelerator at its default size (784 inputs, one layer
// of 250 ReLU neurons, argmax, Q1.11), driven through the AXI4-Lite port as
// the host program drives it: release the soft reset, load all 196,000
// weights and 250 biases, then for each image write the 784 samples, wait for
// the interrupt, read STATUS (read-to-clear), OUTPUT and CHAR. Images are
// synthetic 8-bit grayscale pictures mapped from [0, 255] to [-1, 1] and
// quantised to Q1.11 with saturation; weights are random in [-1/64, 1/64).
// Results are compared with the bit-accurate reference model, and the cycle
// count from the last sample to the interrupt is checked.
module tb_nn_accel_full;
  import nn_model_pkg::*;
  import nn_pkg::*;

  localparam int NI = 784;
  localparam int NN = 250;
  localparam int D  = 12;
  localparam int IMAGES = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic irq;

  int checks = 0, failures = 0, acc_sat = 0, act_sat = 0;

  axil_if #(.AW(REG_ADDR_W), .DW(REG_DATA_W)) bus (.clk);

  nn_accel dut (
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

  longint W [NN][];
  longint B [NN];

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

  longint img[];
  longint y;
  logic [31:0] d;
  int exp_idx;
  longint best;

  initial begin
    bus.idle();
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    bus.read(REG_CTRL, d);
    check("soft reset set after reset", d, 1);
    bus.write(REG_CTRL, 0);
    bus.write(REG_LAYER, 1);
    for (int j = 0; j < NN; j++) begin
      W[j] = new[NI];
      bus.write(REG_NEURON, 32'(j));
      for (int i = 0; i < NI; i++) begin
        W[j][i] = longint'($urandom_range(0, 63)) - 32;
        bus.write(REG_WEIGHT, 32'(W[j][i]));
      end
      B[j] = longint'($urandom_range(0, 63)) - 32;
      bus.write(REG_BIAS, 32'(B[j]));
    end
    $display("weights loaded at cycle %0d", cyc);
    img = new[NI];
    for (int t = 0; t < IMAGES; t++) begin
      // a bright stroke pattern on a dark background, different per image
      for (int i = 0; i < NI; i++) begin
        int r, c;
        r = i / 28; c = i % 28;
        img[i] = quantise(((r + t * 3) % 7 == 0 || (c * (t + 1)) % 9 == 0)
                          ? 200 + int'($urandom_range(0, 55)) : int'($urandom_range(0, 40)));
      end
      exp_idx = 0; best = 0;
      for (int j = 0; j < NN; j++) begin
        y = neuron_ref(img, W[j], B[j], NI, D, 1'b0, SIGMOID_SIZE_DEF,
                       WEIGHT_INT_W_DEF, INPUT_INT_W_DEF, acc_sat, act_sat);
        if (j == 0 || y > best) begin best = y; exp_idx = j; end
      end
      for (int i = 0; i < NI; i++) bus.write(REG_INPUT, 32'(img[i]) & 32'hFFFF);
      while (!irq) @(negedge clk);
      @(negedge clk);
      // data handshake -> register strobe -> sample accepted (+2), neuron (+5),
      // hardmax (+NN), completion flag (+2), recorded on the next clock (+1)
      check($sformatf("image %0d latency", t), irq_rise - last_wr, 2 + 5 + NN + 2 + 1);
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
    $display("relu_saturation=%0d accumulator_saturation=%0d", act_sat, acc_sat);
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
