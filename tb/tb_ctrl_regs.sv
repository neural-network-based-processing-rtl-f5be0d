// tb_ctrl_regs: checks the register bank on its strobe interface.
// Soft reset comes up set and clears when 0 is written; INPUT, WEIGHT and BIAS
// writes each give one single-cycle strobe with the written value; LAYER and
// NEURON read back; a completion sets STATUS, OUTPUT, CHAR and irq; reading
// STATUS returns the flag and clears it; a completion arriving in the same
// cycle as the clearing read is kept.
module tb_ctrl_regs;
  import nn_pkg::*;
  localparam int D = 12;
  localparam int IW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                  rst_n, wr_en, rd_en;
  logic [REG_ADDR_W-1:0] wr_addr, rd_addr;
  logic [REG_DATA_W-1:0] wr_data, rd_data;
  logic                  soft_reset, in_valid, weight_valid, bias_valid, result_valid, irq;
  logic [D-1:0]          in_data;
  logic [31:0]           weight_value, bias_value, cfg_layer, cfg_neuron;
  logic [IW-1:0]         result_idx;
  logic [20:0]           result_char;

  ctrl_regs #(.DATA_W(D), .IDX_W(IW)) dut (.*);

  int in_pulses = 0, w_pulses = 0, b_pulses = 0;
  always_ff @(posedge clk) begin
    if (in_valid) in_pulses <= in_pulses + 1;
    if (weight_valid) w_pulses <= w_pulses + 1;
    if (bias_valid) b_pulses <= b_pulses + 1;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic wr(logic [REG_ADDR_W-1:0] a, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  // Read: returns the value presented during the strobe cycle.
  task automatic rd(logic [REG_ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    rd_en = 1; rd_addr = a;
    #1 d = rd_data;
    @(negedge clk);
    rd_en = 0;
  endtask

  logic [31:0] d;
  int p;

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    result_valid = 0; result_idx = 0; result_char = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("soft reset after power-up", soft_reset, 1);
    rd(REG_CTRL, d);   check("CTRL reads 1", d, 1);
    wr(REG_CTRL, 0);   check("soft reset released", soft_reset, 0);
    // input sample strobe
    p = in_pulses;
    wr(REG_INPUT, 32'h0000_F801);
    check("input data", in_data, 12'h801);
    @(negedge clk);
    check("one input strobe", in_pulses - p, 1);
    // weight and bias strobes
    p = w_pulses;
    wr(REG_WEIGHT, 32'h0000_0ABC);
    check("weight value", weight_value, 32'h0ABC);
    @(negedge clk);
    check("one weight strobe", w_pulses - p, 1);
    p = b_pulses;
    wr(REG_BIAS, 32'hFFFF_F123);
    check("bias value", bias_value, 32'hFFFF_F123);
    @(negedge clk);
    check("one bias strobe", b_pulses - p, 1);
    wr(REG_LAYER, 3);  wr(REG_NEURON, 17);
    rd(REG_LAYER, d);  check("layer", d, 3);
    rd(REG_NEURON, d); check("neuron", d, 17);
    check("cfg outputs", {cfg_layer[7:0], cfg_neuron[7:0]}, {8'd3, 8'd17});
    // completion
    rd(REG_STATUS, d); check("status idle", d, 0);
    check("irq idle", irq, 0);
    @(negedge clk);
    result_valid = 1; result_idx = 8'd42; result_char = 21'h122A;
    @(negedge clk);
    result_valid = 0;
    check("irq on completion", irq, 1);
    rd(REG_OUTPUT, d); check("prediction", d, 42);
    rd(REG_CHAR, d);   check("character", d, 32'h122A);
    rd(REG_STATUS, d); check("status done", d, 1);
    check("irq cleared by the read", irq, 0);
    rd(REG_STATUS, d); check("status cleared", d, 0);
    // completion in the same cycle as the clearing read
    @(negedge clk);
    result_valid = 1; result_idx = 8'd7;
    @(negedge clk);
    result_valid = 1; result_idx = 8'd9; rd_en = 1; rd_addr = REG_STATUS;
    @(negedge clk);
    result_valid = 0; rd_en = 0;
    check("completion kept over the clearing read", irq, 1);
    rd(REG_OUTPUT, d); check("latest prediction", d, 9);
    rd(REG_STATUS, d); check("status still set", d, 1);
    rd(REG_STATUS, d); check("status now clear", d, 0);
    // soft reset can be set again, unmapped reads are 0
    wr(REG_CTRL, 1);   check("soft reset set", soft_reset, 1);
    rd(8'h3C, d);      check("unmapped read", d, 0);
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
