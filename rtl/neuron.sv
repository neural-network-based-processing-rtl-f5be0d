// neuron: streaming multiply-accumulate neuron with bias and activation.
//
// Run time: the neuron receives NUM_WEIGHT input samples on `in_data`, each
// marked by `in_valid` (gaps between samples are allowed). For every sample it
// reads the matching weight from its own weight_memory (read address `r_addr`
// counts the samples), multiplies the signed sample by the signed weight into a
// 2*DATA_W-bit product and adds the product into the 2*DATA_W-bit accumulator
// `sum`. Every addition saturates: if both operands have the same sign and the
// result's sign differs, `sum` is clamped to the largest positive or most
// negative value. When the last product has been added, the bias (kept left
// shifted by DATA_W bits so it sits in the accumulator's scale) is added once,
// also saturating, and the result goes through the activation: relu, or
// sig_rom indexed by the top SIGMOID_SIZE bits of `sum`. `out_valid` pulses for
// one cycle with `out` valid, and the sample counter and accumulator clear.
//
// Pipeline (all from the source design): the sample is delayed one cycle to
// meet the synchronous weight read, the product is registered, and a valid
// chain (weight_valid -> mult_valid) marks when a product is ready. A falling
// edge detector on mult_valid, qualified by r_addr == NUM_WEIGHT, marks the
// end of the stream and triggers the bias add. This implementation also
// requires that no product is still in flight at that point (see
// `stream_end`); without it, samples spaced 2 or 3 cycles apart lose the last
// product. `out_valid` rises 5 clocks after
// the edge that accepts the last sample.
//
// Configuration: when `weight_valid` is high and `cfg_layer`/`cfg_neuron`
// equal LAYER_NO/NEURON_NO, `weight_value[DATA_W-1:0]` is written to the next
// weight address (the write pointer starts at all ones after `rst`, so the
// first weight lands at address 0). `bias_valid` with the same selection loads
// the bias. For pretrained builds, WEIGHT_FILE and BIAS_FILE (binary text,
// one word per line) preload the weights and the bias; configuration writes
// still replace them; no weight is written while `rst` is high, so a
// preloaded table survives power-up. `rst` (synchronous, active high) clears the pointers,
// the accumulator and the valid chain but keeps weights and bias. A new input
// vector must not start before `out_valid` of the previous one.
module neuron
  import nn_pkg::*;
#(
  parameter int unsigned LAYER_NO     = 1,
  parameter int unsigned NEURON_NO    = 0,
  parameter int unsigned NUM_WEIGHT   = 784,
  parameter int unsigned DATA_W       = DATA_W_DEF,
  parameter int unsigned SIGMOID_SIZE = SIGMOID_SIZE_DEF,
  parameter int unsigned WEIGHT_INT_W = WEIGHT_INT_W_DEF,
  parameter int unsigned INPUT_INT_W  = INPUT_INT_W_DEF,
  parameter act_e        ACT          = ACT_RELU,
  parameter string       WEIGHT_FILE  = "",
  parameter string       BIAS_FILE    = ""
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_valid,
  input  logic              weight_valid,
  input  logic              bias_valid,
  input  logic [31:0]       weight_value,
  input  logic [31:0]       bias_value,
  input  logic [31:0]       cfg_layer,
  input  logic [31:0]       cfg_neuron,
  output logic [DATA_W-1:0] out,
  output logic              out_valid
);

  localparam int unsigned ADDR_W = (NUM_WEIGHT > 1) ? $clog2(NUM_WEIGHT) : 1;
  localparam int unsigned ACC_W  = 2*DATA_W;

  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  // Saturating two's-complement addition at the accumulator width.
  function automatic logic [ACC_W-1:0] sat_add(logic [ACC_W-1:0] a, logic [ACC_W-1:0] b);
    logic [ACC_W-1:0] s;
    s = a + b;
    if (!a[ACC_W-1] && !b[ACC_W-1] && s[ACC_W-1])      return ACC_MAX;
    else if (a[ACC_W-1] && b[ACC_W-1] && !s[ACC_W-1])  return ACC_MIN;
    else                                                return s;
  endfunction

  logic              selected;
  logic              wen;
  logic [ADDR_W-1:0] w_addr;
  logic [DATA_W-1:0] w_in;
  logic [ADDR_W:0]   r_addr;        // one bit wider: it must reach NUM_WEIGHT
  logic [DATA_W-1:0] w_out;
  logic [DATA_W-1:0] in_d;
  logic [ACC_W-1:0]  mul;
  logic [ACC_W-1:0]  sum;
  logic [DATA_W-1:0] bias_q [1];    // bias word, one-entry table
  logic [ACC_W-1:0]  bias;          // bias in the accumulator scale
  logic              w_valid_d;     // weight word on w_out is valid
  logic              mult_valid;    // product on mul is valid
  logic              mult_valid_d;
  logic              last_done;     // falling edge of mult_valid
  logic              stream_end;
  logic              sig_valid;

  assign selected   = (cfg_layer == 32'(LAYER_NO)) && (cfg_neuron == 32'(NEURON_NO));
  // End of stream: all samples counted, the product valid chain has just
  // fallen, and no later product is still in flight. The in-flight guard is
  // needed when the last two samples arrive 2 or 3 cycles apart: the falling
  // edge left by the second-to-last sample would otherwise be taken for the
  // end before the last product has been added.
  assign stream_end = (r_addr == (ADDR_W+1)'(NUM_WEIGHT)) && last_done
                      && !w_valid_d && !mult_valid;

  // Weight loading through the configuration path.
  always_ff @(posedge clk) begin
    if (rst) begin
      w_addr <= '1;
      wen    <= 1'b0;
    end else if (weight_valid && selected) begin
      w_in   <= weight_value[DATA_W-1:0];
      w_addr <= w_addr + 1'b1;
      wen    <= 1'b1;
    end else begin
      wen    <= 1'b0;
    end
  end

  // Bias loading. A pretrained bias can be preloaded from BIAS_FILE (one
  // binary word); a configuration write replaces it. The stored word is
  // shifted left by DATA_W bits to sit in the accumulator scale.
  initial if (BIAS_FILE != "") $readmemb(BIAS_FILE, bias_q);
  always_ff @(posedge clk) begin
    if (bias_valid && selected) bias_q[0] <= bias_value[DATA_W-1:0];
  end
  assign bias = {bias_q[0], {DATA_W{1'b0}}};

  // Read address: one step per accepted sample.
  always_ff @(posedge clk) begin
    if (rst || out_valid) r_addr <= '0;
    else if (in_valid)    r_addr <= r_addr + 1'b1;
  end

  weight_memory #(
    .NUM_WEIGHT (NUM_WEIGHT),
    .ADDR_W     (ADDR_W),
    .DATA_W     (DATA_W),
    .INIT_FILE  (WEIGHT_FILE)
  ) u_wmem (
    .clk  (clk),
    .wen  (wen && !rst),  // no write while held in reset (power-up state)
    .wadd (w_addr),
    .win  (w_in),
    .ren  (in_valid),
    .radd (r_addr[ADDR_W-1:0]),
    .wout (w_out)
  );

  // Multiply stage (maps to a DSP block).
  always_ff @(posedge clk) begin
    mul <= ACC_W'($signed(in_d) * $signed(w_out));
  end

  // Accumulate with saturation; bias once at the end of the stream.
  always_ff @(posedge clk) begin
    if (rst || out_valid)  sum <= '0;
    else if (stream_end)   sum <= sat_add(sum, bias);
    else if (mult_valid)   sum <= sat_add(sum, mul);
  end

  // Alignment and valid chain.
  always_ff @(posedge clk) begin
    in_d <= in_data;
    if (rst) begin
      w_valid_d    <= 1'b0;
      mult_valid   <= 1'b0;
      mult_valid_d <= 1'b0;
      last_done    <= 1'b0;
      sig_valid    <= 1'b0;
      out_valid    <= 1'b0;
    end else begin
      w_valid_d    <= in_valid;
      mult_valid   <= w_valid_d;
      mult_valid_d <= mult_valid;
      last_done    <= !mult_valid && mult_valid_d;
      sig_valid    <= stream_end;
      out_valid    <= sig_valid;
    end
  end

  // Activation.
  generate
    if (ACT == ACT_SIGMOID) begin : g_sigmoid
      sig_rom #(
        .IN_W     (SIGMOID_SIZE),
        .DATA_W   (DATA_W),
        .INT_BITS (WEIGHT_INT_W + INPUT_INT_W),
        .OUT_FRAC (DATA_W - INPUT_INT_W)
      ) u_act (
        .clk (clk),
        .x   (sum[ACC_W-1 -: SIGMOID_SIZE]),
        .out (out)
      );
    end else begin : g_relu
      relu #(
        .DATA_W       (DATA_W),
        .WEIGHT_INT_W (WEIGHT_INT_W)
      ) u_act (
        .clk (clk),
        .x   (sum),
        .out (out)
      );
    end
  endgenerate

  // The end-of-stream marker is a single-cycle pulse.
  a_out_valid_pulse: assert property (@(posedge clk) disable iff (rst) out_valid |=> !out_valid);

endmodule
