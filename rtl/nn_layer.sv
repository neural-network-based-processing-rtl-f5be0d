// nn_layer: one fully connected layer of NUM_NEURON parallel neurons.
//
// Every neuron sees the same input sample on a shared bus (`in_data`,
// `in_valid`), fetches its own weight for it and accumulates in parallel, so
// a layer takes NUM_WEIGHT input cycles for all of its neurons together. The
// neurons finish on the same clock; `out_valid` (taken from neuron 0) pulses
// once with the whole output vector on `out_data`, element j being neuron j's
// activation. The configuration inputs are broadcast; each neuron accepts
// only the words addressed to its own (LAYER_NO, neuron index) pair. Layer and
// neuron structure follow the source design; the packed-array output is this
// implementation's choice.
module nn_layer
  import nn_pkg::*;
#(
  parameter int unsigned LAYER_NO     = 1,
  parameter int unsigned NUM_NEURON   = 250,
  parameter int unsigned NUM_WEIGHT   = 784,
  parameter int unsigned DATA_W       = DATA_W_DEF,
  parameter int unsigned SIGMOID_SIZE = SIGMOID_SIZE_DEF,
  parameter int unsigned WEIGHT_INT_W = WEIGHT_INT_W_DEF,
  parameter int unsigned INPUT_INT_W  = INPUT_INT_W_DEF,
  parameter act_e        ACT          = ACT_RELU
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [DATA_W-1:0]                    in_data,
  input  logic                                 in_valid,
  input  logic                                 weight_valid,
  input  logic                                 bias_valid,
  input  logic [31:0]                          weight_value,
  input  logic [31:0]                          bias_value,
  input  logic [31:0]                          cfg_layer,
  input  logic [31:0]                          cfg_neuron,
  output logic [NUM_NEURON-1:0][DATA_W-1:0]    out_data,
  output logic                                 out_valid
);

  logic [NUM_NEURON-1:0] n_valid;

  for (genvar j = 0; j < NUM_NEURON; j++) begin : g_neuron
    neuron #(
      .LAYER_NO     (LAYER_NO),
      .NEURON_NO    (j),
      .NUM_WEIGHT   (NUM_WEIGHT),
      .DATA_W       (DATA_W),
      .SIGMOID_SIZE (SIGMOID_SIZE),
      .WEIGHT_INT_W (WEIGHT_INT_W),
      .INPUT_INT_W  (INPUT_INT_W),
      .ACT          (ACT)
    ) u_neuron (
      .clk          (clk),
      .rst          (rst),
      .in_data      (in_data),
      .in_valid     (in_valid),
      .weight_valid (weight_valid),
      .bias_valid   (bias_valid),
      .weight_value (weight_value),
      .bias_value   (bias_value),
      .cfg_layer    (cfg_layer),
      .cfg_neuron   (cfg_neuron),
      .out          (out_data[j]),
      .out_valid    (n_valid[j])
    );
  end

  assign out_valid = n_valid[0];

  // All neurons share one input stream, so they complete together.
  a_lockstep: assert property (@(posedge clk) disable iff (rst) n_valid == '0 || n_valid == '1);

endmodule
