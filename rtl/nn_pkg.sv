// nn_pkg: types and constants shared by the neural-network accelerator.
//
// Holds the activation selector used by every neuron and layer, the default
// fixed-point format of the datapath (12-bit signed Q1.11, the format the
// design fits the Cyclone V device with) and the register map of the
// memory-mapped control interface. The numeric format follows the source
// design; the register offsets are this implementation's own choice, since
// only the registers' roles are specified.
package nn_pkg;

  // Activation applied at the end of each neuron.
  typedef enum logic {
    ACT_RELU    = 1'b0,
    ACT_SIGMOID = 1'b1
  } act_e;

  // Default datapath: Q1.11, one integer (sign) bit for weights and inputs.
  localparam int unsigned DATA_W_DEF       = 12;
  localparam int unsigned WEIGHT_INT_W_DEF = 1;
  localparam int unsigned INPUT_INT_W_DEF  = 1;
  // log2 of the sigmoid table depth (2**5 entries).
  localparam int unsigned SIGMOID_SIZE_DEF = 5;

  // Memory-mapped register interface (byte offsets, 32-bit registers).
  localparam int unsigned REG_ADDR_W = 8;
  localparam int unsigned REG_DATA_W = 32;

  localparam logic [REG_ADDR_W-1:0] REG_CTRL   = 8'h00; // RW  bit0: soft reset (1 after reset)
  localparam logic [REG_ADDR_W-1:0] REG_INPUT  = 8'h04; // WO  one input sample per write
  localparam logic [REG_ADDR_W-1:0] REG_STATUS = 8'h08; // RO  bit0: done, cleared by the read
  localparam logic [REG_ADDR_W-1:0] REG_OUTPUT = 8'h0C; // RO  predicted class index
  localparam logic [REG_ADDR_W-1:0] REG_WEIGHT = 8'h10; // WO  next weight of the selected neuron
  localparam logic [REG_ADDR_W-1:0] REG_BIAS   = 8'h14; // WO  bias of the selected neuron
  localparam logic [REG_ADDR_W-1:0] REG_LAYER  = 8'h18; // RW  layer number selected for configuration
  localparam logic [REG_ADDR_W-1:0] REG_NEURON = 8'h1C; // RW  neuron number selected for configuration
  localparam logic [REG_ADDR_W-1:0] REG_CHAR   = 8'h20; // RO  Unicode code point of the prediction

  // First code point of the Ethiopic Unicode block.
  localparam logic [20:0] ETHIOPIC_BASE = 21'h1200;

endpackage
