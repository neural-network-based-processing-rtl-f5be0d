// nn_accel: fully connected neural-network classifier with an AXI4-Lite port.
//
// A host processor configures and drives the accelerator through 32-bit
// registers (see ctrl_regs): it releases the soft reset, loads every neuron's
// weights and bias, then writes the NUM_INPUT samples of one image (28x28
// pixels, signed Q1.11) one by one and waits for the completion flag or
// interrupt before reading the predicted class and its Unicode character.
//
// Data path: the samples stream over a shared bus into the first nn_layer,
// whose neurons all multiply-accumulate in parallel against their own weight
// RAMs. When a layer finishes, a layer_streamer replays its output vector one
// element per cycle as the input stream of the next layer. The last layer's
// vector goes to max_finder (hardmax), which scans it for the largest element;
// char_map turns the winning index into the code point 0x1200 + index. The
// result is latched in ctrl_regs, which sets the read-to-clear done flag and
// raises `irq` until that flag is read.
//
// Parameters: N_LAYERS layers, LAYER_NEURONS[l] neurons in layer l, LAYER_ACT[l]
// its activation. The defaults are the configuration that fits the Cyclone V
// 5CSEMA5F31C6: 784 inputs, one stage of 250 neurons, argmax, 12-bit Q1.11
// datapath. The layer sizes of the larger software model (784-30-30-343-343)
// are reachable through the same parameters but exceed that device. Using ReLU
// as the default activation is this implementation's choice.
//
// Timing: one image takes NUM_INPUT input writes; each layer adds 5 clocks after
// its last input, each layer_streamer replays LAYER_NEURONS[l] cycles, and
// max_finder adds LAYER_NEURONS[N_LAYERS-1] + 1 cycles, plus a register stage.
// Reset `rst_n` is active low and synchronous; the core is also held in reset
// while the CTRL soft-reset bit is 1.
module nn_accel
  import nn_pkg::*;
#(
  parameter int unsigned N_LAYERS                = 1,
  parameter int unsigned NUM_INPUT               = 784,
  parameter int unsigned LAYER_NEURONS [N_LAYERS] = '{250},
  parameter act_e        LAYER_ACT     [N_LAYERS] = '{ACT_RELU},
  parameter int unsigned DATA_W                  = DATA_W_DEF,
  parameter int unsigned SIGMOID_SIZE            = SIGMOID_SIZE_DEF,
  parameter int unsigned WEIGHT_INT_W            = WEIGHT_INT_W_DEF,
  parameter int unsigned INPUT_INT_W             = INPUT_INT_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // AXI4-Lite slave (from the HPS lightweight bridge)
  input  logic [REG_ADDR_W-1:0]   s_axi_awaddr,
  input  logic [2:0]              s_axi_awprot,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [REG_DATA_W-1:0]   s_axi_wdata,
  input  logic [REG_DATA_W/8-1:0] s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  input  logic [REG_ADDR_W-1:0]   s_axi_araddr,
  input  logic [2:0]              s_axi_arprot,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [REG_DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  // completion interrupt (level, cleared by reading STATUS)
  output logic                    irq
);

  localparam int unsigned N_OUT = LAYER_NEURONS[N_LAYERS-1];
  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  // Register strobes
  logic                  wr_en, rd_en;
  logic [REG_ADDR_W-1:0] wr_addr, rd_addr;
  logic [REG_DATA_W-1:0] wr_data, rd_data;

  // Core control
  logic              soft_reset, core_rst;
  logic              weight_valid, bias_valid;
  logic [31:0]       weight_value, bias_value, cfg_layer, cfg_neuron;

  // Input stream of each layer
  logic [DATA_W-1:0] stream_data  [N_LAYERS];
  logic              stream_valid [N_LAYERS];

  // Result
  logic [IDX_W-1:0]  result_idx;
  logic              result_valid;
  logic [20:0]       result_char;

  axil_slave #(
    .ADDR_W (REG_ADDR_W),
    .DATA_W (REG_DATA_W)
  ) u_axil (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_awaddr  (s_axi_awaddr),
    .s_awprot  (s_axi_awprot),
    .s_awvalid (s_axi_awvalid),
    .s_awready (s_axi_awready),
    .s_wdata   (s_axi_wdata),
    .s_wstrb   (s_axi_wstrb),
    .s_wvalid  (s_axi_wvalid),
    .s_wready  (s_axi_wready),
    .s_bresp   (s_axi_bresp),
    .s_bvalid  (s_axi_bvalid),
    .s_bready  (s_axi_bready),
    .s_araddr  (s_axi_araddr),
    .s_arprot  (s_axi_arprot),
    .s_arvalid (s_axi_arvalid),
    .s_arready (s_axi_arready),
    .s_rdata   (s_axi_rdata),
    .s_rresp   (s_axi_rresp),
    .s_rvalid  (s_axi_rvalid),
    .s_rready  (s_axi_rready),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data)
  );

  ctrl_regs #(
    .DATA_W (DATA_W),
    .IDX_W  (IDX_W)
  ) u_regs (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_en        (wr_en),
    .wr_addr      (wr_addr),
    .wr_data      (wr_data),
    .rd_en        (rd_en),
    .rd_addr      (rd_addr),
    .rd_data      (rd_data),
    .soft_reset   (soft_reset),
    .in_data      (stream_data[0]),
    .in_valid     (stream_valid[0]),
    .weight_valid (weight_valid),
    .bias_valid   (bias_valid),
    .weight_value (weight_value),
    .bias_value   (bias_value),
    .cfg_layer    (cfg_layer),
    .cfg_neuron   (cfg_neuron),
    .result_valid (result_valid),
    .result_idx   (result_idx),
    .result_char  (result_char),
    .irq          (irq)
  );

  assign core_rst = !rst_n || soft_reset;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    localparam int unsigned NW = (l == 0) ? NUM_INPUT : LAYER_NEURONS[(l == 0) ? 0 : l-1];

    logic [LAYER_NEURONS[l]-1:0][DATA_W-1:0] y;
    logic                                    y_valid;

    nn_layer #(
      .LAYER_NO     (l + 1),
      .NUM_NEURON   (LAYER_NEURONS[l]),
      .NUM_WEIGHT   (NW),
      .DATA_W       (DATA_W),
      .SIGMOID_SIZE (SIGMOID_SIZE),
      .WEIGHT_INT_W (WEIGHT_INT_W),
      .INPUT_INT_W  (INPUT_INT_W),
      .ACT          (LAYER_ACT[l])
    ) u_layer (
      .clk          (clk),
      .rst          (core_rst),
      .in_data      (stream_data[l]),
      .in_valid     (stream_valid[l]),
      .weight_valid (weight_valid),
      .bias_valid   (bias_valid),
      .weight_value (weight_value),
      .bias_value   (bias_value),
      .cfg_layer    (cfg_layer),
      .cfg_neuron   (cfg_neuron),
      .out_data     (y),
      .out_valid    (y_valid)
    );

    if (l < N_LAYERS-1) begin : g_stream
      logic busy;
      layer_streamer #(
        .NUM_ELEM (LAYER_NEURONS[l]),
        .DATA_W   (DATA_W)
      ) u_stream (
        .clk       (clk),
        .rst       (core_rst),
        .in_data   (y),
        .in_valid  (y_valid),
        .out_data  (stream_data[l+1]),
        .out_valid (stream_valid[l+1]),
        .busy      (busy)
      );
    end
  end

  max_finder #(
    .NUM_INPUT (N_OUT),
    .IN_W      (DATA_W),
    .IDX_W     (IDX_W)
  ) u_hardmax (
    .clk     (clk),
    .rst     (core_rst),
    .i_data  (g_layer[N_LAYERS-1].y),
    .i_valid (g_layer[N_LAYERS-1].y_valid),
    .o_idx   (result_idx),
    .o_valid (result_valid)
  );

  char_map #(
    .IDX_W (IDX_W)
  ) u_charmap (
    .class_id   (result_idx),
    .code_point (result_char)
  );

endmodule
