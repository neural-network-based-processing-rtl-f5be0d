// ctrl_regs: memory-mapped register bank of the accelerator.
//
// Sits behind axil_slave and drives the compute core. Registers (byte offsets,
// see nn_pkg):
//   0x00 CTRL    bit 0 soft reset of the core; 1 after power-up reset, so
//                software writes 0 to release the core before use.
//   0x04 INPUT   each write streams one input sample, wr_data[DATA_W-1:0]
//                (a signed Q1.11 value in the low bits of the lower 16 bits),
//                into the first layer: `in_valid` pulses with `in_data`.
//   0x08 STATUS  bit 0 done; set when a prediction completes, cleared by the
//                read that returns it (read-to-clear). `irq` mirrors it.
//   0x0C OUTPUT  index of the predicted class.
//   0x10 WEIGHT  each write pulses `weight_valid` with the word: the next
//                weight of the neuron selected by LAYER/NEURON.
//   0x14 BIAS    each write pulses `bias_valid`: bias of the selected neuron.
//   0x18 LAYER   layer number selected for configuration (layers count from 1).
//   0x1C NEURON  neuron number selected for configuration (from 0).
//   0x20 CHAR    Unicode code point of the predicted character.
// Unmapped offsets read 0 and ignore writes. All strobes are single-cycle and
// registered (one clock after `wr_en`). A completion (`result_valid`) in the
// same cycle as the clearing read wins, so no completion is lost.
//
// The roles of the registers (soft reset cleared by writing 0, one write per
// input sample, read-to-clear completion flag, prediction register, interrupt)
// follow the source design; the offsets and bit positions are this
// implementation's own, as is reaching the weight/bias configuration through
// the same bank.
module ctrl_regs
  import nn_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned IDX_W  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register strobes from the bus slave
  input  logic                  wr_en,
  input  logic [REG_ADDR_W-1:0] wr_addr,
  input  logic [REG_DATA_W-1:0] wr_data,
  input  logic                  rd_en,
  input  logic [REG_ADDR_W-1:0] rd_addr,
  output logic [REG_DATA_W-1:0] rd_data,
  // to the compute core
  output logic                  soft_reset,
  output logic [DATA_W-1:0]     in_data,
  output logic                  in_valid,
  output logic                  weight_valid,
  output logic                  bias_valid,
  output logic [31:0]           weight_value,
  output logic [31:0]           bias_value,
  output logic [31:0]           cfg_layer,
  output logic [31:0]           cfg_neuron,
  // from the compute core
  input  logic                  result_valid,
  input  logic [IDX_W-1:0]      result_idx,
  input  logic [20:0]           result_char,
  // completion interrupt
  output logic                  irq
);

  logic             done;
  logic [IDX_W-1:0] pred_q;
  logic [20:0]      char_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      soft_reset   <= 1'b1;
      in_valid     <= 1'b0;
      weight_valid <= 1'b0;
      bias_valid   <= 1'b0;
      cfg_layer    <= '0;
      cfg_neuron   <= '0;
      done         <= 1'b0;
      pred_q       <= '0;
      char_q       <= '0;
      in_data      <= '0;
      weight_value <= '0;
      bias_value   <= '0;
    end else begin
      in_valid     <= 1'b0;
      weight_valid <= 1'b0;
      bias_valid   <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          REG_CTRL:   soft_reset <= wr_data[0];
          REG_INPUT:  begin in_data <= wr_data[DATA_W-1:0]; in_valid <= 1'b1; end
          REG_WEIGHT: begin weight_value <= wr_data; weight_valid <= 1'b1; end
          REG_BIAS:   begin bias_value <= wr_data; bias_valid <= 1'b1; end
          REG_LAYER:  cfg_layer  <= wr_data;
          REG_NEURON: cfg_neuron <= wr_data;
          default: ;
        endcase
      end
      if (result_valid) begin
        done   <= 1'b1;
        pred_q <= result_idx;
        char_q <= result_char;
      end else if (rd_en && rd_addr == REG_STATUS) begin
        done <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      REG_CTRL:   rd_data = 32'(soft_reset);
      REG_STATUS: rd_data = 32'(done);
      REG_OUTPUT: rd_data = 32'(pred_q);
      REG_LAYER:  rd_data = cfg_layer;
      REG_NEURON: rd_data = cfg_neuron;
      REG_CHAR:   rd_data = 32'(char_q);
      default:    rd_data = '0;
    endcase
  end

  assign irq = done;

endmodule
