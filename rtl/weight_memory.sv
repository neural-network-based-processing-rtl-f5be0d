// weight_memory: per-neuron weight store.
//
// A simple dual-port synchronous RAM, one write port and one read port on a
// single clock. A write stores `win` at `wadd` when `wen` is high. A read with
// `ren` high returns mem[radd] on `wout` after the next rising edge (one cycle
// latency); `wout` holds its value while `ren` is low. The neuron streams the
// read address once per input sample and delays its input by one cycle to line
// up with `wout`. The array is written so that FPGA tools infer block RAM.
//
// As in the source design the contents are either written at run time through
// the configuration path or, for a pre-trained build, loaded from a file named
// by INIT_FILE (binary text, one word per line); an empty name skips the load.
module weight_memory #(
  parameter int unsigned NUM_WEIGHT = 784,
  parameter int unsigned ADDR_W     = (NUM_WEIGHT > 1) ? $clog2(NUM_WEIGHT) : 1,
  parameter int unsigned DATA_W     = 12,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clk,
  input  logic              wen,
  input  logic [ADDR_W-1:0] wadd,
  input  logic [DATA_W-1:0] win,
  input  logic              ren,
  input  logic [ADDR_W-1:0] radd,
  output logic [DATA_W-1:0] wout
);

  logic [DATA_W-1:0] mem [NUM_WEIGHT];

  initial begin
    if (INIT_FILE != "") $readmemb(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (wen) mem[wadd] <= win;
    if (ren) wout <= mem[radd];
  end

endmodule
