// layer_streamer: hands a layer's output vector to the next layer as a stream.
//
// The next layer's neurons take one input sample per cycle on a shared bus, so
// the vector a layer produces in parallel must be presented sequentially. When
// `in_valid` pulses, the NUM_ELEM-element vector `in_data` is copied into a
// shift register; on each of the following NUM_ELEM cycles element k (k = 0
// first) appears on `out_data` with `out_valid` high, and the register shifts
// by one element. A new capture restarts the sequence. `busy` is high while
// elements remain. `rst` is synchronous and active high. The role of this block
// (input stream controller between layers) follows the source design; the
// shift-register form is this implementation's choice.
module layer_streamer #(
  parameter int unsigned NUM_ELEM = 30,
  parameter int unsigned DATA_W   = 12
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [NUM_ELEM-1:0][DATA_W-1:0]  in_data,
  input  logic                             in_valid,
  output logic [DATA_W-1:0]                out_data,
  output logic                             out_valid,
  output logic                             busy
);

  localparam int unsigned CNT_W = $clog2(NUM_ELEM + 1);

  logic [NUM_ELEM-1:0][DATA_W-1:0] shreg;
  logic [CNT_W-1:0]                remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
    end else if (in_valid) begin
      shreg     <= in_data;
      remaining <= CNT_W'(NUM_ELEM);
    end else if (remaining != '0) begin
      shreg     <= shreg >> DATA_W;
      remaining <= remaining - 1'b1;
    end
  end

  assign out_data  = shreg[0];
  assign out_valid = (remaining != '0) && !in_valid;
  assign busy      = (remaining != '0);

endmodule
