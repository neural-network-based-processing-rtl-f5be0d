// relu: registered rectified-linear activation with positive saturation.
//
// Input `x` is the neuron's 2*DATA_W-bit accumulator, the product of two
// fixed-point numbers with WEIGHT_INT_W integer bits in the weights. A
// negative `x` gives 0. A non-negative `x` is narrowed to DATA_W bits by taking
// the slice that starts WEIGHT_INT_W bits below the accumulator's sign bit,
// which returns it to the input/output format (Q1.11 by default). If any of
// the WEIGHT_INT_W bits above that slice is set the value does not fit and the
// output saturates to the largest positive DATA_W-bit number. The output is
// registered: `out` follows `x` by one clock. Behaviour follows the source
// design.
module relu #(
  parameter int unsigned DATA_W       = 12,
  parameter int unsigned WEIGHT_INT_W = 1
) (
  input  logic                clk,
  input  logic [2*DATA_W-1:0] x,
  output logic [DATA_W-1:0]   out
);

  localparam int unsigned MSB = 2*DATA_W-1;

  logic overflow;
  assign overflow = |x[MSB-1 -: WEIGHT_INT_W];

  always_ff @(posedge clk) begin
    if (x[MSB])
      out <= '0;
    else if (overflow)
      out <= {1'b0, {(DATA_W-1){1'b1}}};
    else
      out <= x[MSB-WEIGHT_INT_W -: DATA_W];
  end

endmodule
