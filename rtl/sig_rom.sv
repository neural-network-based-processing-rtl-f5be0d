// sig_rom: sigmoid activation by table lookup.
//
// `x` is the top IN_W bits of the neuron's accumulator, read as a signed
// fixed-point number with INT_BITS integer bits (the integer bits of the
// product of an input and a weight), so one step of `x` is 2**(INT_BITS-IN_W).
// The signed index is re-centred into an unsigned table address by adding
// 2**(IN_W-1), which maps the most negative input to entry 0 and the most
// positive to the last entry. The address is registered, and the table is read
// from the registered address, so `out` follows `x` by one clock.
//
// Entry a holds sigmoid(v) with v = (a - 2**(IN_W-1)) * 2**(INT_BITS-IN_W),
// scaled by 2**OUT_FRAC, rounded to nearest and clamped to the largest positive
// DATA_W-bit value. With the defaults (IN_W = 5, INT_BITS = 2, Q1.11 output)
// the table covers v in [-2, 1.875] in steps of 1/8. The source design loads a
// pre-computed file; here the same samples are computed during elaboration.
module sig_rom #(
  parameter int unsigned IN_W     = 5,
  parameter int unsigned DATA_W   = 12,
  parameter int unsigned INT_BITS = 2,
  parameter int unsigned OUT_FRAC = DATA_W - 1
) (
  input  logic              clk,
  input  logic [IN_W-1:0]   x,
  output logic [DATA_W-1:0] out
);

  localparam int unsigned DEPTH = 2**IN_W;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    v, s, scaled, max_val;
    max_val = real'((2**(DATA_W-1)) - 1);
    for (int a = 0; a < DEPTH; a++) begin
      v      = real'(a - int'(DEPTH/2)) * (2.0 ** (real'(INT_BITS) - real'(IN_W)));
      s      = 1.0 / (1.0 + $exp(-v));
      scaled = s * (2.0 ** real'(OUT_FRAC));
      if (scaled > max_val) scaled = max_val;
      t[a]   = DATA_W'(longint'($floor(scaled + 0.5)));
    end
    return t;
  endfunction

  localparam table_t SIG_TABLE = build_table();

  logic [IN_W-1:0] addr;

  // Adding 2**(IN_W-1) modulo 2**IN_W flips the sign bit of the index.
  always_ff @(posedge clk) begin
    addr <= {~x[IN_W-1], x[IN_W-2:0]};
  end

  assign out = SIG_TABLE[addr];

endmodule
