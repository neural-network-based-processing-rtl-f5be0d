// max_finder: hardmax, the index of the largest element of a vector.
//
// On `i_valid` the whole NUM_INPUT-element vector is copied into a buffer and
// element 0 becomes the running maximum. On each following cycle one more
// element (1, 2, ... NUM_INPUT-1) is compared, as a signed number, with the
// running maximum; a strictly larger element replaces it and its index becomes
// the result, so ties keep the lowest index. After the last comparison
// `o_valid` pulses for one cycle with the index on `o_idx`: `o_valid` rises
// NUM_INPUT clocks after the edge that captured the vector, and one vector can
// be processed every NUM_INPUT+1 cycles. A single comparator is reused over
// time to keep the area small. The sequential scheme follows the source
// design; the signed comparison, the synchronous active-high `rst` and the
// index width are this implementation's choices.
module max_finder #(
  parameter int unsigned NUM_INPUT = 250,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned IDX_W     = (NUM_INPUT > 1) ? $clog2(NUM_INPUT) : 1
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [NUM_INPUT-1:0][IN_W-1:0]   i_data,
  input  logic                             i_valid,
  output logic [IDX_W-1:0]                 o_idx,
  output logic                             o_valid
);

  localparam int unsigned CNT_W = $clog2(NUM_INPUT + 1);

  logic [NUM_INPUT-1:0][IN_W-1:0] buffer;
  logic signed [IN_W-1:0]         max_val;
  logic [CNT_W-1:0]               counter;   // 0 = idle
  logic signed [IN_W-1:0]         cand;

  assign cand = $signed(buffer[counter[IDX_W-1:0]]);

  always_ff @(posedge clk) begin
    o_valid <= 1'b0;
    if (rst) begin
      counter <= '0;
      o_idx   <= '0;
    end else if (i_valid) begin
      buffer  <= i_data;
      max_val <= $signed(i_data[0]);
      o_idx   <= '0;
      counter <= CNT_W'(1);
    end else if (counter == CNT_W'(NUM_INPUT)) begin
      counter <= '0;
      o_valid <= 1'b1;
    end else if (counter != '0) begin
      counter <= counter + 1'b1;
      if (cand > max_val) begin
        max_val <= cand;
        o_idx   <= IDX_W'(counter);
      end
    end
  end

endmodule
