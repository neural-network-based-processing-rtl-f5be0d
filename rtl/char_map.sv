// char_map: class index to Ethiopic character.
//
// The classifier's classes are numbered in Unicode order from the start of the
// Ethiopic block, so the recognised character's code point is
// 0x1200 + class_id. The module is combinational: `code_point` follows
// `class_id` in the same cycle. The mapping rule follows the source design;
// the 21-bit code point width (the range of Unicode) is this
// implementation's choice.
module char_map
  import nn_pkg::*;
#(
  parameter int unsigned IDX_W = 9
) (
  input  logic [IDX_W-1:0] class_id,
  output logic [20:0]      code_point
);

  assign code_point = ETHIOPIC_BASE + 21'(class_id);

endmodule
