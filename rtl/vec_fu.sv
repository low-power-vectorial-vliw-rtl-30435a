// vec_fu: one shared functional unit of a fixed class (Sum, Maximum,
// Multiply, Comparison, Shift or Logic).
//
// Purely combinational; it sits in the EXECUTE stage. The unit splits its
// operands into elements of the size chosen by OpControl[5:4] (four 8-bit,
// two 16-bit or one 32-bit element), so the same hardware acts as a vector
// or a scalar unit, as the source describes. It has three operand lanes so
// that a broadcast (Td) instruction, which computes three results at once
// (the three sums of the Smith-Waterman recursion), needs one unit. The
// element arithmetic is vliw_pkg::vec_op: SUM/SUB, MAX, MUL (low half),
// CMP (EQ/LT/GT give 1 or 0 per element), SRA/SRL/SLA/SLL, OR/AND/XOR; signed
// unless OpControl[1] asks for unsigned. Results wrap; saturation is not
// mentioned by the source and is not done.
module vec_fu
  import vliw_pkg::*;
#(
  parameter fu_class_e CLASS = FU_SUM
) (
  input  logic [5:0] opctl,
  input  word_t      a [3],
  input  word_t      b [3],
  output word_t      r [3]
);
  always_comb
    for (int l = 0; l < 3; l++) r[l] = vec_op(CLASS, opctl, a[l], b[l]);
endmodule
