// Look-behind comparator for unsigned operands (the fast design).
//
// Per bit i it forms LT_i = ~A_i & B_i and Equal_i = A_i XNOR B_i, and from the
// Equal bits the suffix signal EQ_i = "every bit above i is equal"
// (eq_suffix_tree). Then
//   A < B  <=>  some i has LT_i & EQ_i      (lt_o, a wide OR)
//   A = B  <=>  EQ_0 & Equal_0              (eq_o)
// In the circuit, LT/Equal/EQ are static logic evaluated during the precharge
// half of the clock, and the wide OR is a precharged NOR gate with an inverter
// evaluated when the clock goes high; only that last gate lies on the
// evaluate-phase path. In this RTL the whole module is combinational and the
// precharge/evaluate split is a matter of where a timing path ends; the
// module computes the same logical function.
//
// The intermediate vectors are brought out (lt_bits_o, equal_o, eq_bits_o)
// so they can be inspected and checked against hand-worked examples.
// Bit 0 is the least significant bit.
module highspeed_comparator #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic             lt_o,       // A < B
  output logic             eq_o,       // A = B
  output logic [WIDTH-1:0] lt_bits_o,  // LT_i
  output logic [WIDTH-1:0] equal_o,    // Equal_i
  output logic [WIDTH-1:0] eq_bits_o   // EQ_i
);

  logic all_equal;  // root of the equality tree, only used as a tap

  assign lt_bits_o = ~a_i & b_i;
  assign equal_o   = ~(a_i ^ b_i);

  eq_suffix_tree #(.N(WIDTH)) u_eq (
    .equal_i (equal_o),
    .eq_o    (eq_bits_o),
    .all_o   (all_equal)
  );

  // Precharged NOR output stage: pulldown stack i conducts when LT_i & EQ_i.
  assign lt_o = |(lt_bits_o & eq_bits_o);
  assign eq_o = eq_bits_o[0] & equal_o[0];

endmodule
