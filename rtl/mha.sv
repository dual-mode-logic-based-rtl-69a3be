// mha: modified half adder cell of the carry-save multiplier array.
//
// Generates the partial product I = A_j & B_i with its own pp_and gate (with or
// without precision gating, chosen by HAS_PREC) and adds it to the single bit
// y_i arriving from the previous row:
//   s_o = I ^ y_i,  c_o = I & y_i.
// In the array it sits on the first accumulation row, where there is no carry
// input yet, and at the right-hand end of every later row, whose incoming carry
// leaves the array as a bit of the carry vector instead. Combinational. The
// AND-plus-half-adder structure follows the published design; the half adder is written
// at logic level (the silicon cell computes the complemented carry and sum on
// internal nodes and restores them with output inverters).
module mha #(
  parameter bit HAS_PREC = 1'b1
) (
  input  logic a,
  input  logic b,
  input  logic prec,
  input  logic y_i,
  output logic s_o,
  output logic c_o
);

  logic pp;
  logic c_n, s_n;

  pp_and #(.HAS_PREC(HAS_PREC)) u_and (.a(a), .b(b), .prec(prec), .y(pp));

  // Inverted internal nodes, restored by the output inverters.
  assign c_n = ~(pp & y_i);
  assign s_n = ~(pp ^ y_i);
  assign c_o = ~c_n;
  assign s_o = ~s_n;

endmodule
