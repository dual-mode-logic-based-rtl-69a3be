// mfa: modified full adder cell of the carry-save multiplier array.
//
// Generates the partial product I = A_j & B_i with its own pp_and gate (with or
// without precision gating, chosen by HAS_PREC) and adds it to the sum bit s_i
// and carry bit c_i coming from the previous row:
//   c_o = majority(I, s_i, c_i),  s_o = I ^ s_i ^ c_i.
// The full adder is the mirror-adder form: the complemented carry is built
// first and reused for the complemented sum, and two output inverters restore
// both bits. Combinational. The cell structure follows the published design; the
// logic-level rendering of the transistor networks is this design's own.
module mfa #(
  parameter bit HAS_PREC = 1'b1
) (
  input  logic a,
  input  logic b,
  input  logic prec,
  input  logic s_i,
  input  logic c_i,
  output logic s_o,
  output logic c_o
);

  logic pp;
  logic c_n, s_n;

  pp_and #(.HAS_PREC(HAS_PREC)) u_and (.a(a), .b(b), .prec(prec), .y(pp));

  // Mirror adder: carry node first, then sum node using the carry node.
  assign c_n = ~((pp & s_i) | (c_i & (pp | s_i)));
  assign s_n = ~((pp & s_i & c_i) | (c_n & (pp | s_i | c_i)));
  assign c_o = ~c_n;
  assign s_o = ~s_n;

endmodule
