// pp_and: partial-product AND gate of the carry-save multiplier array.
//
// Produces y = a & b, the (i, j) partial product of multiplicand bit A_j and
// multiplier bit B_i. The gate is a two-input NAND (a dual-mode-logic footed
// Type-A gate in the silicon version) followed by either a two-input NOR with
// the precision signal or a plain inverter:
//   HAS_PREC = 1: y = NOR(NAND(a,b), prec), so a high prec forces y to 0. Used
//                 in the two array quadrants that only take part in 16x16
//                 products (MSBs of A with LSBs of B, and LSBs of A with MSBs
//                 of B).
//   HAS_PREC = 0: y = NOT(NAND(a,b)); prec is not used (the port is kept so
//                 that both versions have the same interface).
// Purely combinational; no clock. The gate structure follows the published design;
// modelling the dual-mode gate at logic level (its function does not depend on
// the static or dynamic operating mode) is this design's choice.
module pp_and #(
  parameter bit HAS_PREC = 1'b1
) (
  input  logic a,
  input  logic b,
  input  logic prec,
  output logic y
);

  logic nand_n;

  assign nand_n = ~(a & b);

  if (HAS_PREC) begin : g_prec
    assign y = ~(nand_n | prec);
  end else begin : g_noprec
    assign y = ~nand_n;
  end

endmodule
