// rca4: 4-bit ripple-carry adder block of the carry-skip final adder.
//
// Adds the 4-bit slices s and c of the carry-save vectors and the carry cin.
// Outputs the sum bits o, the propagate bits p = s ^ c (used by the skip logic)
// and the carry out. Bits 0 and 2 use a Type-A carry generator on the true
// inputs and produce an inverted carry; bits 1 and 3 invert their S and C bits
// and use a Type-B generator, which turns the inverted carry back into a true
// one. Odd bits therefore see the inverted incoming carry and restore it with an
// inverter before the sum XOR. Combinational; the carry ripples through four CG
// stages. The stage order and polarities follow the published design.
module rca4 (
  input  logic [3:0] s,
  input  logic [3:0] c,
  input  logic       cin,
  output logic [3:0] o,
  output logic [3:0] p,
  output logic       cout
);

  // Carry chain with its per-node polarity: node k carries the true carry into
  // bit k for even k and the complemented carry for odd k.
  logic [4:0] chain;
  assign chain[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_bit
    logic s_in, c_in, carry_true;
    if (k % 2 == 0) begin : g_type_a
      assign s_in       = s[k];
      assign c_in       = c[k];
      assign carry_true = chain[k];
    end else begin : g_type_b
      assign s_in       = ~s[k];
      assign c_in       = ~c[k];
      assign carry_true = ~chain[k];
    end
    carry_gen u_cg (.s(s_in), .c(c_in), .cin(chain[k]), .cout_n(chain[k+1]));
    assign p[k] = s_in ^ c_in;
    assign o[k] = p[k] ^ carry_true;
  end

  assign cout = chain[4];

endmodule
