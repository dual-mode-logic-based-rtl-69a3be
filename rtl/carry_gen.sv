// carry_gen: carry-generator (CG) stage of the final ripple-carry adder.
//
// An inverting majority gate: cout_n = ~majority(s, c, cin). The same function
// serves both CG flavours of the adder: a Type-A stage is fed the true S, C
// and carry and returns the complemented carry; a Type-B stage is fed the
// complemented S, C and carry and, because majority is self-dual, returns the
// true carry. Alternating the two along the chain avoids an inverter in every
// carry hop. Combinational. The function and the alternation follow the
// published design; the single shared logic-level module is this design's choice.
module carry_gen (
  input  logic s,
  input  logic c,
  input  logic cin,
  output logic cout_n
);

  assign cout_n = ~((s & c) | (cin & (s | c)));

endmodule
