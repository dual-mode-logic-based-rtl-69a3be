// skip_logic: skip condition of one carry-skip stage.
//
// sel is high when all four propagate bits of the stage are high; the stage's
// carry out then equals its carry in and the stage multiplexer passes the
// carry in, skipping the ripple path. Combinational. The function follows the
// published design; the single four-input AND is this design's choice of gate.
module skip_logic (
  input  logic [3:0] p,
  output logic       sel
);

  assign sel = &p;

endmodule
