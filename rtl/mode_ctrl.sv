// mode_ctrl: clock control of the dual-mode-logic (DML) multiplier.
//
// Takes the external clock and the MODE select and produces:
//   clock_n = ~clock              clock of the five pipeline registers
//   clk     = ~(mode & clock_n)   DML clock for Type-A gates
//   clk_n   = ~clk                flipped DML clock for Type-B gates
// With mode low, clk is held high and clk_n low, which keeps every
// pre-charge / pre-discharge transistor off: all DML gates work statically.
// With mode high, clk equals clock: the gates pre-charge while clock is low and
// evaluate while it is high, and the registers capture on the falling edge of
// clock, at the end of evaluation. Combinational gating. The behaviour in each
// mode follows the published design; the choice of clk = clock (rather than its
// inverse) in dynamic mode and its realisation as a NAND of mode with the
// inverted clock are this design's. mode may be changed at any time, but is
// best changed while clock is high so that clk does not glitch.
module mode_ctrl (
  input  logic clock,
  input  logic mode,
  output logic clock_n,
  output logic clk,
  output logic clk_n
);

  assign clock_n = ~clock;
  assign clk     = ~(mode & clock_n);
  assign clk_n   = ~clk;

endmodule
