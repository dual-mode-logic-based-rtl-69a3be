// dml_multiplier: two-stage pipelined double-precision carry-save multiplier
// built for dual-mode logic (DML).
//
// One unsigned 16x16-bit product per clock, or, with prec high, two independent
// 8x8-bit products per clock from the same operand ports:
//   prec = 0: o = a * b
//   prec = 1: o[15:0] = a[7:0] * b[7:0],  o[31:16] = a[15:8] * b[15:8]
// Structure (all registers load on the falling edge of clock):
//   operand registers A, B (16 bit)
//   -> csa_pp_array (partial products, carry-save reduction)        stage 1
//   -> pipeline registers S, C (31 bit each)
//   -> csk_adder (16/32-bit carry-skip final addition)              stage 2
//   -> output register O (32 bit)
// mode_ctrl turns clock and mode into the DML clock (held high for static
// operation, equal to clock for dynamic operation) and clk_buffer_tree derives
// the 16 delayed row clocks from it. In silicon these clocks drive the
// pre-charge transistors and set the evaluation order of the array rows; they
// do not change any logic function, so here they are brought out as ports
// (dml_clk, dml_clk_n, clk_row) and the datapath is modelled at logic level.
//
// Timing: operands present at falling edge t are in the operand registers
// after it; their product is in o after falling edge t+2. prec is not
// registered, as in the published design: it is used by the array during the cycle
// after the operands are captured (between edges t and t+1) and by the final
// adder during the next cycle (between t+1 and t+2). Keep it steady over both
// cycles of an operation; when a 16x16 operation is followed by an 8x8 one,
// hold prec low one cycle longer (a bubble). The reverse switch needs no
// bubble, because an 8x8 pair never carries across bit 16. The assertion
// a_prec_rule flags a violation of this rule in simulation. The reset is this
// design's addition.
module dml_multiplier
  import dml_pkg::*;
(
  input  logic           clock,
  input  logic           rst_n,
  input  logic           mode,
  input  logic           prec,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [P_W-1:0] o,
  output logic           dml_clk,
  output logic           dml_clk_n,
  output logic [N-1:0]   clk_row
);

  logic            clock_n;
  logic [N-1:0]    a_q, b_q;
  logic [CS_W-1:0] s_d, c_d, s_q, c_q;
  logic [P_W-1:0]  o_d;

  mode_ctrl u_mode_ctrl (
    .clock  (clock),
    .mode   (mode),
    .clock_n(clock_n),
    .clk    (dml_clk),
    .clk_n  (dml_clk_n)
  );

  clk_buffer_tree #(.STAGES(N)) u_clk_tree (
    .clk    (dml_clk),
    .clk_row(clk_row)
  );

  pipe_reg #(.WIDTH(N)) u_reg_a (.clk(clock_n), .rst_n(rst_n), .d(a), .q(a_q));
  pipe_reg #(.WIDTH(N)) u_reg_b (.clk(clock_n), .rst_n(rst_n), .d(b), .q(b_q));

  csa_pp_array #(.N(N)) u_array (
    .a   (a_q),
    .b   (b_q),
    .prec(prec),
    .s   (s_d),
    .c   (c_d)
  );

  pipe_reg #(.WIDTH(CS_W)) u_reg_s (.clk(clock_n), .rst_n(rst_n), .d(s_d), .q(s_q));
  pipe_reg #(.WIDTH(CS_W)) u_reg_c (.clk(clock_n), .rst_n(rst_n), .d(c_d), .q(c_q));

  csk_adder #(.STAGES(P_W / 4), .BITS(4), .SPLIT(P_W / 8)) u_adder (
    .s   (s_q),
    .c   (c_q),
    .prec(prec),
    .o   (o_d)
  );

  pipe_reg #(.WIDTH(P_W)) u_reg_o (.clk(clock_n), .rst_n(rst_n), .d(o_d), .q(o));

  // prec timing rule: an 8x8 pair never carries from bit 15 into bit 16, so
  // such a carry in the final adder while prec is high means that a 16x16
  // product is being split because prec was raised one cycle too early.
  a_prec_rule : assert property (@(posedge clock_n) disable iff (!rst_n)
      !(prec && ((17'(s_q[N-1:0]) + 17'(c_q[N-1:0])) >> N) != 17'd0))
    else $error("prec raised while a 16x16 product was still in the final adder");

endmodule
