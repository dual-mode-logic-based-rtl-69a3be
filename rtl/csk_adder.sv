// csk_adder: double-precision (16/32-bit) carry-skip final adder.
//
// Adds the sum and carry vectors left by the partial-product array into the
// product o = s + c. It is a chain of STAGES blocks of BITS bits; each block is
// a ripple-carry adder (rca4), a skip_logic gate and a 2:1 multiplexer that
// passes the block's carry in instead of its ripple carry when all its
// propagate bits are high. After block SPLIT-1 an extra 2:1 multiplexer,
// selected by the inverted precision signal, passes that block's carry out when
// prec is low (one 32-bit sum) and a constant 0 when prec is high (two
// independent 16-bit sums). The vectors are CS_W = STAGES*BITS-1 bits wide; the
// missing top bit is taken as 0, so the top result bit is the final carry.
// Combinational. Block count, block width and the position of the precision
// multiplexer follow the published design; the carry out of the last block is not
// used, as the product cannot exceed 32 bits.
module csk_adder #(
  parameter int unsigned STAGES = 8,
  parameter int unsigned BITS   = 4,
  parameter int unsigned SPLIT  = 4,
  localparam int unsigned W     = STAGES * BITS
) (
  input  logic [W-2:0] s,
  input  logic [W-2:0] c,
  input  logic         prec,
  output logic [W-1:0] o
);

  logic [W-1:0] s_ext, c_ext;
  assign s_ext = {1'b0, s};
  assign c_ext = {1'b0, c};

  // carry[k] enters block k; carry[STAGES] leaves the last one.
  logic [STAGES:0] carry;
  assign carry[0] = 1'b0;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic [BITS-1:0] p;
    logic            rca_cout, sel, mux_out;

    rca4 u_rca (
      .s   (s_ext[k*BITS +: BITS]),
      .c   (c_ext[k*BITS +: BITS]),
      .cin (carry[k]),
      .o   (o[k*BITS +: BITS]),
      .p   (p),
      .cout(rca_cout)
    );
    skip_logic u_skip (.p(p), .sel(sel));

    assign mux_out = sel ? carry[k] : rca_cout;

    if (k == SPLIT - 1) begin : g_split
      // Precision multiplexer: select input is the inverted prec.
      assign carry[k+1] = (~prec) ? mux_out : 1'b0;
    end else begin : g_chain
      assign carry[k+1] = mux_out;
    end
  end

endmodule
