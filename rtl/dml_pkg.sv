// dml_pkg: widths shared by the double-precision multiplier and a reference
// model of its result.
//
// The operands are N = 16 bits wide. The carry-save partial-product array hands
// two CS_W = 31-bit vectors (sum S and carry C, bit k of both having weight 2^k)
// to the final adder, which produces the P_W = 32-bit product. These three
// widths are the ones the multiplier is built around. The precision encoding
// (PREC low = one 16x16 product, PREC high = two independent 8x8 products) is
// also fixed here as an enum so that testbenches and the top share one name for
// it.
package dml_pkg;

  localparam int unsigned N    = 16;        // operand width
  localparam int unsigned HALF = N / 2;     // lower-precision operand width
  localparam int unsigned CS_W = 2 * N - 1; // carry-save vector width
  localparam int unsigned P_W  = 2 * N;     // product width

  typedef enum logic {
    PREC_FULL = 1'b0, // one N x N multiplication
    PREC_HALF = 1'b1  // two concurrent N/2 x N/2 multiplications
  } prec_e;

  typedef enum logic {
    MODE_STATIC  = 1'b0, // DML clocked transistors held off
    MODE_DYNAMIC = 1'b1  // DML clock toggles with the external clock
  } mode_e;

  // Reference product in either precision. With PREC_HALF the lower half of the
  // result is a[HALF-1:0]*b[HALF-1:0] and the upper half a[N-1:HALF]*b[N-1:HALF].
  function automatic logic [P_W-1:0] ref_product(input logic [N-1:0] a,
                                                 input logic [N-1:0] b,
                                                 input logic        prec);
    logic [P_W-1:0] r;
    if (prec == PREC_FULL) begin
      r = P_W'(a) * P_W'(b);
    end else begin
      r[N-1:0] = N'(a[HALF-1:0]) * N'(b[HALF-1:0]);
      r[P_W-1:N] = N'(a[N-1:HALF]) * N'(b[N-1:HALF]);
    end
    return r;
  endfunction

endpackage
