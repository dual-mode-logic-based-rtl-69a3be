// pipe_reg: one of the five edge-triggered registers of the multiplier.
//
// A WIDTH-bit register that loads d on every rising edge of clk (the inverted
// external clock, i.e. the falling edge of the external clock) and clears to 0
// while rst_n is low. The multiplier uses it for the two 16-bit operand
// registers, the two 31-bit carry-save pipeline registers and the 32-bit output
// register. The registers and their widths follow the published design; the
// asynchronous active-low reset is this design's addition, as none is
// specified.
module pipe_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
