// clk_buffer_tree: behavioural model of the 16-stage clock buffer chain.
//
// Behavioural model, not synthesizable logic: it stands for a chain of clock
// buffers whose only job is delay. Stage 0 buffers the DML clock clk into
// clk_row[0]; stage i buffers clk_row[i-1] into clk_row[i]. Row i of the
// partial-product array evaluates on clk_row[i] (and uses clk_row[i-1]), so in
// dynamic mode each row starts evaluating one buffer delay after the row above
// it, once that row's outputs can be valid. Each buffer is modelled as a
// continuous assignment (inertial) with a fixed delay of BUF_DELAY time
// units of the enclosing simulation. The stage count follows the published
// design; the per-stage delay is this design's own placeholder, since the real value comes from the
// transistor-level buffer sizing.
module clk_buffer_tree #(
  parameter int unsigned STAGES       = 16,
  parameter int unsigned BUF_DELAY = 1
) (
  input  logic              clk,
  output logic [STAGES-1:0] clk_row
);

  assign #(BUF_DELAY) clk_row[0] = clk;

  for (genvar i = 1; i < STAGES; i++) begin : g_buf
    assign #(BUF_DELAY) clk_row[i] = clk_row[i-1];
  end

endmodule
