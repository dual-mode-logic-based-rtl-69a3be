// tb_pipe_reg: checks the register: it clears while rst_n is low, loads d on
// each rising clock edge only, and holds between edges.
module tb_pipe_reg;
  localparam int W = 31;
  int checks = 0, failures = 0;
  logic         clk, rst_n;
  logic [W-1:0] d, q, model;

  pipe_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst_n = 1; d = '1;
    #1 rst_n = 0;
    #2;
    checks++;
    if (q !== '0) begin failures++; $display("not cleared"); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 200; n++) begin
      d = W'($urandom());
      #5 clk = 1;
      model = d;
      #1;
      d = W'($urandom());        // must not pass before the next edge
      #1;
      checks++;
      if (q !== model) begin failures++; $display("q=%h exp %h", q, model); end
      #3 clk = 0;
    end
    rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("async clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
