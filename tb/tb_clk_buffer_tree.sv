// tb_clk_buffer_tree: checks the delay chain. After an edge on clk, row clock i
// must take the new value exactly (i+1) buffer delays later and not before.
// The model is run with a buffer delay of 2 time units.
module tb_clk_buffer_tree;
  localparam int STAGES = 16;
  localparam int D      = 2;
  int checks = 0, failures = 0;
  logic              clk;
  logic [STAGES-1:0] clk_row;

  clk_buffer_tree #(.STAGES(STAGES), .BUF_DELAY(D)) dut (.clk(clk), .clk_row(clk_row));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic edge_to(logic level);
    clk = level;
    for (int t = 1; t <= (STAGES + 1) * D; t++) begin
      #1;
      for (int i = 0; i < STAGES; i++) begin
        logic want;
        want = (t >= (i + 1) * D) ? level : ~level;
        checks++;
        if (clk_row[i] !== want) begin
          failures++;
          $display("t=%0d row %0d = %b, expected %b", t, i, clk_row[i], want);
        end
      end
    end
  endtask

  initial begin
    clk = 1'b0;
    #100;
    edge_to(1'b1);
    #10;
    edge_to(1'b0);
    #10;
    edge_to(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
