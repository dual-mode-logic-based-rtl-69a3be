// tb_skip_logic: exhaustive check that sel is high exactly when all four
// propagate bits are high.
module tb_skip_logic;
  int checks = 0, failures = 0;
  logic [3:0] p;
  logic       sel;

  skip_logic dut (.p(p), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      p = 4'(v);
      #1;
      checks++;
      if (sel !== (v == 15)) begin failures++; $display("p=%b sel=%b", p, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
