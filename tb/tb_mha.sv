// tb_mha: exhaustive check of the modified half adder, gated and ungated.
// Reference: product I = a & b (0 in the gated cell when prec is high), then
// {c_o, s_o} = I + y_i.
module tb_mha;
  int checks = 0, failures = 0;
  logic a, b, prec, y_i;
  logic s_g, c_g, s_u, c_u;

  mha #(.HAS_PREC(1'b1)) dut_g (.a(a), .b(b), .prec(prec), .y_i(y_i), .s_o(s_g), .c_o(c_g));
  mha #(.HAS_PREC(1'b0)) dut_u (.a(a), .b(b), .prec(prec), .y_i(y_i), .s_o(s_u), .c_o(c_u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] exp_g, exp_u;
      {a, b, prec, y_i} = 4'(v);
      #1;
      exp_g = 2'(a & b & ~prec) + 2'(y_i);
      exp_u = 2'(a & b) + 2'(y_i);
      checks += 2;
      if ({c_g, s_g} !== exp_g) begin failures++; $display("gated v=%b got %b%b", 4'(v), c_g, s_g); end
      if ({c_u, s_u} !== exp_u) begin failures++; $display("ungated v=%b got %b%b", 4'(v), c_u, s_u); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
