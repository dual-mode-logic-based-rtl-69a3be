// tb_pp_and: exhaustive check of both versions of the partial-product AND gate.
// The gated version must give a & b & ~prec, the ungated one a & b whatever
// prec is. All eight input combinations are applied to both.
module tb_pp_and;
  int checks = 0, failures = 0;
  logic a, b, prec, y_g, y_u;

  pp_and #(.HAS_PREC(1'b1)) dut_g (.a(a), .b(b), .prec(prec), .y(y_g));
  pp_and #(.HAS_PREC(1'b0)) dut_u (.a(a), .b(b), .prec(prec), .y(y_u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, prec} = 3'(v);
      #1;
      checks += 2;
      if (y_g !== (a && b && !prec)) begin failures++; $display("gated a=%b b=%b prec=%b y=%b", a, b, prec, y_g); end
      if (y_u !== (a && b))          begin failures++; $display("ungated a=%b b=%b prec=%b y=%b", a, b, prec, y_u); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
