// tb_carry_gen: exhaustive check of the carry generator, including its use in
// Type-B form: fed complemented inputs it must return the true carry.
module tb_carry_gen;
  int checks = 0, failures = 0;
  logic s, c, cin, cout_n, cout_b;

  carry_gen dut   (.s(s),  .c(c),  .cin(cin),  .cout_n(cout_n));
  carry_gen dut_b (.s(~s), .c(~c), .cin(~cin), .cout_n(cout_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] sum;
      {s, c, cin} = 3'(v);
      #1;
      sum = 2'(s) + 2'(c) + 2'(cin);
      checks += 2;
      if (cout_n !== ~sum[1]) begin failures++; $display("type A v=%b got %b", 3'(v), cout_n); end
      if (cout_b !== sum[1])  begin failures++; $display("type B v=%b got %b", 3'(v), cout_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
