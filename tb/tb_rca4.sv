// tb_rca4: exhaustive check of the 4-bit ripple-carry block: for all 512
// combinations of s, c and cin, {cout, o} must equal s + c + cin and p must
// equal s ^ c.
module tb_rca4;
  int checks = 0, failures = 0;
  logic [3:0] s, c, o, p;
  logic       cin, cout;

  rca4 dut (.s(s), .c(c), .cin(cin), .o(o), .p(p), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] exp_sum;
      {s, c, cin} = 9'(v);
      #1;
      exp_sum = 5'(s) + 5'(c) + 5'(cin);
      checks += 2;
      if ({cout, o} !== exp_sum) begin failures++; $display("s=%h c=%h cin=%b got %b%h", s, c, cin, cout, o); end
      if (p !== (s ^ c))         begin failures++; $display("p s=%h c=%h got %h", s, c, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
