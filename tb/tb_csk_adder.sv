// tb_csk_adder: checks the 16/32-bit carry-skip adder against plain addition.
// prec low: o = s + c over 32 bits. prec high: the two 16-bit halves are
// added independently, with no carry from bit 15 into bit 16. Directed cases
// make whole blocks propagate (so the skip path is taken), make a carry cross
// the precision boundary, and make every block generate; random cases follow.
module tb_csk_adder;
  int checks = 0, failures = 0;
  logic [30:0] s, c;
  logic        prec;
  logic [31:0] o;
  int          skip_cases = 0, cross_cases = 0;

  csk_adder dut (.s(s), .c(c), .prec(prec), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(logic [30:0] sv, logic [30:0] cv, logic pr);
    logic [31:0] r;
    if (!pr) r = 32'(sv) + 32'(cv);
    else begin
      r[15:0]  = sv[15:0] + cv[15:0];
      r[31:16] = 16'(sv[30:16]) + 16'(cv[30:16]);
    end
    return r;
  endfunction

  task automatic check_one(logic [30:0] sv, logic [30:0] cv, logic pr);
    logic [31:0] e;
    s = sv; c = cv; prec = pr;
    #1;
    e = expected(sv, cv, pr);
    checks++;
    if (&4'((sv ^ cv) >> 4)) skip_cases++;   // block 1 all-propagate
    if (!pr && ((32'(sv[15:0]) + 32'(cv[15:0])) >> 16) != 0) cross_cases++;
    if (o !== e) begin
      failures++;
      $display("s=%h c=%h prec=%b got %h exp %h", sv, cv, pr, o, e);
    end
  endtask

  initial begin
    // Directed: all-propagate with a carry entering from below.
    check_one(31'h7FFF_FFFF, 31'h0000_0001, 1'b0);
    check_one(31'h7FFF_FFFF, 31'h0000_0001, 1'b1);
    check_one(31'h0000_FFFF, 31'h0000_0001, 1'b0);   // carry crosses bit 16
    check_one(31'h0000_FFFF, 31'h0000_0001, 1'b1);   // carry cut at bit 16
    check_one(31'h5555_5555, 31'h2AAA_AAAA, 1'b0);   // every bit propagates
    check_one(31'h2AAA_AAAB, 31'h5555_5555, 1'b0);
    check_one(31'h7FFF_FFFF, 31'h7FFF_FFFF, 1'b0);   // every bit generates
    check_one(31'h7FFF_FFFF, 31'h7FFF_FFFF, 1'b1);
    for (int k = 0; k < 31; k++) begin
      check_one(31'h7FFF_FFFF >> k, 31'(1), 1'b0);
      check_one(31'h7FFF_FFFF >> k, 31'(1), 1'b1);
    end
    for (int n = 0; n < 4000; n++) begin
      logic [30:0] rs, rc;
      rs = 31'($urandom());
      rc = 31'($urandom());
      // Bias some vectors towards long propagate runs.
      if (n % 3 == 0) rc = ~rs ^ 31'(1 << $urandom_range(0, 30));
      check_one(rs, rc, n[0]);
    end
    checks++;
    if (skip_cases == 0 || cross_cases == 0) begin
      failures++;
      $display("coverage: skip_cases=%0d cross_cases=%0d", skip_cases, cross_cases);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
