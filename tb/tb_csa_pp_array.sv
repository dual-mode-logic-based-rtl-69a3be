// tb_csa_pp_array: checks that the carry-save array's two vectors add up to the
// product. prec low: s + c = a * b. prec high: the low half of s + c is
// a[7:0]*b[7:0] and the high half a[15:8]*b[15:8]. Also checks that no carry
// of the low 8x8 product reaches bit 16 of the vectors, and that c[1:0] stay 0.
// Corner operands (0, 1, all ones, single bits) come first, random ones after.
module tb_csa_pp_array;
  import dml_pkg::*;
  int checks = 0, failures = 0;
  logic [N-1:0]    a, b;
  logic            prec;
  logic [CS_W-1:0] s, c;

  csa_pp_array dut (.a(a), .b(b), .prec(prec), .s(s), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] av, logic [N-1:0] bv, logic pr);
    logic [P_W-1:0] got, e;
    a = av; b = bv; prec = pr;
    #1;
    e = ref_product(av, bv, pr);
    checks++;
    if (pr) begin
      got[15:0]  = s[15:0] + c[15:0];
      got[31:16] = 16'(s[30:16]) + 16'(c[30:16]);
    end else begin
      got = 32'(s) + 32'(c);
    end
    if (got !== e) begin
      failures++;
      $display("a=%h b=%h prec=%b s+c=%h exp %h", av, bv, pr, got, e);
    end
    checks++;
    if (c[1:0] != 2'b00 || (pr && ((17'(s[15:0]) + 17'(c[15:0])) >> 16) != 0)) begin
      failures++;
      $display("a=%h b=%h prec=%b: stray carry", av, bv, pr);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h00FF, 16'hFF00, 16'h8001};
    foreach (corners[i]) foreach (corners[j]) begin
      check_one(corners[i], corners[j], 1'b0);
      check_one(corners[i], corners[j], 1'b1);
    end
    for (int k = 0; k < N; k++) begin
      check_one(16'(1) << k, 16'hFFFF, 1'b0);
      check_one(16'hFFFF, 16'(1) << k, 1'b1);
    end
    for (int n = 0; n < 5000; n++) check_one(16'($urandom()), 16'($urandom()), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
