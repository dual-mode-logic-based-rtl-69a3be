// tb_mix_workload: the mixed-mode workload at the multiplier's default size.
//
// 500 random 16x16 operand pairs and 500 random pairs for the 8x8 precision
// (two products each) are shuffled into one stream, so that half of the
// operations are at each precision. The DML mode follows the precision, as in
// the mixed operating point: dynamic for 16x16 operations, static for 8x8
// ones. Mode is switched only while the clock is high, one cycle ahead of the
// operation that uses it. prec for pair k is driven during the cycle after
// pair k is captured, and a zero pair is inserted as a bubble wherever a 16x16
// operation is followed by an 8x8 one. Each product is compared with an
// independent reference one clock after the two-stage pipeline delivers it, and
// the number of mode and precision switches is reported and must be non-zero.
module tb_mix_workload;
  import dml_pkg::*;

  localparam int HALF_PERIOD = 50;
  localparam int PER_PREC    = 500;
  localparam int MAXOPS      = 4 * PER_PREC;

  int checks = 0, failures = 0;

  logic           clock, rst_n, mode, prec;
  logic [N-1:0]   a, b;
  logic [P_W-1:0] o;
  logic           dml_clk, dml_clk_n;
  logic [N-1:0]   clk_row;

  dml_multiplier dut (
    .clock(clock), .rst_n(rst_n), .mode(mode), .prec(prec), .a(a), .b(b), .o(o),
    .dml_clk(dml_clk), .dml_clk_n(dml_clk_n), .clk_row(clk_row)
  );

  logic [N-1:0]   op_a [MAXOPS];
  logic [N-1:0]   op_b [MAXOPS];
  logic           op_p [MAXOPS];
  logic [P_W-1:0] op_e [MAXOPS];
  int             nops;
  int             n_full, n_half, n_mode_sw, n_bubble;

  initial begin
    #(2 * HALF_PERIOD * (MAXOPS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int left_full, left_half;
    left_full = PER_PREC; left_half = PER_PREC;
    nops = 0; n_bubble = 0; n_full = 0; n_half = 0; n_mode_sw = 0;
    while (left_full + left_half > 0) begin
      logic p;
      if (left_full == 0)      p = PREC_HALF;
      else if (left_half == 0) p = PREC_FULL;
      else p = ($urandom_range(0, left_full + left_half - 1) < left_half) ? PREC_HALF : PREC_FULL;
      if (nops > 0 && op_p[nops-1] == PREC_FULL && p == PREC_HALF) begin
        op_a[nops] = '0; op_b[nops] = '0; op_p[nops] = PREC_FULL; op_e[nops] = '0;
        nops++; n_bubble++;
      end
      op_a[nops] = 16'($urandom());
      op_b[nops] = 16'($urandom());
      op_p[nops] = p;
      op_e[nops] = ref_product(op_a[nops], op_b[nops], p);
      nops++;
      if (p == PREC_FULL) left_full--; else left_half--;
    end
  end

  // Mixed operating point: dynamic DML for the higher precision.
  function automatic logic mode_for(logic p);
    return (p == PREC_FULL) ? MODE_DYNAMIC : MODE_STATIC;
  endfunction

  initial begin
    clock = 1'b1; rst_n = 1'b1; mode = MODE_STATIC; prec = PREC_FULL; a = '0; b = '0;
    #1 rst_n = 1'b0;
    wait (nops > 0);
    #(HALF_PERIOD) rst_n = 1'b1;
    a = op_a[0]; b = op_b[0]; mode = mode_for(op_p[0]);
    for (int e = 0; e < nops + 2; e++) begin
      #(HALF_PERIOD) clock = 1'b0;            // falling edge e captures pair e
      #1;
      if (e >= 2) begin
        int k;
        k = e - 2;
        checks++;
        if (o !== op_e[k]) begin
          failures++;
          $display("op %0d a=%h b=%h prec=%b: o=%h expected %h", k, op_a[k], op_b[k], op_p[k], o, op_e[k]);
        end
        if (op_a[k] != 0 || op_b[k] != 0) begin
          if (op_p[k] == PREC_FULL) n_full++; else n_half++;
        end
      end
      if (e + 1 < nops) begin a = op_a[e+1]; b = op_b[e+1]; end
      else begin a = '0; b = '0; end
      if (e < nops) prec = op_p[e];
      #(HALF_PERIOD - 1) clock = 1'b1;
      // The array works on pair e+1 in the next cycle: set its mode now.
      if (e + 1 < nops && mode_for(op_p[e+1]) != mode) begin
        mode = mode_for(op_p[e+1]);
        n_mode_sw++;
      end
    end
    $display("16x16 ops=%0d 8x8 ops=%0d (two products each) mode switches=%0d bubbles=%0d",
             n_full, n_half, n_mode_sw, n_bubble);
    checks += 3;
    if (n_full + n_half < 2 * PER_PREC - 2) begin failures++; $display("too few operations checked"); end
    if (n_mode_sw == 0) begin failures++; $display("mode never switched"); end
    if (n_bubble == 0)  begin failures++; $display("no bubble"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
