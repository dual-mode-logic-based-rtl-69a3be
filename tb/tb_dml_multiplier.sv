// tb_dml_multiplier: end-to-end test of the pipelined double-precision
// multiplier at its default size (16-bit operands).
//
// A stream of operand pairs is issued, one per clock, with the precision
// chosen at random per operation and the DML mode switched between static and
// dynamic every few dozen operations. Operand pair k is presented before
// falling edge k; following the top's timing rules, prec for pair k is driven
// during the cycle after that edge, and its product is expected on o right
// after falling edge k+2 (the two-stage latency). When a 16x16 operation is
// followed by an 8x8 one, a zero operand pair is issued in between as the
// required bubble. Every product is compared with an independent reference.
// The test also checks the DML clocks: held high (and the flipped clock low)
// in static mode, equal to the external clock in dynamic mode, and the last
// row clock equal to the DML clock once the buffer chain has settled.
// It counts each mechanism it must exercise (both precisions, both modes,
// switches in both directions for each, bubbles, carries across the 16-bit
// boundary, all-propagate skip blocks in the final adder) and fails if any of
// them never happened.
module tb_dml_multiplier;
  import dml_pkg::*;

  localparam int HALF_PERIOD = 50;
  localparam int NOPS        = 3000;

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

  // Operation list.
  logic [N-1:0]   op_a [NOPS];
  logic [N-1:0]   op_b [NOPS];
  logic           op_p [NOPS];
  logic           op_m [NOPS];
  logic [P_W-1:0] op_e [NOPS];
  int             nops;

  // Mechanism counters.
  int n_full, n_half, n_static_ops, n_dynamic_ops;
  int n_to_half, n_to_full, n_to_dynamic, n_to_static;
  int n_bubble, n_cross16, n_skip;

  initial begin
    #(2 * HALF_PERIOD * (NOPS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build the stream: random precision, mode runs of random length, bubbles.
  initial begin : build
    logic cur_mode;
    int   run;
    nops = 0; cur_mode = MODE_STATIC; run = 0;
    n_bubble = 0; n_cross16 = 0;
    while (nops < NOPS - 2) begin
      logic p;
      logic [N-1:0] av, bv;
      if (run == 0) begin
        run = 20 + int'($urandom_range(0, 30));
        cur_mode = (nops == 0) ? MODE_STATIC : ~cur_mode;
      end
      run--;
      p  = ($urandom_range(0, 2) == 0) ? PREC_HALF : PREC_FULL;
      av = 16'($urandom());
      bv = 16'($urandom());
      if ($urandom_range(0, 9) == 0) begin av = 16'hFFFF; bv = 16'hFFFF; end
      if (nops > 0 && op_p[nops-1] == PREC_FULL && p == PREC_HALF) begin
        op_a[nops] = '0; op_b[nops] = '0; op_p[nops] = PREC_FULL; op_m[nops] = cur_mode;
        op_e[nops] = '0;
        nops++; n_bubble++;
      end
      op_a[nops] = av; op_b[nops] = bv; op_p[nops] = p; op_m[nops] = cur_mode;
      op_e[nops] = ref_product(av, bv, p);
      nops++;
    end
  end

  // Mechanisms inside the final adder, observed on its registered inputs.
  always @(posedge dut.clock_n) if (rst_n) begin
    if (((17'(dut.s_q[15:0]) + 17'(dut.c_q[15:0])) >> 16) != 0 && !prec) n_cross16++;
    for (int k = 0; k < P_W / 4; k++)
      if (&4'(({1'b0, dut.s_q} ^ {1'b0, dut.c_q}) >> (4 * k))) n_skip++;
  end

  // Clock and mode checks in the middle of each half period.
  task automatic check_clocks();
    checks += 2;
    if (mode == MODE_STATIC) begin
      if (dml_clk !== 1'b1 || dml_clk_n !== 1'b0) begin
        failures++; $display("%0t static mode: dml_clk=%b dml_clk_n=%b", $time, dml_clk, dml_clk_n);
      end
    end else begin
      if (dml_clk !== clock || dml_clk_n !== ~clock) begin
        failures++; $display("%0t dynamic mode: dml_clk=%b clock=%b", $time, dml_clk, clock);
      end
    end
    if (clk_row[N-1] !== dml_clk) begin
      failures++; $display("%0t clk_row[%0d]=%b dml_clk=%b", $time, N - 1, clk_row[N-1], dml_clk);
    end
  endtask

  initial begin : run
    int lat;
    n_full = 0; n_half = 0; n_static_ops = 0; n_dynamic_ops = 0;
    n_to_half = 0; n_to_full = 0; n_to_dynamic = 0; n_to_static = 0; n_skip = 0;
    clock = 1'b1; rst_n = 1'b1; mode = MODE_STATIC; prec = PREC_FULL; a = '0; b = '0;
    #1 rst_n = 1'b0;
    wait (nops > 0);
    #(HALF_PERIOD);
    rst_n = 1'b1;

    // Latency: one 16x16 pair after reset; o must change only after the
    // third falling edge counting the one that captures the operands.
    a = 16'hFFFF; b = 16'hFFFF; prec = PREC_FULL;
    lat = 0;
    for (int e = 0; e < 5; e++) begin
      #(HALF_PERIOD) clock = 1'b0;           // falling edge e
      #1;
      a = '0; b = '0;
      if (lat == 0 && o == ref_product(16'hFFFF, 16'hFFFF, PREC_FULL)) lat = e;
      #(HALF_PERIOD - 1) clock = 1'b1;
    end
    checks++;
    if (lat != 2) begin failures++; $display("latency: product after edge %0d, expected 2", lat); end

    // Stream.
    a = op_a[0]; b = op_b[0]; mode = op_m[0];
    for (int e = 0; e < nops + 2; e++) begin
      #(HALF_PERIOD / 2) check_clocks();
      // Clock high, before edge e: o must still hold the product loaded at
      // edge e-1 (the registers load on the falling edge only).
      if (e >= 3) begin
        checks++;
        if (o !== op_e[e-3]) begin
          failures++;
          $display("op %0d: o=%h changed before the falling edge (expected %h)", e - 3, o, op_e[e-3]);
        end
      end
      #(HALF_PERIOD / 2) clock = 1'b0;        // falling edge e captures pair e
      #1;
      if (e >= 2) begin
        int k;
        k = e - 2;
        checks++;
        if (o !== op_e[k]) begin
          failures++;
          $display("op %0d a=%h b=%h prec=%b mode=%b: o=%h expected %h",
                   k, op_a[k], op_b[k], op_p[k], op_m[k], o, op_e[k]);
        end
        if (op_p[k] == PREC_FULL) n_full++; else n_half++;
        if (op_m[k] == MODE_STATIC) n_static_ops++; else n_dynamic_ops++;
      end
      // Drive pair e+1 and the precision of pair e.
      if (e + 1 < nops) begin a = op_a[e+1]; b = op_b[e+1]; end
      else begin a = '0; b = '0; end
      if (e < nops) begin
        if (e > 0 && op_p[e] != op_p[e-1]) begin
          if (op_p[e] == PREC_HALF) n_to_half++; else n_to_full++;
        end
        prec = op_p[e];
      end
      #(HALF_PERIOD / 2 - 1) check_clocks();
      #(HALF_PERIOD / 2) clock = 1'b1;
      // Mode is changed only while the clock is high.
      if (e + 1 < nops && op_m[e+1] != mode) begin
        if (op_m[e+1] == MODE_DYNAMIC) n_to_dynamic++; else n_to_static++;
        mode = op_m[e+1];
      end
    end

    $display("ops: full=%0d half=%0d static=%0d dynamic=%0d", n_full, n_half, n_static_ops, n_dynamic_ops);
    $display("switches: to_half=%0d to_full=%0d to_dynamic=%0d to_static=%0d bubbles=%0d",
             n_to_half, n_to_full, n_to_dynamic, n_to_static, n_bubble);
    $display("adder: carries across bit 16=%0d all-propagate blocks=%0d", n_cross16, n_skip);
    checks += 11;
    if (n_full == 0)        begin failures++; $display("no 16x16 operation"); end
    if (n_half == 0)        begin failures++; $display("no 8x8 operation"); end
    if (n_static_ops == 0)  begin failures++; $display("no static-mode operation"); end
    if (n_dynamic_ops == 0) begin failures++; $display("no dynamic-mode operation"); end
    if (n_to_half == 0)     begin failures++; $display("no switch to 8x8"); end
    if (n_to_full == 0)     begin failures++; $display("no switch to 16x16"); end
    if (n_to_dynamic == 0)  begin failures++; $display("no switch to dynamic mode"); end
    if (n_to_static == 0)   begin failures++; $display("no switch to static mode"); end
    if (n_bubble == 0)      begin failures++; $display("no bubble"); end
    if (n_cross16 == 0)     begin failures++; $display("no carry across bit 16"); end
    if (n_skip == 0)        begin failures++; $display("no skipped adder block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
