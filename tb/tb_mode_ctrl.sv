// tb_mode_ctrl: checks the DML clock control over a few clock periods in each
// mode. Static mode (mode = 0): clk stays high and clk_n low whatever the
// clock does. Dynamic mode (mode = 1): clk follows clock and clk_n its
// inverse. In both modes clock_n is the inverted clock. Checks are taken in
// the middle of each clock half-period.
module tb_mode_ctrl;
  int checks = 0, failures = 0;
  logic clock, mode, clock_n, clk, clk_n;
  int   clk_edges_static = 0, clk_edges_dynamic = 0;

  mode_ctrl dut (.clock(clock), .mode(mode), .clock_n(clock_n), .clk(clk), .clk_n(clk_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(clk) if (mode) clk_edges_dynamic++; else clk_edges_static++;

  task automatic half_period(logic level);
    clock = level;
    #5;
    checks += 3;
    if (clock_n !== ~level) begin failures++; $display("clock_n wrong"); end
    if (clk !== (mode ? level : 1'b1)) begin failures++; $display("clk wrong mode=%b clock=%b clk=%b", mode, level, clk); end
    if (clk_n !== ~clk) begin failures++; $display("clk_n wrong"); end
    #5;
  endtask

  initial begin
    clock = 1'b1; mode = 1'b0;
    #10;
    clk_edges_static = 0;
    repeat (4) begin half_period(1'b0); half_period(1'b1); end
    mode = 1'b1;   // switch while clock is high
    #1;
    clk_edges_dynamic = 0;
    repeat (4) begin half_period(1'b0); half_period(1'b1); end
    checks += 2;
    if (clk_edges_static != 0) begin failures++; $display("clk toggled in static mode"); end
    if (clk_edges_dynamic != 8) begin failures++; $display("clk toggled %0d times in dynamic mode", clk_edges_dynamic); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
