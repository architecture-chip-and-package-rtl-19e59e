// tb_dpwm: pulse widths, dead time and period of the DPWM.
//
// With DUTY_W = 6 (64-cycle period) and DT = 2, a series of duty words is
// applied. For each full period the testbench counts the cycles with
// duty_p and with duty_n high and compares them with
//   high side: duty          low side: 64 - duty - 2*DT (0 if negative)
// It also checks that period_start pulses every 64 cycles, that the two
// outputs are never high together, that there are at least DT idle
// cycles between the two pulses, and that a duty change takes effect only
// from the next period.
module tb_dpwm;
  localparam int DUTY_W = 6, DT = 2, P = 1 << DUTY_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DUTY_W-1:0] duty;
  logic duty_p, duty_n, period_start;

  dpwm #(.DUTY_W(DUTY_W), .DT(DT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int duties [7] = '{0, 1, 10, 32, 59, 60, 63};
    duty = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // align to a period start
    do @(negedge clk); while (!period_start);
    foreach (duties[i]) begin
      int np, nn, gap, last_p, since_start, expn;
      duty = DUTY_W'(duties[i]);     // applies from the next period
      // rest of this period: old duty still in force, skip it
      do @(negedge clk); while (!period_start);
      np = 0; nn = 0; gap = P; last_p = -100;
      for (int c = 0; c < P; c++) begin
        #1;
        check(!(duty_p && duty_n), "no shoot-through");
        if (c > 0) check(!period_start, "one period_start per period");
        if (duty_p) begin np++; last_p = c; end
        if (duty_n) begin
          nn++;
          if (c - last_p < gap) gap = c - last_p;
        end
        @(negedge clk);
      end
      check(period_start, "period of 2^DUTY_W cycles");
      expn = P - duties[i] - 2 * DT;
      if (expn < 0) expn = 0;
      check(np == duties[i], $sformatf("high side on %0d cycles for duty %0d", np, duties[i]));
      check(nn == expn, $sformatf("low side on %0d cycles for duty %0d (want %0d)", nn, duties[i], expn));
      if (duties[i] > 0 && nn > 0) check(gap > DT, "dead time after the high-side pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
