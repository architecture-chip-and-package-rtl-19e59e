// tb_dldo_ctrl: closed loop with a behavioural DLDO power stage.
//
// The power stage is modelled as a first-order lag: the output voltage
// error (in units of one switch current) moves halfway each cycle towards
// (switches on - load), and the clocked comparator reports whether it is
// below zero (the reference). The load steps between values inside and outside the
// switch range. Checked: sw_en is always the thermometer code of count;
// count changes by at most one per cycle, towards the load; the loop
// settles within 2 switches of the load within |step| + 8 cycles; the
// count saturates, with ev_sat, when the load exceeds N_SW or drops
// below zero switches; en = 0 freezes the count.
module tb_dldo_ctrl;
  localparam int N_SW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, cmp, ev_sat;
  logic [N_SW-1:0] sw_en;
  logic [$clog2(N_SW+1)-1:0] count;

  dldo_ctrl #(.N_SW(N_SW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int v = 0, load = 16, prev, sat_seen = 0;

  // behavioural power stage and comparator, evaluated at the falling edge
  always @(negedge clk) if (rst_n) begin
    v   = (v + 2 * (int'(count) - load)) / 2;   // first-order lag
    cmp = (v < 0);
    #2;
    check(sw_en == N_SW'((64'd1 << count) - 1), "thermometer code");
    if (ev_sat) sat_seen++;
  end

  task automatic settle(int ld, int cycles);
    load = ld;
    repeat (cycles) begin
      @(negedge clk);
      #3;
      prev = int'(count);
      @(posedge clk);
      #1;
      check(int'(count) - prev <= 1 && prev - int'(count) <= 1, "one switch per cycle");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; cmp = 0;
    repeat (3) @(negedge clk);
    #1 check(count == N_SW / 2, "half the switches on after reset");
    rst_n = 1;
    begin
      int loads [5] = '{20, 5, 28, 12, 24};
      int last = 16;
      foreach (loads[i]) begin
        int step;
        step = (loads[i] > last) ? loads[i] - last : last - loads[i];
        settle(loads[i], step + 8);
        check(int'(count) >= loads[i] - 2 && int'(count) <= loads[i] + 2,
              $sformatf("settled near load %0d (count %0d)", loads[i], count));
        settle(loads[i], 20);
        check(int'(count) >= loads[i] - 2 && int'(count) <= loads[i] + 2, "stays near the load");
        last = loads[i];
      end
    end
    // saturation at both ends
    settle(40, 40);
    check(count == N_SW, "saturates at N_SW");
    settle(-5, 60);
    check(count == 0, "saturates at zero");
    check(sat_seen > 0, "ev_sat seen");
    // disabled loop holds its count
    @(negedge clk) en = 0;
    load = 30;
    repeat (20) @(negedge clk);
    #3 check(count == 0, "en = 0 freezes the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
