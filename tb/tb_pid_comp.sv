// tb_pid_comp: the PID compensator against an independent model, then in
// a closed loop with a behavioural buck converter.
//
// Part 1 applies random ADC samples, references and gains and compares
// the duty word after every sample with a model that evaluates the PID
// law in full-precision integers: accumulator u += KP*(e-e1) + KI*e +
// KD*(e-2e1+e2), clamped to [0, 255*64], duty = u / 64.
// Part 2 closes the loop: the converter output (in ADC codes) follows
// duty * 200 / 255 through a first-order lag, and the ADC reads it every
// 8 cycles. With the reference at 120 the output must settle within 3
// codes, and follow a reference step to 80.
module tb_pid_comp;
  localparam int ADC_W = 8, DUTY_W = 8, GAIN_W = 8, FRAC = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ADC_W-1:0] adc, vref;
  logic sample_valid;
  logic [GAIN_W-1:0] kp, ki, kd;
  logic [DUTY_W-1:0] duty;

  pid_comp #(.ADC_W(ADC_W), .DUTY_W(DUTY_W), .GAIN_W(GAIN_W), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint u, e1m, e2m;

  task automatic model_step(int a, int r);
    longint e, du;
    e  = r - a;
    du = longint'(kp) * (e - e1m) + longint'(ki) * e + longint'(kd) * (e - 2 * e1m + e2m);
    u  = u + du;
    if (u < 0) u = 0;
    if (u > 255 * 64) u = 255 * 64;
    e2m = e1m;
    e1m = e;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vout10;   // converter output in tenths of an ADC code
    adc = 0; vref = 0; sample_valid = 0; kp = 0; ki = 0; kd = 0;
    u = 0; e1m = 0; e2m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- part 1: random samples against the model ----
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n % 50 == 0) begin
        kp = GAIN_W'($urandom_range(0, 80));
        ki = GAIN_W'($urandom_range(0, 30));
        kd = GAIN_W'($urandom_range(0, 40));
      end
      adc  = ADC_W'($urandom);
      vref = ADC_W'($urandom_range(60, 200));
      sample_valid = 1'($urandom_range(0, 3) != 0);
      if (sample_valid) model_step(int'(adc), int'(vref));
      @(negedge clk);
      sample_valid = 0;
      check(int'(duty) == int'(u / 64), $sformatf("duty %0d, model %0d", duty, u / 64));
    end
    // ---- part 2: closed loop ----
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    kp = 8'd24; ki = 8'd6; kd = 8'd4;
    vref = 8'd120;
    vout10 = 0;
    for (int n = 0; n < 8 * 400; n++) begin
      @(negedge clk);
      vout10 = vout10 + ((int'(duty) * 2000 / 255) - vout10) / 16;
      adc = ADC_W'(vout10 / 10);
      sample_valid = (n % 8 == 0);
      if (n == 8 * 200) begin
        check(int'(adc) >= 117 && int'(adc) <= 123, $sformatf("settled at reference 120 (adc %0d)", adc));
        vref = 8'd80;
      end
    end
    check(int'(adc) >= 77 && int'(adc) <= 83, $sformatf("followed reference 80 (adc %0d)", adc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
