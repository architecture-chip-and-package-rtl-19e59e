// pid_comp: digital PID compensator of the integrated voltage regulator.
//
// The IVR is a buck converter. An ADC samples the scaled output voltage;
// this block compares each sample with the reference and computes the
// next PWM duty cycle. It uses the incremental (velocity) form:
//
//   e[n]   = vref - adc[n]
//   u[n]   = u[n-1] + KP*(e[n]-e[n-1]) + KI*e[n] + KD*(e[n]-2e[n-1]+e[n-2])
//   duty   = u[n] >> FRAC, with u kept within [0, 2^DUTY_W - 1] << FRAC
//
// Gains are run-time inputs, unsigned, with FRAC fractional bits in the
// accumulator. One update happens on each clock edge where sample_valid is
// high (one ADC conversion); duty changes in the cycle after it. The
// clamp keeps the accumulator from winding up at either end.
//
// The document's IVR block diagram shows the ADC, the reference, the
// digital PID compensator and the DPWM; the control law form, widths and
// gain format are this design's choices.
module pid_comp #(
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned DUTY_W = 8,
  parameter int unsigned GAIN_W = 8,
  parameter int unsigned FRAC   = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc,
  input  logic              sample_valid,
  input  logic [ADC_W-1:0]  vref,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  input  logic [GAIN_W-1:0] kd,
  output logic [DUTY_W-1:0] duty
);

  localparam int unsigned EW = ADC_W + 3;              // error and its differences
  localparam int unsigned AW = DUTY_W + FRAC + 2;      // accumulator, with sign and margin
  localparam int unsigned PW = EW + GAIN_W + 3;        // one update

  logic signed [EW-1:0] e0, e1, e2;
  logic signed [AW-1:0] acc;
  logic signed [PW-1:0] du;
  logic signed [PW+1:0] nxt;

  localparam logic signed [PW+1:0] MAXV = (PW+2)'(((1 << DUTY_W) - 1) << FRAC);

  always_comb begin
    e0  = EW'($signed({1'b0, vref})) - EW'($signed({1'b0, adc}));
    du  = PW'($signed({1'b0, kp})) * PW'(e0 - e1)
        + PW'($signed({1'b0, ki})) * PW'(e0)
        + PW'($signed({1'b0, kd})) * PW'(e0 - e1 - e1 + e2);
    nxt = (PW+2)'(acc) + (PW+2)'(du);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1  <= '0;
      e2  <= '0;
      acc <= '0;
    end else if (sample_valid) begin
      e2 <= e1;
      e1 <= e0;
      if (nxt < 0)          acc <= '0;
      else if (nxt > MAXV)  acc <= AW'(MAXV);
      else                  acc <= AW'(nxt);
    end
  end

  assign duty = DUTY_W'(acc >>> FRAC);

endmodule
