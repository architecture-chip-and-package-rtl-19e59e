// ivr_ctrl: digital controller of the integrated voltage regulator.
//
// The IVR is a buck converter whose switches, inductor and capacitor are
// analog. Its loop, as drawn in the document's IVR block diagram, is
// ADC -> digital PID compensator -> DPWM -> gate drivers. This module holds
// the two digital parts: the DPWM switches at 2^DUTY_W clock cycles per
// period and asks for one ADC conversion at the start of each period
// (adc_start); the PID compensator takes the conversion result (adc,
// adc_valid), compares it with vref and sets the duty cycle that the DPWM
// uses from its next period on.
module ivr_ctrl #(
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned DUTY_W = 8,
  parameter int unsigned GAIN_W = 8,
  parameter int unsigned FRAC   = 6,
  parameter int unsigned DT     = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc,
  input  logic              adc_valid,
  output logic              adc_start,
  input  logic [ADC_W-1:0]  vref,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  input  logic [GAIN_W-1:0] kd,
  output logic              duty_p,
  output logic              duty_n,
  output logic [DUTY_W-1:0] duty
);

  pid_comp #(.ADC_W(ADC_W), .DUTY_W(DUTY_W), .GAIN_W(GAIN_W), .FRAC(FRAC)) u_pid (
    .clk, .rst_n, .adc, .sample_valid(adc_valid), .vref, .kp, .ki, .kd, .duty
  );

  dpwm #(.DUTY_W(DUTY_W), .DT(DT)) u_pwm (
    .clk, .rst_n, .duty, .duty_p, .duty_n, .period_start(adc_start)
  );

endmodule
