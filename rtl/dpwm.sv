// dpwm: counter-based digital pulse-width modulator of the IVR.
//
// A free-running counter of DUTY_W bits sets the switching period
// (2^DUTY_W clock cycles). The duty word is taken at the start of each
// period, so a duty change never cuts a pulse short. Within a period
//   duty_p (high-side switch on)  while  count <  duty
//   duty_n (low-side switch on)   while  duty + DT <= count < 2^DUTY_W - DT
// so the two switches are never on together: DT cycles of dead time
// follow the high-side pulse and precede the next one. A duty of 0 keeps
// the high side off for the whole period. period_start pulses in the first
// cycle of each period and is used to start an ADC conversion.
//
// Both outputs are active high "switch on" commands; the gate drivers
// supply the polarity of each transistor. The DPWM and its two outputs
// duty_P / duty_N are from the document's IVR block diagram; the counter
// scheme and the dead time are this design's choices.
module dpwm #(
  parameter int unsigned DUTY_W = 8,
  parameter int unsigned DT     = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DUTY_W-1:0] duty,
  output logic              duty_p,
  output logic              duty_n,
  output logic              period_start
);

  logic [DUTY_W-1:0] cnt, duty_q;
  logic [DUTY_W:0]   n_on, n_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty_q <= duty;
    end
  end

  assign n_on         = {1'b0, duty_q} + (DUTY_W+1)'(DT);
  assign n_off        = (DUTY_W+1)'((1 << DUTY_W) - DT);
  assign duty_p       = ({1'b0, cnt} < {1'b0, duty_q});
  assign duty_n       = ({1'b0, cnt} >= n_on) && ({1'b0, cnt} < n_off);
  assign period_start = (cnt == '0);

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(duty_p && duty_n));

endmodule
