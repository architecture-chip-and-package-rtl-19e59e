// dldo_ctrl: digital control loop of a digital low-dropout regulator.
//
// A DLDO regulates with an array of N_SW identical power switches between
// the supply and the regulated rail. Its only analog part in the loop is a
// clocked comparator that reports whether the rail is below the reference
// (cmp = 1). This controller keeps a count of switches that are on and, on
// every clock edge where en is high, adds one switch while the rail is low
// and removes one while it is high, saturating at 0 and N_SW. The switch
// enables sw_en are the thermometer code of that count (sw_en[i] = 1 for
// i < count), so one switch changes per cycle. In steady state the count
// toggles by one around the load's operating point.
//
// After reset half of the switches are on. ev_sat pulses in a cycle where
// the count wants to move past either end.
//
// The document places the DLDO control logic on the Rocket chiplet and
// the DLDO with its capacitor on their own chiplet; the counter-based loop
// and the number of switches are this design's choices.
module dldo_ctrl #(
  parameter int unsigned N_SW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            cmp,
  output logic [N_SW-1:0] sw_en,
  output logic [$clog2(N_SW+1)-1:0] count,
  output logic            ev_sat
);

  localparam int unsigned CW = $clog2(N_SW + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= CW'(N_SW / 2);
    end else if (en) begin
      if (cmp && count != CW'(N_SW))  count <= count + 1'b1;
      else if (!cmp && count != '0)   count <= count - 1'b1;
    end
  end

  assign ev_sat = en && ((cmp && count == CW'(N_SW)) || (!cmp && count == '0));

  always_comb begin
    for (int i = 0; i < N_SW; i++) sw_en[i] = (CW'(i) < count);
  end

endmodule
