// serdes: serial link between the debug module and its I/O driver.
//
// The transmitter takes a W-bit word (valid/ready) and sends it on one
// wire: a start bit of 1, then the W data bits, least significant first,
// one bit per clock; the line idles at 0. It takes the next word in the
// cycle after the last data bit, so a word occupies W+1 cycles.
// The receiver watches its line for a start bit, shifts in the next W
// bits and presents the word on rx_valid for one cycle.
//
// The document shows a Serdes between the Debug block and an I/O driver
// of the Rocket chiplet; the framing and the width are this design's
// choices.
module serdes #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmit
  input  logic [W-1:0] tx_data,
  input  logic         tx_valid,
  output logic         tx_ready,
  output logic         tx_line,
  // receive
  input  logic         rx_line,
  output logic [W-1:0] rx_data,
  output logic         rx_valid
);

  localparam int unsigned CW = $clog2(W + 1);

  // ---------------- transmit ----------------
  logic [W-1:0]  tsh;
  logic [CW-1:0] tcnt;     // data bits left to send
  logic          tbusy;

  assign tx_ready = !tbusy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsh     <= '0;
      tcnt    <= '0;
      tbusy   <= 1'b0;
      tx_line <= 1'b0;
    end else if (!tbusy) begin
      tx_line <= 1'b0;
      if (tx_valid) begin
        tsh     <= tx_data;
        tcnt    <= CW'(W);
        tbusy   <= 1'b1;
        tx_line <= 1'b1;            // start bit
      end
    end else begin
      tx_line <= tsh[0];
      tsh     <= tsh >> 1;
      tcnt    <= tcnt - 1'b1;
      if (tcnt == CW'(1)) tbusy <= 1'b0;
    end
  end

  // ---------------- receive ----------------
  logic [CW-1:0] rcnt;     // data bits still to come
  logic          rbusy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt     <= '0;
      rbusy    <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (!rbusy) begin
        if (rx_line) begin
          rbusy <= 1'b1;
          rcnt  <= CW'(W);
        end
      end else begin
        rx_data <= {rx_line, rx_data[W-1:1]};
        rcnt    <= rcnt - 1'b1;
        if (rcnt == CW'(1)) begin
          rbusy    <= 1'b0;
          rx_valid <= 1'b1;
        end
      end
    end
  end

endmodule
