// tb_serdes: the debug serdes in loop-back.
//
// The transmit line is wired to the receive line. Random 32-bit words are
// sent back to back and with gaps; every received word must equal the
// word sent, in order. The word must appear on rx_valid W+2 cycles after
// the transmitter took it (start bit, W data bits, one register stage),
// and the transmitter must take one word per W+1 cycles when fed
// continuously.
module tb_serdes;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] tx_data, rx_data;
  logic tx_valid, tx_ready, tx_line, rx_line, rx_valid;

  serdes #(.W(W)) dut (.*);
  assign rx_line = tx_line;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] q[$];
  int t_sent[$];
  int cyc = 0, got = 0, last_take = -1;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    #2;
    if (rx_valid) begin
      check(q.size() > 0 && rx_data == q[0], "received word");
      if (t_sent.size() > 0) check(cyc - t_sent[0] == W + 2, $sformatf("latency %0d cycles", cyc - t_sent[0]));
      void'(q.pop_front());
      void'(t_sent.pop_front());
      got++;
    end
    if (tx_valid && tx_ready) begin
      q.push_back(tx_data);
      t_sent.push_back(cyc);
      if (last_take >= 0 && cont) check(cyc - last_take == W + 1, "one word per W+1 cycles");
      last_take = cyc;
    end
  end

  bit cont;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_valid = 0; tx_data = 0; cont = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // continuous stream
    cont = 1;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      tx_valid = 1;
      tx_data  = $urandom;
      #1 while (!tx_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    tx_valid = 0;
    cont = 0;
    // words with gaps
    for (int n = 0; n < 10; n++) begin
      repeat ($urandom_range(1, 40)) @(negedge clk);
      tx_valid = 1;
      tx_data  = $urandom;
      #1 while (!tx_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      tx_valid = 0;
    end
    repeat (W + 10) @(negedge clk);
    check(got == 20, $sformatf("all 20 words received (got %0d)", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
