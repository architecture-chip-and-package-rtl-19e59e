// tb_hl_bridge: loop-back test of the Hybrid-Link bridge.
//
// The bridge's flit output is fed back into its own flit input through a
// gate that randomly withholds the channel (backpressure). Random
// transactions of all six packet kinds are sent; every received
// transaction is compared with the one sent, every header flit is checked
// bit by bit against the layout {L/E, Valid, CMD, Length, Addr}, and the
// number of flits per packet (1, 2 or 3) is checked against the packet
// kind. With the channel always open, a packet must take exactly as many
// cycles as it has flits.
module tb_hl_bridge;
  import hl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  hl_txn_t tx_txn, rx_txn;
  logic    tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t   tx_flit, rx_flit;
  logic    tx_flit_ready, rx_flit_ready, gate;

  hl_bridge dut (.*);

  assign rx_flit       = gate ? tx_flit : '0;
  assign tx_flit_ready = gate && rx_flit_ready;

  int checks = 0, failures = 0;
  hl_txn_t sent_q[$];

  int      nflit_q[$];
  int      flits_seen;
  bit      in_pkt;
  int      pkt_flits_expect;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expect_flits(hl_txn_t t);
    return 1 + (t.ext ? 1 : 0) + ((t.cmd == CMD_WRITE_REQ || t.cmd == CMD_READ_RESP) ? 1 : 0);
  endfunction

  function automatic hl_txn_t rand_txn();
    hl_txn_t t;
    int k;
    t      = '0;
    k      = $urandom_range(0, 2);
    t.cmd  = (k == 0) ? CMD_READ_REQ : (k == 1) ? CMD_WRITE_REQ : CMD_READ_RESP;
    t.ext  = 1'($urandom_range(0, 1));
    t.len  = 3'd1;
    t.addr = $urandom;
    t.data = (t.cmd == CMD_READ_REQ) ? 32'd0 : $urandom;
    if (t.ext) begin
      t.tid = 6'($urandom);
      t.did = 6'($urandom);
    end
    return t;
  endfunction

  // Inputs change at the falling edge; the monitor samples 2 ns later, and
  // a handshake it sees completes at the next rising edge.
  hl_txn_t hdr_q[$];
  always @(negedge clk) if (rst_n) begin
    #2;
    if (tx_flit.valid && tx_flit_ready) begin
      if (!in_pkt) begin
        hl_txn_t h;
        h = hdr_q.pop_front();
        check(tx_flit[39] == h.ext && tx_flit[38] == 1'b1 && tx_flit[37:35] == h.cmd &&
              tx_flit[34:32] == h.len && tx_flit[31:0] == h.addr, "header flit layout");
        in_pkt = 1;
        flits_seen = 1;
        pkt_flits_expect = nflit_q.pop_front();
      end else begin
        flits_seen++;
      end
      if (flits_seen == pkt_flits_expect) in_pkt = 0;
    end
    if (rx_valid && rx_ready) begin
      hl_txn_t e;
      e = sent_q.pop_front();
      check(rx_txn.ext == e.ext && rx_txn.cmd == e.cmd && rx_txn.len == e.len &&
            rx_txn.addr == e.addr, "received header fields");
      if (e.cmd != CMD_READ_REQ) check(rx_txn.data == e.data, "received data");
      if (e.ext) check(rx_txn.tid == e.tid && rx_txn.did == e.did, "received TID/DID");
    end
  end

  // called just after a falling edge
  task automatic send(hl_txn_t t);
    tx_txn   = t;
    tx_valid = 1;
    #1;
    while (!tx_ready) begin @(negedge clk); #1; end
    sent_q.push_back(t);
    hdr_q.push_back(t);
    nflit_q.push_back(expect_flits(t));
    @(negedge clk);
    tx_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pkt = 0;
    tx_valid = 0; tx_txn = '0; rx_ready = 1; gate = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // timing with an open channel: one flit per cycle
    for (int k = 0; k < 6; k++) begin
      hl_txn_t t;
      int c0, c1;
      t = rand_txn();
      t.ext = k[0];
      t.cmd = (k < 2) ? CMD_READ_REQ : (k < 4) ? CMD_WRITE_REQ : CMD_READ_RESP;
      if (t.cmd == CMD_READ_REQ) t.data = 0;
      if (!t.ext) begin t.tid = 0; t.did = 0; end
      send(t);
      // accepted at the last rising edge; the packet takes one cycle per flit
      c0 = 0;
      while (!rx_valid) begin @(negedge clk); c0++; end
      check(c0 == expect_flits(t), $sformatf("packet of %0d flits took %0d cycles", expect_flits(t), c0));
      @(negedge clk);
    end
    // random traffic with backpressure
    fork
      begin
        for (int n = 0; n < 300; n++) begin
          send(rand_txn());
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      begin
        for (int n = 0; n < 3000; n++) begin
          @(negedge clk);
          gate     = 1'($urandom_range(0, 3) != 0);
          rx_ready = 1'($urandom_range(0, 3) != 0);
        end
        @(negedge clk);
        gate = 1; rx_ready = 1;
      end
    join
    repeat (20) @(negedge clk);
    check(sent_q.size() == 0, "all transactions received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
