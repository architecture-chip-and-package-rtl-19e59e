// tb_noc_xbar: self-checking testbench of the NoC crossbar.
//
// Every one of the nine input ports sends a random stream of packets:
// extended reads, writes and read responses for a random DID, a few for a
// DID that is no port and a few lightweight ones, which must be dropped.
// Each packet carries its source and a sequence number in its address, so
// the receiver at each output can check that packets arrive whole (never
// interleaved), unchanged, at the port named by their DID, and in order per
// source. Outputs apply random backpressure. The test counts drops against
// the packets that should be dropped and requires arbitration conflicts
// (two inputs for one output in the same cycle) to have happened.
// Inputs are driven after the falling edge and sampled 2 ns later.
`timescale 1ns/1ps
module tb_noc_xbar;
  import hl_pkg::*;
  localparam int NP = 9;
  localparam int NPKT = 300;   // packets per input

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t in_flit [NP], out_flit [NP];
  logic  in_ready [NP], out_ready [NP];
  logic  ev_drop, ev_conflict;

  noc_xbar #(.N_PORTS(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t txq [NP][$];
  logic [31:0] expq [NP][$];   // per output: expected packet addresses, any source order
  flit_t rxp [NP][$];          // flits of the packet being received on each output
  int sent_pkts = 0, recv_pkts = 0, want_drops = 0, drops = 0, conflicts = 0;
  int last_seq [NP][NP];
  bit taken [NP];

  function automatic void make_pkt(int src, int seq);
    hl_txn_t t;
    int r;
    t = '0;
    r = $urandom_range(0, 9);
    t.ext  = (r != 0);
    t.cmd  = hl_cmd_e'($urandom_range(1, 3));
    t.len  = 1;
    t.addr = {4'(src), 16'(seq), 12'($urandom)};
    t.data = $urandom;
    t.tid  = 6'($urandom);
    t.did  = (r == 1) ? 6'($urandom_range(NP, 63)) : 6'($urandom_range(0, NP - 1));
    txq[src].push_back(make_header(t));
    if (t.ext) txq[src].push_back(make_body(1'b1, ext_payload(t.tid, t.did)));
    if (cmd_has_data(t.cmd)) txq[src].push_back(make_body(t.ext, t.data));
    if (!t.ext || t.did >= NP) want_drops++;
    else sent_pkts++;
  endfunction

  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (taken[p]) begin            // handshake completed on the last rising edge
        void'(txq[p].pop_front());
        in_flit[p] = '0;
        taken[p]   = 0;
      end
      // keep an offered flit until it is taken; otherwise offer the next one sometimes
      if (!in_flit[p].valid && txq[p].size() > 0 && $urandom_range(0, 2) != 0) in_flit[p] = txq[p][0];
      out_ready[p] = 1'($urandom_range(0, 4) != 0);
    end
    #2;
    if (rst_n) begin
      if (ev_drop) drops++;
      if (ev_conflict) conflicts++;
      for (int p = 0; p < NP; p++) begin
        taken[p] = in_flit[p].valid && in_ready[p];
        if (out_flit[p].valid && out_ready[p]) begin
          rxp[p].push_back(out_flit[p]);
          if (rxp[p].size() == int'(pkt_flits(rxp[p][0]))) begin
            int src, seq;
            flit_t h;
            h   = rxp[p][0];
            src = int'(h.payload[31:28]);
            seq = int'(h.payload[27:12]);
            check(h.ext && rxp[p][1].ext, "only extended packets are routed");
            check(int'(rxp[p][1].payload[5:0]) == p, $sformatf("packet from %0d for DID %0d left on port %0d", src, rxp[p][1].payload[5:0], p));
            check(seq > last_seq[src][p], "packets of one source arrive in order");
            last_seq[src][p] = seq;
            for (int k = 1; k < rxp[p].size(); k++)
              check(rxp[p][k].ctl == 6'd0, "body flit unchanged (no header inside a packet)");
            recv_pkts++;
            rxp[p].delete();
          end
        end
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog (sent %0d recv %0d drops %0d)", sent_pkts, recv_pkts, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      in_flit[p] = '0; out_ready[p] = 0; taken[p] = 0;
      for (int q = 0; q < NP; q++) last_seq[p][q] = -1;
      for (int n = 0; n < NPKT; n++) make_pkt(p, n);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (recv_pkts < sent_pkts) @(negedge clk);
    repeat (20) @(negedge clk);
    check(recv_pkts == sent_pkts, $sformatf("%0d of %0d packets delivered", recv_pkts, sent_pkts));
    // ev_drop is one wire for all inputs: drops in the same cycle count once
    check(drops > want_drops / 2 && drops <= want_drops, $sformatf("%0d drop cycles for %0d unroutable packets", drops, want_drops));
    check(conflicts > 50, $sformatf("arbitration conflicts happened (%0d)", conflicts));
    foreach (txq[p]) check(txq[p].size() == 0, "every input emptied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
