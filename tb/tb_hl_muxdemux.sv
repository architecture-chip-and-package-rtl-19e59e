// tb_hl_muxdemux: three local streams through one channel and back.
//
// Three packet sources drive the mux side with random packets of all six
// kinds. The channel output is looped back into the channel input, so each
// packet also crosses the demux. Checked:
//  * every packet on the channel is the next packet of one source, with
//    all of its flits back to back (no interleaving of packets);
//  * every packet leaving the demux appears on port addr_slot(addr, 3)
//    (word address modulo 3), whole and in channel order;
//  * all packets arrive; the arbiter served every source.
// Channel and local receivers apply random backpressure. All driving and
// sampling happens around the falling clock edge: inputs change at the
// edge, handshakes are sampled 2 ns later and complete at the next rising
// edge.
module tb_hl_muxdemux;
  import hl_pkg::*;

  localparam int N = 3;
  localparam int PKTS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t loc_tx [N];
  logic  loc_tx_ready [N];
  flit_t ch_tx, ch_rx;
  logic  ch_tx_ready, ch_rx_ready, gate;
  flit_t loc_rx [N];
  logic  loc_rx_ready [N];

  hl_muxdemux #(.N(N), .ROUTE(ROUTE_SLOT)) dut (.*);

  assign ch_rx       = gate ? ch_tx : '0;
  assign ch_tx_ready = gate && ch_rx_ready;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef flit_t pkt_t [$];
  // packets of each source, flattened into flit queues, plus packet starts
  flit_t src_q [N][$];
  int    src_sent [N];
  flit_t exp_q [N][$];        // expected flits at each demux port
  int    ch_src;              // source of the packet on the channel, -1 none
  int    ch_left;
  int    rx_count;
  int    ch_port;

  function automatic void make_packet(int s);
    hl_txn_t t;
    int k;
    t      = '0;
    k      = $urandom_range(0, 2);
    t.cmd  = (k == 0) ? CMD_READ_REQ : (k == 1) ? CMD_WRITE_REQ : CMD_READ_RESP;
    t.ext  = 1'($urandom_range(0, 1));
    t.len  = 3'd1;
    t.addr = $urandom;
    t.data = $urandom;
    t.tid  = 6'($urandom);
    t.did  = 6'($urandom);
    src_q[s].push_back(make_header(t));
    if (t.ext) src_q[s].push_back(make_body(1'b1, ext_payload(t.tid, t.did)));
    if (k != 0) src_q[s].push_back(make_body(t.ext, t.data));
  endfunction

  function automatic int nflits(flit_t h);
    return 1 + (h.ext ? 1 : 0) + ((h.ctl[5:3] == 3'd2 || h.ctl[5:3] == 3'd3) ? 1 : 0);
  endfunction

  int hdr_left [N];           // flits left in each source's current packet

  always @(negedge clk) if (rst_n) begin
    // ---- drive the next cycle ----
    for (int s = 0; s < N; s++) begin
      loc_tx[s] = (src_q[s].size() > 0) ? src_q[s][0] : '0;
      loc_rx_ready[s] = 1'($urandom_range(0, 3) != 0);
    end
    gate = 1'($urandom_range(0, 4) != 0);
    #2;
    // ---- sample this cycle's handshakes (they complete at the next rising edge) ----
    for (int s = 0; s < N; s++)
      if (loc_tx[s].valid && loc_tx_ready[s]) void'(src_q[s].pop_front());
    if (ch_tx.valid && ch_tx_ready) begin
      if (ch_left == 0) begin
        // a new packet: it must be the head of exactly one source
        int found;
        found = -1;
        for (int s = 0; s < N; s++)
          if (loc_tx[s].valid && loc_tx_ready[s] && loc_tx[s] == ch_tx) found = s;
        check(found >= 0, "channel header comes from a granted source");
        ch_src  = found;
        ch_left = nflits(ch_tx);
        ch_port = int'(ch_tx.payload[11:2]) % N;
      end else begin
        check(ch_src >= 0 && loc_tx[ch_src].valid && loc_tx_ready[ch_src] && loc_tx[ch_src] == ch_tx,
              $sformatf("packet continues from the same source %0d (left %0d) %h", ch_src, ch_left, ch_tx));
      end
      exp_q[ch_port].push_back(ch_tx);
      ch_left--;
    end
    for (int p = 0; p < N; p++) begin
      if (loc_rx[p].valid && loc_rx_ready[p]) begin
        check(exp_q[p].size() > 0 && loc_rx[p] == exp_q[p][0], $sformatf("demux port %0d flit", p));
        if (exp_q[p].size() > 0) void'(exp_q[p].pop_front());
        rx_count++;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    ch_src = -1; ch_left = 0; rx_count = 0; gate = 0;
    for (int s = 0; s < N; s++) begin loc_tx[s] = '0; loc_rx_ready[s] = 1; end
    total = 0;
    for (int s = 0; s < N; s++)
      for (int n = 0; n < PKTS; n++) make_packet(s);
    for (int s = 0; s < N; s++) total += src_q[s].size();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (src_q[0].size() == 0 && src_q[1].size() == 0 && src_q[2].size() == 0);
    repeat (200) @(negedge clk);
    check(rx_count == total, $sformatf("all %0d flits delivered (got %0d)", total, rx_count));
    for (int p = 0; p < N; p++) check(exp_q[p].size() == 0, "no flit left undelivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
