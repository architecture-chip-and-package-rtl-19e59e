// l1_l2_if: the L1-to-L2 interface of a Rocket chiplet.
//
// It turns system-bus memory requests into Hybrid-Link transactions and
// spreads them over N_BR bridges that share the chiplet's channel to its
// L2 chiplet. A request goes to bridge addr_slot(addr, N_BR) (word address
// modulo N_BR), so all traffic to one address keeps its order. The mode
// follows the address:
//   cacheable   (addr[31] = 1)   lightweight, served by the L2 cache
//   uncached    (addr[31:30]=01) extended, TID = core, DID = memory node,
//                                passed through the L2 chiplet to the NoC
// Writes are posted: they leave the interface as soon as their bridge
// takes them and get no response. A read occupies its bridge until the
// read response comes back; the bridge remembers the requester's TID, so
// lightweight responses, which carry no TID, find their core. A request
// for a bridge with a read outstanding waits.
//
// Responses from the bridges are merged by a round-robin arbiter.
//
// The document names the interface and shows three bridges below it; the
// distribution rule, the posted writes and the one-read-per-bridge limit
// are this design's choices.
module l1_l2_if
  import hl_pkg::*;
#(
  parameter int unsigned N_BR = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  // from / to the system bus
  input  bus_req_t  req,
  input  logic      req_valid,
  output logic      req_ready,
  output bus_resp_t resp,
  output logic      resp_valid,
  input  logic      resp_ready,
  // to / from the bridges
  output hl_txn_t   br_tx       [N_BR],
  output logic      br_tx_valid [N_BR],
  input  logic      br_tx_ready [N_BR],
  input  hl_txn_t   br_rx       [N_BR],
  input  logic      br_rx_valid [N_BR],
  output logic      br_rx_ready [N_BR]
);

  localparam int unsigned BW = (N_BR > 1) ? $clog2(N_BR) : 1;

  logic [N_BR-1:0] busy;
  logic [ID_W-1:0] tid_q [N_BR];

  // ---------------- requests ----------------
  logic [BW-1:0] b;
  hl_txn_t       t;

  always_comb begin
    b      = BW'(addr_slot(req.addr, N_BR));
    t      = '0;
    t.ext  = (decode_addr(req.addr) == DST_UNCACH);
    t.cmd  = req.write ? CMD_WRITE_REQ : CMD_READ_REQ;
    t.len  = 3'd1;
    t.addr = req.addr;
    t.data = req.write ? req.wdata : 32'd0;
    t.tid  = req.tid;
    t.did  = t.ext ? MEM_NODE : 6'd0;
    for (int i = 0; i < N_BR; i++) begin
      br_tx[i]       = t;
      br_tx_valid[i] = req_valid && !busy[i] && (b == BW'(i));
    end
  end

  assign req_ready = !busy[b] && br_tx_ready[b];

  // ---------------- responses ----------------
  logic [BW-1:0] r_ptr, r_sel;
  logic          r_found;

  always_comb begin
    r_sel   = r_ptr;
    r_found = 1'b0;
    for (int k = N_BR - 1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(r_ptr) + k) % N_BR;
      if (br_rx_valid[c]) begin
        r_sel   = BW'(c);
        r_found = 1'b1;
      end
    end
    resp.rdata = br_rx[r_sel].data;
    resp.err   = 1'b0;
    resp.tid   = tid_q[r_sel];
    // anything but a read response is dropped
    resp_valid = r_found && (br_rx[r_sel].cmd == CMD_READ_RESP) && busy[r_sel];
  end

  always_comb begin
    for (int i = 0; i < N_BR; i++)
      br_rx_ready[i] = r_found && (r_sel == BW'(i)) && (resp_ready || !resp_valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= '0;
      r_ptr <= '0;
      for (int i = 0; i < N_BR; i++) tid_q[i] <= '0;
    end else begin
      if (r_found && br_rx_ready[r_sel]) begin
        r_ptr <= BW'((int'(r_sel) + 1) % N_BR);
        if (resp_valid) busy[r_sel] <= 1'b0;
      end
      if (req_valid && req_ready && !req.write) begin
        busy[b]  <= 1'b1;
        tid_q[b] <= req.tid;
      end
    end
  end

endmodule
