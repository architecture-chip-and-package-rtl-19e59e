// mem_ctrl: the 4-channel memory controller.
//
// Requests arrive as extended-mode Hybrid-Link transactions from the NoC.
// Memory is word-interleaved over N_CH channels: the channel is the word
// address modulo N_CH (address bits 3:2 for four channels), so consecutive
// words fall on different channels and up to N_CH reads are in flight at
// once. Address bits 31:30 are ignored: the cacheable window (0x8...) and
// the uncached window (0x4...) are the same memory.
//
// Each channel holds at most one request. A request is accepted when its
// channel is free and that channel's DRAM port is ready; a request for a
// busy channel waits at the head (requests are served in order per
// channel). A write is done when the DRAM port takes it. A read keeps its
// channel busy until the DRAM returns the word (dram_rvalid, any number of
// cycles later) and the read response has been handed to the NoC side.
// Completed reads are answered through a round-robin arbiter with an
// extended read response: address and TID echoed, DID = TID / 8, which is
// the node of the requesting core's chiplet.
//
// The DRAM port is a plain word interface: request with valid/ready, read
// data returned with dram_rvalid.
//
// The document gives the number of channels; the interleaving, the
// queueing and the DRAM port are this design's choices.
module mem_ctrl
  import hl_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hl_txn_t   req,
  input  logic      req_valid,
  output logic      req_ready,
  output hl_txn_t   resp,
  output logic      resp_valid,
  input  logic      resp_ready,
  output dram_req_t dram_req    [N_CH],
  output logic      dram_valid  [N_CH],
  input  logic      dram_ready  [N_CH],
  input  logic [31:0] dram_rdata [N_CH],
  input  logic      dram_rvalid [N_CH],
  output logic [N_CH-1:0] ch_busy
);

  localparam int unsigned CW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [N_CH-1:0] busy, done;
  hl_txn_t         held [N_CH];
  logic [31:0]     rdat [N_CH];

  logic [CW-1:0] ch;
  logic          is_rd, is_wr;

  assign ch    = req.addr[CW+1:2];
  assign is_rd = (req.cmd == CMD_READ_REQ);
  assign is_wr = (req.cmd == CMD_WRITE_REQ);

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      dram_req[c].write = is_wr;
      dram_req[c].waddr = {2'b00, req.addr[29:2]};
      dram_req[c].wdata = req.data;
      dram_valid[c]     = req_valid && (is_rd || is_wr) && !busy[c] && (ch == CW'(c));
    end
    if (is_rd || is_wr) req_ready = !busy[ch] && dram_ready[ch];
    else                req_ready = 1'b1;   // anything else is dropped
  end

  // ---------------- responses ----------------
  logic [CW-1:0] r_ptr, r_sel;
  logic          r_found;

  always_comb begin
    r_sel   = r_ptr;
    r_found = 1'b0;
    for (int k = N_CH - 1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(r_ptr) + k) % N_CH;
      if (done[c]) begin
        r_sel   = CW'(c);
        r_found = 1'b1;
      end
    end
    resp      = '0;
    resp.ext  = 1'b1;
    resp.cmd  = CMD_READ_RESP;
    resp.len  = 3'd1;
    resp.addr = held[r_sel].addr;
    resp.data = rdat[r_sel];
    resp.tid  = held[r_sel].tid;
    resp.did  = {3'b000, held[r_sel].tid[5:3]};
    resp_valid = r_found;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= '0;
      done  <= '0;
      r_ptr <= '0;
      for (int c = 0; c < N_CH; c++) begin
        held[c] <= '0;
        rdat[c] <= '0;
      end
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        if (busy[c] && !done[c] && dram_rvalid[c]) begin
          done[c] <= 1'b1;
          rdat[c] <= dram_rdata[c];
        end
      end
      if (resp_valid && resp_ready) begin
        busy[r_sel] <= 1'b0;
        done[r_sel] <= 1'b0;
        r_ptr       <= CW'((int'(r_sel) + 1) % N_CH);
      end
      if (req_valid && req_ready && is_rd) begin
        busy[ch] <= 1'b1;
        held[ch] <= req;
      end
    end
  end

  assign ch_busy = busy;

endmodule
