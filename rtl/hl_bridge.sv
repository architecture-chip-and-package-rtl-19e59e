// hl_bridge: Hybrid-Link protocol translator.
//
// The bridge sits between a block that thinks in whole transactions
// (hl_txn_t: mode, command, length, address, data, TID, DID) and a 40-bit
// flit channel. Both directions are independent:
//
//  * transmit: a transaction accepted on tx_valid/tx_ready is sent as a
//    packet of 1 to 3 flits (header, then the TID/DID flit in extended
//    mode, then the data flit for writes and read responses), one flit per
//    cycle while tx_flit_ready is high. The next transaction is accepted
//    in the cycle the last flit leaves, so back-to-back packets have no gap.
//  * receive: flits taken while rx_flit_ready is high are assembled; once
//    the last flit of a packet is in, the transaction is offered on
//    rx_valid until rx_ready. No new flit is taken while it waits.
//
// The packet formats follow the Hybrid-Link flit table (see hl_pkg). The
// ready wire, the one-transaction buffer on each side and the timing are
// this design's choices. A flit with Valid low is ignored by the receiver.
module hl_bridge
  import hl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // transaction -> flits
  input  hl_txn_t tx_txn,
  input  logic    tx_valid,
  output logic    tx_ready,
  output flit_t   tx_flit,
  input  logic    tx_flit_ready,
  // flits -> transaction
  input  flit_t   rx_flit,
  output logic    rx_flit_ready,
  output hl_txn_t rx_txn,
  output logic    rx_valid,
  input  logic    rx_ready
);

  // ---------------- transmit ----------------
  hl_txn_t    cur;
  logic       busy;
  logic [1:0] idx, nflits;
  logic       tx_last;

  always_comb begin
    tx_flit = '0;
    if (busy) begin
      if (idx == 2'd0)                tx_flit = make_header(cur);
      else if (cur.ext && idx == 2'd1) tx_flit = make_body(1'b1, ext_payload(cur.tid, cur.did));
      else                            tx_flit = make_body(cur.ext, cur.data);
    end
  end

  assign tx_last  = busy && tx_flit_ready && (idx == nflits - 2'd1);
  assign tx_ready = !busy || tx_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      idx    <= '0;
      nflits <= '0;
      cur    <= '0;
    end else begin
      if (busy && tx_flit_ready) idx <= idx + 2'd1;
      if (tx_last) busy <= 1'b0;
      if (tx_valid && tx_ready) begin
        busy   <= 1'b1;
        idx    <= '0;
        cur    <= tx_txn;
        nflits <= pkt_flits(make_header(tx_txn));
      end
    end
  end

  // ---------------- receive ----------------
  logic       pending;
  logic [1:0] ridx, rtotal;
  hl_txn_t    acc;
  logic       take;

  assign rx_flit_ready = !pending;
  assign take          = rx_flit.valid && !pending;
  assign rx_valid      = pending;
  assign rx_txn        = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      ridx    <= '0;
      rtotal  <= '0;
      acc     <= '0;
    end else begin
      if (pending && rx_ready) pending <= 1'b0;
      if (take) begin
        if (ridx == 2'd0) begin
          acc      <= '0;
          acc.ext  <= rx_flit.ext;
          acc.cmd  <= hl_cmd_e'(rx_flit.ctl[5:3]);
          acc.len  <= rx_flit.ctl[2:0];
          acc.addr <= rx_flit.payload;
          rtotal   <= pkt_flits(rx_flit);
          if (pkt_flits(rx_flit) == 2'd1) pending <= 1'b1;
          else                            ridx    <= 2'd1;
        end else begin
          if (acc.ext && ridx == 2'd1) begin
            acc.tid <= rx_flit.payload[11:6];
            acc.did <= rx_flit.payload[5:0];
          end else begin
            acc.data <= rx_flit.payload;
          end
          if (ridx == rtotal - 2'd1) begin
            pending <= 1'b1;
            ridx    <= '0;
          end else begin
            ridx <= ridx + 2'd1;
          end
        end
      end
    end
  end

  // A flit offered and not taken must stay unchanged.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (tx_flit.valid && !tx_flit_ready) |=> $stable(tx_flit);
  endproperty
  a_hold: assert property (p_hold);

endmodule
