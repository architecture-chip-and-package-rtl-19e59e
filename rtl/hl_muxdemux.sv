// hl_muxdemux: shares one Hybrid-Link physical channel among N bridges.
//
// Toward the channel (mux) the N local flit streams are merged. A
// round-robin arbiter picks one stream whenever no packet is in flight and
// keeps that grant until the packet's last flit has left, so packets are
// never interleaved. The grant is combinational: a header can leave in the
// cycle it arrives.
//
// From the channel (demux) each packet is steered, as a whole, to one
// local port chosen from its header by ROUTE:
//   ROUTE_MODE : lightweight packets to port 0, extended packets to port 1
//   ROUTE_A31  : address bit 31 low to port 0, high to port 1
//   ROUTE_SLOT : port addr_slot(address, N), the same rule the L1-to-L2
//                interface uses to place a request on a bridge
// Backpressure of the chosen port is passed to the channel.
//
// The mux/demux blocks and their places on the Rocket and L2 chiplets are
// the document's; it only names them, so the arbitration and steering
// rules are this design's choices.
module hl_muxdemux
  import hl_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter route_e      ROUTE = ROUTE_SLOT
) (
  input  logic  clk,
  input  logic  rst_n,
  // local -> channel
  input  flit_t loc_tx       [N],
  output logic  loc_tx_ready [N],
  output flit_t ch_tx,
  input  logic  ch_tx_ready,
  // channel -> local
  input  flit_t ch_rx,
  output logic  ch_rx_ready,
  output flit_t loc_rx       [N],
  input  logic  loc_rx_ready [N]
);

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  // ---------------- mux ----------------
  logic          m_lock;
  logic [SW-1:0] m_gnt, m_ptr, m_sel;
  logic [1:0]    m_rem;
  logic          m_found;

  always_comb begin
    int unsigned c;
    c       = 0;
    m_sel   = m_gnt;
    m_found = m_lock;
    if (!m_lock) begin
      m_sel = m_ptr;
      for (int k = N - 1; k >= 0; k--) begin
        c = (int'(m_ptr) + k) % N;
        if (loc_tx[c].valid) begin
          m_sel   = SW'(c);
          m_found = 1'b1;
        end
      end
    end
  end

  always_comb begin
    ch_tx = '0;
    if (m_found) ch_tx = loc_tx[m_sel];
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      loc_tx_ready[i] = m_found && (m_sel == SW'(i)) && ch_tx_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_lock <= 1'b0;
      m_gnt  <= '0;
      m_ptr  <= '0;
      m_rem  <= '0;
    end else if (ch_tx.valid && ch_tx_ready) begin
      if (!m_lock) begin
        m_ptr <= SW'((int'(m_sel) + 1) % N);
        if (pkt_flits(ch_tx) > 2'd1) begin
          m_lock <= 1'b1;
          m_gnt  <= m_sel;
          m_rem  <= pkt_flits(ch_tx) - 2'd1;
        end
      end else begin
        m_rem <= m_rem - 2'd1;
        if (m_rem == 2'd1) m_lock <= 1'b0;
      end
    end
  end

  // ---------------- demux ----------------
  logic          d_lock;
  logic [SW-1:0] d_dst, d_sel;
  logic [1:0]    d_rem;

  function automatic logic [SW-1:0] route(flit_t h);
    case (ROUTE)
      ROUTE_MODE: return SW'(h.ext);
      ROUTE_A31:  return SW'(h.payload[31]);
      default:    return SW'(addr_slot(h.payload, N));
    endcase
  endfunction

  always_comb begin
    d_sel = d_lock ? d_dst : route(ch_rx);
    for (int i = 0; i < N; i++) begin
      loc_rx[i] = '0;
      if (d_sel == SW'(i)) loc_rx[i] = ch_rx;
    end
  end

  assign ch_rx_ready = loc_rx_ready[d_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_lock <= 1'b0;
      d_dst  <= '0;
      d_rem  <= '0;
    end else if (ch_rx.valid && ch_rx_ready) begin
      if (!d_lock) begin
        if (pkt_flits(ch_rx) > 2'd1) begin
          d_lock <= 1'b1;
          d_dst  <= d_sel;
          d_rem  <= pkt_flits(ch_rx) - 2'd1;
        end
      end else begin
        d_rem <= d_rem - 2'd1;
        if (d_rem == 2'd1) d_lock <= 1'b0;
      end
    end
  end

  // The packet being sent keeps its grant until its last flit has left.
  a_no_switch: assert property (@(posedge clk) disable iff (!rst_n)
    m_lock |-> (m_sel == m_gnt));

endmodule
