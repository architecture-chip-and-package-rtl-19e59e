// l2_chiplet: one L2 chiplet of ROCKET-64.
//
// The chiplet has two Hybrid-Link channels: "up" to its Rocket chiplet and
// "down" to the NoC. Two mux/demux blocks and two bridges surround the L2
// cache slice:
//
//   up channel -- md_up --+-- port 0: bridge A -- L2 cache (requests in,
//                         |                        responses out)
//                         +-- port 1: pass-through --+
//                                                    |
//   down channel -- md_dn --+-- port 0: pass-through -+
//                           +-- port 1: bridge B -- L2 cache (misses and
//                                                   write-through out,
//                                                   fills in)
//
// md_up steers by protocol mode: lightweight packets (cacheable requests)
// go to the cache, extended packets (uncached requests) pass straight
// through to the NoC. md_dn steers by address bit 31: responses for
// cacheable addresses are the cache's fills, the others are responses to
// uncached requests and go back up.
//
// This arrangement of two mux/demux blocks and two bridges is the
// document's L2 chiplet diagram; the steering rules are this design's.
module l2_chiplet
  import hl_pkg::*;
#(
  parameter int unsigned NODE     = 0,
  parameter int unsigned IDX_BITS = 18
) (
  input  logic  clk,
  input  logic  rst_n,
  // channel to the Rocket chiplet
  input  flit_t up_rx,
  output logic  up_rx_ready,
  output flit_t up_tx,
  input  logic  up_tx_ready,
  // channel to the NoC
  output flit_t dn_tx,
  input  logic  dn_tx_ready,
  input  flit_t dn_rx,
  output logic  dn_rx_ready,
  // events
  output logic  ev_hit,
  output logic  ev_miss,
  output logic  init_done
);

  flit_t u_loc_tx [2];
  logic  u_loc_tx_ready [2];
  flit_t u_loc_rx [2];
  logic  u_loc_rx_ready [2];
  flit_t d_loc_tx [2];
  logic  d_loc_tx_ready [2];
  flit_t d_loc_rx [2];
  logic  d_loc_rx_ready [2];

  hl_muxdemux #(.N(2), .ROUTE(ROUTE_MODE)) u_md_up (
    .clk, .rst_n,
    .loc_tx(u_loc_tx), .loc_tx_ready(u_loc_tx_ready), .ch_tx(up_tx), .ch_tx_ready(up_tx_ready),
    .ch_rx(up_rx), .ch_rx_ready(up_rx_ready), .loc_rx(u_loc_rx), .loc_rx_ready(u_loc_rx_ready)
  );

  hl_muxdemux #(.N(2), .ROUTE(ROUTE_A31)) u_md_dn (
    .clk, .rst_n,
    .loc_tx(d_loc_tx), .loc_tx_ready(d_loc_tx_ready), .ch_tx(dn_tx), .ch_tx_ready(dn_tx_ready),
    .ch_rx(dn_rx), .ch_rx_ready(dn_rx_ready), .loc_rx(d_loc_rx), .loc_rx_ready(d_loc_rx_ready)
  );

  // pass-through between the two mux/demux blocks
  assign d_loc_tx[0]       = u_loc_rx[1];
  assign u_loc_rx_ready[1] = d_loc_tx_ready[0];
  assign u_loc_tx[1]       = d_loc_rx[0];
  assign d_loc_rx_ready[0] = u_loc_tx_ready[1];

  hl_txn_t up_req, up_resp, dn_req, dn_resp;
  logic    up_req_valid, up_req_ready, up_resp_valid, up_resp_ready;
  logic    dn_req_valid, dn_req_ready, dn_resp_valid, dn_resp_ready;

  hl_bridge u_br_a (
    .clk, .rst_n,
    .tx_txn(up_resp), .tx_valid(up_resp_valid), .tx_ready(up_resp_ready),
    .tx_flit(u_loc_tx[0]), .tx_flit_ready(u_loc_tx_ready[0]),
    .rx_flit(u_loc_rx[0]), .rx_flit_ready(u_loc_rx_ready[0]),
    .rx_txn(up_req), .rx_valid(up_req_valid), .rx_ready(up_req_ready)
  );

  hl_bridge u_br_b (
    .clk, .rst_n,
    .tx_txn(dn_req), .tx_valid(dn_req_valid), .tx_ready(dn_req_ready),
    .tx_flit(d_loc_tx[1]), .tx_flit_ready(d_loc_tx_ready[1]),
    .rx_flit(d_loc_rx[1]), .rx_flit_ready(d_loc_rx_ready[1]),
    .rx_txn(dn_resp), .rx_valid(dn_resp_valid), .rx_ready(dn_resp_ready)
  );

  l2_cache #(.IDX_BITS(IDX_BITS), .NODE(NODE)) u_l2 (
    .clk, .rst_n,
    .up_req, .up_req_valid, .up_req_ready, .up_resp, .up_resp_valid, .up_resp_ready,
    .dn_req, .dn_req_valid, .dn_req_ready, .dn_resp, .dn_resp_valid, .dn_resp_ready,
    .ev_hit, .ev_miss, .init_done
  );

endmodule
