// rocket_chiplet: one Rocket chiplet of ROCKET-64 (the logic around its
// eight cores).
//
// Each core's memory port feeds a request FIFO; the system bus arbitrates
// the FIFOs and sends each request to the L1-to-L2 interface, to the
// periphery bus port or to the error device. The L1-to-L2 interface puts
// memory requests on three Hybrid-Link bridges, and a mux/demux joins the
// bridges onto the single flit channel to this chiplet's L2 chiplet
// (responses come back on the same channel and are steered to the bridge
// that owns their address). The chiplet also carries the control logic of
// its DLDO and the serdes of its debug link.
//
// Requests are tagged with the global core number NODE*N_TILES + tile,
// which becomes the Hybrid-Link TID. The cores (with their L1 caches) and
// the periphery devices are outside this module; their ports are brought
// out. The structure follows the document's single-Rocket-tile diagram;
// the I/O drivers in that diagram are plain wires here.
module rocket_chiplet
  import hl_pkg::*;
#(
  parameter int unsigned NODE       = 0,
  parameter int unsigned N_TILES    = 8,
  parameter int unsigned N_BR       = 3,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned N_SW       = 32,
  parameter int unsigned DBG_W      = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // cores
  input  core_req_t  core_req        [N_TILES],
  input  logic       core_req_valid  [N_TILES],
  output logic       core_req_ready  [N_TILES],
  output core_resp_t core_resp       [N_TILES],
  output logic       core_resp_valid [N_TILES],
  input  logic       core_resp_ready [N_TILES],
  // periphery bus
  output bus_req_t   periph_req,
  output logic       periph_req_valid,
  input  logic       periph_req_ready,
  input  bus_resp_t  periph_resp,
  input  logic       periph_resp_valid,
  output logic       periph_resp_ready,
  // Hybrid-Link channel to the L2 chiplet
  output flit_t      ch_tx,
  input  logic       ch_tx_ready,
  input  flit_t      ch_rx,
  output logic       ch_rx_ready,
  // DLDO
  input  logic       ldo_en,
  input  logic       ldo_cmp,
  output logic [N_SW-1:0] ldo_sw_en,
  // debug serdes
  input  logic [DBG_W-1:0] dbg_tx_data,
  input  logic       dbg_tx_valid,
  output logic       dbg_tx_ready,
  output logic       dbg_line_out,
  input  logic       dbg_line_in,
  output logic [DBG_W-1:0] dbg_rx_data,
  output logic       dbg_rx_valid
);

  // ---------------- tile FIFOs ----------------
  bus_req_t f_out   [N_TILES];
  logic     f_valid [N_TILES];
  logic     f_ready [N_TILES];

  for (genvar i = 0; i < N_TILES; i++) begin : g_fifo
    bus_req_t f_in;
    logic [$bits(bus_req_t)-1:0] f_q;
    always_comb begin
      f_in.write = core_req[i].write;
      f_in.addr  = core_req[i].addr;
      f_in.wdata = core_req[i].wdata;
      f_in.tid   = ID_W'(NODE * N_TILES + i);
    end
    sync_fifo #(.W($bits(bus_req_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_data(f_in), .in_valid(core_req_valid[i]), .in_ready(core_req_ready[i]),
      .out_data(f_q), .out_valid(f_valid[i]), .out_ready(f_ready[i])
    );
    assign f_out[i] = bus_req_t'(f_q);
  end

  // ---------------- system bus ----------------
  bus_req_t  g_req        [3];
  logic      g_req_valid  [3];
  logic      g_req_ready  [3];
  bus_resp_t g_resp       [3];
  logic      g_resp_valid [3];
  logic      g_resp_ready [3];

  sys_bus #(.N_TILES(N_TILES)) u_sbus (
    .clk, .rst_n,
    .t_req(f_out), .t_req_valid(f_valid), .t_req_ready(f_ready),
    .t_resp(core_resp), .t_resp_valid(core_resp_valid), .t_resp_ready(core_resp_ready),
    .g_req, .g_req_valid, .g_req_ready, .g_resp, .g_resp_valid, .g_resp_ready
  );

  assign periph_req        = g_req[1];
  assign periph_req_valid  = g_req_valid[1];
  assign g_req_ready[1]    = periph_req_ready;
  assign g_resp[1]         = periph_resp;
  assign g_resp_valid[1]   = periph_resp_valid;
  assign periph_resp_ready = g_resp_ready[1];

  error_dev u_err (
    .clk, .rst_n,
    .req(g_req[2]), .req_valid(g_req_valid[2]), .req_ready(g_req_ready[2]),
    .resp(g_resp[2]), .resp_valid(g_resp_valid[2]), .resp_ready(g_resp_ready[2])
  );

  // ---------------- L1-to-L2 interface and bridges ----------------
  hl_txn_t br_tx       [N_BR];
  logic    br_tx_valid [N_BR];
  logic    br_tx_ready [N_BR];
  hl_txn_t br_rx       [N_BR];
  logic    br_rx_valid [N_BR];
  logic    br_rx_ready [N_BR];

  l1_l2_if #(.N_BR(N_BR)) u_l1l2 (
    .clk, .rst_n,
    .req(g_req[0]), .req_valid(g_req_valid[0]), .req_ready(g_req_ready[0]),
    .resp(g_resp[0]), .resp_valid(g_resp_valid[0]), .resp_ready(g_resp_ready[0]),
    .br_tx, .br_tx_valid, .br_tx_ready, .br_rx, .br_rx_valid, .br_rx_ready
  );

  flit_t loc_tx       [N_BR];
  logic  loc_tx_ready [N_BR];
  flit_t loc_rx       [N_BR];
  logic  loc_rx_ready [N_BR];

  for (genvar b = 0; b < N_BR; b++) begin : g_br
    hl_bridge u_br (
      .clk, .rst_n,
      .tx_txn(br_tx[b]), .tx_valid(br_tx_valid[b]), .tx_ready(br_tx_ready[b]),
      .tx_flit(loc_tx[b]), .tx_flit_ready(loc_tx_ready[b]),
      .rx_flit(loc_rx[b]), .rx_flit_ready(loc_rx_ready[b]),
      .rx_txn(br_rx[b]), .rx_valid(br_rx_valid[b]), .rx_ready(br_rx_ready[b])
    );
  end

  hl_muxdemux #(.N(N_BR), .ROUTE(ROUTE_SLOT)) u_md (
    .clk, .rst_n,
    .loc_tx, .loc_tx_ready, .ch_tx, .ch_tx_ready,
    .ch_rx, .ch_rx_ready, .loc_rx, .loc_rx_ready
  );

  // ---------------- DLDO control ----------------
  dldo_ctrl #(.N_SW(N_SW)) u_ldo (
    .clk, .rst_n, .en(ldo_en), .cmp(ldo_cmp), .sw_en(ldo_sw_en),
    .count(), .ev_sat()
  );

  // ---------------- debug serdes ----------------
  serdes #(.W(DBG_W)) u_dbg (
    .clk, .rst_n,
    .tx_data(dbg_tx_data), .tx_valid(dbg_tx_valid), .tx_ready(dbg_tx_ready), .tx_line(dbg_line_out),
    .rx_line(dbg_line_in), .rx_data(dbg_rx_data), .rx_valid(dbg_rx_valid)
  );

endmodule
