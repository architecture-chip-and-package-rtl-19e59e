// rocket64_top: ROCKET-64, a 64-core RISC-V system built from chiplets.
//
// Twenty-seven chiplets of six kinds share a silicon interposer: eight
// Rocket chiplets (eight cores each), eight L2 chiplets, eight DLDO
// chiplets, one NoC chiplet, one memory controller chiplet and one IVR
// chiplet. All data between chiplets travels as 40-bit Hybrid-Link flits.
// This module instantiates the digital logic of all of them and wires
// the channels:
//
//   Rocket chiplet c  <--lightweight/extended-->  L2 chiplet c
//   L2 chiplet c      <--extended-->  NoC port c           (c = 0..7)
//   NoC port 8        <--extended-->  memory controller chiplet
//
// A core's cacheable load or store crosses one channel to its L2 slice;
// an L2 miss, a write-through or an uncached access crosses the NoC to
// the memory controller, whose four DRAM channels are ports of this
// module. The cores, their periphery devices, the DRAM, the DLDO power
// stages and the IVR power stage and ADC are analog or outside the design
// and appear as ports. Interposer wires and I/O drivers are plain wires.
//
// Core k (0..63) is tile k % 8 of Rocket chiplet k / 8; its request and
// response ports are element k of the core_* arrays.
module rocket64_top
  import hl_pkg::*;
#(
  parameter int unsigned N_CHIPLETS  = 8,
  parameter int unsigned TILES       = 8,
  parameter int unsigned L2_IDX_BITS = 18,
  parameter int unsigned N_MEM_CH    = 4,
  parameter int unsigned N_SW        = 32,
  parameter int unsigned DBG_W       = 32,
  parameter int unsigned ADC_W       = 8,
  parameter int unsigned DUTY_W      = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // cores
  input  core_req_t  core_req        [N_CHIPLETS*TILES],
  input  logic       core_req_valid  [N_CHIPLETS*TILES],
  output logic       core_req_ready  [N_CHIPLETS*TILES],
  output core_resp_t core_resp       [N_CHIPLETS*TILES],
  output logic       core_resp_valid [N_CHIPLETS*TILES],
  input  logic       core_resp_ready [N_CHIPLETS*TILES],
  // periphery bus of each Rocket chiplet
  output bus_req_t   periph_req        [N_CHIPLETS],
  output logic       periph_req_valid  [N_CHIPLETS],
  input  logic       periph_req_ready  [N_CHIPLETS],
  input  bus_resp_t  periph_resp       [N_CHIPLETS],
  input  logic       periph_resp_valid [N_CHIPLETS],
  output logic       periph_resp_ready [N_CHIPLETS],
  // debug serdes of each Rocket chiplet
  input  logic [DBG_W-1:0] dbg_tx_data  [N_CHIPLETS],
  input  logic       dbg_tx_valid [N_CHIPLETS],
  output logic       dbg_tx_ready [N_CHIPLETS],
  output logic       dbg_line_out [N_CHIPLETS],
  input  logic       dbg_line_in  [N_CHIPLETS],
  output logic [DBG_W-1:0] dbg_rx_data  [N_CHIPLETS],
  output logic       dbg_rx_valid [N_CHIPLETS],
  // DLDO of each Rocket chiplet
  input  logic       ldo_en    [N_CHIPLETS],
  input  logic       ldo_cmp   [N_CHIPLETS],
  output logic [N_SW-1:0] ldo_sw_en [N_CHIPLETS],
  // DRAM channels
  output dram_req_t  dram_req    [N_MEM_CH],
  output logic       dram_valid  [N_MEM_CH],
  input  logic       dram_ready  [N_MEM_CH],
  input  logic [31:0] dram_rdata [N_MEM_CH],
  input  logic       dram_rvalid [N_MEM_CH],
  // IVR
  input  logic [ADC_W-1:0] ivr_adc,
  input  logic       ivr_adc_valid,
  output logic       ivr_adc_start,
  input  logic [ADC_W-1:0] ivr_vref,
  input  logic [7:0] ivr_kp,
  input  logic [7:0] ivr_ki,
  input  logic [7:0] ivr_kd,
  output logic       ivr_duty_p,
  output logic       ivr_duty_n,
  // status and events
  output logic       l2_ready,
  output logic [N_CHIPLETS-1:0] ev_l2_hit,
  output logic [N_CHIPLETS-1:0] ev_l2_miss,
  output logic       ev_noc_drop,
  output logic       ev_noc_conflict,
  output logic [N_MEM_CH-1:0] mem_ch_busy
);

  localparam int unsigned NP = N_CHIPLETS + 1;

  flit_t noc_in  [NP];
  logic  noc_in_ready  [NP];
  flit_t noc_out [NP];
  logic  noc_out_ready [NP];
  logic [N_CHIPLETS-1:0] l2_init;

  for (genvar c = 0; c < N_CHIPLETS; c++) begin : g_chip
    flit_t r2l, l2r;
    logic  r2l_ready, l2r_ready;

    core_req_t  c_req        [TILES];
    logic       c_req_valid  [TILES];
    logic       c_req_ready  [TILES];
    core_resp_t c_resp       [TILES];
    logic       c_resp_valid [TILES];
    logic       c_resp_ready [TILES];

    for (genvar t = 0; t < TILES; t++) begin : g_t
      assign c_req[t]                     = core_req[c*TILES+t];
      assign c_req_valid[t]               = core_req_valid[c*TILES+t];
      assign core_req_ready[c*TILES+t]    = c_req_ready[t];
      assign core_resp[c*TILES+t]         = c_resp[t];
      assign core_resp_valid[c*TILES+t]   = c_resp_valid[t];
      assign c_resp_ready[t]              = core_resp_ready[c*TILES+t];
    end

    rocket_chiplet #(.NODE(c), .N_TILES(TILES), .N_SW(N_SW), .DBG_W(DBG_W)) u_rocket (
      .clk, .rst_n,
      .core_req(c_req), .core_req_valid(c_req_valid), .core_req_ready(c_req_ready),
      .core_resp(c_resp), .core_resp_valid(c_resp_valid), .core_resp_ready(c_resp_ready),
      .periph_req(periph_req[c]), .periph_req_valid(periph_req_valid[c]),
      .periph_req_ready(periph_req_ready[c]), .periph_resp(periph_resp[c]),
      .periph_resp_valid(periph_resp_valid[c]), .periph_resp_ready(periph_resp_ready[c]),
      .ch_tx(r2l), .ch_tx_ready(r2l_ready), .ch_rx(l2r), .ch_rx_ready(l2r_ready),
      .ldo_en(ldo_en[c]), .ldo_cmp(ldo_cmp[c]), .ldo_sw_en(ldo_sw_en[c]),
      .dbg_tx_data(dbg_tx_data[c]), .dbg_tx_valid(dbg_tx_valid[c]), .dbg_tx_ready(dbg_tx_ready[c]),
      .dbg_line_out(dbg_line_out[c]), .dbg_line_in(dbg_line_in[c]),
      .dbg_rx_data(dbg_rx_data[c]), .dbg_rx_valid(dbg_rx_valid[c])
    );

    l2_chiplet #(.NODE(c), .IDX_BITS(L2_IDX_BITS)) u_l2 (
      .clk, .rst_n,
      .up_rx(r2l), .up_rx_ready(r2l_ready), .up_tx(l2r), .up_tx_ready(l2r_ready),
      .dn_tx(noc_in[c]), .dn_tx_ready(noc_in_ready[c]),
      .dn_rx(noc_out[c]), .dn_rx_ready(noc_out_ready[c]),
      .ev_hit(ev_l2_hit[c]), .ev_miss(ev_l2_miss[c]), .init_done(l2_init[c])
    );
  end

  noc_xbar #(.N_PORTS(NP)) u_noc (
    .clk, .rst_n,
    .in_flit(noc_in), .in_ready(noc_in_ready),
    .out_flit(noc_out), .out_ready(noc_out_ready),
    .ev_drop(ev_noc_drop), .ev_conflict(ev_noc_conflict)
  );

  memctrl_chiplet #(.N_CH(N_MEM_CH)) u_mc (
    .clk, .rst_n,
    .ch_rx(noc_out[N_CHIPLETS]), .ch_rx_ready(noc_out_ready[N_CHIPLETS]),
    .ch_tx(noc_in[N_CHIPLETS]), .ch_tx_ready(noc_in_ready[N_CHIPLETS]),
    .dram_req, .dram_valid, .dram_ready, .dram_rdata, .dram_rvalid, .ch_busy(mem_ch_busy)
  );

  ivr_ctrl #(.ADC_W(ADC_W), .DUTY_W(DUTY_W)) u_ivr (
    .clk, .rst_n,
    .adc(ivr_adc), .adc_valid(ivr_adc_valid), .adc_start(ivr_adc_start), .vref(ivr_vref),
    .kp(ivr_kp), .ki(ivr_ki), .kd(ivr_kd),
    .duty_p(ivr_duty_p), .duty_n(ivr_duty_n), .duty()
  );

  assign l2_ready = &l2_init;

endmodule
