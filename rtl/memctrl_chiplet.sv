// memctrl_chiplet: the memory controller chiplet of ROCKET-64.
//
// A Hybrid-Link bridge turns the flit channel from the NoC into whole
// extended-mode transactions for the 4-channel memory controller and
// sends its read responses back as flits. The DRAM channel ports are
// brought out. The chiplet is the document's; its contents beyond the
// named controller are this design's.
module memctrl_chiplet
  import hl_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       ch_rx,
  output logic        ch_rx_ready,
  output flit_t       ch_tx,
  input  logic        ch_tx_ready,
  output dram_req_t   dram_req    [N_CH],
  output logic        dram_valid  [N_CH],
  input  logic        dram_ready  [N_CH],
  input  logic [31:0] dram_rdata  [N_CH],
  input  logic        dram_rvalid [N_CH],
  output logic [N_CH-1:0] ch_busy
);

  hl_txn_t req, resp;
  logic    req_valid, req_ready, resp_valid, resp_ready;

  hl_bridge u_br (
    .clk, .rst_n,
    .tx_txn(resp), .tx_valid(resp_valid), .tx_ready(resp_ready),
    .tx_flit(ch_tx), .tx_flit_ready(ch_tx_ready),
    .rx_flit(ch_rx), .rx_flit_ready(ch_rx_ready),
    .rx_txn(req), .rx_valid(req_valid), .rx_ready(req_ready)
  );

  mem_ctrl #(.N_CH(N_CH)) u_mc (
    .clk, .rst_n,
    .req, .req_valid, .req_ready, .resp, .resp_valid, .resp_ready,
    .dram_req, .dram_valid, .dram_ready, .dram_rdata, .dram_rvalid, .ch_busy
  );

endmodule
