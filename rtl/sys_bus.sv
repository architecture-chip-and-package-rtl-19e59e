// sys_bus: the system bus of a Rocket chiplet.
//
// Requests: the N_TILES tile queues compete for the bus through a
// round-robin arbiter; the winner's address is decoded (hl_pkg::decode_addr)
// and the request is offered to one of three targets:
//   port 0  L1-to-L2 interface   cacheable and uncached memory
//   port 1  periphery bus        CLINT, PLIC, Bootrom, Debug
//   port 2  error device         everything unmapped
// A request moves when the chosen target is ready; the arbiter then moves
// its pointer past the winner. One request per cycle at most.
//
// Responses: the three targets' responses compete through a second
// round-robin arbiter and go to the tile given by the response's TID
// (TID modulo N_TILES is the tile's position on the chiplet).
//
// The document shows the system bus connecting the tile FIFOs, the
// L1-to-L2 interface, the error device and the periphery bus; the address
// map and the arbitration are this design's choices.
module sys_bus
  import hl_pkg::*;
#(
  parameter int unsigned N_TILES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // tiles
  input  bus_req_t   t_req        [N_TILES],
  input  logic       t_req_valid  [N_TILES],
  output logic       t_req_ready  [N_TILES],
  output core_resp_t t_resp       [N_TILES],
  output logic       t_resp_valid [N_TILES],
  input  logic       t_resp_ready [N_TILES],
  // targets: 0 = L1-to-L2 interface, 1 = periphery bus, 2 = error device
  output bus_req_t   g_req        [3],
  output logic       g_req_valid  [3],
  input  logic       g_req_ready  [3],
  input  bus_resp_t  g_resp       [3],
  input  logic       g_resp_valid [3],
  output logic       g_resp_ready [3]
);

  localparam int unsigned TW = (N_TILES > 1) ? $clog2(N_TILES) : 1;

  // ---------------- requests ----------------
  logic [TW-1:0] q_ptr, q_sel;
  logic          q_found;
  bus_dst_e      q_dst;
  logic [1:0]    q_tgt;

  always_comb begin
    q_sel   = q_ptr;
    q_found = 1'b0;
    for (int k = N_TILES - 1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(q_ptr) + k) % N_TILES;
      if (t_req_valid[c]) begin
        q_sel   = TW'(c);
        q_found = 1'b1;
      end
    end
    q_dst = decode_addr(t_req[q_sel].addr);
    case (q_dst)
      DST_L2, DST_UNCACH: q_tgt = 2'd0;
      DST_PERIPH:         q_tgt = 2'd1;
      default:            q_tgt = 2'd2;
    endcase
    for (int g = 0; g < 3; g++) begin
      g_req[g]       = t_req[q_sel];
      g_req_valid[g] = q_found && (q_tgt == 2'(g));
    end
  end

  always_comb begin
    for (int i = 0; i < N_TILES; i++)
      t_req_ready[i] = q_found && (q_sel == TW'(i)) && g_req_ready[q_tgt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_ptr <= '0;
    else if (q_found && g_req_ready[q_tgt]) q_ptr <= TW'((int'(q_sel) + 1) % N_TILES);
  end

  // ---------------- responses ----------------
  logic [1:0]    r_ptr, r_sel;
  logic          r_found;
  logic [TW-1:0] r_dst;

  always_comb begin
    r_sel   = r_ptr;
    r_found = 1'b0;
    for (int k = 2; k >= 0; k--) begin
      int unsigned c;
      c = (int'(r_ptr) + k) % 3;
      if (g_resp_valid[c]) begin
        r_sel   = 2'(c);
        r_found = 1'b1;
      end
    end
    r_dst = TW'(int'(g_resp[r_sel].tid) % N_TILES);
    for (int i = 0; i < N_TILES; i++) begin
      t_resp[i].rdata = g_resp[r_sel].rdata;
      t_resp[i].err   = g_resp[r_sel].err;
      t_resp_valid[i] = r_found && (r_dst == TW'(i));
    end
  end

  always_comb begin
    for (int g = 0; g < 3; g++)
      g_resp_ready[g] = r_found && (r_sel == 2'(g)) && t_resp_ready[r_dst];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_ptr <= '0;
    else if (r_found && t_resp_ready[r_dst]) r_ptr <= 2'((int'(r_sel) + 1) % 3);
  end

endmodule
