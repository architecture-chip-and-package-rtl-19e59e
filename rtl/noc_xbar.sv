// noc_xbar: the NoC chiplet, a crossbar with one centralized arbiter.
//
// N_PORTS Hybrid-Link channels meet here: ports 0..7 lead to the eight
// L2 chiplets, port 8 to the memory controller. Only extended-mode
// packets are routed; the destination is the DID in their second flit.
//
// Each input port collects one whole packet (store and forward, at most
// three flits) before it asks for its output. A single arbiter, shared by
// all outputs, looks at every waiting packet in each cycle: for every free
// output it grants the waiting input that comes first in round-robin order
// after that output's last grant. A granted packet then streams out at one
// flit per cycle, and the output stays reserved until its last flit has
// left. The input takes its next packet in the cycle after that.
// Lightweight packets and packets for a DID that is no port are taken and
// dropped (ev_drop pulses).
//
// The document names a centralized NoC arbiter on its own chiplet
// between the Rocket tiles and the memory controller; the crossbar, the
// buffering and the round-robin rule are this design's choices.
module noc_xbar
  import hl_pkg::*;
#(
  parameter int unsigned N_PORTS = 9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit   [N_PORTS],
  output logic  in_ready  [N_PORTS],
  output flit_t out_flit  [N_PORTS],
  input  logic  out_ready [N_PORTS],
  output logic  ev_drop,
  output logic  ev_conflict
);

  localparam int unsigned PW = $clog2(N_PORTS);

  typedef enum logic [1:0] {I_COLLECT, I_WAIT, I_SEND} in_state_e;

  in_state_e     ist  [N_PORTS];
  flit_t         pbuf [N_PORTS][3];
  logic [1:0]    cnt  [N_PORTS];   // flits held (collect) / next to send
  logic [1:0]    tot  [N_PORTS];
  logic [PW-1:0] dst  [N_PORTS];

  logic          obusy [N_PORTS];
  logic [PW-1:0] osrc  [N_PORTS];
  logic [PW-1:0] optr  [N_PORTS];

  // ---------------- arbitration ----------------
  logic          gnt_v [N_PORTS];
  logic [PW-1:0] gnt_i [N_PORTS];
  logic          conflict;

  always_comb begin
    conflict = 1'b0;
    for (int o = 0; o < N_PORTS; o++) begin
      int unsigned nreq;
      int unsigned c;
      c        = 0;
      gnt_v[o] = 1'b0;
      gnt_i[o] = '0;
      nreq     = 0;
      if (!obusy[o]) begin
        for (int k = N_PORTS - 1; k >= 0; k--) begin
          c = int'(optr[o]) + 1 + k;
          if (c >= N_PORTS) c = c - N_PORTS;
          if (c >= N_PORTS) c = c - N_PORTS;
          if (ist[c] == I_WAIT && dst[c] == PW'(o)) begin
            gnt_v[o] = 1'b1;
            gnt_i[o] = PW'(c);
            nreq     = nreq + 1;
          end
        end
      end
      if (nreq > 1) conflict = 1'b1;
    end
  end
  assign ev_conflict = conflict;

  // ---------------- per-input view ----------------
  flit_t cur_flit [N_PORTS];   // flit an input would send now
  logic  granted  [N_PORTS];   // input wins an output in this cycle
  logic  adv      [N_PORTS];   // input's current flit leaves in this cycle
  logic  last     [N_PORTS];   // ... and it is the packet's last one

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      cur_flit[i] = pbuf[i][cnt[i]];
      granted[i]  = 1'b0;
      for (int o = 0; o < N_PORTS; o++)
        if (gnt_v[o] && gnt_i[o] == PW'(i)) granted[i] = 1'b1;
      adv[i]  = (ist[i] == I_SEND) && out_ready[dst[i]];
      last[i] = (cnt[i] == tot[i] - 2'd1);
    end
  end

  // ---------------- outputs ----------------
  always_comb begin
    for (int o = 0; o < N_PORTS; o++) begin
      out_flit[o] = '0;
      if (obusy[o]) out_flit[o] = cur_flit[osrc[o]];
    end
  end

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) in_ready[i] = (ist[i] == I_COLLECT);
  end

  // ---------------- inputs ----------------
  logic drop;
  logic [N_PORTS-1:0] bad;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    logic       ext_i;
    logic [5:0] did_i;
    logic [1:0] tot_i;
    logic       done_i;

    always_comb begin
      ext_i  = (cnt[i] == 2'd0) ? in_flit[i].ext : pbuf[i][0].ext;
      tot_i  = (cnt[i] == 2'd0) ? pkt_flits(in_flit[i]) : tot[i];
      did_i  = (cnt[i] == 2'd1) ? in_flit[i].payload[5:0] : pbuf[i][1].payload[5:0];
      done_i = (cnt[i] == tot_i - 2'd1);
    end

    // a packet that cannot be routed is discarded when its last flit is in
    assign bad[i] = (ist[i] == I_COLLECT) && in_flit[i].valid && done_i &&
                    !(ext_i && did_i < 6'(N_PORTS));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ist[i]  <= I_COLLECT;
        cnt[i]  <= '0;
        tot[i]  <= '0;
        dst[i]  <= '0;
        for (int f = 0; f < 3; f++) pbuf[i][f] <= '0;
      end else begin
        case (ist[i])
          I_COLLECT: if (in_flit[i].valid) begin
            pbuf[i][cnt[i]] <= in_flit[i];
            if (cnt[i] == 2'd0) tot[i] <= tot_i;
            if (done_i) begin
              cnt[i] <= '0;
              if (ext_i && did_i < 6'(N_PORTS)) begin
                ist[i] <= I_WAIT;
                dst[i] <= PW'(did_i);
              end
            end else begin
              cnt[i] <= cnt[i] + 2'd1;
            end
          end
          I_WAIT: if (granted[i]) begin
            ist[i] <= I_SEND;
            cnt[i] <= '0;
          end
          I_SEND: if (adv[i]) begin
            if (last[i]) begin
              ist[i] <= I_COLLECT;
              cnt[i] <= '0;
            end else begin
              cnt[i] <= cnt[i] + 2'd1;
            end
          end
          default: ist[i] <= I_COLLECT;
        endcase
      end
    end
  end

  assign drop = |bad;

  // ---------------- outputs' reservations ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_PORTS; o++) begin
        obusy[o] <= 1'b0;
        osrc[o]  <= '0;
        optr[o]  <= PW'(o);
      end
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        if (gnt_v[o]) begin
          obusy[o] <= 1'b1;
          osrc[o]  <= gnt_i[o];
          optr[o]  <= gnt_i[o];
        end else if (obusy[o] && out_ready[o] && last[osrc[o]]) begin
          obusy[o] <= 1'b0;
        end
      end
    end
  end

  assign ev_drop = drop;

endmodule
