// l2_cache: the L2 cache slice of one L2 chiplet.
//
// 8 MB of L2 is split over the eight L2 chiplets, so one slice holds 1 MB:
// 2^IDX_BITS lines of one 32-bit word, direct mapped. Each line has a tag
// of the address bits above the index and a valid bit, kept together in a
// tag array.
//
// Operation, one request at a time from the Rocket side (up):
//  * read hit   answered from the data array; response one cycle later
//  * read miss  an extended read request goes down to the memory
//               controller (DID = memory node, TID = first core of this
//               chiplet); the returning data fills the line and is sent up
//  * write      write-through with allocate: the line is written and
//               marked valid, and the write is forwarded down as an
//               extended write in the same cycle; the write has no response
// After reset the cache clears its tag array, one line per cycle
// (2^IDX_BITS cycles), and takes no request until that is done.
//
// ev_hit / ev_miss pulse once per read hit / read miss.
//
// The document gives the total L2 size and the L2 chiplet; line size,
// mapping, write policy and the invalidation sweep are this design's
// choices. The slices are not kept coherent with one another; writes reach
// memory at once, so memory is always up to date.
module l2_cache
  import hl_pkg::*;
#(
  parameter int unsigned IDX_BITS = 18,
  parameter int unsigned NODE     = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  // requests from and responses to the Rocket chiplet
  input  hl_txn_t up_req,
  input  logic    up_req_valid,
  output logic    up_req_ready,
  output hl_txn_t up_resp,
  output logic    up_resp_valid,
  input  logic    up_resp_ready,
  // requests to and responses from memory
  output hl_txn_t dn_req,
  output logic    dn_req_valid,
  input  logic    dn_req_ready,
  input  hl_txn_t dn_resp,
  input  logic    dn_resp_valid,
  output logic    dn_resp_ready,
  // events
  output logic    ev_hit,
  output logic    ev_miss,
  output logic    init_done
);

  localparam int unsigned NLINES = 1 << IDX_BITS;
  localparam int unsigned TAG_W  = 30 - IDX_BITS;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_MISS_REQ, S_MISS_WAIT} state_e;

  logic [31:0]      data_a [NLINES];
  logic [TAG_W:0]   tagv_a [NLINES];   // {valid, tag}

  state_e                state;
  logic [IDX_BITS-1:0]   init_idx;
  hl_txn_t               cur;
  logic                  rsp_pend;
  hl_txn_t               rsp_q;

  logic [IDX_BITS-1:0]   idx;
  logic [TAG_W-1:0]      tag;
  logic                  hit;
  logic                  is_wr;

  assign idx   = up_req.addr[IDX_BITS+1:2];
  assign tag   = up_req.addr[31:IDX_BITS+2];
  assign hit   = tagv_a[idx][TAG_W] && (tagv_a[idx][TAG_W-1:0] == tag);
  assign is_wr = (up_req.cmd == CMD_WRITE_REQ);

  function automatic hl_txn_t mem_txn(hl_cmd_e c, logic [31:0] a, logic [31:0] d);
    hl_txn_t m;
    m      = '0;
    m.ext  = 1'b1;
    m.cmd  = c;
    m.len  = 3'd1;
    m.addr = a;
    m.data = d;
    m.tid  = ID_W'(NODE * 8);
    m.did  = MEM_NODE;
    return m;
  endfunction

  always_comb begin
    up_req_ready = 1'b0;
    dn_req       = '0;
    dn_req_valid = 1'b0;
    case (state)
      S_IDLE: begin
        if (is_wr) begin
          dn_req       = mem_txn(CMD_WRITE_REQ, up_req.addr, up_req.data);
          dn_req_valid = up_req_valid;
          up_req_ready = dn_req_ready;
        end else begin
          up_req_ready = !rsp_pend;
        end
      end
      S_MISS_REQ: begin
        dn_req       = mem_txn(CMD_READ_REQ, cur.addr, 32'd0);
        dn_req_valid = 1'b1;
      end
      default: ;
    endcase
  end

  assign dn_resp_ready = (state == S_MISS_WAIT);
  assign up_resp       = rsp_q;
  assign up_resp_valid = rsp_pend;
  assign init_done     = (state != S_INIT);

  logic acc_rd;
  assign acc_rd = (state == S_IDLE) && up_req_valid && up_req_ready && !is_wr;
  assign ev_hit  = acc_rd && hit;
  assign ev_miss = acc_rd && !hit;

  function automatic hl_txn_t resp_txn(logic [31:0] a, logic [31:0] d);
    hl_txn_t r;
    r      = '0;
    r.cmd  = CMD_READ_RESP;
    r.len  = 3'd1;
    r.addr = a;
    r.data = d;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      init_idx <= '0;
      cur      <= '0;
      rsp_pend <= 1'b0;
      rsp_q    <= '0;
    end else begin
      if (rsp_pend && up_resp_ready) rsp_pend <= 1'b0;
      case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_BITS'(NLINES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (acc_rd) begin
            if (hit) begin
              rsp_pend <= 1'b1;
              rsp_q    <= resp_txn(up_req.addr, data_a[idx]);
            end else begin
              cur   <= up_req;
              state <= S_MISS_REQ;
            end
          end
        end
        S_MISS_REQ: if (dn_req_ready) state <= S_MISS_WAIT;
        S_MISS_WAIT: begin
          if (dn_resp_valid && dn_resp.cmd == CMD_READ_RESP) begin
            rsp_pend <= 1'b1;
            rsp_q    <= resp_txn(cur.addr, dn_resp.data);
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Array writes: the invalidation sweep, writes and fills.
  logic [IDX_BITS-1:0] cur_idx;
  assign cur_idx = cur.addr[IDX_BITS+1:2];

  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      tagv_a[init_idx] <= '0;
    end else if (state == S_IDLE && up_req_valid && up_req_ready && is_wr) begin
      data_a[idx] <= up_req.data;
      tagv_a[idx] <= {1'b1, tag};
    end else if (state == S_MISS_WAIT && dn_resp_valid && dn_resp.cmd == CMD_READ_RESP) begin
      data_a[cur_idx] <= dn_resp.data;
      tagv_a[cur_idx] <= {1'b1, cur.addr[31:IDX_BITS+2]};
    end
  end

endmodule
