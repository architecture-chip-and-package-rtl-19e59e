// hl_pkg: types and constants shared by the ROCKET-64 chiplets.
//
// Hybrid-Link is the chiplet-to-chiplet protocol of this system. Every
// physical channel carries one 40-bit flit per cycle. A packet is one
// header flit followed by up to two body flits:
//
//   header : {L/E, Valid, CMD[2:0], Length[2:0], Addr[31:0]}
//   body   : {L/E, Valid, RSVD[5:0],  payload[31:0]}
//
// L/E selects the protocol mode: 0 = lightweight (point-to-point links,
// no routing information), 1 = extended (routed transactions, which add a
// flit holding TID and DID). Valid marks a flit that carries information.
//
//   mode         command          flits
//   lightweight  read request     header
//   extended     read request     header, TID/DID
//   lightweight  write (4 B)      header, data
//   extended     write (4 B)      header, TID/DID, data
//   lightweight  read resp (4 B)  header, data
//   extended     read resp (4 B)  header, TID/DID, data
//
// The field list, the 40-bit width, the six packet kinds and the three
// flit slots follow the protocol description. The order of the fields
// inside a flit, the command codes, the meaning of Length (number of
// 4-byte words), the layout of the TID/DID flit and the echo of the
// request address in a read response are this design's choices.
//
// TID is the 6-bit global core number (0..63) of the core a transaction
// belongs to; DID is the 6-bit destination node on the NoC (Rocket/L2
// chiplet pairs are nodes 0..7, the memory controller node 8).
//
// Besides the flit, each channel has one ready wire running against the
// data; a flit moves on a clock edge where Valid and ready are both 1.
package hl_pkg;

  localparam int unsigned FLIT_W   = 40;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ID_W     = 6;
  localparam int unsigned N_NODES  = 9;
  localparam logic [ID_W-1:0] MEM_NODE = 6'd8;

  typedef enum logic [2:0] {
    CMD_NONE      = 3'd0,
    CMD_READ_REQ  = 3'd1,
    CMD_WRITE_REQ = 3'd2,
    CMD_READ_RESP = 3'd3
  } hl_cmd_e;

  // One 40-bit flit. For a header, ctl = {cmd, len}; for a body flit, ctl
  // is the reserved field and is sent as zero.
  typedef struct packed {
    logic        ext;
    logic        valid;
    logic [5:0]  ctl;
    logic [31:0] payload;
  } flit_t;

  // A whole transaction, as the bridges see it.
  typedef struct packed {
    logic            ext;
    hl_cmd_e         cmd;
    logic [2:0]      len;
    logic [31:0]     addr;
    logic [31:0]     data;
    logic [ID_W-1:0] tid;
    logic [ID_W-1:0] did;
  } hl_txn_t;

  // Core-side request and response (the core's memory port).
  typedef struct packed {
    logic        write;
    logic [31:0] addr;
    logic [31:0] wdata;
  } core_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        err;
  } core_resp_t;

  // System-bus request and response: the core request tagged with the
  // issuing core's global number.
  typedef struct packed {
    logic            write;
    logic [31:0]     addr;
    logic [31:0]     wdata;
    logic [ID_W-1:0] tid;
  } bus_req_t;

  typedef struct packed {
    logic [31:0]     rdata;
    logic            err;
    logic [ID_W-1:0] tid;
  } bus_resp_t;

  // DRAM channel request (one 32-bit word).
  typedef struct packed {
    logic        write;
    logic [29:0] waddr;   // word address
    logic [31:0] wdata;
  } dram_req_t;

  // Address map of a Rocket chiplet's system bus.
  //   0x8000_0000-0xFFFF_FFFF  cacheable memory, through the L2 chiplet
  //   0x4000_0000-0x7FFF_FFFF  uncached alias of the same memory, extended
  //                            mode straight to the memory controller
  //   0x0000_0000-0x0FFF_FFFF  periphery bus (CLINT, PLIC, Bootrom, Debug)
  //   anything else            error device
  typedef enum logic [1:0] {
    DST_L2     = 2'd0,
    DST_UNCACH = 2'd1,
    DST_PERIPH = 2'd2,
    DST_ERROR  = 2'd3
  } bus_dst_e;

  function automatic bus_dst_e decode_addr(logic [31:0] a);
    if (a[31])                  return DST_L2;
    else if (a[31:30] == 2'b01) return DST_UNCACH;
    else if (a[31:28] == 4'h0)  return DST_PERIPH;
    else                        return DST_ERROR;
  endfunction

  // Steering rules of a mux/demux for packets arriving from its channel.
  typedef enum logic [1:0] {
    ROUTE_MODE = 2'd0,   // lightweight -> port 0, extended -> port 1
    ROUTE_A31  = 2'd1,   // Addr[31] = 0 -> port 0, 1 -> port 1
    ROUTE_SLOT = 2'd2    // port addr_slot(Addr, N)
  } route_e;

  // Bridge slot of an address on a Rocket chiplet: word address modulo the
  // number of bridges, taken over address bits 11:2.
  function automatic int unsigned addr_slot(logic [31:0] a, int unsigned n);
    return int'(a[11:2]) % n;
  endfunction

  function automatic logic cmd_has_data(hl_cmd_e c);
    return (c == CMD_WRITE_REQ) || (c == CMD_READ_RESP);
  endfunction

  // Number of flits of the packet whose header is h (1 to 3).
  function automatic logic [1:0] pkt_flits(flit_t h);
    hl_cmd_e c;
    c = hl_cmd_e'(h.ctl[5:3]);
    return 2'd1 + {1'b0, h.ext} + {1'b0, cmd_has_data(c)};
  endfunction

  function automatic flit_t make_header(hl_txn_t t);
    flit_t f;
    f.ext     = t.ext;
    f.valid   = 1'b1;
    f.ctl     = {t.cmd, t.len};
    f.payload = t.addr;
    return f;
  endfunction

  function automatic flit_t make_body(logic ext, logic [31:0] payload);
    flit_t f;
    f.ext     = ext;
    f.valid   = 1'b1;
    f.ctl     = 6'd0;
    f.payload = payload;
    return f;
  endfunction

  // Payload of the extended-mode flit: bits 11:6 TID, bits 5:0 DID.
  function automatic logic [31:0] ext_payload(logic [ID_W-1:0] tid, logic [ID_W-1:0] did);
    return {20'd0, tid, did};
  endfunction

endpackage
