// error_dev: the system bus's error device.
//
// Every request the system bus cannot map (see hl_pkg::decode_addr) is
// sent here. The device accepts one request at a time and answers it one
// cycle later with err = 1, rdata = 0 and the requester's TID, holding the
// response until it is taken. It accepts a new request in the cycle its
// response is taken, so it can serve one request per cycle.
//
// The document only names the block; answering with an error flag is this
// design's reading of that name.
module error_dev
  import hl_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  bus_req_t  req,
  input  logic      req_valid,
  output logic      req_ready,
  output bus_resp_t resp,
  output logic      resp_valid,
  input  logic      resp_ready
);

  logic [ID_W-1:0] tid_q;

  assign req_ready  = !resp_valid || resp_ready;
  assign resp.rdata = '0;
  assign resp.err   = 1'b1;
  assign resp.tid   = tid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      tid_q      <= '0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        resp_valid <= 1'b1;
        tid_q      <= req.tid;
      end
    end
  end

endmodule
