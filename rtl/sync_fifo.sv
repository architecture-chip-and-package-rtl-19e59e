// sync_fifo: the request queue between a Rocket core and the system bus.
//
// A first-in first-out buffer of DEPTH entries of W bits with a
// valid/ready handshake on both sides. A word written in one cycle can be
// read in the next (no fall-through); the queue accepts a write while
// full only in a cycle where it is also read. Storage is a register array
// addressed by read and write pointers one bit wider than the index, so
// full and empty are told apart by the extra bit.
//
// The document places one FIFO between each tile and the system bus and
// says nothing more about it; the depth and the handshake are this
// design's choices.
module sync_fifo #(
  parameter int unsigned W     = 71,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         empty, full, do_wr, do_rd;

  assign empty     = (wp == rp);
  assign full      = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign out_valid = !empty;
  assign out_data  = mem[rp[AW-1:0]];
  assign do_rd     = out_valid && out_ready;
  assign in_ready  = !full || do_rd;
  assign do_wr     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= in_data;
  end

endmodule
