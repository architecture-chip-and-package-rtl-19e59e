// tb_l2_cache: one L2 slice against a reference memory and tag model.
//
// The slice (IDX_BITS = 6, 64 lines, so that lines conflict often) gets
// random lightweight reads and writes to a small set of addresses that
// share indices. A behavioural memory answers the slice's extended
// requests after a random delay. The testbench keeps its own memory
// image and its own copy of the direct-mapped tag array. Checked:
//  * every read returns the latest value written to that address;
//  * a read is a hit exactly when the reference tag array says so, and
//    ev_hit / ev_miss agree; a hit is answered one cycle after it is taken;
//  * every write is forwarded down as an extended write (DID = memory
//    node, TID = NODE*8) with the right address and data;
//  * no request is taken during the invalidation sweep after reset.
module tb_l2_cache;
  import hl_pkg::*;
  localparam int IDX = 6, NODE = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  hl_txn_t up_req, up_resp, dn_req, dn_resp;
  logic up_req_valid, up_req_ready, up_resp_valid, up_resp_ready;
  logic dn_req_valid, dn_req_ready, dn_resp_valid, dn_resp_ready;
  logic ev_hit, ev_miss, init_done;

  l2_cache #(.IDX_BITS(IDX), .NODE(NODE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- behavioural memory ----------------
  logic [31:0] mem [logic [31:0]];
  int          mdelay;
  hl_txn_t     mreq;
  bit          mbusy;
  int          nwrites_down = 0;

  function automatic logic [31:0] rd(logic [31:0] a);
    return mem.exists(a) ? mem[a] : ~a;   // unwritten words read as ~address
  endfunction

  // ---------------- reference tags ----------------
  logic [31:0] ref_line [2**IDX];
  bit          ref_vld  [2**IDX];

  int cyc = 0, hits = 0, misses = 0, rd_count = 0;
  logic [31:0] rq_addr[$];
  int          rq_time[$];
  bit          rq_hit[$];
  logic [31:0] rq_data[$];
  logic [31:0] shadow [logic [31:0]];   // value each address must read, in issue order

  always @(negedge clk) begin
    cyc++;
    // memory side drive
    dn_req_ready  = 1'($urandom_range(0, 3) != 0);
    if (mbusy && mdelay == 0) begin
      dn_resp_valid = 1;
      dn_resp       = '0;
      dn_resp.ext   = 1;
      dn_resp.cmd   = CMD_READ_RESP;
      dn_resp.len   = 1;
      dn_resp.addr  = mreq.addr;
      dn_resp.data  = rd(mreq.addr);
      dn_resp.tid   = mreq.tid;
    end else begin
      dn_resp_valid = 0;
    end
    if (mdelay > 0) mdelay--;
    up_resp_ready = 1'($urandom_range(0, 4) != 0);
    #2;
    if (rst_n) begin
      if (dn_req_valid && dn_req_ready) begin
        check(dn_req.ext && dn_req.did == MEM_NODE && dn_req.tid == 6'(NODE * 8), "downstream request routing fields");
        if (dn_req.cmd == CMD_WRITE_REQ) begin
          mem[dn_req.addr] = dn_req.data;
          nwrites_down++;
        end else begin
          check(!mbusy, "one miss at a time");
          mbusy  = 1;
          mreq   = dn_req;
          mdelay = $urandom_range(1, 6);
        end
      end
      if (dn_resp_valid && dn_resp_ready) mbusy = 0;
      if (up_resp_valid && up_resp_ready) begin
        check(rq_addr.size() > 0 && up_resp.addr == rq_addr[0], "response address");
        check(up_resp.cmd == CMD_READ_RESP && !up_resp.ext, "lightweight read response");
        if (rq_addr.size() > 0) begin
          check(up_resp.data == rq_data[0], $sformatf("read data %h at %h, want %h", up_resp.data, rq_addr[0], rq_data[0]));
          void'(rq_data.pop_front()); void'(rq_addr.pop_front()); void'(rq_time.pop_front()); void'(rq_hit.pop_front());
        end
        rd_count++;
      end
    end
  end

  task automatic issue(bit wr, logic [31:0] a, logic [31:0] d);
    up_req      = '0;
    up_req.cmd  = wr ? CMD_WRITE_REQ : CMD_READ_REQ;
    up_req.len  = 1;
    up_req.addr = a;
    up_req.data = d;
    up_req_valid = 1;
    #1;
    while (!up_req_ready) begin @(negedge clk); #1; end
    begin
      int i;
      bit h;
      i = int'(a[IDX+1:2]);
      h = ref_vld[i] && ref_line[i] == a;
      if (wr) begin
        check(!ev_hit && !ev_miss, "no hit/miss event on a write");
        check(dn_req_valid && dn_req_ready && dn_req.cmd == CMD_WRITE_REQ &&
              dn_req.addr == a && dn_req.data == d, "write forwarded in the cycle it is taken");
        shadow[a] = d;
      end else begin
        check(ev_hit == h && ev_miss == !h, $sformatf("hit/miss of %h (want hit=%0b)", a, h));
        if (h) hits++; else misses++;
        ref_hit_last = h;
        rq_data.push_back(shadow.exists(a) ? shadow[a] : ~a);
        rq_addr.push_back(a); rq_time.push_back(cyc); rq_hit.push_back(h);
      end
      ref_vld[i] = 1; ref_line[i] = a;
    end
    @(negedge clk);
    up_req_valid = 0;
    if (!wr && ref_hit_last) begin
      #1 check(up_resp_valid && up_resp.addr == a, "hit answered one cycle later");
    end
  endtask
  bit ref_hit_last;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_req = '0; up_req_valid = 0; dn_resp = '0; dn_resp_valid = 0; mbusy = 0; mdelay = 0;
    foreach (ref_vld[i]) ref_vld[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    up_req_valid = 1; up_req.cmd = CMD_READ_REQ;
    for (int n = 0; n < 2**IDX; n++) begin
      #3 check(!up_req_ready && !init_done, "no request during the sweep");
      @(negedge clk);
    end
    up_req_valid = 0;
    wait (init_done);
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] a;
      // 4 tags x 16 indices x word offsets
      a = {2'b10, 20'($urandom_range(0, 3)), 4'd0, 4'($urandom_range(0, 15)), 2'b00};
      issue(1'($urandom_range(0, 3) == 0), a, $urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    check(rq_addr.size() == 0, "everything answered");
    check(hits > 100 && misses > 100, $sformatf("hits %0d and misses %0d both exercised", hits, misses));
    check(nwrites_down > 100, "write-through traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
