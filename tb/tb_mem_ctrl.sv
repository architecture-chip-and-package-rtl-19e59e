// tb_mem_ctrl: self-checking testbench of the 4-channel memory controller.
//
// A random stream of extended reads and writes goes in; each DRAM channel is
// a behavioural word memory that takes requests with random backpressure and
// returns read data after a random delay. A shadow copy of memory, updated in
// request order, gives the value every read must return; responses may come
// back out of order across channels and are matched by address and TID. The
// test also checks the routing fields of each response (extended, DID =
// TID / 8), that a request lands on channel addr[3:2], that the 0x4 and 0x8
// windows alias, and that several channels are busy at once.
// Stimulus is driven after the falling edge and sampled 2 ns later; the
// handshakes complete on the next rising edge.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import hl_pkg::*;
  localparam int NCH = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  hl_txn_t req, resp;
  logic req_valid, req_ready, resp_valid, resp_ready;
  dram_req_t dram_req [NCH];
  logic dram_valid [NCH], dram_ready [NCH], dram_rvalid [NCH];
  logic [31:0] dram_rdata [NCH];
  logic [NCH-1:0] ch_busy;

  mem_ctrl #(.N_CH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DRAM channel models
  logic [31:0] dmem [NCH][logic [29:0]];
  int          dly  [NCH];
  bit          dpend[NCH];
  logic [29:0] dwa  [NCH];

  // expected read responses
  logic [31:0] exp_addr[$], exp_data[$];
  logic [5:0]  exp_tid[$];
  logic [31:0] shadow [logic [29:0]];   // keyed by addr[29:2]
  int max_busy = 0, nresp = 0;

  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      dram_ready[c]  = 1'($urandom_range(0, 3) != 0);
      dram_rvalid[c] = 0;
      if (dpend[c]) begin
        if (dly[c] == 0) begin
          dram_rvalid[c] = 1;
          dram_rdata[c]  = dmem[c].exists(dwa[c]) ? dmem[c][dwa[c]] : {2'b11, dwa[c]};
        end else dly[c]--;
      end
    end
    resp_ready = 1'($urandom_range(0, 3) != 0);
    #2;
    if (rst_n) begin
      int nb;
      nb = $countones(ch_busy);
      if (nb > max_busy) max_busy = nb;
      for (int c = 0; c < NCH; c++) begin
        if (dram_rvalid[c]) dpend[c] = 0;
        if (dram_valid[c] && dram_ready[c]) begin
          check(dram_req[c].waddr[27:0] == req.addr[29:2], "DRAM word address");
          check(req.addr[3:2] == 2'(c), "channel is addr[3:2]");
          if (dram_req[c].write) dmem[c][dram_req[c].waddr] = dram_req[c].wdata;
          else begin
            check(!dpend[c], "one read per channel");
            dpend[c] = 1; dwa[c] = dram_req[c].waddr; dly[c] = $urandom_range(0, 7);
          end
        end
      end
      if (resp_valid && resp_ready) begin
        int f;
        f = -1;
        foreach (exp_addr[i]) if (f < 0 && exp_addr[i] == resp.addr && exp_tid[i] == resp.tid) f = i;
        check(f >= 0, $sformatf("response %h matches a request", resp.addr));
        check(resp.ext && resp.cmd == CMD_READ_RESP && resp.did == {3'b0, resp.tid[5:3]}, "response routing fields");
        if (f >= 0) begin
          check(resp.data == exp_data[f], $sformatf("read data %h at %h, want %h", resp.data, resp.addr, exp_data[f]));
          exp_addr.delete(f); exp_data.delete(f); exp_tid.delete(f);
        end
        nresp++;
      end
    end
  end

  task automatic issue(bit wr, logic [31:0] a, logic [31:0] d, logic [5:0] tid);
    req = '0;
    req.ext = 1; req.cmd = wr ? CMD_WRITE_REQ : CMD_READ_REQ; req.len = 1;
    req.addr = a; req.data = d; req.tid = tid; req.did = MEM_NODE;
    req_valid = 1;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    if (wr) shadow[a[29:2]] = d;
    else begin
      exp_addr.push_back(a); exp_tid.push_back(tid);
      exp_data.push_back(shadow.exists(a[29:2]) ? shadow[a[29:2]] : {2'b11, 2'b00, a[29:2]});
    end
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_valid = 0; resp_ready = 0;
    foreach (dpend[c]) begin dpend[c] = 0; dly[c] = 0; dram_rdata[c] = 0; dram_ready[c] = 0; dram_rvalid[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // alias: write through the uncached window, read through the cacheable one
    issue(1, 32'h4000_0100, 32'hCAFE_0001, 6'd9);
    issue(0, 32'h8000_0100, 0, 6'd9);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = {($urandom_range(0, 1) ? 2'b10 : 2'b01), 22'd0, 6'($urandom_range(0, 63)), 2'b00};
      issue(1'($urandom_range(0, 2) == 0), a, $urandom, 6'($urandom_range(0, 63)));
    end
    repeat (40) @(negedge clk);
    check(exp_addr.size() == 0, "every read answered");
    check(max_busy == NCH, $sformatf("all channels busy at once (max %0d)", max_busy));
    check(nresp > 1500, "read traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
