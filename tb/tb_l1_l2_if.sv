// tb_l1_l2_if: self-checking testbench of the L1-to-L2 interface.
//
// A random stream of cacheable and uncached reads and writes from random
// cores enters the interface. Three bridge models take transactions with
// random backpressure and answer each read, after a random delay, with a
// read response (lightweight for cacheable, extended for uncached reads)
// whose data is derived from the address. The test checks that each
// request leaves on bridge addr[11:2] mod 3 with the mode, command,
// address, data, TID and DID the address map calls for; that a bridge
// never gets a second read while one is outstanding; that every read is
// answered once, to the core that issued it, with the right data; and that
// several bridges had reads outstanding at the same time.
// Inputs change after the falling edge and are sampled 1 to 2 ns later.
`timescale 1ns/1ps
module tb_l1_l2_if;
  import hl_pkg::*;
  localparam int NB = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t  req;
  logic      req_valid, req_ready;
  bus_resp_t resp;
  logic      resp_valid, resp_ready;
  hl_txn_t   br_tx [NB], br_rx [NB];
  logic      br_tx_valid [NB], br_tx_ready [NB], br_rx_valid [NB], br_rx_ready [NB];

  l1_l2_if #(.N_BR(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] bdata(logic [31:0] a);
    return {a[15:0], ~a[15:0]};
  endfunction

  bit          bpend [NB];
  hl_txn_t     bq [NB];
  int          bdly [NB];
  bit          btaken [NB];
  logic [31:0] exp_d [$];
  logic [5:0]  exp_t [$];
  int n_multi = 0, n_rsp = 0;

  always @(negedge clk) begin
    for (int i = 0; i < NB; i++) begin
      if (btaken[i]) begin bpend[i] = 0; btaken[i] = 0; end
      br_tx_ready[i] = 1'($urandom_range(0, 2) != 0);
      br_rx_valid[i] = 0;
      br_rx[i] = '0;
      if (bpend[i]) begin
        if (bdly[i] == 0) begin
          br_rx_valid[i] = 1;
          br_rx[i].ext  = bq[i].ext;
          br_rx[i].cmd  = CMD_READ_RESP;
          br_rx[i].len  = 1;
          br_rx[i].addr = bq[i].addr;
          br_rx[i].data = bdata(bq[i].addr);
          br_rx[i].tid  = bq[i].tid;
        end else bdly[i]--;
      end
    end
    resp_ready = 1'($urandom_range(0, 3) != 0);
    #2;
    if (rst_n) begin
      int nb;
      nb = 0;
      for (int i = 0; i < NB; i++) begin
        if (bpend[i]) nb++;
        if (br_tx_valid[i] && br_tx_ready[i]) begin
          hl_txn_t t;
          bit unc;
          t = br_tx[i];
          unc = (req.addr[31:30] == 2'b01);
          check(req_valid && t.addr == req.addr, "bridge carries the request's address");
          check(int'(req.addr[11:2]) % NB == i, $sformatf("address %h on bridge %0d", req.addr, i));
          check(t.ext == unc && t.cmd == (req.write ? CMD_WRITE_REQ : CMD_READ_REQ) && t.len == 3'd1,
                "mode, command and length");
          check(!req.write || t.data == req.wdata, "write data");
          check(!unc || (t.tid == req.tid && t.did == MEM_NODE), "uncached: TID = core, DID = memory node");
          if (t.cmd == CMD_READ_REQ) begin
            check(!bpend[i], "one read outstanding per bridge");
            bpend[i] = 1; bq[i] = t; bq[i].tid = req.tid; bdly[i] = $urandom_range(0, 8);
          end
        end
        btaken[i] = br_rx_valid[i] && br_rx_ready[i];
      end
      if (nb > 1) n_multi++;
      if (resp_valid && resp_ready) begin
        int f;
        f = -1;
        foreach (exp_d[k]) if (f < 0 && exp_d[k] == resp.rdata && exp_t[k] == resp.tid) f = k;
        check(f >= 0 && !resp.err, $sformatf("response %h for core %0d matches a read", resp.rdata, resp.tid));
        if (f >= 0) begin exp_d.delete(f); exp_t.delete(f); end
        n_rsp++;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_valid = 0; resp_ready = 0;
    for (int i = 0; i < NB; i++) begin bpend[i] = 0; bdly[i] = 0; btaken[i] = 0; br_rx[i] = '0; br_rx_valid[i] = 0; br_tx_ready[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bus_req_t r;
      r.write = 1'($urandom_range(0, 3) == 0);
      r.addr  = {($urandom_range(0, 1) ? 2'b10 : 2'b01), 14'($urandom), 14'($urandom), 2'b00};
      r.wdata = $urandom;
      r.tid   = 6'($urandom);
      req = r; req_valid = 1;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      if (!r.write) begin exp_d.push_back(bdata(r.addr)); exp_t.push_back(r.tid); end
      @(negedge clk);
      req_valid = 0;
    end
    repeat (40) @(negedge clk);
    check(exp_d.size() == 0, "every read answered");
    check(n_rsp > 1000, "read traffic");
    check(n_multi > 100, $sformatf("reads outstanding on several bridges at once (%0d cycles)", n_multi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
