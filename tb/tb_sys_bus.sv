// tb_sys_bus: self-checking testbench of the Rocket chiplet's system bus.
//
// Eight tile processes issue random reads and writes, one at a time, to
// addresses in all four windows of the address map. Three target models
// (L1-to-L2 interface, periphery bus, error device) accept with random
// backpressure and answer every read after a random delay with data
// derived from the address and target, echoing the TID. The test checks
// that each request reaches the target its address decodes to, unchanged
// and tagged with the issuing tile's TID, that each read's response comes
// back to the issuing tile with the right data and error flag, that no
// response is invented, and that tiles were made to wait (bus contention).
// Inputs change after the falling edge and are sampled 1 to 2 ns later.
`timescale 1ns/1ps
module tb_sys_bus;
  import hl_pkg::*;
  localparam int NT = 8, NODE = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t   t_req [NT];
  logic       t_req_valid [NT], t_req_ready [NT];
  core_resp_t t_resp [NT];
  logic       t_resp_valid [NT], t_resp_ready [NT];
  bus_req_t   g_req [3];
  logic       g_req_valid [3], g_req_ready [3];
  bus_resp_t  g_resp [3];
  logic       g_resp_valid [3], g_resp_ready [3];

  sys_bus #(.N_TILES(NT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int target_of(logic [31:0] a);
    case (decode_addr(a))
      DST_L2, DST_UNCACH: return 0;
      DST_PERIPH:         return 1;
      default:            return 2;
    endcase
  endfunction

  function automatic logic [31:0] tdata(int g, logic [31:0] a);
    return (g == 2) ? 32'd0 : (a ^ (32'h1111_1111 * (g + 1)));
  endfunction

  bus_req_t gq [3][$];
  int       gdly [3];
  bit       gtaken [3];
  bit       want [NT];
  core_resp_t exp_r [NT];
  bus_req_t last_req [NT];
  bit       sent [NT];
  int       n_bp = 0, n_rsp = 0, ndone = 0;

  always @(negedge clk) begin
    for (int g = 0; g < 3; g++) begin
      if (gtaken[g]) begin void'(gq[g].pop_front()); gtaken[g] = 0; gdly[g] = $urandom_range(0, 3); end
      g_req_ready[g]  = 1'($urandom_range(0, 2) != 0);
      g_resp_valid[g] = 0;
      if (gq[g].size() > 0 && gdly[g] == 0) begin
        g_resp_valid[g] = 1;
        g_resp[g].rdata = tdata(g, gq[g][0].addr);
        g_resp[g].err   = (g == 2);
        g_resp[g].tid   = gq[g][0].tid;
      end else if (gdly[g] > 0) gdly[g]--;
    end
    for (int i = 0; i < NT; i++) t_resp_ready[i] = 1'($urandom_range(0, 3) != 0);
    #2;
    if (rst_n) begin
      for (int g = 0; g < 3; g++) begin
        if (g_req_valid[g] && g_req_ready[g]) begin
          int i;
          i = int'(g_req[g].tid) % NT;
          check(sent[i] && g_req[g] == last_req[i], $sformatf("target %0d got tile %0d's request unchanged", g, i));
          check(target_of(g_req[g].addr) == g, $sformatf("address %h decoded to target %0d", g_req[g].addr, g));
          sent[i] = 0;
          if (!g_req[g].write) gq[g].push_back(g_req[g]);
        end
        gtaken[g] = g_resp_valid[g] && g_resp_ready[g];
      end
      for (int i = 0; i < NT; i++) begin
        if (t_req_valid[i] && !t_req_ready[i]) n_bp++;
        if (t_resp_valid[i] && t_resp_ready[i]) begin
          check(want[i], $sformatf("tile %0d: response only to its read", i));
          check(t_resp[i] == exp_r[i], $sformatf("tile %0d: response %h/%b, want %h/%b", i, t_resp[i].rdata, t_resp[i].err, exp_r[i].rdata, exp_r[i].err));
          want[i] = 0;
          n_rsp++;
        end
      end
    end
  end

  task automatic tile_run(int i);
    for (int n = 0; n < 200; n++) begin
      bus_req_t r;
      int g;
      r.write = 1'($urandom_range(0, 3) == 0);
      case ($urandom_range(0, 3))
        0: r.addr = 32'h8000_0000 | $urandom_range(0, 32'hFFFF) << 2;
        1: r.addr = 32'h4000_0000 | $urandom_range(0, 32'hFFFF) << 2;
        2: r.addr = 32'h0000_0000 | $urandom_range(0, 32'hFFFF) << 2;
        default: r.addr = 32'h1000_0000 | $urandom_range(0, 32'h0FFF_FFFF);
      endcase
      r.wdata = $urandom;
      r.tid   = 6'(NODE * NT + i);
      g = target_of(r.addr);
      t_req[i] = r;
      t_req_valid[i] = 1;
      #1;
      while (!t_req_ready[i]) begin @(negedge clk); #1; end
      last_req[i] = r; sent[i] = 1;
      if (!r.write) begin
        want[i] = 1;
        exp_r[i].rdata = tdata(g, r.addr);
        exp_r[i].err   = (g == 2);
      end
      @(negedge clk);
      t_req_valid[i] = 0;
      while (want[i]) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    ndone++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NT; i++) begin t_req[i] = '0; t_req_valid[i] = 0; t_resp_ready[i] = 0; want[i] = 0; sent[i] = 0; end
    for (int g = 0; g < 3; g++) begin g_req_ready[g] = 0; g_resp[g] = '0; g_resp_valid[g] = 0; gdly[g] = 0; gtaken[g] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) fork
      automatic int ii = i;
      tile_run(ii);
    join_none
    while (ndone < NT) @(negedge clk);
    repeat (10) @(negedge clk);
    check(n_rsp > 800, $sformatf("%0d read responses", n_rsp));
    check(n_bp > 100, $sformatf("tiles waited for the bus (%0d cycles)", n_bp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
