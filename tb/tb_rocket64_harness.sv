// tb_rocket64_harness: end-to-end test bench body for the ROCKET-64 top.
//
// It instantiates rocket64_top (with L2_IDX_BITS = IDX, or with no
// parameter list at all when IDX is the default 18) and surrounds it with
// behavioural models of everything outside the digital design:
//   * 64 cores, each a process that issues NOPS random accesses one at a
//     time: cacheable reads and writes (a per-core block of 16 words, so
//     cores of one chiplet evict each other's lines in small caches),
//     uncached reads and writes, periphery reads and reads of unmapped
//     space. Writes are posted; a read waits for its response.
//   * four DRAM channels (word memories with random backpressure and
//     latency), eight periphery buses (answer ~address after a delay),
//   * a DLDO power stage per Rocket chiplet (rail low while fewer switches
//     are on than the load needs; chiplet 7 sees a load no switch count
//     can meet and must saturate),
//   * a buck converter with ADC for the IVR (output follows the DPWM's
//     on-time through a first-order lag), and
//   * a loop-back wire on each chiplet's debug serial line.
// A shadow memory, updated in issue order, gives the value every memory
// read must return (the two memory windows alias one DRAM word space).
// Every mechanism is counted, and one that never happened is a failure:
// L2 hits and misses, uncached pass-through reads, periphery and error
// responses, NoC arbitration conflicts, several DRAM channels busy at once,
// core backpressure, DLDO tracking and saturation, IVR regulation and a
// debug word over each serial link.
// Inputs change after the falling clock edge and are sampled 1 to 2 ns
// later; handshakes complete on the next rising edge.
`timescale 1ns/1ps
module tb_rocket64_harness #(
  parameter int IDX  = 4,
  parameter int NOPS = 40
);
  import hl_pkg::*;
  localparam int NC = 8, NT = 8, NCORE = 64, NCH = 4, NSW = 32, DW = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_req_t  core_req        [NCORE];
  logic       core_req_valid  [NCORE], core_req_ready [NCORE];
  core_resp_t core_resp       [NCORE];
  logic       core_resp_valid [NCORE], core_resp_ready [NCORE];
  bus_req_t   periph_req      [NC];
  logic       periph_req_valid [NC], periph_req_ready [NC];
  bus_resp_t  periph_resp     [NC];
  logic       periph_resp_valid [NC], periph_resp_ready [NC];
  logic [DW-1:0] dbg_tx_data [NC], dbg_rx_data [NC];
  logic       dbg_tx_valid [NC], dbg_tx_ready [NC], dbg_line_out [NC], dbg_line_in [NC], dbg_rx_valid [NC];
  logic       ldo_en [NC], ldo_cmp [NC];
  logic [NSW-1:0] ldo_sw_en [NC];
  dram_req_t  dram_req [NCH];
  logic       dram_valid [NCH], dram_ready [NCH], dram_rvalid [NCH];
  logic [31:0] dram_rdata [NCH];
  logic [7:0] ivr_adc, ivr_vref, ivr_kp, ivr_ki, ivr_kd;
  logic       ivr_adc_valid, ivr_adc_start, ivr_duty_p, ivr_duty_n;
  logic       l2_ready, ev_noc_drop, ev_noc_conflict;
  logic [NC-1:0]  ev_l2_hit, ev_l2_miss;
  logic [NCH-1:0] mem_ch_busy;

  if (IDX == 18) begin : g_full
    rocket64_top dut (.*);
  end else begin : g_small
    rocket64_top #(.L2_IDX_BITS(IDX)) dut (.*);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- counters ----------------
  int n_hit = 0, n_miss = 0, n_unc = 0, n_per = 0, n_err = 0, n_conf = 0;
  int n_multi = 0, n_bp = 0, n_sat = 0, n_dbg = 0, n_cached = 0, cyc = 0;

  // ---------------- DRAM channels ----------------
  logic [31:0] dmem [NCH][logic [29:0]];
  int          dly [NCH];
  bit          dpend [NCH];
  logic [29:0] dwa [NCH];

  function automatic logic [31:0] dram_init(logic [29:0] wa);
    return {4'hD, wa[27:0]};
  endfunction

  // ---------------- periphery buses ----------------
  bus_req_t pq [NC][$];
  int       pdly [NC];
  bit       ptaken [NC];

  // ---------------- cores ----------------
  logic [31:0] shadow [logic [29:0]];
  bit          want_rsp [NCORE];
  core_resp_t  exp_rsp  [NCORE];
  int          ndone = 0;

  always @(negedge clk) begin
    cyc++;
    for (int c = 0; c < NCH; c++) begin
      dram_ready[c]  = 1'($urandom_range(0, 3) != 0);
      dram_rvalid[c] = 0;
      if (dpend[c]) begin
        if (dly[c] == 0) begin
          dram_rvalid[c] = 1;
          dram_rdata[c]  = dmem[c].exists(dwa[c]) ? dmem[c][dwa[c]] : dram_init(dwa[c]);
        end else dly[c]--;
      end
    end
    for (int c = 0; c < NC; c++) begin
      if (ptaken[c]) begin void'(pq[c].pop_front()); ptaken[c] = 0; pdly[c] = $urandom_range(0, 3); end
      periph_req_ready[c]  = 1'($urandom_range(0, 2) != 0);
      periph_resp_valid[c] = 0;
      if (pq[c].size() > 0) begin
        if (pdly[c] == 0) begin
          periph_resp_valid[c] = 1;
          periph_resp[c].rdata = ~pq[c][0].addr;
          periph_resp[c].err   = 0;
          periph_resp[c].tid   = pq[c][0].tid;
        end else pdly[c]--;
      end
    end
    for (int k = 0; k < NCORE; k++) core_resp_ready[k] = 1'($urandom_range(0, 3) != 0);
    #2;
    if (rst_n) begin
      int nb;
      nb = $countones(mem_ch_busy);
      if (nb > 1) n_multi++;
      if (ev_noc_conflict) n_conf++;
      n_hit  += $countones(ev_l2_hit);
      n_miss += $countones(ev_l2_miss);
      check(!ev_noc_drop, "no packet dropped by the NoC");
      for (int c = 0; c < NCH; c++) begin
        if (dram_rvalid[c]) dpend[c] = 0;
        if (dram_valid[c] && dram_ready[c]) begin
          if (dram_req[c].write) dmem[c][dram_req[c].waddr] = dram_req[c].wdata;
          else begin
            check(!dpend[c], "one DRAM read per channel");
            dpend[c] = 1; dwa[c] = dram_req[c].waddr; dly[c] = $urandom_range(0, 6);
          end
        end
      end
      for (int c = 0; c < NC; c++) begin
        if (periph_req_valid[c] && periph_req_ready[c]) begin
          check(periph_req[c].tid[5:3] == 3'(c), "periphery request from this chiplet's core");
          pq[c].push_back(periph_req[c]);
        end
        ptaken[c] = periph_resp_valid[c] && periph_resp_ready[c];
      end
      for (int k = 0; k < NCORE; k++) begin
        if (core_req_valid[k] && !core_req_ready[k]) n_bp++;
        if (core_resp_valid[k] && core_resp_ready[k]) begin
          check(want_rsp[k], $sformatf("core %0d: response only to a read", k));
          check(core_resp[k] == exp_rsp[k], $sformatf("core %0d: response %h/%b, want %h/%b", k,
                core_resp[k].rdata, core_resp[k].err, exp_rsp[k].rdata, exp_rsp[k].err));
          want_rsp[k] = 0;
        end
      end
    end
  end

  task automatic core_run(int k);
    for (int n = 0; n < NOPS; n++) begin
      int kind, w;
      logic [31:0] a;
      core_req_t r;
      kind = $urandom_range(0, 9);
      w    = $urandom_range(0, 15);
      r    = '0;
      case (kind)
        0, 1, 2: a = 32'h8000_0000 | (k << 8) | (w << 2);               // cacheable read
        3, 4:    begin a = 32'h8000_0000 | (k << 8) | (w << 2); r.write = 1; end
        5:       a = 32'h4010_0000 | (k << 8) | (w << 2);               // uncached read
        6:       begin a = 32'h4010_0000 | (k << 8) | (w << 2); r.write = 1; end
        7, 8:    a = 32'h0000_1000 | (k << 4);                          // periphery
        default: a = 32'h2000_0000 | (k << 8);                          // unmapped
      endcase
      r.addr  = a;
      r.wdata = $urandom;
      core_req[k] = r;
      core_req_valid[k] = 1;
      #1;
      while (!core_req_ready[k]) begin @(negedge clk); #1; end
      if (r.write) shadow[a[29:2]] = r.wdata;
      else begin
        want_rsp[k] = 1;
        exp_rsp[k]  = '0;
        if (kind >= 7) begin
          exp_rsp[k].rdata = (kind == 9) ? 32'd0 : ~a;
          exp_rsp[k].err   = (kind == 9);
        end else begin
          exp_rsp[k].rdata = shadow.exists(a[29:2]) ? shadow[a[29:2]] : dram_init({2'b00, a[29:2]});
        end
      end
      @(negedge clk);
      core_req_valid[k] = 0;
      while (want_rsp[k]) @(negedge clk);
      if (!r.write) begin
        if (kind == 5) n_unc++;
        else if (kind == 7 || kind == 8) n_per++;
        else if (kind == 9) n_err++;
        else n_cached++;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    ndone++;
  endtask

  // ---------------- DLDO power stages ----------------
  int ldo_load [NC];
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      ldo_en[c]  = rst_n;
      ldo_cmp[c] = ($countones(ldo_sw_en[c]) < ldo_load[c]);
    end
    if (rst_n && &ldo_sw_en[7]) n_sat++;
  end

  // ---------------- IVR buck converter and ADC ----------------
  int on_cnt = 0, vout10 = 0;
  always @(negedge clk) begin
    ivr_adc_valid = 0;
    if (ivr_duty_p) on_cnt++;
    if (ivr_adc_start) begin
      // on-time of the last period sets the target; the output lags it
      vout10 = vout10 + ((on_cnt * 2000 / 256) - vout10) / 4;
      on_cnt = 0;
      ivr_adc = 8'(vout10 / 10);
      ivr_adc_valid = 1;
    end
  end

  // ---------------- debug serial loop-back ----------------
  always_comb for (int c = 0; c < NC; c++) dbg_line_in[c] = dbg_line_out[c];

  task automatic dbg_run(int c);
    logic [DW-1:0] w;
    w = $urandom;
    dbg_tx_data[c] = w;
    dbg_tx_valid[c] = 1;
    #1;
    while (!dbg_tx_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    dbg_tx_valid[c] = 0;
    for (int t = 0; t < 4 * DW + 20; t++) begin
      @(negedge clk); #2;
      if (dbg_rx_valid[c]) begin
        check(dbg_rx_data[c] == w, $sformatf("debug word on chiplet %0d", c));
        n_dbg++;
        break;
      end
    end
  endtask

  initial begin
    #((IDX == 18 ? 1000000 : 200000) * 10);
    failures++;
    $display("FAIL: watchdog (%0d of %0d cores done)", ndone, NCORE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (core_req[k]) begin core_req[k] = '0; core_req_valid[k] = 0; core_resp_ready[k] = 0; want_rsp[k] = 0; end
    foreach (dpend[c]) begin dpend[c] = 0; dly[c] = 0; dram_rdata[c] = 0; dram_ready[c] = 0; dram_rvalid[c] = 0; end
    for (int c = 0; c < NC; c++) begin
      pdly[c] = 0; ptaken[c] = 0; periph_resp[c] = '0; periph_resp_valid[c] = 0; periph_req_ready[c] = 0;
      dbg_tx_data[c] = '0; dbg_tx_valid[c] = 0;
      ldo_load[c] = (c == 7) ? NSW + 4 : 5 + 3 * c;
      ldo_en[c] = 0; ldo_cmp[c] = 0;
    end
    ivr_adc = 0; ivr_adc_valid = 0; ivr_vref = 8'd120; ivr_kp = 8'd24; ivr_ki = 8'd6; ivr_kd = 8'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the L2 slices clear their tags first; cores may already queue requests
    for (int k = 0; k < NCORE; k++) fork
      automatic int kk = k;
      core_run(kk);
    join_none
    for (int c = 0; c < NC; c++) fork
      automatic int cc = c;
      dbg_run(cc);
    join_none
    wait (l2_ready);
    while (ndone < NCORE) @(negedge clk);
    repeat (300 * 256 - cyc > 0 ? 300 * 256 - cyc : 0) @(negedge clk);
    repeat (20) @(negedge clk);
    // DLDO: switch count tracks each load within one switch, or saturates
    for (int c = 0; c < 7; c++)
      check($countones(ldo_sw_en[c]) >= ldo_load[c] - 1 && $countones(ldo_sw_en[c]) <= ldo_load[c] + 1,
            $sformatf("DLDO %0d: %0d switches on for a load of %0d", c, $countones(ldo_sw_en[c]), ldo_load[c]));
    // IVR: the output sits near the reference
    check(vout10 / 10 >= 116 && vout10 / 10 <= 124, $sformatf("IVR output %0d for reference 120", vout10 / 10));
    $display("mechanisms: L2 hit %0d, L2 miss %0d, cached reads %0d, uncached reads %0d, periphery %0d, error %0d",
             n_hit, n_miss, n_cached, n_unc, n_per, n_err);
    $display("            NoC conflicts %0d, multi-channel DRAM cycles %0d, core stall cycles %0d, DLDO saturated cycles %0d, debug words %0d",
             n_conf, n_multi, n_bp, n_sat, n_dbg);
    check(n_hit > 0,   "L2 hit happened");
    check(n_miss > 0,  "L2 miss happened");
    check(n_unc > 0,   "uncached pass-through read happened");
    check(n_per > 0,   "periphery access happened");
    check(n_err > 0,   "error response happened");
    check(n_conf > 0,  "NoC arbitration conflict happened");
    check(n_multi > 0, "several DRAM channels busy at once");
    check(n_bp > 0,    "core backpressure happened");
    check(n_sat > 0,   "DLDO saturation happened");
    check(n_dbg == NC, "a debug word crossed every serial link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
