// tb_error_dev: requests to the error device come back as errors.
//
// Random requests with random TIDs are sent, with random response
// backpressure. Every response must carry err = 1, rdata = 0 and the TID
// of the oldest unanswered request, and must appear one cycle after its
// request was taken.
module tb_error_dev;
  import hl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t  req;
  bus_resp_t resp;
  logic req_valid, req_ready, resp_valid, resp_ready;

  error_dev dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [5:0] tids[$];
  int taken_at[$];
  int cyc = 0;
  int answered = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_valid = 0; resp_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      cyc++;
      req_valid  = 1'($urandom_range(0, 1));
      req.addr   = $urandom;
      req.write  = 1'($urandom_range(0, 1));
      req.wdata  = $urandom;
      req.tid    = 6'($urandom);
      resp_ready = 1'($urandom_range(0, 2) != 0);
      #2;
      if (resp_valid) begin
        check(resp.err && resp.rdata == 0, "error response");
        check(tids.size() > 0 && resp.tid == tids[0], "response TID");
        if (taken_at.size() > 0 && taken_at[0] >= 0)
          check(cyc - taken_at[0] >= 1, "response one cycle after request");
        if (resp_ready) begin
          void'(tids.pop_front());
          void'(taken_at.pop_front());
          answered++;
        end
      end
      if (req_valid && req_ready) begin
        tids.push_back(req.tid);
        taken_at.push_back(cyc);
      end
    end
    check(answered > 50, "requests answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
