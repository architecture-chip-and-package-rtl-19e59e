// tb_sync_fifo: random push/pop against a queue model.
//
// Random valid and ready patterns fill, drain and overrun the FIFO. Every
// word read is compared with a reference queue; in_ready must be low
// exactly when the FIFO holds DEPTH words and is not being read, and a
// word written into an empty FIFO must be readable one cycle later.
// Inputs change at the falling edge; handshakes are sampled 2 ns later.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] model[$];
  int full_seen = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: write into the empty FIFO, visible one cycle later
    @(negedge clk);
    in_data = 16'hBEEF; in_valid = 1;
    #2 check(!out_valid, "empty FIFO shows no data");
    @(negedge clk);
    in_valid = 0;
    #2 check(out_valid && out_data == 16'hBEEF, "word readable one cycle after it was written");
    @(negedge clk);
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid  = 1'($urandom_range(0, 1));
      in_data   = W'($urandom);
      out_ready = 1'($urandom_range(0, 2) == 0) || (n > 1500 && 1'($urandom_range(0, 1)));
      #2;
      check(out_valid == (model.size() > 0), "out_valid matches occupancy");
      check(in_ready == (model.size() < DEPTH || out_ready), "in_ready matches occupancy");
      if (model.size() == DEPTH) full_seen++;
      if (out_valid && out_ready) begin
        check(out_data == model[0], "data order");
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_seen > 0, "FIFO was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
