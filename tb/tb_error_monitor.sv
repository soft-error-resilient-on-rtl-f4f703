// tb_error_monitor: self-checking testbench of the windowed error counter.
//
// With a 50-cycle window, random error pulses are applied and counted by the
// testbench. At every `win_done` the reported count must equal the pulses of
// that window, including one in the last cycle, and `win_done` must recur
// exactly every 50 cycles. A burst longer than the counter range checks that
// the count saturates.
module tb_error_monitor;
  localparam int W = 50, CW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic err_pulse = 0, win_done;
  logic [CW-1:0] win_errs;
  error_monitor #(.WINDOW(W), .CNT_W(CW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt = 0, cyc = 0, wins = 0, rate;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 200 * W; c++) begin
      rate = (c / (20 * W)) % 4;          // phases: none, sparse, dense, saturating
      err_pulse = (rate == 0) ? 1'b0 : (rate == 3) ? 1'b1 : ($urandom_range(0, rate == 1 ? 20 : 3) == 0);
      cnt += int'(err_pulse);
      cyc++;
      #1;
      check(win_done == (cyc == W), $sformatf("window end at cycle %0d", cyc));
      if (win_done) begin
        check(int'(win_errs) == ((cnt > 15) ? 15 : cnt), $sformatf("window count %0d, expected %0d", win_errs, cnt));
        cnt = 0; cyc = 0; wins++;
      end
      @(negedge clk);
    end
    check(wins == 200, "window count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
