// tb_sa_controller: self-checking testbench of the protection-level policy.
//
// Window results are fed directly (no error monitor). A directed sequence
// checks each rule: more than 4 errors in a window moves P to P+ICR, more than
// 16 moves P+ICR to P+ICR+EWB, 3 clean windows move the top level down, 2
// clean windows move P+ICR down, at most one step happens per window, and the
// enable outputs and one-cycle up/down pulses follow the level. Random window
// results are then compared with a reference model of the same rules.
module tb_sa_controller;
  import ser_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic win_done = 0;
  logic [15:0] win_errs = '0;
  prot_level_e level;
  logic icr_en, ewb_cci_en, upgrade, downgrade;
  sa_controller dut (.*);

  int ref_lvl = 0, ref_run = 0;
  task automatic window(input int errs);
    int nl, nr;
    @(negedge clk);
    win_done = 1; win_errs = 16'(errs);
    nr = (errs != 0) ? 0 : (ref_run == 7 ? 7 : ref_run + 1);
    nl = ref_lvl;
    if (ref_lvl == 0 && errs > 4) nl = 1;
    else if (ref_lvl == 1 && errs > 16) nl = 2;
    else if (ref_lvl == 1 && nr >= 2) nl = 0;
    else if (ref_lvl == 2 && nr >= 3) nl = 1;
    #1;
    check(upgrade == (nl > ref_lvl) && downgrade == (nl < ref_lvl), "level change pulses");
    @(negedge clk);
    win_done = 0;
    ref_run = (nl != ref_lvl) ? 0 : nr;
    ref_lvl = nl;
    #1;
    check(int'(level) == ref_lvl, $sformatf("level %0d expected %0d", level, ref_lvl));
    check(icr_en == (ref_lvl != 0) && ewb_cci_en == (ref_lvl == 2), "enables follow level");
    check(!upgrade && !downgrade, "pulses last one cycle");
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    window(4);   check(level == LVL_P, "4 errors keep P");
    window(5);   check(level == LVL_P_ICR, "5 errors raise to P+ICR");
    window(100); check(level == LVL_P_ICR_EWB, "one step per window");
    window(0); window(0); check(level == LVL_P_ICR_EWB, "2 clean windows keep the top level");
    window(0);   check(level == LVL_P_ICR, "3 clean windows lower it");
    window(16);  check(level == LVL_P_ICR, "16 errors keep P+ICR");
    window(0);   check(level == LVL_P_ICR, "1 clean window keeps P+ICR");
    window(0);   check(level == LVL_P, "2 clean windows lower to P");
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      window(r < 5 ? 0 : r < 7 ? $urandom_range(1, 6) : r < 9 ? $urandom_range(5, 30) : 65535);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
