// tb_sa_rdc: self-checking testbench of the self-adaptive reliable data cache.
//
// Small cache (8 sets, 4-entry tag buffer, 8-cycle decay tick) with a
// 400-cycle monitoring window, against the behavioural L2. Single-bit errors
// are injected into clean words and read back (each is detected and
// repaired by a refetch, and counted by the monitor). Checks:
//  * 5 errors in a window raise the level from P to P+ICR at the window end,
//    17 more raise it to P+ICR+EWB, one step per window;
//  * stores write in-cache replicas only from P+ICR upwards; early
//    write-back / invalidation of idle lines happens only at the top level;
//  * 3 error-free windows lower the top level, 2 more lower P+ICR to P;
//  * the window error count equals the errors detected in that window;
//  * every read returns the last value written.
module tb_sa_rdc;
  import ser_pkg::*;
  localparam int SETS = 8, TAG_W = 33, SET_W = 3, WIN = 400;
  localparam int CADDR_W = TAG_W + SET_W + 6, LADDR_W = TAG_W + SET_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic req_valid = 0, req_ready, req_we = 0, resp_valid, resp_err;
  logic [CADDR_W-1:0] req_addr = '0;
  logic [63:0] req_wdata = '0, resp_rdata;
  logic l2_req_valid, l2_req_we, l2_resp_valid;
  logic [LADDR_W-1:0] l2_req_addr;
  logic [511:0] l2_req_wdata, l2_resp_rdata;
  logic [7:0] l2_req_wmask;
  prot_level_e level;
  logic upgrade, downgrade, win_done;
  logic [15:0] win_errs;
  dc_events_t ev;
  logic inj_valid = 0, inj_tag = 0, inj_way = 0, tb_inj_valid = 0;
  logic [SET_W-1:0] inj_set = '0;
  logic [2:0] inj_word = '0;
  logic [5:0] inj_bit = '0;
  logic [1:0] tb_inj_idx = '0;
  logic [5:0] tb_inj_bit = '0;

  sa_rdc #(.SETS(SETS), .TB_ENTRIES(4), .DECAY_GLOBAL_W(3), .WINDOW(WIN)) dut (.*);
  l2_model #(.LADDR_W(LADDR_W), .LAT(3)) l2 (
    .clk, .req_valid(l2_req_valid), .req_we(l2_req_we), .req_addr(l2_req_addr),
    .req_wdata(l2_req_wdata), .req_wmask(l2_req_wmask),
    .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  logic [63:0] gold [logic [CADDR_W-4:0]];
  function automatic logic [63:0] gval(input logic [CADDR_W-1:0] a);
    return gold.exists(a[CADDR_W-1:3]) ? gold[a[CADDR_W-1:3]] : l2.init_word(a[CADDR_W-1:6], int'(a[5:3]));
  endfunction
  function automatic logic [CADDR_W-1:0] mk(input int tag, input int set, input int word);
    return {TAG_W'(tag), SET_W'(set), 3'(word), 3'b000};
  endfunction

  int n_err_win = 0, n_icr_copy = 0, n_ewb = 0, n_cci = 0, n_up = 0, n_down = 0;
  int icr_at_p = 0, ewb_below = 0;
  always @(posedge clk) if (rst_n) begin
    if (win_done) begin
      check(int'(win_errs) == n_err_win + int'(ev.tag_err || ev.data_err),
            $sformatf("window count %0d, detected %0d", win_errs, n_err_win));
      n_err_win = 0;
    end else n_err_win += int'(ev.tag_err || ev.data_err);
    n_icr_copy += int'(ev.icr_copy); n_ewb += int'(ev.ewb); n_cci += int'(ev.cci);
    n_up += int'(upgrade); n_down += int'(downgrade);
    if (ev.icr_copy && level == LVL_P) icr_at_p++;
    if ((ev.ewb || ev.cci) && level != LVL_P_ICR_EWB) ewb_below++;
  end

  task automatic access(input bit we, input logic [CADDR_W-1:0] a, input logic [63:0] wd);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(posedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (!we) check(!resp_err && resp_rdata == gval(a), $sformatf("read %h", a));
    if (we) gold[a[CADDR_W-1:3]] = wd;
    @(posedge clk); #1;
  endtask
  // one detected and repaired error: flip a bit of a clean word, read it
  task automatic one_error(input int i);
    int s, k;
    s = i % SETS;
    k = (l2.init_word({TAG_W'(100), SET_W'(s)}, 1) == '0) ? 2 : 1;   // a non-zero word
    access(0, mk(100, s, k), '0);
    @(negedge clk);
    inj_valid = 1; inj_set = SET_W'(s); inj_word = 3'(k); inj_bit = 6'($urandom_range(0, 63));
    inj_way = !(dut.u_cache.valid_q[s][0] && !dut.u_cache.dup_q[s][0] && dut.u_cache.tag_q[s][0] == TAG_W'(100));
    @(negedge clk); inj_valid = 0;
    access(0, mk(100, s, k), '0);
  endtask
  task automatic wait_window();
    @(posedge clk);
    while (!win_done) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(level == LVL_P, "starts at P");
    access(1, mk(1, 0, 0), 64'h1234_5678_9ABC_DEF0);
    check(n_icr_copy == 0, "no replica at P");
    wait_window();
    // 5 errors in one window
    for (int i = 0; i < 5; i++) one_error(i);
    wait_window();
    check(level == LVL_P_ICR && n_up == 1, "5 errors raise P to P+ICR");
    access(1, mk(2, 3, 2), 64'h0BAD_CAFE_0000_0001);
    repeat (2) @(posedge clk);
    check(n_icr_copy >= 1, "stores replicate at P+ICR");
    wait_window();
    // 17 errors in one window
    for (int i = 0; i < 17; i++) one_error(i);
    wait_window();
    check(level == LVL_P_ICR_EWB && n_up == 2, "17 errors raise P+ICR to P+ICR+EWB");
    access(1, mk(3, 5, 4), 64'h5555);
    repeat (100) @(posedge clk);
    check(n_ewb >= 1 && n_cci >= 1, "idle lines written back / invalidated at the top level");
    wait_window(); wait_window();
    check(level == LVL_P_ICR_EWB, "2 clean windows keep the top level");
    wait_window();
    check(level == LVL_P_ICR && n_down == 1, "3 clean windows lower it");
    wait_window();
    check(level == LVL_P_ICR, "1 clean window keeps P+ICR");
    wait_window();
    check(level == LVL_P && n_down == 2, "2 clean windows lower P+ICR to P");
    check(icr_at_p == 0 && ewb_below == 0, "mechanisms only at their levels");
    for (int i = 0; i < 8; i++) access(0, mk(1 + i % 3, (3 * i) % SETS, i), '0);
    access(0, mk(1, 0, 0), '0);
    access(0, mk(2, 3, 2), '0);
    access(0, mk(3, 5, 4), '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
