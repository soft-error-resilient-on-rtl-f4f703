// tb_ser_top: end-to-end testbench of the three protected structures.
//
// The top is built small (8-set caches, 4-entry tag buffer, short decay
// ticks, 400-cycle monitoring window, 16 registers with 2 result lanes) so
// that every mechanism can be reached quickly. Three independent processes
// drive the data cache (with the behavioural L2), the instruction cache
// (with an L2 that is a fixed function of the address) and the register-file
// datapath. Data returned anywhere is compared with a reference. Each
// protection mechanism is counted when its event fires and the run fails if
// any mechanism never happened:
//   data cache  - hit, miss, fill, write-back, tag copy into the tag buffer,
//                 tag repair from it, clean line dropped on a tag error,
//                 clean-word refetch, replica write, replica repair,
//                 detected-unrecoverable error, tag-buffer forced write-back,
//                 early write-back, clean-line invalidation, zero-flag read,
//                 level raise and level lowering;
//   icache      - hit, miss, scrub, invalidation;
//   register    - duplicated write, duplicated read, bypass, recovery with
//                 stall and replay, exception.
module tb_ser_top;
  import ser_pkg::*;
  localparam int DSETS = 8, DSW = 3, TW = 33, ISETS = 8, ISW = 3, NR = 16, NL = 2, NRD = 4;
  localparam int DCA = TW + DSW + 6, DLA = TW + DSW, ICA = TW + ISW + 6, ILA = TW + ISW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- top ports ----------------
  logic dc_req_valid = 0, dc_req_ready, dc_req_we = 0, dc_resp_valid, dc_resp_err;
  logic [DCA-1:0] dc_req_addr = '0;
  logic [63:0] dc_req_wdata = '0, dc_resp_rdata;
  logic dc_l2_req_valid, dc_l2_req_we, dc_l2_resp_valid;
  logic [DLA-1:0] dc_l2_req_addr;
  logic [511:0] dc_l2_req_wdata, dc_l2_resp_rdata;
  logic [7:0] dc_l2_req_wmask;
  prot_level_e dc_level;
  logic dc_upgrade, dc_downgrade, dc_win_done;
  logic [15:0] dc_win_errs;
  dc_events_t dc_ev;
  logic dc_inj_valid = 0, dc_inj_tag = 0, dc_inj_way = 0, dc_tb_inj_valid = 0;
  logic [DSW-1:0] dc_inj_set = '0;
  logic [2:0] dc_inj_word = '0;
  logic [5:0] dc_inj_bit = '0;
  logic [1:0] dc_tb_inj_idx = '0;
  logic [5:0] dc_tb_inj_bit = '0;
  logic ic_req_valid = 0, ic_req_ready, ic_resp_valid, ic_l2_req_valid, ic_l2_resp_valid;
  logic [ICA-1:0] ic_req_addr = '0;
  logic [31:0] ic_resp_instr;
  logic [ILA-1:0] ic_l2_req_addr;
  logic [511:0] ic_l2_resp_rdata;
  logic ic_ev_hit, ic_ev_miss, ic_ev_scrub, ic_ev_inval;
  logic ic_inj_valid = 0, ic_inj_way = 0;
  logic [ISW-1:0] ic_inj_set = '0;
  logic [3:0] ic_inj_word = '0;
  logic [4:0] ic_inj_bit = '0;
  logic [NL-1:0] rf_res_valid = '0, rf_wr_dup;
  logic [3:0] rf_res_dest [NL];
  logic [63:0] rf_res_value [NL];
  logic [NRD-1:0] rf_rd_valid = '0, rf_rd_ok, rf_rd_dup, rf_rd_det, rf_rd_rec, rf_rd_bypass;
  logic [3:0] rf_rd_idx [NRD];
  logic [63:0] rf_rd_operand [NRD];
  logic rf_stall, rf_exception;
  logic rf_inj_rf_valid = 0, rf_inj_bus_valid = 0, rf_inj_bus_lane = 0;
  logic [3:0] rf_inj_rf_idx = '0;
  logic [6:0] rf_inj_rf_bit = '0, rf_inj_bus_bit = '0;

  ser_top #(.DC_SETS(DSETS), .DC_TB_ENTRIES(4), .DC_DECAY_W(3), .DC_WINDOW(400),
            .IC_SETS(ISETS), .IC_TICK_LOG2(3), .RF_NREGS(NR), .RF_LANES(NL)) dut (.*);

  l2_model #(.LADDR_W(DLA), .LAT(3)) l2 (
    .clk, .req_valid(dc_l2_req_valid), .req_we(dc_l2_req_we), .req_addr(dc_l2_req_addr),
    .req_wdata(dc_l2_req_wdata), .req_wmask(dc_l2_req_wmask),
    .resp_valid(dc_l2_resp_valid), .resp_rdata(dc_l2_resp_rdata));

  function automatic logic [31:0] instr(input logic [ILA-1:0] la, input int k);
    return la[31:0] * 32'h9E37_79B9 ^ {16'(k), 16'hC0DE};
  endfunction
  int icnt = 0;
  always @(posedge clk) if (ic_l2_req_valid && !ic_l2_resp_valid) icnt <= icnt + 1; else icnt <= 0;
  assign ic_l2_resp_valid = ic_l2_req_valid && icnt == 2;
  always_comb for (int k = 0; k < 16; k++) ic_l2_resp_rdata[32*k +: 32] = instr(ic_l2_req_addr, k);

  // ---------------- mechanism counters ----------------
  localparam int NM = 26;
  int cnt [NM];
  string names [NM] = '{"dc hit", "dc miss", "dc fill", "dc write-back", "dc tag copy", "dc tag repair",
    "dc tag drop", "dc refetch", "dc replica write", "dc replica repair", "dc unrecoverable",
    "dc TRB write-back", "dc early write-back", "dc clean invalidation", "dc zero read",
    "dc level raise", "dc level lower", "ic hit", "ic miss", "ic scrub", "ic invalidation",
    "rf duplicated write", "rf duplicated read", "rf bypass", "rf recovery", "rf exception"};
  always @(posedge clk) if (rst_n) begin
    logic [NM-1:0] e;
    e = {dc_ev.hit, dc_ev.miss, dc_ev.fill, dc_ev.writeback, dc_ev.trb_dup, dc_ev.tag_fix,
         dc_ev.tag_drop, dc_ev.refetch, dc_ev.icr_copy, dc_ev.icr_fix, dc_ev.due,
         dc_ev.trb_ewb, dc_ev.ewb, dc_ev.cci, dc_ev.zero_read, dc_upgrade, dc_downgrade,
         ic_ev_hit, ic_ev_miss, ic_ev_scrub, ic_ev_inval,
         |rf_wr_dup, |rf_rd_dup, |(rf_rd_bypass & rf_rd_valid), rf_stall, rf_exception};
    for (int i = 0; i < NM; i++) cnt[i] += int'(e[NM-1-i]);
  end

  // ---------------- data cache driver ----------------
  logic [63:0] gold [logic [DCA-4:0]];
  function automatic logic [63:0] gval(input logic [DCA-1:0] a);
    return gold.exists(a[DCA-1:3]) ? gold[a[DCA-1:3]] : l2.init_word(a[DCA-1:6], int'(a[5:3]));
  endfunction
  function automatic logic [DCA-1:0] mk(input int tag, input int set, input int word);
    return {TW'(tag), DSW'(set), 3'(word), 3'b000};
  endfunction
  task automatic dacc(input bit we, input logic [DCA-1:0] a, input logic [63:0] wd, output bit err);
    @(negedge clk);
    while (!dc_req_ready) @(negedge clk);
    dc_req_valid = 1; dc_req_we = we; dc_req_addr = a; dc_req_wdata = wd;
    @(posedge clk);
    @(negedge clk); dc_req_valid = 0;
    while (!dc_resp_valid) @(negedge clk);
    err = dc_resp_err;
    if (!we && !err) check(dc_resp_rdata == gval(a), $sformatf("dcache read %h", a));
    if (we) gold[a[DCA-1:3]] = wd;
    @(posedge clk); #1;
  endtask
  task automatic drd(input logic [DCA-1:0] a);
    bit e;
    dacc(0, a, '0, e);
    check(!e, "dcache read without error");
  endtask
  task automatic dwr(input logic [DCA-1:0] a, input logic [63:0] v);
    bit e;
    dacc(1, a, v, e);
  endtask
  function automatic int dway(input int tag, input int set);
    for (int w = 0; w < 2; w++)
      if (dut.u_dcache.u_cache.valid_q[set][w] && !dut.u_dcache.u_cache.dup_q[set][w] &&
          dut.u_dcache.u_cache.tag_q[set][w] == TW'(tag)) return w;
    return 0;
  endfunction
  task automatic dinj(input bit tag, input int set, input int way, input int word, input int b);
    @(negedge clk);
    dc_inj_valid = 1; dc_inj_tag = tag; dc_inj_set = DSW'(set); dc_inj_way = way[0];
    dc_inj_word = 3'(word); dc_inj_bit = 6'(b);
    @(negedge clk); dc_inj_valid = 0;
  endtask
  task automatic derrors(input int n);
    for (int i = 0; i < n; i++) begin
      int s, k;
      s = i % DSETS;
      k = (l2.init_word({TW'(100), DSW'(s)}, 1) == '0) ? 2 : 1;
      drd(mk(100, s, k));
      dinj(0, s, dway(100, s), k, i % 64);
      drd(mk(100, s, k));
    end
  endtask
  task automatic dwindow();
    @(posedge clk);
    while (!dc_win_done) @(posedge clk);
    #1;
  endtask

  bit dc_done = 0, ic_done = 0, rf_done = 0;
  initial begin : dc_proc
    bit e;
    wait (rst_n);
    drd(mk(5, 1, 0));
    drd(mk(5, 1, 1));
    dwr(mk(5, 1, 2), 64'h1111_2222_3333_4444);
    dwr(mk(5, 1, 3), 64'h0);
    drd(mk(5, 1, 3));
    dinj(0, 1, dway(5, 1), 5, 7);
    drd(mk(5, 1, 5));                             // refetch
    dinj(1, 1, dway(5, 1), 0, 9);
    drd(mk(5, 1, 2));                             // tag repair
    drd(mk(9, 2, 4));
    dinj(1, 2, dway(9, 2), 0, 4);
    drd(mk(9, 2, 4));                             // tag drop
    dinj(0, 1, dway(5, 1), 2, 30);
    dacc(0, mk(5, 1, 2), '0, e);                  // dirty word, no replica
    check(e, "unrecoverable error reported");
    dwr(mk(5, 1, 2), 64'h5151);
    for (int i = 0; i < 6; i++) dwr(mk(20 + i, 3 + i % 4, i), 64'hA0 + 64'(i));
    dwindow();
    derrors(5);
    dwindow();
    check(dc_level == LVL_P_ICR, "data cache at P+ICR");
    dwr(mk(40, 7, 1), 64'hDEAD_BEEF);
    repeat (3) @(posedge clk);                    // replica written
    dinj(0, 7, dway(40, 7), 1, 33);
    drd(mk(40, 7, 1));                            // replica repair
    dwindow();
    derrors(17);
    dwindow();
    check(dc_level == LVL_P_ICR_EWB, "data cache at P+ICR+EWB");
    repeat (300) @(posedge clk);                  // idle: early write-back, invalidation
    repeat (6) dwindow();
    check(dc_level == LVL_P, "data cache back at P");
    for (int i = 0; i < 6; i++) drd(mk(20 + i, 3 + i % 4, i));
    drd(mk(40, 7, 1));
    dc_done = 1;
  end

  // ---------------- instruction cache driver ----------------
  task automatic fetch(input int tag, input int set, input int w);
    logic [ICA-1:0] a;
    a = {TW'(tag), ISW'(set), 4'(w), 2'b00};
    @(negedge clk);
    while (!ic_req_ready) @(negedge clk);
    ic_req_valid = 1; ic_req_addr = a;
    @(posedge clk);
    @(negedge clk); ic_req_valid = 0;
    while (!ic_resp_valid) @(negedge clk);
    check(ic_resp_instr == instr(a[ICA-1:6], w), "icache fetch");
    @(posedge clk); #1;
  endtask
  initial begin : ic_proc
    wait (rst_n);
    for (int i = 0; i < 40; i++) fetch(i % 3, i % ISETS, i % 16);
    @(negedge clk);
    ic_inj_valid = 1; ic_inj_set = 1; ic_inj_way = 0; ic_inj_word = 3; ic_inj_bit = 2;
    @(negedge clk); ic_inj_valid = 0;
    repeat (800) @(posedge clk);                  // scrubs, then invalidations
    for (int i = 0; i < 40; i++) fetch(i % 3, i % ISETS, i % 16);
    ic_done = 1;
  end

  // ---------------- register file driver ----------------
  logic [63:0] rgold [NR];
  task automatic rcycle();
    #1;
    for (int k = 0; k < NRD; k++) if (rf_rd_valid[k] && rf_rd_ok[k])
      check(rf_rd_operand[k] == rgold[rf_rd_idx[k]], "register operand");
    @(posedge clk);
    for (int l = 0; l < NL; l++) if (rf_res_valid[l]) rgold[rf_res_dest[l]] = rf_res_value[l];
    @(negedge clk);
    rf_res_valid = '0; rf_rd_valid = '0; rf_inj_rf_valid = 0; rf_inj_bus_valid = 0;
  endtask
  initial begin : rf_proc
    for (int i = 0; i < NR; i++) rgold[i] = '0;
    for (int l = 0; l < NL; l++) begin rf_res_dest[l] = '0; rf_res_value[l] = '0; end
    for (int k = 0; k < NRD; k++) rf_rd_idx[k] = '0;
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NR; i += 2) begin
      rf_res_valid = '1; rf_res_dest[0] = 4'(i); rf_res_dest[1] = 4'(i + 1);
      rf_res_value[0] = 64'(i) * 64'h1234_5678_9;      // regular for i > 0
      rf_res_value[1] = 64'(i + 1);                      // narrow
      rcycle();
    end
    for (int c = 0; c < 200; c++) begin
      rf_res_valid = 2'($urandom); rf_res_dest[0] = 4'($urandom);
      rf_res_dest[1] = rf_res_dest[0] + 4'($urandom_range(1, 15));
      rf_res_value[0] = {$urandom, $urandom}; rf_res_value[1] = 64'($urandom_range(0, 1000));
      for (int k = 0; k < NRD; k++) begin rf_rd_idx[k] = 4'($urandom); rf_rd_valid[k] = 1'($urandom); end
      rcycle();
    end
    // narrow value with a low-half flip: recovery, then clean replay
    rf_res_valid = 1; rf_res_dest[0] = 4'd3; rf_res_value[0] = 64'd77; rcycle();
    repeat (3) rcycle();
    rf_inj_rf_valid = 1; rf_inj_rf_idx = 4'd3; rf_inj_rf_bit = 7'd4; rcycle();
    rf_rd_valid = 1; rf_rd_idx[0] = 4'd3; #1;
    check(rf_stall && !rf_rd_ok[0], "register recovery stalls");
    rcycle();
    rf_rd_valid = 1; rf_rd_idx[0] = 4'd3; #1;
    check(rf_rd_ok[0] && rf_rd_operand[0] == 64'd77, "replayed read after recovery");
    rcycle();
    // regular value with a flip: exception
    rf_res_valid = 1; rf_res_dest[0] = 4'd4; rf_res_value[0] = 64'hF0F0_1234_5678_9ABC; rcycle();
    repeat (3) rcycle();
    rf_inj_rf_valid = 1; rf_inj_rf_idx = 4'd4; rf_inj_rf_bit = 7'd40; rcycle();
    rf_rd_valid = 1; rf_rd_idx[0] = 4'd4; #1;
    check(rf_exception, "register exception");
    rcycle();
    rf_done = 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NM; i++) cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dc_done && ic_done && rf_done);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NM; i++) begin
      $display("  %-24s %0d", names[i], cnt[i]);
      check(cnt[i] > 0, $sformatf("mechanism never happened: %s", names[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
