// tb_ser_top_full: smoke test of the top at its full default size.
//
// ser_top is instantiated with no parameter overrides: 512-set 64 KB data and
// instruction caches, 32-entry tag buffer, 1K decay interval, 100K-cycle
// monitoring window and the 128-entry register file with 8 result lanes.
// The test performs one complete operation on each structure and checks its
// result and timing:
//   data cache  - write miss (fill from the behavioural L2, then replayed as
//                 a hit), read hit one
//                 cycle after acceptance with the written value, read of an
//                 untouched word of the line equal to the L2 contents, and
//                 the tag copy into the tag buffer on the first write;
//   icache      - miss then hit with the instruction supplied by the L2
//                 function, hit one cycle after acceptance;
//   register    - a narrow value written with duplication, read back as a
//                 duplicated operand, and a regular value read back as is.
// A watchdog counts a failure if the run exceeds 20000 cycles. The long
// time-based mechanisms (window-based adaptation, decay) are exercised by
// tb_ser_top at reduced size.
module tb_ser_top_full;
  import ser_pkg::*;
  localparam int DSW = 9, TW = 33, ISW = 9, NL = 8, NRD = 16;
  localparam int DCA = TW + DSW + 6, DLA = TW + DSW, ICA = TW + ISW + 6, ILA = TW + ISW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

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
  logic [4:0] dc_tb_inj_idx = '0;
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
  logic [6:0] rf_res_dest [NL];
  logic [63:0] rf_res_value [NL];
  logic [NRD-1:0] rf_rd_valid = '0, rf_rd_ok, rf_rd_dup, rf_rd_det, rf_rd_rec, rf_rd_bypass;
  logic [6:0] rf_rd_idx [NRD];
  logic [63:0] rf_rd_operand [NRD];
  logic rf_stall, rf_exception;
  logic rf_inj_rf_valid = 0, rf_inj_bus_valid = 0;
  logic [2:0] rf_inj_bus_lane = '0;
  logic [6:0] rf_inj_rf_idx = '0;
  logic [6:0] rf_inj_rf_bit = '0, rf_inj_bus_bit = '0;

  ser_top dut (.*);

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

  int n_miss = 0, n_hit = 0, n_dup = 0, n_imiss = 0, n_ihit = 0;
  always @(posedge clk) if (rst_n) begin
    n_miss  += int'(dc_ev.miss);
    n_hit   += int'(dc_ev.hit);
    n_dup   += int'(dc_ev.trb_dup);
    n_imiss += int'(ic_ev_miss);
    n_ihit  += int'(ic_ev_hit);
  end

  // data cache access; returns the cycles from acceptance to response
  task automatic dacc(input bit we, input logic [DCA-1:0] a, input logic [63:0] wd,
                      output logic [63:0] rd, output int lat);
    @(negedge clk);
    while (!dc_req_ready) @(negedge clk);
    dc_req_valid = 1; dc_req_we = we; dc_req_addr = a; dc_req_wdata = wd;
    @(posedge clk);
    lat = 0;
    @(negedge clk); dc_req_valid = 0;
    while (!dc_resp_valid) begin lat++; @(negedge clk); end
    lat++;
    rd = dc_resp_rdata;
    check(!dc_resp_err, "data cache access without error");
    @(posedge clk); #1;
  endtask

  task automatic iacc(input logic [ICA-1:0] a, output logic [31:0] ins, output int lat);
    @(negedge clk);
    while (!ic_req_ready) @(negedge clk);
    ic_req_valid = 1; ic_req_addr = a;
    @(posedge clk);
    lat = 0;
    @(negedge clk); ic_req_valid = 0;
    while (!ic_resp_valid) begin lat++; @(negedge clk); end
    lat++;
    ins = ic_resp_instr;
    @(posedge clk); #1;
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 20000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    logic [63:0] rd;
    logic [31:0] ins;
    logic [DCA-1:0] a;
    logic [ICA-1:0] ia;
    int lat;
    for (int l = 0; l < NL; l++) begin rf_res_dest[l] = '0; rf_res_value[l] = '0; end
    for (int r = 0; r < NRD; r++) rf_rd_idx[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- data cache ----
    a = {TW'(33'h1_2345_6789), DSW'(300), 3'd5, 3'b000};
    dacc(1, a, 64'hDEAD_BEEF_0123_4567, rd, lat);
    check(lat > 1, "write miss takes a fill");
    dacc(0, a, '0, rd, lat);
    check(rd == 64'hDEAD_BEEF_0123_4567, "read back written word");
    check(lat == 1, $sformatf("hit latency 1, got %0d", lat));
    a[5:3] = 3'd2;
    dacc(0, a, '0, rd, lat);
    check(rd == l2.init_word(a[DCA-1:6], 2), "untouched word equals L2 contents");
    check(n_miss == 1 && n_hit == 3, $sformatf("dcache miss/hit counts %0d/%0d", n_miss, n_hit));
    check(n_dup == 1, "tag copied into the tag buffer on the first write");

    // ---- instruction cache ----
    ia = {TW'(33'h0_0BAD_F00D), ISW'(77), 4'd9, 2'b00};
    iacc(ia, ins, lat);
    check(ins == instr(ia[ICA-1:6], 9), "icache miss returns L2 instruction");
    check(lat > 1, "icache miss takes a fill");
    iacc(ia, ins, lat);
    check(ins == instr(ia[ICA-1:6], 9), "icache hit returns same instruction");
    check(lat == 1, $sformatf("icache hit latency 1, got %0d", lat));
    check(n_imiss == 1 && n_ihit == 2, "icache miss/hit counts (a miss is replayed as a hit after the fill)");

    // ---- register file ----
    @(negedge clk);
    rf_res_valid = 8'b0000_0011;
    rf_res_dest[0] = 7'd100; rf_res_value[0] = 64'hFFFF_FFFF_8000_0001;   // narrow negative
    rf_res_dest[1] = 7'd101; rf_res_value[1] = 64'h1234_5678_9ABC_DEF0;   // regular
    #1 check(rf_wr_dup == 8'b0000_0001, "only the narrow result is duplicated");
    @(negedge clk);
    rf_res_valid = '0;
    repeat (3) @(negedge clk);
    rf_rd_valid = 16'h0003;
    rf_rd_idx[0] = 7'd100; rf_rd_idx[1] = 7'd101;
    #1;
    check(rf_rd_ok[1:0] == 2'b11, "both operands usable");
    check(rf_rd_operand[0] == 64'hFFFF_FFFF_8000_0001, "narrow operand");
    check(rf_rd_operand[1] == 64'h1234_5678_9ABC_DEF0, "regular operand");
    check(rf_rd_dup[1:0] == 2'b01, "narrow operand read as duplicated");
    check(rf_rd_det[1:0] == 2'b00 && !rf_exception && !rf_stall, "no error on clean reads");
    @(negedge clk);
    rf_rd_valid = '0;

    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
