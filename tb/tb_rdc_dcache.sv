// tb_rdc_dcache: self-checking testbench of the reliable data cache.
//
// A small cache (8 sets, 4-entry tag buffer, decay tick every 8 cycles) runs
// against the behavioural L2. A reference memory holds the last value written
// to every word; every read is compared with it, and every write-back is
// checked to carry exactly the words stored by the CPU (per-word dirty bits)
// with their latest values. Directed steps exercise each mechanism: miss and
// fill, hit latency, zero-flag reads, parity errors in clean words (refetch),
// in dirty words with and without in-cache replication, tag errors with and
// without a tag-buffer replica, tag-buffer replacement forcing a write-back,
// and early write-back / clean-line invalidation of idle lines. Random
// traffic with changing protection settings follows.
module tb_rdc_dcache;
  import ser_pkg::*;

  localparam int SETS = 8, TBE = 4, TAG_W = 33, SET_W = 3;
  localparam int CADDR_W = TAG_W + SET_W + 6, LADDR_W = TAG_W + SET_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic icr_en = 0, ewb_cci_en = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [CADDR_W-1:0] req_addr = '0;
  logic [63:0] req_wdata = '0, resp_rdata;
  logic resp_valid, resp_err;
  logic l2_req_valid, l2_req_we, l2_resp_valid;
  logic [LADDR_W-1:0] l2_req_addr;
  logic [511:0] l2_req_wdata, l2_resp_rdata;
  logic [7:0] l2_req_wmask;
  logic err_detected;
  dc_events_t ev;
  logic inj_valid = 0, inj_tag = 0, inj_way = 0, tb_inj_valid = 0;
  logic [SET_W-1:0] inj_set = '0;
  logic [2:0] inj_word = '0;
  logic [5:0] inj_bit = '0;
  logic [1:0] tb_inj_idx = '0;
  logic [5:0] tb_inj_bit = '0;

  rdc_dcache #(.SETS(SETS), .TB_ENTRIES(TBE), .DECAY_GLOBAL_W(3)) dut (.*);

  l2_model #(.LADDR_W(LADDR_W), .LAT(3)) l2 (
    .clk, .req_valid(l2_req_valid), .req_we(l2_req_we), .req_addr(l2_req_addr),
    .req_wdata(l2_req_wdata), .req_wmask(l2_req_wmask),
    .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  // ---------------- reference memory ----------------
  logic [63:0] gold [logic [CADDR_W-4:0]];
  function automatic logic [63:0] gval(input logic [CADDR_W-1:0] a);
    logic [CADDR_W-4:0] w = a[CADDR_W-1:3];
    return gold.exists(w) ? gold[w] : l2.init_word(a[CADDR_W-1:6], int'(a[5:3]));
  endfunction
  function automatic logic [CADDR_W-1:0] mk(input int tag, input int set, input int word);
    return {TAG_W'(tag), SET_W'(set), 3'(word), 3'b000};
  endfunction

  // ---------------- event counters ----------------
  int n_hit, n_miss, n_fill, n_wb, n_tag_err, n_tag_fix, n_tag_drop, n_data_err, n_refetch;
  int n_icr_fix, n_icr_copy, n_due, n_ewb, n_cci, n_trb_dup, n_trb_ewb, n_zero, n_errdet;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev.hit);  n_miss += int'(ev.miss); n_fill += int'(ev.fill);
    n_wb += int'(ev.writeback); n_tag_err += int'(ev.tag_err); n_tag_fix += int'(ev.tag_fix);
    n_tag_drop += int'(ev.tag_drop); n_data_err += int'(ev.data_err); n_refetch += int'(ev.refetch);
    n_icr_fix += int'(ev.icr_fix); n_icr_copy += int'(ev.icr_copy); n_due += int'(ev.due);
    n_ewb += int'(ev.ewb); n_cci += int'(ev.cci); n_trb_dup += int'(ev.trb_dup);
    n_trb_ewb += int'(ev.trb_ewb); n_zero += int'(ev.zero_read); n_errdet += int'(err_detected);
  end

  // every write-back carries only CPU-written words, with their latest value
  always @(posedge clk) if (rst_n && l2_req_valid && l2_req_we && l2_resp_valid) begin
    for (int k = 0; k < 8; k++) if (l2_req_wmask[k]) begin
      logic [CADDR_W-1:0] a;
      a = {l2_req_addr, 3'(k), 3'b000};
      check(gold.exists(a[CADDR_W-1:3]), $sformatf("write-back of word %h never written", a));
      check(l2_req_wdata[64*k +: 64] == gval(a),
            $sformatf("write-back of %h: %h, expected %h", a, l2_req_wdata[64*k +: 64], gval(a)));
    end
  end

  // ---------------- CPU access ----------------
  task automatic access(input bit we, input logic [CADDR_W-1:0] a, input logic [63:0] wd,
                        output logic [63:0] rd, output bit err, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(posedge clk); lat = 0;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) begin @(posedge clk); lat++; @(negedge clk); end
    lat++;
    rd = resp_rdata; err = resp_err;
    if (we) gold[a[CADDR_W-1:3]] = wd;
    @(posedge clk); #1;
  endtask

  task automatic rd_check(input logic [CADDR_W-1:0] a, input string what);
    logic [63:0] d; bit e; int lat;
    access(0, a, '0, d, e, lat);
    check(!e && d == gval(a), $sformatf("%s: read %h got %h exp %h err %0d", what, a, d, gval(a), e));
  endtask
  task automatic wr(input logic [CADDR_W-1:0] a, input logic [63:0] v);
    logic [63:0] d; bit e; int lat;
    access(1, a, v, d, e, lat);
  endtask

  function automatic int way_of(input int tag, input int set);
    for (int w = 0; w < 2; w++)
      if (dut.valid_q[set][w] && !dut.dup_q[set][w] && dut.tag_q[set][w] == TAG_W'(tag)) return w;
    return -1;
  endfunction

  task automatic inject(input bit tag, input int set, input int way, input int word, input int b);
    @(negedge clk);
    inj_valid = 1; inj_tag = tag; inj_set = SET_W'(set); inj_way = way[0];
    inj_word = 3'(word); inj_bit = 6'(b);
    @(negedge clk); inj_valid = 0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d; bit e; int lat, w, b0, f0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. miss then hit, hit latency
    access(0, mk(5, 1, 0), '0, d, e, lat);
    check(d == gval(mk(5, 1, 0)) && n_miss == 1 && n_fill == 1, "first read misses and fills");
    check(lat > 2, $sformatf("miss latency %0d", lat));
    access(0, mk(5, 1, 1), '0, d, e, lat);
    check(d == gval(mk(5, 1, 1)) && lat == 1, $sformatf("hit answers in the cycle after acceptance (lat %0d)", lat));

    // 2. write hit copies the tag to the tag buffer
    wr(mk(5, 1, 2), 64'h1111_2222_3333_4444);
    check(n_trb_dup == 1, "first store to a line duplicates its tag");
    rd_check(mk(5, 1, 2), "read after write");

    // 3. zero flag masks errors in an all-zero word
    wr(mk(5, 1, 3), 64'h0);
    w = way_of(5, 1);
    inject(0, 1, w, 3, 17);
    b0 = n_data_err;
    rd_check(mk(5, 1, 3), "zero word");
    check(n_zero >= 1 && n_data_err == b0, "zero word answered from its flag");

    // 4. error in a clean word is repaired from L2
    inject(0, 1, w, 5, 40);
    b0 = n_refetch;
    rd_check(mk(5, 1, 5), "clean word after flip");
    check(n_refetch == b0 + 1, "clean word refetched");

    // 5. error in a dirty word, no replica: detected, unrecoverable
    inject(0, 1, w, 2, 3);
    access(0, mk(5, 1, 2), '0, d, e, lat);
    check(e == 1 && n_due >= 1, "dirty word error without replica reported");
    wr(mk(5, 1, 2), 64'h5555_6666_7777_8888);
    rd_check(mk(5, 1, 2), "rewritten word");

    // 6. tag error of a dirty line: restored from the tag buffer
    inject(1, 1, w, 0, 7);
    b0 = n_tag_fix;
    rd_check(mk(5, 1, 2), "dirty line after tag flip");
    check(n_tag_fix == b0 + 1, "tag restored from replica");

    // 7. tag error of a clean line: dropped and refetched
    rd_check(mk(9, 2, 4), "clean line");
    inject(1, 2, way_of(9, 2), 0, 30);
    b0 = n_tag_drop;
    rd_check(mk(9, 2, 4), "clean line after tag flip");
    check(n_tag_drop == b0 + 1, "clean line with bad tag dropped");

    // 8. more dirty lines than tag-buffer entries: early write-back
    b0 = n_trb_ewb;
    for (int i = 0; i < 6; i++) wr(mk(20 + i, 3 + (i % 4), i % 8), 64'hA000 + 64'(i));
    check(n_trb_ewb >= 2, $sformatf("tag-buffer replacement wrote lines back (%0d)", n_trb_ewb - b0));
    repeat (20) @(posedge clk);
    #1 check(dut.u_tb.occupancy <= 3'(TBE), "buffer occupancy");
    for (int s = 0; s < SETS; s++)
      for (int ww = 0; ww < 2; ww++)
        if (dut.valid_q[s][ww] && !dut.dup_q[s][ww] && |dut.dirty_q[s][ww])
          check(dut.copy_q[s][ww], "every dirty line has a tag replica");
    for (int i = 0; i < 6; i++) rd_check(mk(20 + i, 3 + (i % 4), i % 8), "after TRB write-back");

    // 9. in-cache replication repairs a dirty word
    icr_en = 1;
    wr(mk(40, 7, 1), 64'hDEAD_BEEF_0000_0001);
    @(posedge clk); #1;
    check(n_icr_copy >= 1, "store with ICR writes a replica");
    inject(0, 7, way_of(40, 7), 1, 33);
    b0 = n_icr_fix;
    rd_check(mk(40, 7, 1), "dirty word repaired from replica");
    check(n_icr_fix == b0 + 1, "ICR repair");
    rd_check(mk(40, 7, 1), "repaired word stays good");

    // 10. early write-back and clean-line invalidation of idle lines
    ewb_cci_en = 1;
    b0 = n_ewb; f0 = n_cci;
    repeat (200) @(posedge clk);
    check(n_ewb > b0, "idle dirty lines written back early");
    check(n_cci > f0, "idle clean lines invalidated");
    for (int s = 0; s < SETS; s++)
      for (int ww = 0; ww < 2; ww++)
        check(!(dut.valid_q[s][ww] && !dut.dup_q[s][ww] && |dut.dirty_q[s][ww]), "no dirty line survives idleness");
    rd_check(mk(40, 7, 1), "after EWB");
    rd_check(mk(5, 1, 2), "after EWB");

    // 11. random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [CADDR_W-1:0] a;
      a = mk($urandom_range(0, 3), $urandom_range(0, SETS - 1), $urandom_range(0, 7));
      if (i % 500 == 0) begin icr_en = $urandom_range(0, 1); ewb_cci_en = $urandom_range(0, 1); end
      if ($urandom_range(0, 2) == 0) wr(a, ($urandom_range(0, 3) == 0) ? 64'h0 : {$urandom, $urandom});
      else rd_check(a, "random");
      if ($urandom_range(0, 30) == 0) repeat ($urandom_range(1, 60)) @(posedge clk);
    end

    check(n_errdet == n_tag_err + n_data_err, "every detected error reported to the monitor");
    $display("events: hit=%0d miss=%0d wb=%0d tagfix=%0d tagdrop=%0d refetch=%0d icrfix=%0d icrcopy=%0d due=%0d ewb=%0d cci=%0d trbdup=%0d trbewb=%0d zero=%0d",
             n_hit, n_miss, n_wb, n_tag_fix, n_tag_drop, n_refetch, n_icr_fix, n_icr_copy, n_due, n_ewb, n_cci, n_trb_dup, n_trb_ewb, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
