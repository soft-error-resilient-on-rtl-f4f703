// tb_icache_cs_cci: self-checking testbench of the instruction cache with
// cacheline scrubbing and clean-line invalidation.
//
// Small configuration: 8 sets, decay tick every 8 cycles, so a line is
// flagged after 4 ticks (25..32 idle cycles). The testbench plays the L2 (a
// fixed function of the address, 3-cycle latency) and checks:
//  * a miss fills the line; a hit answers in the cycle after acceptance;
//  * a bit flipped in a stored line is returned by a fetch (there is no
//    check code) but is removed by the next scrub of the idle line;
//  * an idle line is scrubbed exactly 3 times, one decay interval apart,
//    then invalidated, after which a fetch misses again;
//  * a fetch that hits clears the scrub count;
//  * random fetches always return the right instruction.
module tb_icache_cs_cci;
  localparam int SETS = 8, TW = 33, SW = 3, TL = 3, T = 1 << TL;
  localparam int CADDR_W = TW + SW + 4 + 2, LADDR_W = TW + SW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic req_valid = 0, req_ready, resp_valid, l2_req_valid, l2_resp_valid;
  logic [CADDR_W-1:0] req_addr = '0;
  logic [31:0] resp_instr;
  logic [LADDR_W-1:0] l2_req_addr;
  logic [511:0] l2_resp_rdata;
  logic ev_hit, ev_miss, ev_scrub, ev_inval;
  logic inj_valid = 0, inj_way = 0;
  logic [SW-1:0] inj_set = '0;
  logic [3:0] inj_word = '0;
  logic [4:0] inj_bit = '0;
  icache_cs_cci #(.SETS(SETS), .TICK_LOG2(TL)) dut (.*);

  function automatic logic [31:0] instr(input logic [LADDR_W-1:0] la, input int k);
    return la[31:0] * 32'h9E37_79B9 ^ {16'(k), 16'hC0DE};
  endfunction
  // L2: answers a held request after 3 cycles
  int l2cnt = 0, n_l2 = 0;
  always @(posedge clk) begin
    if (l2_req_valid && !l2_resp_valid) l2cnt <= l2cnt + 1; else l2cnt <= 0;
    if (l2_resp_valid) n_l2++;
  end
  assign l2_resp_valid = l2_req_valid && l2cnt == 3;
  always_comb for (int k = 0; k < 16; k++) l2_resp_rdata[32*k +: 32] = instr(l2_req_addr, k);

  int n_hit, n_miss, n_scrub, n_inval;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_scrub += int'(ev_scrub); n_inval += int'(ev_inval);
  end

  function automatic logic [CADDR_W-1:0] mk(input int tag, input int set, input int w);
    return {TW'(tag), SW'(set), 4'(w), 2'b00};
  endfunction
  task automatic fetch(input logic [CADDR_W-1:0] a, output logic [31:0] d, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_addr = a;
    @(posedge clk); lat = 0;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) begin @(posedge clk); lat++; @(negedge clk); end
    lat++;
    d = resp_instr;
    @(posedge clk); #1;
  endtask
  task automatic fcheck(input logic [CADDR_W-1:0] a, input string what);
    logic [31:0] d; int lat;
    fetch(a, d, lat);
    check(d == instr(a[CADDR_W-1:6], int'(a[5:2])), $sformatf("%s: fetch %h", what, a));
  endtask
  function automatic int way_of(input int tag, input int set);
    for (int w = 0; w < 2; w++)
      if (dut.valid_q[set][w] && dut.tag_q[set][w] == TW'(tag)) return w;
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d; int lat, t0, b0;
    n_hit = 0; n_miss = 0; n_scrub = 0; n_inval = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // miss, then hit latency
    fetch(mk(7, 2, 3), d, lat);
    check(d == instr({TW'(7), SW'(2)}, 3) && n_miss == 1 && lat > 3, "miss fills the line");
    fetch(mk(7, 2, 9), d, lat);
    check(d == instr({TW'(7), SW'(2)}, 9) && lat == 1, $sformatf("hit answers in the next cycle (%0d)", lat));

    // a flipped bit is returned, then scrubbed away
    @(negedge clk);
    inj_valid = 1; inj_set = 2; inj_way = way_of(7, 2) == 1; inj_word = 5; inj_bit = 11;
    @(negedge clk); inj_valid = 0;
    fetch(mk(7, 2, 5), d, lat);
    check(d == (instr({TW'(7), SW'(2)}, 5) ^ 32'h800), "flipped bit is visible before scrubbing");
    t0 = $time / 10; b0 = n_scrub;
    while (n_scrub == b0 && $time / 10 - t0 < 20 * T) @(posedge clk);
    check(n_scrub == b0 + 1, "idle line scrubbed");
    check($time / 10 - t0 > 3 * T && $time / 10 - t0 <= 4 * T + 2,
          $sformatf("scrub after %0d idle cycles (tick %0d)", $time / 10 - t0, T));
    repeat (8) @(posedge clk);
    #1 check(dut.data_q[{3'd2, way_of(7, 2) == 1, 4'd5}] == instr({TW'(7), SW'(2)}, 5), "scrub removed the flip");

    // two more scrubs, then invalidation
    t0 = $time / 10;
    while (n_inval == 0 && $time / 10 - t0 < 40 * T) @(posedge clk);
    check(n_scrub == b0 + 3 && n_inval == 1, $sformatf("3 scrubs then invalidation (%0d scrubs)", n_scrub - b0));
    check($time / 10 - t0 > 8 * T, "scrubs are one decay interval apart");
    check(way_of(7, 2) < 0, "idle line invalidated");
    b0 = n_miss;
    fcheck(mk(7, 2, 0), "after invalidation");
    check(n_miss == b0 + 1, "fetch after invalidation misses");

    // a hit resets the scrub count
    t0 = $time / 10; b0 = n_scrub;
    while (n_scrub < b0 + 2) @(posedge clk);
    fcheck(mk(7, 2, 1), "hit between scrubs");
    b0 = n_inval;
    begin
      int s0;
      s0 = n_scrub;
      while (n_inval == b0) @(posedge clk);
      check(n_scrub - s0 == 3, $sformatf("scrub count restarts after a hit (%0d)", n_scrub - s0));
    end

    // random fetches
    for (int i = 0; i < 4000; i++) begin
      fcheck(mk($urandom_range(0, 3), $urandom_range(0, SETS - 1), $urandom_range(0, 15)), "random");
      if ($urandom_range(0, 40) == 0) repeat ($urandom_range(1, 80)) @(posedge clk);
    end
    check(n_hit > 1000 && n_scrub > 10, "hits and scrubs during random traffic");
    $display("events: hit=%0d miss=%0d scrub=%0d inval=%0d l2=%0d", n_hit, n_miss, n_scrub, n_inval, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
