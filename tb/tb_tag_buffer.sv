// tb_tag_buffer: self-checking testbench of the tag replica buffer.
//
// Small configuration: 4 entries, 10-bit tags, 3-bit set, 1-bit way. Random
// inserts, drops and lookups are compared every cycle with a reference model
// of the buffer (free entry first, lowest index; otherwise the FIFO head;
// a repeated insert for the same line rewrites its entry). The displaced-entry
// outputs are checked whenever the buffer is full. Directed injections then
// check that a flipped tag bit is reported by `lk_tag_ok` and that a flipped
// pointer bit makes the entry unmatchable.
module tb_tag_buffer;
  localparam int E = 4, TW = 10, SW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [SW-1:0] lk_set = '0, ins_set = '0, inv_set = '0, vic_set;
  logic lk_way = 0, ins_way = 0, inv_way = 0, vic_way;
  logic lk_hit, lk_tag_ok, ins_valid = 0, vic_valid, vic_tag_ok, inv_valid = 0, inj_valid = 0;
  logic [1:0] lk_idx, inj_idx = '0;
  logic [TW-1:0] lk_tag, ins_tag = '0, vic_tag;
  logic [3:0] inj_bit = '0;
  logic [2:0] occupancy;
  tag_buffer #(.ENTRIES(E), .TAG_W(TW), .SET_W(SW), .WAY_W(1)) dut (.*);

  // reference model
  bit mv [E]; int mt [E]; int mp [E]; int head = 0;
  function automatic int find(input int p);
    for (int i = 0; i < E; i++) if (mv[i] && mp[i] == p) return i;
    return -1;
  endfunction
  function automatic int free_e();
    for (int i = 0; i < E; i++) if (!mv[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_disp = 0;
    for (int i = 0; i < E; i++) mv[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int lp, ip, vp, f, d, occ, free_e_pre;
      lp = $urandom_range(0, 15); ip = $urandom_range(0, 15); vp = $urandom_range(0, 15);
      {lk_set, lk_way} = 4'(lp); {ins_set, ins_way} = 4'(ip); {inv_set, inv_way} = 4'(vp);
      ins_tag = 10'($urandom);
      ins_valid = $urandom_range(0, 2) == 0;
      inv_valid = $urandom_range(0, 3) == 0;
      #1;
      f = find(lp);
      check(lk_hit == (f >= 0), "lookup hit");
      if (f >= 0) check(lk_tag == 10'(mt[f]) && lk_tag_ok && lk_idx == 2'(f), "lookup replica");
      d = find(ip);
      free_e_pre = free_e();
      check(vic_valid == (d < 0 && free_e() < 0), "displacement predicted");
      if (vic_valid) check({vic_set, vic_way} == 4'(mp[head]) && vic_tag == 10'(mt[head]) && vic_tag_ok,
                           "displaced entry is the FIFO head");
      occ = 0; for (int i = 0; i < E; i++) occ += int'(mv[i]);
      check(int'(occupancy) == occ, "occupancy");
      // model update: the entry is chosen on the state before this cycle's
      // drop; the drop is applied, then the insert
      begin
        int k, vi;
        k = (d >= 0) ? d : free_e();
        if (k < 0) k = head;
        vi = find(vp);
        if (inv_valid && vi >= 0) mv[vi] = 0;
        if (ins_valid) begin
          if (d < 0 && free_e_pre < 0) begin head = (head + 1) % E; n_disp++; end
          mv[k] = 1; mt[k] = int'(ins_tag); mp[k] = ip;
        end
      end
      @(negedge clk);
      ins_valid = 0; inv_valid = 0;
    end
    check(n_disp > 100, "FIFO displacements exercised");

    // injections
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      {ins_set, ins_way} = 4'(i); ins_tag = 10'(100 + i); ins_valid = 1;
      inv_valid = 0;
    end
    @(negedge clk); ins_valid = 0;
    {lk_set, lk_way} = 4'(2); #1;
    check(lk_hit && lk_tag_ok && lk_tag == 10'(102), "entry present before injection");
    inj_idx = lk_idx; inj_bit = 4'd3; inj_valid = 1;
    @(negedge clk); inj_valid = 0; #1;
    check(lk_hit && !lk_tag_ok, "flipped replica bit detected");
    {lk_set, lk_way} = 4'(1); #1;
    inj_idx = lk_idx; inj_bit = 4'(TW + 1); inj_valid = 1;
    @(negedge clk); inj_valid = 0; #1;
    check(!lk_hit, "entry with flipped pointer bit never matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
