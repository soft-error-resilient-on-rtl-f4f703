// tb_ird_datapath: self-checking testbench of the IRD register-file datapath.
//
// Small configuration: 16 registers, 2 result lanes, 4 read ports. The
// testbench keeps the architectural value of every register; a result is
// visible to reads from the cycle after it is presented (through the bypass,
// then from the register file). Checks:
//  * fault-free random traffic: every operand equals the model, every read is
//    usable, narrow results and reads are flagged as duplicated;
//  * directed faults: a flip in the low half of a narrow value stalls for one
//    cycle, repairs the entry and the replayed read is correct; a flip in the
//    high half of a narrow value is ignored; a flip in a regular value, or in
//    both halves of a narrow one, raises an exception; a flipped result-bus
//    wire is caught on the bypass path and on the register-file path;
//  * random faults: whenever a read is reported usable its value is correct,
//    and recoveries and exceptions both occur.
// A stalled cycle is replayed with the same reads and no new results.
module tb_ird_datapath;
  import ser_pkg::*;
  localparam int N = 16, L = 2, R = 2 * L;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [L-1:0] res_valid = '0, wr_dup;
  logic [3:0] res_dest [L];
  logic [63:0] res_value [L];
  logic [R-1:0] rd_valid = '0, rd_ok, rd_dup, rd_det, rd_rec, rd_bypass;
  logic [3:0] rd_idx [R];
  logic [63:0] rd_operand [R];
  logic stall, exception;
  logic inj_rf_valid = 0, inj_bus_valid = 0;
  logic [3:0] inj_rf_idx = '0;
  logic [6:0] inj_rf_bit = '0, inj_bus_bit = '0;
  logic inj_bus_lane = 0;
  ird_datapath #(.NREGS(N), .LANES(L)) dut (.*);

  logic [63:0] gold [N];
  int n_rec = 0, n_exc = 0, n_byp = 0, n_dup = 0;
  bit faults = 0;
  bit hit [N] = '{default: 0};

  function automatic logic [63:0] rnd_value();
    case (int'($urandom_range(0, 3)))
      0: return {{33{1'b0}}, 31'($urandom)};
      1: return {{33{1'b1}}, 31'($urandom)};
      2: return {32'h1, $urandom};
      default: return {$urandom | 32'h4000_0000, $urandom};
    endcase
  endfunction
  function automatic bit is_narrow(input logic [63:0] v);
    return v[63:31] == '0 || v[63:31] == '1 || v[63:32] == 32'h1;
  endfunction

  // one cycle: drive after the falling edge, check before the rising edge
  task automatic cycle();
    #1;
    for (int k = 0; k < R; k++) if (rd_valid[k] && rd_ok[k])
      check(rd_operand[k] == gold[rd_idx[k]], $sformatf("port %0d r%0d: %h expected %h",
            k, rd_idx[k], rd_operand[k], gold[rd_idx[k]]));
    if (!faults) for (int k = 0; k < R; k++) if (rd_valid[k])
      check(rd_dup[k] == is_narrow(gold[rd_idx[k]]), "read-with-duplicate flag");
    for (int l = 0; l < L; l++) if (res_valid[l])
      check(wr_dup[l] == is_narrow(res_value[l]), "write-with-duplicate flag");
    n_rec += $countones(rd_rec); n_exc += int'(exception);
    n_byp += $countones(rd_bypass & rd_valid); n_dup += $countones(rd_dup);
    @(posedge clk);
    for (int l = 0; l < L; l++) if (res_valid[l]) gold[res_dest[l]] = res_value[l];
    @(negedge clk);
    res_valid = '0; rd_valid = '0; inj_rf_valid = 0; inj_bus_valid = 0;
  endtask

  task automatic put(input int r, input logic [63:0] v);
    res_valid = 1; res_dest[0] = 4'(r); res_value[0] = v;
    cycle();
    repeat (3) cycle();
  endtask
  task automatic rd1(input int r);
    rd_valid = 1; rd_idx[0] = 4'(r);
  endtask
  task automatic flip(input int r, input int b);
    inj_rf_valid = 1; inj_rf_idx = 4'(r); inj_rf_bit = 7'(b);
    cycle();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) gold[i] = '0;
    for (int l = 0; l < L; l++) begin res_dest[l] = '0; res_value[l] = '0; end
    for (int k = 0; k < R; k++) rd_idx[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- every register written once, then fault-free random traffic ----
    for (int i = 0; i < N; i += 2) begin
      res_valid = '1; res_dest[0] = 4'(i); res_dest[1] = 4'(i + 1);
      res_value[0] = rnd_value(); res_value[1] = rnd_value();
      cycle();
    end
    repeat (3) cycle();
    for (int c = 0; c < 5000; c++) begin
      res_valid = 2'($urandom);
      res_dest[0] = 4'($urandom);
      res_dest[1] = res_dest[0] + 4'($urandom_range(1, 15));
      for (int l = 0; l < L; l++) res_value[l] = rnd_value();
      for (int k = 0; k < R; k++) begin rd_idx[k] = 4'($urandom); rd_valid[k] = $urandom_range(0, 1); end
      #1 check(!stall && !exception && (rd_ok == rd_valid), "fault-free reads are usable");
      cycle();
    end
    check(n_byp > 100 && n_dup > 100, "bypass and duplicated reads exercised");
    check(n_rec == 0 && n_exc == 0, "no detection without faults");

    faults = 1;
    // ---- low-half flip of a narrow value: stall, repair, replay ----
    put(3, 64'hFFFF_FFFF_8765_4321);
    flip(3, 5);
    rd1(3); #1;
    check(stall && rd_rec[0] && !rd_ok[0] && !exception, "narrow low-half error stalls for recovery");
    check(rd_operand[0] == gold[3], "recovered operand is the copy");
    cycle();
    rd1(3); #1;
    check(!stall && rd_ok[0] && !rd_det[0] && rd_operand[0] == gold[3], "replayed read is clean after repair");
    cycle();
    // ---- high-half flip of a narrow value is not checked ----
    put(4, 64'h0000_0001_0000_ABCD);
    flip(4, 45);
    rd1(4); #1;
    check(rd_ok[0] && !rd_det[0] && rd_operand[0] == gold[4], "high-half flip of a narrow value is masked");
    cycle();
    // ---- flag flip of a narrow value: both halves fail ----
    put(5, 64'h1234);
    flip(5, 64);
    rd1(5); #1;
    check(exception && !rd_ok[0], "flag flip of a narrow value raises an exception");
    cycle();
    // ---- regular value ----
    put(6, 64'h0123_4567_89AB_CDEF);
    flip(6, 50);
    rd1(6); #1;
    check(exception && rd_det[0] && !rd_rec[0], "regular value error raises an exception");
    cycle();
    put(6, 64'h0123_4567_89AB_CDEF);
    flip(6, 66);
    rd1(6); #1;
    check(exception, "parity bit flip of a regular value detected");
    cycle();
    // ---- a bus wire flips while a narrow result is bypassed ----
    res_valid = 1; res_dest[0] = 4'd7; res_value[0] = 64'h0000_0000_0BAD_F00D;
    cycle();
    inj_bus_valid = 1; inj_bus_lane = 0; inj_bus_bit = 7'd9;
    rd1(7); #1;
    check(rd_bypass[0] && stall && rd_rec[0] && rd_operand[0] == gold[7], "bus flip caught on the bypass path");
    cycle();
    begin
      int tries;
      tries = 0;
      do begin
        rd1(7); #1; tries++;
        if (stall) cycle();
        else break;
      end while (tries < 4);
      check(rd_ok[0] && rd_operand[0] == gold[7], "bus-flipped value repaired in the file");
      check(tries == 2, $sformatf("one more recovery from the file (%0d reads)", tries));
      cycle();
    end
    res_valid = 1; res_dest[0] = 4'd8; res_value[0] = 64'h7777_0000_1111_2222;
    cycle();
    inj_bus_valid = 1; inj_bus_lane = 0; inj_bus_bit = 7'd60;
    rd1(8); #1;
    check(exception, "bus flip of a regular value detected");
    cycle();

    // ---- random faults ----
    n_rec = 0; n_exc = 0;
    for (int c = 0; c < 20000; c++) begin
      logic [R-1:0] rv;
      logic [3:0] ri [R];
      res_valid = 2'($urandom);
      res_dest[0] = 4'($urandom);
      res_dest[1] = res_dest[0] + 4'($urandom_range(1, 15));
      for (int l = 0; l < L; l++) res_value[l] = rnd_value();
      for (int k = 0; k < R; k++) begin rd_idx[k] = 4'($urandom); rd_valid[k] = $urandom_range(0, 1); end
      // at most one flipped bit per register value: parity detects odd counts
      if ($urandom_range(0, 4) == 0) begin
        inj_rf_idx = 4'($urandom);
        if (!hit[inj_rf_idx] && !(res_valid[0] && res_dest[0] == inj_rf_idx) &&
            !(res_valid[1] && res_dest[1] == inj_rf_idx)) begin
          inj_rf_valid = 1; inj_rf_bit = 7'($urandom_range(0, 67));
          hit[inj_rf_idx] = 1;
        end
      end
      if ($urandom_range(0, 20) == 0) begin
        inj_bus_lane = 1'($urandom);
        if (dut.rb_v[inj_bus_lane] && !hit[dut.rb_dest[inj_bus_lane]] &&
            !(res_valid[0] && res_dest[0] == dut.rb_dest[inj_bus_lane]) &&
            !(res_valid[1] && res_dest[1] == dut.rb_dest[inj_bus_lane])) begin
          inj_bus_valid = 1; inj_bus_bit = 7'($urandom_range(0, 65));
          hit[dut.rb_dest[inj_bus_lane]] = 1;
        end
      end
      for (int l = 0; l < L; l++) if (res_valid[l]) hit[res_dest[l]] = 0;
      #1;
      if (stall) begin
        rv = rd_valid; ri = rd_idx;
        cycle();
        rd_valid = rv; rd_idx = ri;     // replay
      end
      cycle();
    end
    check(n_rec > 50 && n_exc > 50, $sformatf("random faults: %0d recoveries, %0d exceptions", n_rec, n_exc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
