// tb_decay_timer: self-checking testbench of the line idle-time detector.
//
// Small configuration (8 lines, tick every 4 cycles, 2-bit local counters).
// First a directed check of the idle time: a single line, touched once and
// then left alone, must be reported after 4 ticks, i.e. between 3 and 4 tick
// periods after the touch, and not before. Then random activity, touches and
// acknowledgements are applied while a cycle-accurate reference model of the
// counters predicts `exp_valid`/`exp_idx` every cycle.
module tb_decay_timer;
  localparam int N = 8, GW = 2, LW = 2, T = 1 << GW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic en = 0, touch_valid = 0, exp_ack = 0;
  logic [N-1:0] active = '0;
  logic [2:0] touch_idx = '0;
  logic exp_valid, tick;
  logic [2:0] exp_idx;

  decay_timer #(.NLINES(N), .GLOBAL_W(GW), .LOCAL_W(LW)) dut (.*);

  // reference model
  int g = 0;
  int lc [N];
  bit pend [N];
  bit ref_v; int ref_i;
  always_comb begin
    ref_v = 0; ref_i = 0;
    for (int i = N - 1; i >= 0; i--) if (pend[i]) begin ref_v = 1; ref_i = i; end
  end
  always @(posedge clk) if (rst_n) begin
    bit tk;
    tk = en && (g == T - 1);
    if (en) g = (g + 1) % T;
    for (int i = 0; i < N; i++) begin
      bit ack_i;
      ack_i = exp_ack && ref_v && ref_i == i;
      if (!active[i] || (touch_valid && touch_idx == 3'(i))) begin lc[i] = 0; pend[i] = 0; end
      else begin
        if (tk) begin
          if (lc[i] == (1 << LW) - 1) begin lc[i] = 0; pend[i] = 1; end
          else lc[i]++;
        end
        if (ack_i) pend[i] = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < N; i++) begin lc[i] = 0; pend[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // directed: idle time of one line is 4 ticks
    @(negedge clk); en = 1; active = 8'b0000_0100; touch_valid = 1; touch_idx = 2;
    @(negedge clk); touch_valid = 0;
    cyc = 1;
    while (!exp_valid && cyc < 10 * T) begin @(negedge clk); cyc++; end
    check(exp_valid && exp_idx == 2, "idle line reported");
    check(cyc > 3 * T && cyc <= 4 * T + 1, $sformatf("idle time %0d cycles, tick period %0d", cyc, T));
    @(negedge clk); exp_ack = 1;
    @(negedge clk); exp_ack = 0;
    check(!exp_valid, "acknowledge clears the report");
    // a disabled timer never reports
    en = 0; touch_valid = 1; @(negedge clk); touch_valid = 0;
    repeat (20 * T) @(negedge clk);
    check(!exp_valid, "no report while disabled");

    // random, against the reference model
    for (int i = 0; i < N; i++) begin lc[i] = int'({dut.lcnt[1][i], dut.lcnt[0][i]}); pend[i] = dut.pending[i]; end
    g = int'(dut.gcnt);
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      check(exp_valid == ref_v && (!ref_v || exp_idx == 3'(ref_i)), "expiry output matches the model");
      check(tick == (en && g == T - 1), "tick");
      if (c % 1000 == 0) en = $urandom_range(0, 5) != 0;
      if ($urandom_range(0, 40) == 0) active = 8'($urandom);
      touch_valid = $urandom_range(0, 6) == 0;
      touch_idx   = 3'($urandom);
      exp_ack     = exp_valid && $urandom_range(0, 2) == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
