// decay_timer: idle-time detector for cache lines, in the style of cache decay.
//
// An N-bit global counter runs while `en` is high and produces a tick every
// 2**GLOBAL_W cycles. Every tracked line (`active[i]`) owns a small local
// counter that advances on each tick and is cleared whenever the line is
// accessed (`touch_valid`/`touch_idx`). A line whose local counter is already
// at its maximum when a tick arrives is declared idle: its `pending` bit is
// set and its local counter restarts from zero. With the default 2-bit local
// counter the idle time is therefore 4 ticks (4 x 256 = 1K cycles for the
// default GLOBAL_W of 8).
//
// The owner (a cache) sees the lowest-numbered pending line on
// `exp_valid`/`exp_idx` and clears it with `exp_ack` once it has written the
// line back (dirty) or invalidated it (clean). Lines that are not active keep
// their counter and pending bit at zero.
//
// The global/local counter structure, the 2-bit local counter, reset on
// access and the shared use for early write-back and clean-line invalidation
// follow the described design; reading "saturates" as "a tick arrives at the
// maximum count" and the lowest-index-first service order are choices of this
// implementation.
module decay_timer #(
  parameter int unsigned NLINES   = 1024,  // lines tracked (sets x ways)
  parameter int unsigned GLOBAL_W = 8,     // tick every 2**GLOBAL_W cycles
  parameter int unsigned LOCAL_W  = 2,     // per-line counter width
  localparam int unsigned IDX_W   = $clog2(NLINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,            // EWB/CCI enable: gates the global counter
  input  logic [NLINES-1:0] active,        // lines that hold valid data
  input  logic              touch_valid,   // an access to line touch_idx
  input  logic [IDX_W-1:0]  touch_idx,
  output logic              exp_valid,     // some line has been idle long enough
  output logic [IDX_W-1:0]  exp_idx,
  input  logic              exp_ack,       // owner has handled exp_idx
  output logic              tick           // global tick (observability)
);

  // The local counters are kept as LOCAL_W bit-planes (plane b holds bit b of
  // every line's counter), so one tick updates all lines with a few wide
  // vector operations.
  logic [GLOBAL_W-1:0]              gcnt;
  logic [LOCAL_W-1:0][NLINES-1:0]   lcnt;
  logic [NLINES-1:0]                pending;
  logic [NLINES-1:0]                touch_oh, ack_oh, clr, expire;
  logic [LOCAL_W-1:0][NLINES-1:0]   lcnt_n;

  assign tick     = en && (gcnt == '1);
  assign touch_oh = NLINES'(touch_valid) << touch_idx;
  assign ack_oh   = NLINES'(exp_ack) << exp_idx;
  assign clr      = ~active | touch_oh;

  // ripple increment of all counters; the carry out of the top plane marks
  // the lines whose counter was at its maximum when the tick arrived
  always_comb begin
    logic [NLINES-1:0] carry;
    carry = {NLINES{tick}};
    for (int b = 0; b < LOCAL_W; b++) begin
      lcnt_n[b] = (lcnt[b] ^ carry) & ~clr;
      carry     = carry & lcnt[b];
    end
    expire = carry & ~clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt    <= '0;
      lcnt    <= '0;
      pending <= '0;
    end else begin
      if (en) gcnt <= gcnt + 1'b1;
      lcnt    <= lcnt_n;
      pending <= (pending | expire) & ~ack_oh & ~clr;
    end
  end

  // Lowest-index pending line: isolate the lowest set bit, then encode it.
  logic [NLINES-1:0] lowest;
  assign lowest    = pending & (~pending + 1'b1);
  assign exp_valid = |pending;
  always_comb
    for (int b = 0; b < IDX_W; b++) begin
      exp_idx[b] = 1'b0;
      for (int i = 0; i < NLINES; i++)
        if (((i >> b) & 1) != 0) exp_idx[b] = exp_idx[b] | lowest[i];
    end

endmodule
