// icache_cs_cci: instruction cache with cacheline scrubbing and clean-line
// invalidation (CS-CCI).
//
// A blocking, read-only, 2-way set-associative cache (default 64 KB, 64-byte
// lines, 32-bit instructions, 33-bit tags). Its lines are only vulnerable
// between two reads, so idle lines are refreshed or dropped:
//   * a decay timer (1K-cycle tick, 2-bit local counter per line, cleared by
//     every fetch that hits the line) flags a line after 4K idle cycles;
//   * the first three times an idle line is flagged it is scrubbed: its
//     contents are re-read from the (error-free) L2 and overwritten, which
//     removes any bit flips collected in the meantime;
//   * the fourth time, i.e. after 16K idle cycles, it is invalidated, so an
//     unused line stops costing L2 traffic.
// Scrubs and invalidations run only in cycles with no fetch waiting.
//
// Fetch side: `req_valid` is accepted while `req_ready`; a hit answers on
// `resp_valid` with the instruction in the next cycle, a miss after the L2
// line fill. L2 side: `l2_req_valid` is held with a line address until
// `l2_resp_valid` returns the line. `inj_*` flips one stored bit. `ev_*` are
// one-cycle event pulses.
//
// The scrub-then-invalidate policy and its 4K/16K intervals follow the
// described design; counting scrubs with a second 2-bit per-line counter, the
// replacement policy (invalid way first, else not most recently used) and the
// blocking controller are choices of this implementation.
module icache_cs_cci #(
  parameter int unsigned SETS        = 512,
  parameter int unsigned LINE_INSTR  = 16,
  parameter int unsigned TAG_W       = 33,
  parameter int unsigned TICK_LOG2   = 10,   // decay tick every 1K cycles
  parameter int unsigned SCRUBS      = 3,    // scrubs before invalidation
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned OFF_W   = $clog2(LINE_INSTR),
  localparam int unsigned CADDR_W = TAG_W + SET_W + OFF_W + 2,
  localparam int unsigned LADDR_W = TAG_W + SET_W,
  localparam int unsigned LINE_W  = LINE_INSTR * 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [CADDR_W-1:0] req_addr,
  output logic               resp_valid,
  output logic [31:0]        resp_instr,
  output logic               l2_req_valid,
  output logic [LADDR_W-1:0] l2_req_addr,
  input  logic               l2_resp_valid,
  input  logic [LINE_W-1:0]  l2_resp_rdata,
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_scrub,
  output logic               ev_inval,
  input  logic               inj_valid,
  input  logic [SET_W-1:0]   inj_set,
  input  logic               inj_way,
  input  logic [OFF_W-1:0]   inj_word,
  input  logic [4:0]         inj_bit
);

  localparam int unsigned NLINES = SETS * 2;

  // Instruction words: one memory row per (set, way, word).
  localparam int unsigned ROW_W = $clog2(NLINES * LINE_INSTR);
  logic [31:0]      data_q  [NLINES*LINE_INSTR];
  logic [TAG_W-1:0] tag_q   [SETS][2];
  logic [1:0]       valid_q [SETS];
  logic [1:0]       scrub_q [SETS][2];
  logic             mru_q   [SETS];

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_FILL, S_IDLEWORK} state_e;
  state_e state, state_n;

  logic [CADDR_W-1:0] rq_addr;
  logic [SET_W-1:0]   rq_set;
  logic [TAG_W-1:0]   rq_tag;
  logic [OFF_W-1:0]   rq_off;
  assign rq_off = rq_addr[2 +: OFF_W];
  assign rq_set = rq_addr[2 + OFF_W +: SET_W];
  assign rq_tag = rq_addr[2 + OFF_W + SET_W +: TAG_W];

  logic [SET_W-1:0] fl_set;
  logic             fl_way;
  logic [TAG_W-1:0] fl_tag;
  logic             fl_scrub;    // fill is a scrub of a resident line
  logic [SET_W-1:0] dc_set;
  logic             dc_way;

  // ---------------- lookup ----------------
  logic [1:0] hitv;
  logic       hit, hw, vict;
  always_comb begin
    for (int w = 0; w < 2; w++) hitv[w] = valid_q[rq_set][w] && tag_q[rq_set][w] == rq_tag;
    hit = |hitv;
    hw  = hitv[1];
    if      (!valid_q[rq_set][0]) vict = 1'b0;
    else if (!valid_q[rq_set][1]) vict = 1'b1;
    else                          vict = !mru_q[rq_set];
  end

  // ---------------- decay timer ----------------
  logic [NLINES-1:0] active;
  logic              touch, exp_valid, exp_ack, tick;
  logic [SET_W:0]    touch_idx, exp_idx;
  always_comb
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < 2; w++) active[2*s + w] = valid_q[s][w];

  decay_timer #(.NLINES(NLINES), .GLOBAL_W(TICK_LOG2), .LOCAL_W(2)) u_decay (
    .clk, .rst_n, .en(1'b1), .active,
    .touch_valid(touch), .touch_idx,
    .exp_valid, .exp_idx, .exp_ack, .tick
  );

  // ---------------- controller ----------------
  always_comb begin
    state_n      = state;
    req_ready    = (state == S_IDLE);
    resp_valid   = 1'b0;
    resp_instr   = data_q[{rq_set, hw, rq_off}];
    l2_req_valid = 1'b0;
    l2_req_addr  = {fl_tag, fl_set};
    touch        = 1'b0;
    touch_idx    = {rq_set, hw};
    exp_ack      = 1'b0;
    ev_hit       = 1'b0;
    ev_miss      = 1'b0;
    ev_scrub     = 1'b0;
    ev_inval     = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (req_valid) state_n = S_LOOKUP;
        else if (exp_valid) begin
          exp_ack = 1'b1;
          state_n = S_IDLEWORK;
        end
      end
      S_LOOKUP: begin
        if (hit) begin
          ev_hit     = 1'b1;
          resp_valid = 1'b1;
          touch      = 1'b1;
          state_n    = S_IDLE;
        end else begin
          ev_miss = 1'b1;
          state_n = S_FILL;
        end
      end
      S_IDLEWORK: begin
        // scrub (re-read) the idle line, or drop it after SCRUBS scrubs
        if (!valid_q[dc_set][dc_way])                 state_n = S_IDLE;
        else if (scrub_q[dc_set][dc_way] >= 2'(SCRUBS)) begin
          ev_inval = 1'b1;
          state_n  = S_IDLE;
        end else begin
          ev_scrub = 1'b1;
          state_n  = S_FILL;
        end
      end
      S_FILL: begin
        l2_req_valid = 1'b1;
        if (l2_resp_valid) state_n = fl_scrub ? S_IDLE : S_LOOKUP;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rq_addr  <= '0;
      fl_set   <= '0;
      fl_way   <= 1'b0;
      fl_tag   <= '0;
      fl_scrub <= 1'b0;
      dc_set   <= '0;
      dc_way   <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        mru_q[s]   <= 1'b0;
        for (int w = 0; w < 2; w++) begin
          tag_q[s][w]   <= '0;
          scrub_q[s][w] <= '0;
        end
      end
    end else begin
      state <= state_n;
      unique case (state)
        S_IDLE: begin
          if (req_valid)      rq_addr <= req_addr;
          else if (exp_valid) {dc_set, dc_way} <= exp_idx;
        end
        S_LOOKUP: begin
          if (hit) begin
            mru_q[rq_set]       <= hw;
            scrub_q[rq_set][hw] <= '0;
          end else begin
            fl_set   <= rq_set;
            fl_way   <= vict;
            fl_tag   <= rq_tag;
            fl_scrub <= 1'b0;
            valid_q[rq_set][vict] <= 1'b0;
          end
        end
        S_IDLEWORK: begin
          if (valid_q[dc_set][dc_way]) begin
            if (scrub_q[dc_set][dc_way] >= 2'(SCRUBS)) begin
              valid_q[dc_set][dc_way] <= 1'b0;
            end else begin
              scrub_q[dc_set][dc_way] <= scrub_q[dc_set][dc_way] + 2'd1;
              fl_set   <= dc_set;
              fl_way   <= dc_way;
              fl_tag   <= tag_q[dc_set][dc_way];
              fl_scrub <= 1'b1;
            end
          end
        end
        S_FILL: begin
          if (l2_resp_valid) begin
            valid_q[fl_set][fl_way] <= 1'b1;
            tag_q[fl_set][fl_way]   <= fl_tag;
            if (!fl_scrub) scrub_q[fl_set][fl_way] <= '0;
          end
        end
        default: ;
      endcase
    end
  end

  // One write port per word position: a line fill, or else a fault injection.
  logic [LINE_INSTR-1:0] dw_we;
  logic [ROW_W-1:0]      dw_row [LINE_INSTR];
  logic [31:0]           dw_d   [LINE_INSTR];
  always_comb
    for (int k = 0; k < LINE_INSTR; k++) begin
      dw_we[k]  = state == S_FILL && l2_resp_valid;
      dw_row[k] = {fl_set, fl_way, OFF_W'(k)};
      dw_d[k]   = l2_resp_rdata[32*k +: 32];
      if (!dw_we[k] && inj_valid && inj_word == OFF_W'(k)) begin
        dw_we[k]  = 1'b1;
        dw_row[k] = {inj_set, inj_way, OFF_W'(k)};
        dw_d[k]   = data_q[{inj_set, inj_way, OFF_W'(k)}] ^ (32'd1 << inj_bit);
      end
    end

  always_ff @(posedge clk)
    for (int k = 0; k < LINE_INSTR; k++)
      if (dw_we[k]) data_q[dw_row[k]] <= dw_d[k];

endmodule
