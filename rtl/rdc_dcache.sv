// rdc_dcache: reliable write-back L1 data cache.
//
// A blocking, 2-way set-associative write-back cache (default 64 KB, 64-byte
// lines, 64-bit words, 33-bit tags) that combines the protection mechanisms
// of the design:
//   * byte parity on every data word (detection);
//   * one dirty bit per word (MDB): only dirty words are written back, so
//     errors in clean words of a dirty line are never propagated, and an
//     error in a clean word is repaired by re-reading the line from L2;
//   * one zero flag per word (NWVC): an all-zero word is returned from its
//     flag without reading the data bits;
//   * in-cache replication (ICR, `icr_en`): the line written by a store is
//     copied into the other way of its set, one cycle later, and a dirty word
//     that fails parity is repaired from the copy;
//   * early write-back / clean-line invalidation (`ewb_cci_en`): a decay
//     timer finds lines idle for 4 ticks; idle dirty lines are written back,
//     idle clean lines are invalidated;
//   * tag parity with a tag replication buffer (selective TRB with early
//     write-back): the tag of every dirty line is copied into a 32-entry tag
//     buffer when the line first becomes dirty; a failing tag is restored
//     from it; when the buffer displaces a replica, that line is written back
//     so that every dirty line always has a replica.
//
// CPU side: a request is accepted when `req_ready` (idle) and `req_valid`
// are high. A read hit answers on `resp_valid` in the next cycle (2-cycle
// load-to-use counting the accept cycle); write hits also answer in the next
// cycle. Misses, repairs and background work (ICR copy, write-backs) add
// cycles. `resp_err` marks a read whose data is detected as wrong and could
// not be repaired (to be handled by the operating system).
// L2 side: `l2_req_valid` is held with a line address until `l2_resp_valid`;
// writes carry a word mask (the dirty bits), reads return a whole line.
// `err_detected` pulses once for each detected parity failure, for the
// soft-error monitor. `ev` gives one-cycle pulses of every mechanism.
// `inj_*` flips one data or tag bit, `tb_inj_*` one tag-buffer bit.
//
// Following the described design: the mechanisms listed above, byte parity,
// word-level dirty and zero bits, the 2-bit local counters, the 1K-cycle idle
// time (256-cycle tick), the 32-entry buffer with FIFO+ replacement, the
// replica being written the cycle after the store, recovery of clean data by
// reloading from an error-free L2. Choices of this implementation: a blocking
// controller, whole-line transfers on a simple L2 handshake, the replica
// always living in the other way of the same set (only where that way is not
// a dirty line), a whole-line copy when the replica is written, and servicing
// idle lines only when no CPU request is waiting.
module rdc_dcache import ser_pkg::*; #(
  parameter int unsigned SETS           = 512,
  parameter int unsigned LINE_WORDS     = 8,
  parameter int unsigned TAG_W          = 33,
  parameter int unsigned TB_ENTRIES     = 32,
  parameter int unsigned DECAY_GLOBAL_W = 8,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned WOFF_W  = $clog2(LINE_WORDS),
  localparam int unsigned CADDR_W = TAG_W + SET_W + WOFF_W + 3,
  localparam int unsigned LADDR_W = TAG_W + SET_W,
  localparam int unsigned LINE_W  = LINE_WORDS * WORD_W,
  localparam int unsigned TBI_W   = $clog2(TB_ENTRIES),
  localparam int unsigned TBB_W   = $clog2(TAG_W + SET_W + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // protection level controls
  input  logic                  icr_en,
  input  logic                  ewb_cci_en,
  // CPU side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [CADDR_W-1:0]    req_addr,
  input  logic [WORD_W-1:0]     req_wdata,
  output logic                  resp_valid,
  output logic [WORD_W-1:0]     resp_rdata,
  output logic                  resp_err,
  // L2 side
  output logic                  l2_req_valid,
  output logic                  l2_req_we,
  output logic [LADDR_W-1:0]    l2_req_addr,
  output logic [LINE_W-1:0]     l2_req_wdata,
  output logic [LINE_WORDS-1:0] l2_req_wmask,
  input  logic                  l2_resp_valid,
  input  logic [LINE_W-1:0]     l2_resp_rdata,
  // monitoring
  output logic                  err_detected,
  output dc_events_t            ev,
  // fault injection
  input  logic                  inj_valid,
  input  logic                  inj_tag,      // 1: tag bit, 0: data bit
  input  logic [SET_W-1:0]      inj_set,
  input  logic                  inj_way,
  input  logic [WOFF_W-1:0]     inj_word,
  input  logic [5:0]            inj_bit,
  input  logic                  tb_inj_valid,
  input  logic [TBI_W-1:0]      tb_inj_idx,
  input  logic [TBB_W-1:0]      tb_inj_bit
);

  localparam int unsigned NLINES = SETS * 2;

  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [WORD_BYTES-1:0] wpar_t;

  // ---------------- storage ----------------
  // Data words and their byte parity: one memory row per (set, way, word).
  localparam int unsigned ROW_W = $clog2(NLINES * LINE_WORDS);
  word_t                 data_q [NLINES*LINE_WORDS];
  wpar_t                 dpar_q [NLINES*LINE_WORDS];
  logic [TAG_W-1:0]      tag_q  [SETS][2];
  logic                  tpar_q [SETS][2];
  logic [1:0]            valid_q [SETS];
  logic [1:0]            dup_q   [SETS];   // way holds an in-cache replica
  logic [1:0]            copy_q  [SETS];   // tag has a replica in the tag buffer
  logic [LINE_WORDS-1:0] dirty_q [SETS][2];
  logic [LINE_WORDS-1:0] zero_q  [SETS][2];
  logic                  mru_q   [SETS];

  function automatic logic [ROW_W-1:0] row(input logic [SET_W-1:0] s, input logic w,
                                           input logic [WOFF_W-1:0] k);
    return {s, w, k};
  endfunction

  // ---------------- controller state ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_TAGFIX, S_ICR, S_WB, S_FILL, S_DECAY, S_TRBEWB
  } state_e;
  state_e state, state_n;

  logic                 rq_we;
  logic [CADDR_W-1:0]   rq_addr;
  word_t                rq_wdata;
  logic [SET_W-1:0]     rq_set;
  logic [TAG_W-1:0]     rq_tag;
  logic [WOFF_W-1:0]    rq_off;
  assign rq_off = rq_addr[3 +: WOFF_W];
  assign rq_set = rq_addr[3 + WOFF_W +: SET_W];
  assign rq_tag = rq_addr[3 + WOFF_W + SET_W +: TAG_W];

  logic                 fix_way;      // way with a failing tag (S_TAGFIX)
  logic                 hw_q;         // hit way of the last store (S_ICR)
  logic [SET_W-1:0]     wb_set;       // line being written back
  logic                 wb_way;
  logic [TAG_W-1:0]     wb_tag;
  logic                 wb_inval;     // invalidate (1) or keep clean (0) afterwards
  state_e               wb_next;
  logic [SET_W-1:0]     fl_set;       // line being filled
  logic                 fl_way;
  logic [TAG_W-1:0]     fl_tag;
  logic                 fl_merge;     // keep dirty words (repair refill)
  logic [SET_W-1:0]     dc_set;       // idle line (S_DECAY)
  logic                 dc_way;
  logic                 te_pend;      // tag-buffer victim waits for write-back
  logic [SET_W-1:0]     te_set;
  logic                 te_way;
  logic [TAG_W-1:0]     te_tag;
  logic                 te_tag_ok;

  // lookup results (see below)
  logic [1:0] lk_v, lk_dup, lk_match, lk_tok, lk_bad, lk_hitv;
  logic       lk_hit, hw_n, lk_rep;   // hit, hit way, replica present in other way
  logic       lk_bad_way;
  word_t      lk_word, rep_word;
  logic       lk_word_ok, rep_word_ok;

  // ---------------- decay timer ----------------
  logic [NLINES-1:0]        dt_active;
  logic                     dt_touch;
  logic [SET_W:0]           dt_touch_idx;
  logic                     dt_exp_valid, dt_exp_ack, dt_tick;
  logic [SET_W:0]           dt_exp_idx;

  always_comb
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < 2; w++)
        dt_active[2*s + w] = valid_q[s][w] && !dup_q[s][w];

  decay_timer #(.NLINES(NLINES), .GLOBAL_W(DECAY_GLOBAL_W), .LOCAL_W(2)) u_decay (
    .clk, .rst_n, .en(ewb_cci_en), .active(dt_active),
    .touch_valid(dt_touch), .touch_idx(dt_touch_idx),
    .exp_valid(dt_exp_valid), .exp_idx(dt_exp_idx), .exp_ack(dt_exp_ack), .tick(dt_tick)
  );

  // ---------------- tag buffer ----------------
  logic [SET_W-1:0] tb_lk_set;
  logic             tb_lk_way;
  logic             tb_lk_hit, tb_lk_ok;
  logic [TBI_W-1:0] tb_lk_idx;
  logic [TAG_W-1:0] tb_lk_tag;
  logic             tb_ins, tb_vic_valid, tb_vic_way, tb_vic_ok, tb_inv, tb_inv_way;
  logic [SET_W-1:0] tb_vic_set, tb_inv_set;
  logic [TAG_W-1:0] tb_vic_tag;
  logic [TBI_W:0]   tb_occ;

  tag_buffer #(.ENTRIES(TB_ENTRIES), .TAG_W(TAG_W), .SET_W(SET_W), .WAY_W(1)) u_tb (
    .clk, .rst_n,
    .lk_set(tb_lk_set), .lk_way(tb_lk_way), .lk_hit(tb_lk_hit), .lk_idx(tb_lk_idx),
    .lk_tag(tb_lk_tag), .lk_tag_ok(tb_lk_ok),
    .ins_valid(tb_ins), .ins_set(rq_set), .ins_way(hw_n), .ins_tag(rq_tag),
    .vic_valid(tb_vic_valid), .vic_set(tb_vic_set), .vic_way(tb_vic_way),
    .vic_tag(tb_vic_tag), .vic_tag_ok(tb_vic_ok),
    .inv_valid(tb_inv), .inv_set(tb_inv_set), .inv_way(tb_inv_way),
    .inj_valid(tb_inj_valid), .inj_idx(tb_inj_idx), .inj_bit(tb_inj_bit),
    .occupancy(tb_occ)
  );

  // ---------------- array read ports ----------------
  // Each stored word is read through a fixed set of ports: the requested
  // word of both ways, and every word of the line being written back and of
  // its partner way (entry 0: wb_way, entry 1: the other way).
  word_t                   lk_d [2];
  wpar_t                   lk_p [2];
  logic [1:0]              lk_z;
  word_t                   wb_d [2][LINE_WORDS];
  wpar_t                   wb_p [2][LINE_WORDS];
  logic [1:0][LINE_WORDS-1:0] wb_z;
  logic [LINE_WORDS-1:0]   wb_dirty;
  always_comb begin
    for (int w = 0; w < 2; w++) begin
      lk_d[w] = data_q[row(rq_set, w[0], rq_off)];
      lk_p[w] = dpar_q[row(rq_set, w[0], rq_off)];
      lk_z[w] = zero_q[rq_set][w][rq_off];
      wb_z[w] = zero_q[wb_set][wb_way ^ w[0]];
      for (int k = 0; k < LINE_WORDS; k++) begin
        wb_d[w][k] = data_q[row(wb_set, wb_way ^ w[0], WOFF_W'(k))];
        wb_p[w][k] = dpar_q[row(wb_set, wb_way ^ w[0], WOFF_W'(k))];
      end
    end
    wb_dirty = dirty_q[wb_set][wb_way];
  end

  // ---------------- lookup of the request set ----------------

  always_comb begin
    for (int w = 0; w < 2; w++) begin
      lk_v[w]     = valid_q[rq_set][w];
      lk_dup[w]   = dup_q[rq_set][w];
      lk_match[w] = tag_q[rq_set][w] == rq_tag;
      lk_tok[w]   = (^tag_q[rq_set][w]) == tpar_q[rq_set][w];
      lk_bad[w]   = lk_v[w] && !lk_tok[w];
      lk_hitv[w]  = lk_v[w] && !lk_dup[w] && lk_match[w];
    end
    lk_hit     = |lk_hitv;
    hw_n       = lk_hitv[1];
    lk_bad_way = !lk_bad[0];
    lk_rep     = lk_v[!hw_n] && lk_dup[!hw_n] && lk_match[!hw_n];
    lk_word     = lk_z[hw_n] ? '0 : lk_d[hw_n];
    lk_word_ok  = lk_z[hw_n] || (byte_parity(lk_d[hw_n]) == lk_p[hw_n]);
    rep_word    = lk_z[!hw_n] ? '0 : lk_d[!hw_n];
    rep_word_ok = lk_z[!hw_n] || (byte_parity(lk_d[!hw_n]) == lk_p[!hw_n]);
  end

  // Victim choice on a miss: invalid way, else a replica, else not-MRU.
  logic vict;
  always_comb begin
    if      (!lk_v[0])  vict = 1'b0;
    else if (!lk_v[1])  vict = 1'b1;
    else if (lk_dup[0]) vict = 1'b0;
    else if (lk_dup[1]) vict = 1'b1;
    else                vict = !mru_q[rq_set];
  end

  // ---------------- write-back data (dirty words only) ----------------
  logic [LINE_W-1:0] wb_data;
  logic              wb_bad, wb_unrec;
  always_comb begin
    logic rep;
    rep      = valid_q[wb_set][!wb_way] && dup_q[wb_set][!wb_way] && tag_q[wb_set][!wb_way] == wb_tag;
    wb_bad   = 1'b0;
    wb_unrec = 1'b0;
    for (int k = 0; k < LINE_WORDS; k++) begin
      word_t d;
      logic  ok, rok;
      d   = wb_z[0][k] ? '0 : wb_d[0][k];
      ok  = wb_z[0][k] || byte_parity(wb_d[0][k]) == wb_p[0][k];
      rok = rep && (wb_z[1][k] || byte_parity(wb_d[1][k]) == wb_p[1][k]);
      if (wb_dirty[k] && !ok) begin
        wb_bad = 1'b1;
        if (rok) d = wb_z[1][k] ? '0 : wb_d[1][k];
        else     wb_unrec = 1'b1;
      end
      wb_data[k*WORD_W +: WORD_W] = d;
    end
  end

  // ---------------- data array write controls ----------------
  logic              dw_word_en, dw_line_en, dw_copy_en;
  logic [SET_W-1:0]  dw_set;
  logic              dw_way;
  logic [WOFF_W-1:0] dw_off;
  word_t             dw_word;

  // ---------------- controller ----------------
  always_comb begin
    state_n      = state;
    req_ready    = (state == S_IDLE);
    resp_valid   = 1'b0;
    resp_rdata   = lk_word;
    resp_err     = 1'b0;
    l2_req_valid = 1'b0;
    l2_req_we    = 1'b0;
    l2_req_addr  = {fl_tag, fl_set};
    l2_req_wdata = wb_data;
    l2_req_wmask = dirty_q[wb_set][wb_way];
    err_detected = 1'b0;
    ev           = '0;
    dt_touch     = 1'b0;
    dt_touch_idx = {rq_set, hw_n};
    dt_exp_ack   = 1'b0;
    tb_lk_set    = rq_set;
    tb_lk_way    = fix_way;
    tb_ins       = 1'b0;
    tb_inv       = 1'b0;
    tb_inv_set   = rq_set;
    tb_inv_way   = vict;
    dw_word_en   = 1'b0;
    dw_line_en   = 1'b0;
    dw_copy_en   = 1'b0;
    dw_set       = rq_set;
    dw_way       = hw_n;
    dw_off       = rq_off;
    dw_word      = rq_wdata;

    unique case (state)
      S_IDLE: begin
        if (req_valid)                       state_n = S_LOOKUP;
        else if (dt_exp_valid && ewb_cci_en) begin
          state_n    = S_DECAY;
          dt_exp_ack = 1'b1;
        end
      end

      S_LOOKUP: begin
        if (|lk_bad) begin
          ev.tag_err   = 1'b1;
          err_detected = 1'b1;
          state_n      = S_TAGFIX;
        end else if (lk_hit) begin
          ev.hit   = 1'b1;
          dt_touch = 1'b1;
          if (rq_we) begin
            dw_word_en = 1'b1;
            resp_valid = 1'b1;
            if (!copy_q[rq_set][hw_n]) begin
              tb_ins     = 1'b1;
              ev.trb_dup = 1'b1;
            end
            if (icr_en)                 state_n = S_ICR;
            else if (tb_ins && tb_vic_valid) state_n = S_TRBEWB;
            else                        state_n = S_IDLE;
          end else if (lk_word_ok) begin
            resp_valid   = 1'b1;
            ev.zero_read = zero_q[rq_set][hw_n][rq_off];
            state_n      = S_IDLE;
          end else begin
            ev.data_err  = 1'b1;
            err_detected = 1'b1;
            if (!dirty_q[rq_set][hw_n][rq_off]) begin
              ev.refetch = 1'b1;
              state_n    = S_FILL;
            end else if (lk_rep && rep_word_ok) begin
              ev.icr_fix = 1'b1;
              dw_word_en = 1'b1;
              dw_word    = rep_word;
              resp_valid = 1'b1;
              resp_rdata = rep_word;
              state_n    = S_IDLE;
            end else begin
              ev.due     = 1'b1;
              resp_valid = 1'b1;
              resp_err   = 1'b1;
              state_n    = S_IDLE;
            end
          end
        end else begin
          ev.miss = 1'b1;
          if (lk_v[vict] && !lk_dup[vict] && copy_q[rq_set][vict]) tb_inv = 1'b1;
          if (lk_v[vict] && !lk_dup[vict] && |dirty_q[rq_set][vict]) state_n = S_WB;
          else                                                       state_n = S_FILL;
        end
      end

      S_TAGFIX: begin
        tb_lk_set = rq_set;
        tb_lk_way = fix_way;
        if (!dup_q[rq_set][fix_way] && copy_q[rq_set][fix_way] && tb_lk_ok) begin
          ev.tag_fix = 1'b1;
        end else if (!dup_q[rq_set][fix_way]) begin
          tb_inv     = copy_q[rq_set][fix_way];
          tb_inv_way = fix_way;
          if (|dirty_q[rq_set][fix_way]) ev.due      = 1'b1;
          else                           ev.tag_drop = 1'b1;
        end
        state_n = S_LOOKUP;
      end

      S_ICR: begin
        dw_set = rq_set;
        dw_way = !hw_q;
        if (valid_q[rq_set][!hw_q] && !dup_q[rq_set][!hw_q] && |dirty_q[rq_set][!hw_q]) begin
          // other way holds a dirty line of its own: no room for a replica
        end else begin
          dw_copy_en  = 1'b1;
          ev.icr_copy = 1'b1;
          if (valid_q[rq_set][!hw_q] && !dup_q[rq_set][!hw_q] && copy_q[rq_set][!hw_q]) begin
            tb_inv     = 1'b1;
            tb_inv_way = !hw_q;
          end
        end
        state_n = te_pend ? S_TRBEWB : S_IDLE;
      end

      S_DECAY: begin
        tb_lk_set = dc_set;
        tb_lk_way = dc_way;
        tb_inv_set = dc_set;
        tb_inv_way = dc_way;
        state_n   = S_IDLE;
        if (valid_q[dc_set][dc_way] && !dup_q[dc_set][dc_way]) begin
          if (!(|dirty_q[dc_set][dc_way])) begin
            ev.cci = 1'b1;
            tb_inv = copy_q[dc_set][dc_way];
          end else if (((^tag_q[dc_set][dc_way]) == tpar_q[dc_set][dc_way]) ||
                       (copy_q[dc_set][dc_way] && tb_lk_ok)) begin
            ev.ewb  = 1'b1;
            state_n = S_WB;
          end else begin
            ev.tag_err   = 1'b1;
            err_detected = 1'b1;
            ev.due       = 1'b1;
            tb_inv       = copy_q[dc_set][dc_way];
          end
        end
      end

      S_TRBEWB: begin
        state_n = S_IDLE;
        if (valid_q[te_set][te_way] && !dup_q[te_set][te_way] && |dirty_q[te_set][te_way]) begin
          ev.trb_ewb = 1'b1;
          state_n    = S_WB;
          if (((^tag_q[te_set][te_way]) != tpar_q[te_set][te_way])) begin
            ev.tag_err   = 1'b1;
            err_detected = 1'b1;
            if (!te_tag_ok) begin
              ev.due  = 1'b1;
              state_n = S_IDLE;
            end
          end
        end
      end

      S_WB: begin
        l2_req_valid = 1'b1;
        l2_req_we    = 1'b1;
        l2_req_addr  = {wb_tag, wb_set};
        if (l2_resp_valid) begin
          ev.writeback = 1'b1;
          if (wb_bad) begin
            ev.data_err  = 1'b1;
            err_detected = 1'b1;
            ev.icr_fix   = !wb_unrec;
            ev.due       = wb_unrec;
          end
          if (!wb_inval) begin
            tb_inv     = copy_q[wb_set][wb_way];
            tb_inv_set = wb_set;
            tb_inv_way = wb_way;
          end
          state_n = wb_next;
        end
      end

      S_FILL: begin
        l2_req_valid = 1'b1;
        l2_req_addr  = {fl_tag, fl_set};
        dw_set       = fl_set;
        dw_way       = fl_way;
        if (l2_resp_valid) begin
          ev.fill      = 1'b1;
          dw_line_en   = 1'b1;
          dt_touch     = 1'b1;
          dt_touch_idx = {fl_set, fl_way};
          state_n      = S_LOOKUP;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  // ---------------- sequential: controller and metadata ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rq_we     <= 1'b0;
      rq_addr   <= '0;
      rq_wdata  <= '0;
      fix_way   <= 1'b0;
      hw_q      <= 1'b0;
      wb_set    <= '0;
      wb_way    <= 1'b0;
      wb_tag    <= '0;
      wb_inval  <= 1'b0;
      wb_next   <= S_IDLE;
      fl_set    <= '0;
      fl_way    <= 1'b0;
      fl_tag    <= '0;
      fl_merge  <= 1'b0;
      dc_set    <= '0;
      dc_way    <= 1'b0;
      te_pend   <= 1'b0;
      te_set    <= '0;
      te_way    <= 1'b0;
      te_tag    <= '0;
      te_tag_ok <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dup_q[s]   <= '0;
        copy_q[s]  <= '0;
        mru_q[s]   <= 1'b0;
        for (int w = 0; w < 2; w++) begin
          tag_q[s][w]   <= '0;
          tpar_q[s][w]  <= 1'b0;
          dirty_q[s][w] <= '0;
          zero_q[s][w]  <= '0;
        end
      end
    end else begin
      state <= state_n;
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            rq_we    <= req_we;
            rq_addr  <= req_addr;
            rq_wdata <= req_wdata;
          end else if (dt_exp_valid && ewb_cci_en) begin
            {dc_set, dc_way} <= dt_exp_idx;
          end
        end

        S_LOOKUP: begin
          if (|lk_bad) begin
            fix_way <= lk_bad_way;
          end else if (lk_hit) begin
            mru_q[rq_set] <= hw_n;
            hw_q          <= hw_n;
            if (rq_we) begin
              dirty_q[rq_set][hw_n][rq_off] <= 1'b1;
              zero_q[rq_set][hw_n][rq_off]  <= (rq_wdata == '0);
              if (tb_ins) begin
                copy_q[rq_set][hw_n] <= 1'b1;
                if (tb_vic_valid) begin
                  copy_q[tb_vic_set][tb_vic_way] <= 1'b0;
                  te_pend   <= 1'b1;
                  te_set    <= tb_vic_set;
                  te_way    <= tb_vic_way;
                  te_tag    <= tb_vic_tag;
                  te_tag_ok <= tb_vic_ok;
                end
              end
              // a replica that ICR will not refresh is stale: drop it
              if (!icr_en && lk_rep) valid_q[rq_set][!hw_n] <= 1'b0;
            end else if (!lk_word_ok && !dirty_q[rq_set][hw_n][rq_off]) begin
              fl_set   <= rq_set;
              fl_way   <= hw_n;
              fl_tag   <= rq_tag;
              fl_merge <= 1'b1;
            end else if (!lk_word_ok && lk_rep && rep_word_ok) begin
              zero_q[rq_set][hw_n][rq_off] <= zero_q[rq_set][!hw_n][rq_off];
            end
          end else begin
            if (lk_v[vict] && !lk_dup[vict] && copy_q[rq_set][vict]) copy_q[rq_set][vict] <= 1'b0;
            fl_set   <= rq_set;
            fl_way   <= vict;
            fl_tag   <= rq_tag;
            fl_merge <= 1'b0;
            if (lk_v[vict] && !lk_dup[vict] && |dirty_q[rq_set][vict]) begin
              wb_set   <= rq_set;
              wb_way   <= vict;
              wb_tag   <= tag_q[rq_set][vict];
              wb_inval <= 1'b1;
              wb_next  <= S_FILL;
            end else begin
              valid_q[rq_set][vict] <= 1'b0;
            end
          end
        end

        S_TAGFIX: begin
          if (!dup_q[rq_set][fix_way] && copy_q[rq_set][fix_way] && tb_lk_ok) begin
            tag_q[rq_set][fix_way]  <= tb_lk_tag;
            tpar_q[rq_set][fix_way] <= ^tb_lk_tag;
          end else begin
            valid_q[rq_set][fix_way] <= 1'b0;
            copy_q[rq_set][fix_way]  <= 1'b0;
            dirty_q[rq_set][fix_way] <= '0;
          end
        end

        S_ICR: begin
          if (!(valid_q[rq_set][!hw_q] && !dup_q[rq_set][!hw_q] && |dirty_q[rq_set][!hw_q])) begin
            valid_q[rq_set][!hw_q] <= 1'b1;
            dup_q[rq_set][!hw_q]   <= 1'b1;
            copy_q[rq_set][!hw_q]  <= 1'b0;
            dirty_q[rq_set][!hw_q] <= '0;
            tag_q[rq_set][!hw_q]   <= tag_q[rq_set][hw_q];
            tpar_q[rq_set][!hw_q]  <= tpar_q[rq_set][hw_q];
            zero_q[rq_set][!hw_q]  <= zero_q[rq_set][hw_q];
          end
        end

        S_DECAY: begin
          if (valid_q[dc_set][dc_way] && !dup_q[dc_set][dc_way]) begin
            if (!(|dirty_q[dc_set][dc_way])) begin
              valid_q[dc_set][dc_way] <= 1'b0;
              copy_q[dc_set][dc_way]  <= 1'b0;
            end else if (((^tag_q[dc_set][dc_way]) == tpar_q[dc_set][dc_way]) ||
                         (copy_q[dc_set][dc_way] && tb_lk_ok)) begin
              wb_set   <= dc_set;
              wb_way   <= dc_way;
              wb_tag   <= ((^tag_q[dc_set][dc_way]) == tpar_q[dc_set][dc_way]) ?
                          tag_q[dc_set][dc_way] : tb_lk_tag;
              wb_inval <= 1'b0;
              wb_next  <= S_IDLE;
            end else begin
              valid_q[dc_set][dc_way] <= 1'b0;
              copy_q[dc_set][dc_way]  <= 1'b0;
              dirty_q[dc_set][dc_way] <= '0;
            end
          end
        end

        S_TRBEWB: begin
          te_pend <= 1'b0;
          if (valid_q[te_set][te_way] && !dup_q[te_set][te_way] && |dirty_q[te_set][te_way]) begin
            wb_set   <= te_set;
            wb_way   <= te_way;
            wb_tag   <= ((^tag_q[te_set][te_way]) == tpar_q[te_set][te_way]) ? tag_q[te_set][te_way] : te_tag;
            wb_inval <= 1'b0;
            wb_next  <= S_IDLE;
            if (((^tag_q[te_set][te_way]) != tpar_q[te_set][te_way]) && !te_tag_ok) begin
              valid_q[te_set][te_way] <= 1'b0;
              dirty_q[te_set][te_way] <= '0;
            end
          end
        end

        S_WB: begin
          if (l2_resp_valid) begin
            if (wb_inval) begin
              valid_q[wb_set][wb_way] <= 1'b0;
            end else begin
              // the line is clean now: repair its tag, drop replica and buffer entry
              tag_q[wb_set][wb_way]  <= wb_tag;
              tpar_q[wb_set][wb_way] <= ^wb_tag;
              copy_q[wb_set][wb_way] <= 1'b0;
              if (dup_q[wb_set][!wb_way]) valid_q[wb_set][!wb_way] <= 1'b0;
            end
            dirty_q[wb_set][wb_way] <= '0;
          end
        end

        S_FILL: begin
          if (l2_resp_valid) begin
            valid_q[fl_set][fl_way] <= 1'b1;
            dup_q[fl_set][fl_way]   <= 1'b0;
            tag_q[fl_set][fl_way]   <= fl_tag;
            tpar_q[fl_set][fl_way]  <= ^fl_tag;
            if (!fl_merge) begin
              copy_q[fl_set][fl_way]  <= 1'b0;
              dirty_q[fl_set][fl_way] <= '0;
            end
            for (int k = 0; k < LINE_WORDS; k++)
              if (!(fl_merge && dirty_q[fl_set][fl_way][k]))
                zero_q[fl_set][fl_way][k] <= (l2_resp_rdata[k*WORD_W +: WORD_W] == '0);
          end
        end

        default: ;
      endcase

      if (inj_valid && inj_tag && int'(inj_bit) < TAG_W)
        tag_q[inj_set][inj_way][inj_bit] <= ~tag_q[inj_set][inj_way][inj_bit];
    end
  end

  // ---------------- sequential: data array (not reset) ----------------
  // One write port per word position k. A word write, a line fill (which
  // skips the dirty words of a merge fill) and a replica copy write through
  // it; a fault injection uses it only when nothing else writes that
  // position in the same cycle.
  logic [LINE_WORDS-1:0] dw_we;
  logic [ROW_W-1:0]      dw_row [LINE_WORDS];
  word_t                 dw_d   [LINE_WORDS];
  wpar_t                 dw_p   [LINE_WORDS];

  always_comb
    for (int k = 0; k < LINE_WORDS; k++) begin
      dw_we[k]  = 1'b0;
      dw_row[k] = row(dw_set, dw_way, WOFF_W'(k));
      dw_d[k]   = dw_word;
      if (dw_word_en && dw_off == WOFF_W'(k)) dw_we[k] = 1'b1;
      if (dw_line_en && !(fl_merge && dirty_q[fl_set][fl_way][k])) begin
        dw_we[k] = 1'b1;
        dw_d[k]  = l2_resp_rdata[k*WORD_W +: WORD_W];
      end
      dw_p[k] = byte_parity(dw_d[k]);
      if (dw_copy_en) begin
        dw_we[k] = 1'b1;
        dw_d[k]  = data_q[row(dw_set, !dw_way, WOFF_W'(k))];
        dw_p[k]  = dpar_q[row(dw_set, !dw_way, WOFF_W'(k))];
      end
      if (!dw_we[k] && inj_valid && !inj_tag && inj_word == WOFF_W'(k)) begin
        dw_we[k]  = 1'b1;
        dw_row[k] = row(inj_set, inj_way, WOFF_W'(k));
        dw_d[k]   = data_q[row(inj_set, inj_way, WOFF_W'(k))] ^ (word_t'(1) << inj_bit);
        dw_p[k]   = dpar_q[row(inj_set, inj_way, WOFF_W'(k))];
      end
    end

  always_ff @(posedge clk)
    for (int k = 0; k < LINE_WORDS; k++)
      if (dw_we[k]) begin
        data_q[dw_row[k]] <= dw_d[k];
        dpar_q[dw_row[k]] <= dw_p[k];
      end

  // ---------------- rules ----------------
  // A set never holds two in-cache replicas.
  a_one_replica: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOKUP && !(|lk_bad) && (&lk_v)) |-> !(&lk_dup));
  // A write-back only ever carries dirty words.
  a_wb_mask: assert property (@(posedge clk) disable iff (!rst_n)
    (l2_req_valid && l2_req_we) |-> (|l2_req_wmask));

endmodule
