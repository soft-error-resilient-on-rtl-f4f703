// sa_rdc: self-adaptive reliable data cache.
//
// The reliable data cache (rdc_dcache) under closed-loop control: every parity
// failure the cache detects is counted by the soft-error monitor over a
// monitoring window; at the end of the window the adaptation controller
// decides whether to raise, keep or lower the protection level, and drives
// the cache's `icr_en` (in-cache replication) and `ewb_cci_en` (early
// write-back / clean-line invalidation, which also gates the decay timer's
// global counter) accordingly. Byte parity, the tag replication buffer, the
// per-word dirty bits and the zero flags are always active, since all levels
// share them.
//
// Interface and timing are those of rdc_dcache (CPU side, L2 side, fault
// injection), plus the current `level` and one-cycle `upgrade`/`downgrade`
// strobes. A level change takes effect in the cycle after the window ends.
//
// The three levels built on one another, the shared parity hardware, the
// monitor/controller split and the enable signals follow the described
// design; the default window is 100K cycles and the decay tick 256 cycles.
module sa_rdc import ser_pkg::*; #(
  parameter int unsigned SETS           = 512,
  parameter int unsigned LINE_WORDS     = 8,
  parameter int unsigned TAG_W          = 33,
  parameter int unsigned TB_ENTRIES     = 32,
  parameter int unsigned DECAY_GLOBAL_W = 8,
  parameter int unsigned WINDOW         = 100_000,
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
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [CADDR_W-1:0]    req_addr,
  input  logic [WORD_W-1:0]     req_wdata,
  output logic                  resp_valid,
  output logic [WORD_W-1:0]     resp_rdata,
  output logic                  resp_err,
  output logic                  l2_req_valid,
  output logic                  l2_req_we,
  output logic [LADDR_W-1:0]    l2_req_addr,
  output logic [LINE_W-1:0]     l2_req_wdata,
  output logic [LINE_WORDS-1:0] l2_req_wmask,
  input  logic                  l2_resp_valid,
  input  logic [LINE_W-1:0]     l2_resp_rdata,
  output prot_level_e           level,
  output logic                  upgrade,
  output logic                  downgrade,
  output logic                  win_done,
  output logic [15:0]           win_errs,
  output dc_events_t            ev,
  input  logic                  inj_valid,
  input  logic                  inj_tag,
  input  logic [SET_W-1:0]      inj_set,
  input  logic                  inj_way,
  input  logic [WOFF_W-1:0]     inj_word,
  input  logic [5:0]            inj_bit,
  input  logic                  tb_inj_valid,
  input  logic [TBI_W-1:0]      tb_inj_idx,
  input  logic [TBB_W-1:0]      tb_inj_bit
);

  logic icr_en, ewb_cci_en, err_detected;

  rdc_dcache #(
    .SETS(SETS), .LINE_WORDS(LINE_WORDS), .TAG_W(TAG_W),
    .TB_ENTRIES(TB_ENTRIES), .DECAY_GLOBAL_W(DECAY_GLOBAL_W)
  ) u_cache (
    .clk, .rst_n, .icr_en, .ewb_cci_en,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata, .resp_err,
    .l2_req_valid, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_wmask,
    .l2_resp_valid, .l2_resp_rdata,
    .err_detected, .ev,
    .inj_valid, .inj_tag, .inj_set, .inj_way, .inj_word, .inj_bit,
    .tb_inj_valid, .tb_inj_idx, .tb_inj_bit
  );

  error_monitor #(.WINDOW(WINDOW), .CNT_W(16)) u_mon (
    .clk, .rst_n, .err_pulse(err_detected), .win_done, .win_errs
  );

  sa_controller #(.CNT_W(16)) u_ctl (
    .clk, .rst_n, .win_done, .win_errs,
    .level, .icr_en, .ewb_cci_en, .upgrade, .downgrade
  );

endmodule
