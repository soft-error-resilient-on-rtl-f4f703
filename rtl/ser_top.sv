// ser_top: soft-error resilient on-chip memory structures of one processor
// core, side by side:
//   * the self-adaptive reliable L1 data cache (sa_rdc): byte parity,
//     per-word dirty and zero bits, tag replication buffer with early
//     write-back, and in-cache replication / early write-back / clean-line
//     invalidation switched on and off by a soft-error monitor;
//   * the L1 instruction cache with cacheline scrubbing and clean-line
//     invalidation (icache_cs_cci);
//   * the integer register-file datapath with in-register duplication of
//     narrow values and parity coding (ird_datapath).
// The three share only clock and reset. The L2 cache (assumed ECC-protected
// and error free) and the processor pipeline are outside: their interfaces are
// the ports of this module, grouped by prefix (dc_ data cache, ic_ instruction
// cache, rf_ register file). Fault-injection ports of each structure are
// brought out for testing. Timing is that of each sub-block.
module ser_top import ser_pkg::*; #(
  parameter int unsigned DC_SETS        = 512,
  parameter int unsigned DC_TB_ENTRIES  = 32,
  parameter int unsigned DC_DECAY_W     = 8,
  parameter int unsigned DC_WINDOW      = 100_000,
  parameter int unsigned IC_SETS        = 512,
  parameter int unsigned IC_TICK_LOG2   = 10,
  parameter int unsigned RF_NREGS       = 128,
  parameter int unsigned RF_LANES       = 8,
  localparam int unsigned TAG_W     = 33,
  localparam int unsigned DC_SET_W  = $clog2(DC_SETS),
  localparam int unsigned DC_CADDR  = TAG_W + DC_SET_W + 3 + 3,
  localparam int unsigned DC_LADDR  = TAG_W + DC_SET_W,
  localparam int unsigned DC_TBI_W  = $clog2(DC_TB_ENTRIES),
  localparam int unsigned DC_TBB_W  = $clog2(TAG_W + DC_SET_W + 1),
  localparam int unsigned IC_SET_W  = $clog2(IC_SETS),
  localparam int unsigned IC_CADDR  = TAG_W + IC_SET_W + 4 + 2,
  localparam int unsigned IC_LADDR  = TAG_W + IC_SET_W,
  localparam int unsigned RF_IDX_W  = $clog2(RF_NREGS),
  localparam int unsigned RF_NRD    = 2 * RF_LANES,
  localparam int unsigned RF_LN_W   = (RF_LANES > 1) ? $clog2(RF_LANES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---------------- data cache ----------------
  input  logic                  dc_req_valid,
  output logic                  dc_req_ready,
  input  logic                  dc_req_we,
  input  logic [DC_CADDR-1:0]   dc_req_addr,
  input  logic [63:0]           dc_req_wdata,
  output logic                  dc_resp_valid,
  output logic [63:0]           dc_resp_rdata,
  output logic                  dc_resp_err,
  output logic                  dc_l2_req_valid,
  output logic                  dc_l2_req_we,
  output logic [DC_LADDR-1:0]   dc_l2_req_addr,
  output logic [511:0]          dc_l2_req_wdata,
  output logic [7:0]            dc_l2_req_wmask,
  input  logic                  dc_l2_resp_valid,
  input  logic [511:0]          dc_l2_resp_rdata,
  output prot_level_e           dc_level,
  output logic                  dc_upgrade,
  output logic                  dc_downgrade,
  output logic                  dc_win_done,
  output logic [15:0]           dc_win_errs,
  output dc_events_t            dc_ev,
  input  logic                  dc_inj_valid,
  input  logic                  dc_inj_tag,
  input  logic [DC_SET_W-1:0]   dc_inj_set,
  input  logic                  dc_inj_way,
  input  logic [2:0]            dc_inj_word,
  input  logic [5:0]            dc_inj_bit,
  input  logic                  dc_tb_inj_valid,
  input  logic [DC_TBI_W-1:0]   dc_tb_inj_idx,
  input  logic [DC_TBB_W-1:0]   dc_tb_inj_bit,
  // ---------------- instruction cache ----------------
  input  logic                  ic_req_valid,
  output logic                  ic_req_ready,
  input  logic [IC_CADDR-1:0]   ic_req_addr,
  output logic                  ic_resp_valid,
  output logic [31:0]           ic_resp_instr,
  output logic                  ic_l2_req_valid,
  output logic [IC_LADDR-1:0]   ic_l2_req_addr,
  input  logic                  ic_l2_resp_valid,
  input  logic [511:0]          ic_l2_resp_rdata,
  output logic                  ic_ev_hit,
  output logic                  ic_ev_miss,
  output logic                  ic_ev_scrub,
  output logic                  ic_ev_inval,
  input  logic                  ic_inj_valid,
  input  logic [IC_SET_W-1:0]   ic_inj_set,
  input  logic                  ic_inj_way,
  input  logic [3:0]            ic_inj_word,
  input  logic [4:0]            ic_inj_bit,
  // ---------------- register file ----------------
  input  logic [RF_LANES-1:0]   rf_res_valid,
  input  logic [RF_IDX_W-1:0]   rf_res_dest  [RF_LANES],
  input  logic [63:0]           rf_res_value [RF_LANES],
  output logic [RF_LANES-1:0]   rf_wr_dup,
  input  logic [RF_NRD-1:0]     rf_rd_valid,
  input  logic [RF_IDX_W-1:0]   rf_rd_idx [RF_NRD],
  output logic [63:0]           rf_rd_operand [RF_NRD],
  output logic [RF_NRD-1:0]     rf_rd_ok,
  output logic [RF_NRD-1:0]     rf_rd_dup,
  output logic [RF_NRD-1:0]     rf_rd_det,
  output logic [RF_NRD-1:0]     rf_rd_rec,
  output logic [RF_NRD-1:0]     rf_rd_bypass,
  output logic                  rf_stall,
  output logic                  rf_exception,
  input  logic                  rf_inj_rf_valid,
  input  logic [RF_IDX_W-1:0]   rf_inj_rf_idx,
  input  logic [6:0]            rf_inj_rf_bit,
  input  logic                  rf_inj_bus_valid,
  input  logic [RF_LN_W-1:0]    rf_inj_bus_lane,
  input  logic [6:0]            rf_inj_bus_bit
);

  sa_rdc #(
    .SETS(DC_SETS), .LINE_WORDS(8), .TAG_W(TAG_W), .TB_ENTRIES(DC_TB_ENTRIES),
    .DECAY_GLOBAL_W(DC_DECAY_W), .WINDOW(DC_WINDOW)
  ) u_dcache (
    .clk, .rst_n,
    .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req_we(dc_req_we),
    .req_addr(dc_req_addr), .req_wdata(dc_req_wdata),
    .resp_valid(dc_resp_valid), .resp_rdata(dc_resp_rdata), .resp_err(dc_resp_err),
    .l2_req_valid(dc_l2_req_valid), .l2_req_we(dc_l2_req_we), .l2_req_addr(dc_l2_req_addr),
    .l2_req_wdata(dc_l2_req_wdata), .l2_req_wmask(dc_l2_req_wmask),
    .l2_resp_valid(dc_l2_resp_valid), .l2_resp_rdata(dc_l2_resp_rdata),
    .level(dc_level), .upgrade(dc_upgrade), .downgrade(dc_downgrade),
    .win_done(dc_win_done), .win_errs(dc_win_errs), .ev(dc_ev),
    .inj_valid(dc_inj_valid), .inj_tag(dc_inj_tag), .inj_set(dc_inj_set),
    .inj_way(dc_inj_way), .inj_word(dc_inj_word), .inj_bit(dc_inj_bit),
    .tb_inj_valid(dc_tb_inj_valid), .tb_inj_idx(dc_tb_inj_idx), .tb_inj_bit(dc_tb_inj_bit)
  );

  icache_cs_cci #(
    .SETS(IC_SETS), .LINE_INSTR(16), .TAG_W(TAG_W), .TICK_LOG2(IC_TICK_LOG2), .SCRUBS(3)
  ) u_icache (
    .clk, .rst_n,
    .req_valid(ic_req_valid), .req_ready(ic_req_ready), .req_addr(ic_req_addr),
    .resp_valid(ic_resp_valid), .resp_instr(ic_resp_instr),
    .l2_req_valid(ic_l2_req_valid), .l2_req_addr(ic_l2_req_addr),
    .l2_resp_valid(ic_l2_resp_valid), .l2_resp_rdata(ic_l2_resp_rdata),
    .ev_hit(ic_ev_hit), .ev_miss(ic_ev_miss), .ev_scrub(ic_ev_scrub), .ev_inval(ic_ev_inval),
    .inj_valid(ic_inj_valid), .inj_set(ic_inj_set), .inj_way(ic_inj_way),
    .inj_word(ic_inj_word), .inj_bit(ic_inj_bit)
  );

  ird_datapath #(.NREGS(RF_NREGS), .LANES(RF_LANES)) u_rf (
    .clk, .rst_n,
    .res_valid(rf_res_valid), .res_dest(rf_res_dest), .res_value(rf_res_value),
    .wr_dup(rf_wr_dup),
    .rd_valid(rf_rd_valid), .rd_idx(rf_rd_idx), .rd_operand(rf_rd_operand),
    .rd_ok(rf_rd_ok), .rd_dup(rf_rd_dup), .rd_det(rf_rd_det), .rd_rec(rf_rd_rec),
    .rd_bypass(rf_rd_bypass), .stall(rf_stall), .exception(rf_exception),
    .inj_rf_valid(rf_inj_rf_valid), .inj_rf_idx(rf_inj_rf_idx), .inj_rf_bit(rf_inj_rf_bit),
    .inj_bus_valid(rf_inj_bus_valid), .inj_bus_lane(rf_inj_bus_lane), .inj_bus_bit(rf_inj_bus_bit)
  );

endmodule
