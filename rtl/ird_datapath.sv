// ird_datapath: register-file datapath with in-register duplication (IRD)
// and parity coding.
//
// Result side, per lane (LANES results per cycle):
//   cycle t   : the functional-unit result enters; nw_detect classifies it and
//               duplicates a narrow value into both halves; the word is latched
//               in the result pipeline register.
//   cycle t+1 : the word travels over the result bus into the register file
//               (WB) and, in parallel, the parity-encode step (P_Enc) computes
//               its two parity bits {p_hi, p_lo}.
//   cycle t+2 : the parity bits are written into the parity register (P_Wr).
// Operand side, per read port (2 per lane): the operand comes from
//   * the bypass network, if a result for that register is on the result bus
//     this cycle; its parity bits are generated alongside (P_Enc) from the
//     pipeline register, so a bit flipped on the bus wires is caught;
//   * the register file with parity from the P_Enc stage, if the parity bits
//     are not yet in the parity register;
//   * otherwise the register file and the parity register.
// ird_operand_check then checks it in the first execute cycle. A narrow value
// whose low half fails while its copy passes raises `stall`: the operands of
// this cycle are not valid, the register-file entry is repaired from its copy
// (when the operand came from the register file), and the instruction must be
// re-issued in the next cycle with the same read requests (replay). An error
// with no good copy raises `exception` for the operating system.
// `wr_dup`/`rd_dup` flag results written and operands read with a duplicate
// (the WWD and RWD events), `rd_det`/`rd_rec` detections and recoveries.
// `inj_rf_*` flips a stored bit; `inj_bus_*` flips a wire of a result bus
// lane for one cycle (the value written into the register file and bypassed).
//
// Following the described design: duplication at the functional-unit output,
// the 2-bit flag, parity per half (with the flag), a separate parity register
// written one stage later, bypassing of parity bits to the check, checking
// overlapped with execute, a stall plus copy-back plus replay on recovery and
// an exception otherwise. The 128 integer registers and 8 result lanes are the
// evaluated machine's; two read ports per lane, the exact pipeline timing, and
// repairing the entry only for operands read from the register file are
// choices of this implementation.
module ird_datapath import ser_pkg::*; #(
  parameter int unsigned NREGS = 128,
  parameter int unsigned LANES = 8,
  parameter bit DUP_COMPARE    = 1'b0,
  localparam int unsigned NRD   = 2 * LANES,
  localparam int unsigned IDX_W = $clog2(NREGS),
  localparam int unsigned LN_W  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // functional-unit results
  input  logic [LANES-1:0] res_valid,
  input  logic [IDX_W-1:0] res_dest  [LANES],
  input  logic [RV_W-1:0]  res_value [LANES],
  output logic [LANES-1:0] wr_dup,
  // operand reads
  input  logic [NRD-1:0]   rd_valid,
  input  logic [IDX_W-1:0] rd_idx [NRD],
  output logic [RV_W-1:0]  rd_operand [NRD],
  output logic [NRD-1:0]   rd_ok,          // operand usable this cycle
  output logic [NRD-1:0]   rd_dup,
  output logic [NRD-1:0]   rd_det,
  output logic [NRD-1:0]   rd_rec,
  output logic [NRD-1:0]   rd_bypass,      // operand came from the result bus
  output logic             stall,
  output logic             exception,
  // fault injection
  input  logic             inj_rf_valid,
  input  logic [IDX_W-1:0] inj_rf_idx,
  input  logic [6:0]       inj_rf_bit,
  input  logic             inj_bus_valid,
  input  logic [LN_W-1:0]  inj_bus_lane,
  input  logic [6:0]       inj_bus_bit
);

  // ---------------- result side ----------------
  rf_word_t         det_word [LANES];
  logic [LANES-1:0] det_narrow;

  for (genvar l = 0; l < LANES; l++) begin : g_det
    nw_detect u_nw (.value(res_value[l]), .word(det_word[l]), .narrow(det_narrow[l]));
  end
  assign wr_dup = res_valid & det_narrow;

  // result pipeline register (end of execute)
  logic [LANES-1:0] rb_v;
  logic [IDX_W-1:0] rb_dest [LANES];
  rf_word_t         rb_word [LANES];
  // P_Enc pipeline register
  logic [LANES-1:0] pe_v;
  logic [IDX_W-1:0] pe_dest [LANES];
  logic [1:0]       pe_par  [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_v <= '0;
      pe_v <= '0;
      for (int l = 0; l < LANES; l++) begin
        rb_dest[l] <= '0;
        rb_word[l] <= '0;
        pe_dest[l] <= '0;
        pe_par[l]  <= '0;
      end
    end else begin
      rb_v <= res_valid;
      pe_v <= rb_v;
      for (int l = 0; l < LANES; l++) begin
        rb_dest[l] <= res_dest[l];
        rb_word[l] <= det_word[l];
        pe_dest[l] <= rb_dest[l];
        pe_par[l]  <= rf_parity(rb_word[l]);
      end
    end
  end

  // the result bus: the latched word, possibly with a flipped wire
  rf_word_t bus_word [LANES];
  always_comb
    for (int l = 0; l < LANES; l++) begin
      bus_word[l] = rb_word[l];
      if (inj_bus_valid && inj_bus_lane == LN_W'(l) && inj_bus_bit < 7'd66)
        bus_word[l][inj_bus_bit] = ~rb_word[l][inj_bus_bit];
    end

  // ---------------- register file ----------------
  rf_word_t         rf_rd_data [NRD];
  logic [1:0]       rf_rd_par  [NRD];
  logic [NRD-1:0]   rep_en;
  logic             rep_plo    [NRD];
  logic [1:0]       pw_par_w   [LANES];

  always_comb for (int l = 0; l < LANES; l++) pw_par_w[l] = pe_par[l];

  ird_regfile #(.NREGS(NREGS), .NWR(LANES), .NRD(NRD)) u_rf (
    .clk, .rst_n,
    .wr_en(rb_v), .wr_idx(rb_dest), .wr_data(bus_word),
    .pw_en(pe_v), .pw_idx(pe_dest), .pw_par(pw_par_w),
    .rep_en, .rep_idx(rd_idx), .rep_plo,
    .rd_idx, .rd_data(rf_rd_data), .rd_par(rf_rd_par),
    .inj_valid(inj_rf_valid), .inj_idx(inj_rf_idx), .inj_bit(inj_rf_bit)
  );

  // ---------------- operand side ----------------
  rf_word_t       op_word [NRD];
  logic [1:0]     op_par  [NRD];
  logic [NRD-1:0] from_rf, c_exc;
  rf_word_t       c_rep   [NRD];   // repaired words (the file repairs itself in place)

  always_comb
    for (int k = 0; k < NRD; k++) begin
      op_word[k]   = rf_rd_data[k];
      op_par[k]    = rf_rd_par[k];
      from_rf[k]   = 1'b1;
      rd_bypass[k] = 1'b0;
      for (int l = 0; l < LANES; l++)
        if (pe_v[l] && pe_dest[l] == rd_idx[k]) op_par[k] = pe_par[l];
      for (int l = 0; l < LANES; l++)
        if (rb_v[l] && rb_dest[l] == rd_idx[k]) begin
          op_word[k]   = bus_word[l];
          op_par[k]    = rf_parity(rb_word[l]);
          from_rf[k]   = 1'b0;
          rd_bypass[k] = 1'b1;
        end
    end

  for (genvar k = 0; k < NRD; k++) begin : g_chk
    logic det, rec, exc, nar;
    ird_operand_check #(.DUP_COMPARE(DUP_COMPARE)) u_chk (
      .word(op_word[k]), .par(op_par[k]), .operand(rd_operand[k]),
      .is_narrow(nar), .detected(det), .recover(rec), .exception(exc),
      .repaired(c_rep[k])
    );
    assign rd_dup[k]  = rd_valid[k] && nar;
    assign rd_det[k]  = rd_valid[k] && det;
    assign rd_rec[k]  = rd_valid[k] && rec;
    assign c_exc[k]   = rd_valid[k] && exc;
    assign rep_en[k]  = rd_rec[k] && from_rf[k];
    assign rep_plo[k] = op_par[k][1];
  end

  assign stall     = |rd_rec;
  assign exception = |c_exc;
  assign rd_ok     = rd_valid & ~rd_rec & ~c_exc & {NRD{!stall}};

  // renaming never gives two results of one cycle the same destination
  for (genvar a = 0; a < LANES; a++) begin : g_uniq
    for (genvar b = a + 1; b < LANES; b++) begin : g_pair
      a_dest: assert property (@(posedge clk) disable iff (!rst_n)
        !(res_valid[a] && res_valid[b] && res_dest[a] == res_dest[b]));
    end
  end

endmodule
