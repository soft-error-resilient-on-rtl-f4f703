// ird_regfile: physical register file of the in-register-duplication scheme,
// with its separate parity register.
//
// NREGS entries of 64 data bits plus the 2-bit narrowness flag, and a
// separate bit-addressable parity register holding the two parity bits of
// every entry. Values and parity are written by different ports at different
// stages: a result is written to the data array one cycle before its parity,
// which is only ready after the parity-encode stage. Each read port returns an
// entry and its parity bits combinationally.
// Write ports: NWR result ports (`wr_*`), NWR parity ports (`pw_*`), and NRD
// repair ports (`rep_*`), one per read port, which overwrite the low half of
// an entry with its high-half copy and set its low parity bit to the given
// value (the high-half parity). Ports never
// target the same entry in one cycle except a parity port and a repair port,
// which then write the same value. `inj_*` flips one stored bit (0..63 data,
// 64..65 flag, 66..67 parity). All entries reset to zero with matching parity.
//
// The parity register separate from the data array, and its bit-level update,
// follow the described design; port counts, the repair ports and reset values
// are choices of this implementation.
module ird_regfile import ser_pkg::*; #(
  parameter int unsigned NREGS = 128,
  parameter int unsigned NWR   = 8,
  parameter int unsigned NRD   = 16,
  localparam int unsigned IDX_W = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NWR-1:0]   wr_en,
  input  logic [IDX_W-1:0] wr_idx  [NWR],
  input  rf_word_t         wr_data [NWR],
  input  logic [NWR-1:0]   pw_en,
  input  logic [IDX_W-1:0] pw_idx  [NWR],
  input  logic [1:0]       pw_par  [NWR],
  input  logic [NRD-1:0]   rep_en,
  input  logic [IDX_W-1:0] rep_idx [NRD],
  input  logic             rep_plo [NRD],   // new low parity bit (= high one)
  input  logic [IDX_W-1:0] rd_idx  [NRD],
  output rf_word_t         rd_data [NRD],
  output logic [1:0]       rd_par  [NRD],
  input  logic             inj_valid,
  input  logic [IDX_W-1:0] inj_idx,
  input  logic [6:0]       inj_bit
);

  rf_word_t   regs [NREGS];
  logic [1:0] pars [NREGS];

  always_comb
    for (int k = 0; k < NRD; k++) begin
      rd_data[k] = regs[rd_idx[k]];
      rd_par[k]  = pars[rd_idx[k]];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        regs[i] <= '0;
        pars[i] <= '0;
      end
    end else begin
      for (int l = 0; l < NWR; l++) begin
        if (wr_en[l]) regs[wr_idx[l]] <= wr_data[l];
        if (pw_en[l]) pars[pw_idx[l]] <= pw_par[l];
      end
      for (int k = 0; k < NRD; k++)
        if (rep_en[k]) begin
          regs[rep_idx[k]].data[31:0] <= regs[rep_idx[k]].data[63:32];
          pars[rep_idx[k]][0]         <= rep_plo[k];
        end
      if (inj_valid) begin
        if (inj_bit < 7'd66) regs[inj_idx][inj_bit] <= ~regs[inj_idx][inj_bit];
        else if (inj_bit < 7'd68) pars[inj_idx][inj_bit[0]] <= ~pars[inj_idx][inj_bit[0]];
      end
    end
  end

endmodule
