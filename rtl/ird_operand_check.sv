// ird_operand_check: parity check, error recovery and value restoration of one
// source operand at the input of a functional unit (the P_Chk step, which
// overlaps the first execute cycle).
//
// Inputs are a register-file word (two 32-bit halves plus the narrowness flag)
// and its two parity bits {p_hi, p_lo}, each covering one half and the flag.
//   * Narrow value (flag 01 or 11): only the low half is checked. If it
//     passes, the operand is rebuilt from the low half (sign extension, or
//     32'h1 above an address). If it fails and the high-half copy passes,
//     `recover` is raised and `repaired` holds the word with the high half
//     copied back into the low half; the operand is rebuilt from the high
//     half. If both fail, `exception` is raised.
//   * Regular value (flag 00, or the unused 10): both halves are checked; any
//     failure raises `exception`, as a regular value has no copy.
// `detected` is raised for any parity failure. With DUP_COMPARE set, a narrow
// value whose two copies differ although the low half passes its parity check
// (an even number of flips) is also reported, as an exception. Purely
// combinational.
//
// The check of the low half only, recovery from the high half, the exception
// when both fail, and the checks of regular values follow the described
// design; the optional copy comparison is the described multi-bit extension,
// off by default.
module ird_operand_check import ser_pkg::*; #(
  parameter bit DUP_COMPARE = 1'b0
) (
  input  rf_word_t        word,
  input  logic [1:0]      par,        // {p_hi, p_lo} as stored
  output logic [RV_W-1:0] operand,
  output logic            is_narrow,  // read with a duplicate
  output logic            detected,
  output logic            recover,
  output logic            exception,
  output rf_word_t        repaired
);

  function automatic logic [RV_W-1:0] rebuild(input nw_flag_e f, input logic [31:0] h);
    return (f == NW_ADDR34) ? {32'h0000_0001, h} : {{32{h[31]}}, h};
  endfunction

  logic lo_ok, hi_ok;

  always_comb begin
    lo_ok     = (^{word.flag, word.data[31:0]})  == par[0];
    hi_ok     = (^{word.flag, word.data[63:32]}) == par[1];
    is_narrow = (word.flag == NW_SIGNED) || (word.flag == NW_ADDR34);
    repaired  = word;
    repaired.data[31:0] = word.data[63:32];
    detected  = 1'b0;
    recover   = 1'b0;
    exception = 1'b0;
    operand   = word.data;
    if (is_narrow) begin
      operand = rebuild(word.flag, word.data[31:0]);
      if (!lo_ok) begin
        detected = 1'b1;
        if (hi_ok) begin
          recover = 1'b1;
          operand = rebuild(word.flag, word.data[63:32]);
        end else begin
          exception = 1'b1;
        end
      end else if (DUP_COMPARE && word.data[31:0] != word.data[63:32]) begin
        detected  = 1'b1;
        exception = 1'b1;
      end
    end else if (!lo_ok || !hi_ok) begin
      detected  = 1'b1;
      exception = 1'b1;
    end
  end

endmodule
