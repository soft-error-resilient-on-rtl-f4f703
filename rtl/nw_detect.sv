// nw_detect: narrow-width detection and in-register duplication at the output
// of a functional unit.
//
// A 64-bit result is classified into one of three narrow forms or as regular:
//   32-bit positive : bits 63..31 all zero        -> flag n1n0 = 01
//   32-bit negative : bits 63..31 all one         -> flag n1n0 = 01
//   34-bit address  : bits 63..34 zero, 33..32=01 -> flag n1n0 = 11
//   anything else   : regular                     -> flag n1n0 = 00
// For a narrow result the low 32-bit half is copied into the high half, so
// the value travels over the result bus and the bypass network and sits in the
// register file as two identical copies; the flag says how to rebuild the
// full value (sign extension, or the fixed 01 in bits 33..32 of an address).
// Regular results pass unchanged. Purely combinational.
//
// The three value forms, the 2-bit flag and copying the low half into the
// high half follow the described design. The flag encoding (n0 = "duplicated",
// n1 = "address") and detecting the forms from the result bits themselves,
// rather than from signals inside the functional unit's leading-zero/one
// logic, are choices of this implementation.
module nw_detect import ser_pkg::*; (
  input  logic [RV_W-1:0] value,
  output rf_word_t        word,
  output logic            narrow
);

  logic pos32, neg32, addr34;

  always_comb begin
    pos32  = (value[63:31] == '0);
    neg32  = (value[63:31] == '1);
    addr34 = (value[63:34] == '0) && (value[33:32] == 2'b01);
    narrow = pos32 || neg32 || addr34;
    if (pos32 || neg32) word.flag = NW_SIGNED;
    else if (addr34)    word.flag = NW_ADDR34;
    else                word.flag = NW_REGULAR;
    word.data = narrow ? {value[31:0], value[31:0]} : value;
  end

endmodule
