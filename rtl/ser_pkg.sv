// ser_pkg: types, sizes and small functions shared by the soft-error
// resilient memory structures (reliable L1 data cache, instruction cache with
// scrubbing, in-register-duplication register file).
//
// Cache geometry follows the evaluated processor: 64 KB, 2-way, 64-byte
// lines, 64-bit words, 33-bit tags (so a 48-bit physical byte address).
// Register values are 64-bit with a 2-bit narrowness flag.
//
// Parity convention (a design choice): even parity, i.e. the stored bit is
// the XOR of the protected bits, so a word and its parity bit XOR to zero.
package ser_pkg;

  // ---------------- cache geometry ----------------
  localparam int unsigned ADDR_W      = 48;   // byte address width
  localparam int unsigned WORD_W      = 64;   // cache data word
  localparam int unsigned WORD_BYTES  = WORD_W / 8;

  // Protection level of the self-adaptive data cache.
  typedef enum logic [1:0] {
    LVL_P           = 2'd0,   // byte parity only
    LVL_P_ICR       = 2'd1,   // + in-cache replication of dirty lines
    LVL_P_ICR_EWB   = 2'd2    // + early write-back / clean-line invalidation
  } prot_level_e;

  // One-cycle event pulses of the reliable data cache.
  typedef struct packed {
    logic hit;        // CPU access hit a primary line
    logic miss;       // CPU access missed
    logic fill;       // line brought in from L2
    logic writeback;  // dirty words written to L2 (any cause)
    logic tag_err;    // tag parity failure detected
    logic tag_fix;    // tag restored from its replica in the tag buffer
    logic tag_drop;   // clean line dropped because its tag failed
    logic data_err;   // data parity failure detected
    logic refetch;    // clean word repaired by re-reading the line from L2
    logic icr_fix;    // dirty word repaired from its in-cache replica
    logic icr_copy;   // in-cache replica written or refreshed
    logic due;        // detected but unrecoverable error
    logic ewb;        // early write-back of an idle dirty line
    logic cci;        // invalidation of an idle clean line
    logic trb_dup;    // tag copied into the tag buffer
    logic trb_ewb;    // write-back forced by a tag-buffer replacement
    logic zero_read;  // read answered from the zero (narrow) flag
  } dc_events_t;

  // ---------------- register file value ----------------
  localparam int unsigned RV_W = 64;

  // Narrowness flag n1n0.
  typedef enum logic [1:0] {
    NW_REGULAR = 2'b00,   // full 64-bit value, no duplicate
    NW_SIGNED  = 2'b01,   // value = sign extension of its low 32 bits
    NW_UNUSED  = 2'b10,   // never produced
    NW_ADDR34  = 2'b11    // 34-bit address: upper 32 bits are 32'h0000_0001
  } nw_flag_e;

  // A register-file entry: 64 data bits plus the narrowness flag.
  typedef struct packed {
    nw_flag_e          flag;
    logic [RV_W-1:0]   data;
  } rf_word_t;

  // Parity of one byte-lane vector: one bit per byte.
  function automatic logic [WORD_BYTES-1:0] byte_parity(input logic [WORD_W-1:0] w);
    logic [WORD_BYTES-1:0] p;
    for (int b = 0; b < WORD_BYTES; b++) p[b] = ^w[8*b +: 8];
    return p;
  endfunction

  // Parity bits of a register value: {upper half + flag, lower half + flag}.
  function automatic logic [1:0] rf_parity(input rf_word_t v);
    return {^{v.flag, v.data[63:32]}, ^{v.flag, v.data[31:0]}};
  endfunction

endpackage
