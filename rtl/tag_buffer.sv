// tag_buffer: the small buffer of a tag replication buffer (TRB) scheme.
//
// Each of the ENTRIES entries keeps a replica of one cache tag together with
// a pointer (set, way) to the original entry in the tag array. Tag and pointer
// each carry an even-parity bit. The pointer part is content addressable:
// `lk_*` searches all entries for a given (set, way) in the same cycle and
// returns the replica and whether its parity still checks. An entry whose
// pointer fails its parity check never matches.
//
// `ins_*` stores a new replica (`ins_valid` strobes it; the other `ins_*`
// inputs alone already drive the victim outputs). The entry used is chosen by FIFO+: a free
// entry if one exists (the one freed when the replica of an evicted line was
// dropped), otherwise the oldest entry, named by a FIFO head pointer. Before
// the insert takes effect `vic_*` tells the owner which valid replica, if any,
// is about to be displaced (with its replica, `vic_tag`), so that it can clear
// that line's copy bit and, in the early-write-back variant, write that dirty
// line back. `inv_*` drops the
// replica of a given (set, way). `inj_*` flips one stored bit, for fault
// injection. All updates happen at the clock edge; lookups are combinational.
//
// Entry contents, parity protection, the CAM pointer, and the FIFO / FIFO+
// policies follow the described design. Searching free entries lowest-first
// and letting an insert to an already replicated line overwrite that entry
// are choices of this implementation.
module tag_buffer #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned TAG_W   = 33,
  parameter int unsigned SET_W   = 9,
  parameter int unsigned WAY_W   = 1,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned PTR_W  = SET_W + WAY_W,
  localparam int unsigned BIT_W  = $clog2(TAG_W + PTR_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  // associative lookup by pointer
  input  logic [SET_W-1:0] lk_set,
  input  logic [WAY_W-1:0] lk_way,
  output logic             lk_hit,
  output logic [IDX_W-1:0] lk_idx,
  output logic [TAG_W-1:0] lk_tag,
  output logic             lk_tag_ok,
  // insert a replica
  input  logic             ins_valid,
  input  logic [SET_W-1:0] ins_set,
  input  logic [WAY_W-1:0] ins_way,
  input  logic [TAG_W-1:0] ins_tag,
  output logic             vic_valid,     // an insert of ins_* would displace this replica
  output logic [SET_W-1:0] vic_set,
  output logic [WAY_W-1:0] vic_way,
  output logic [TAG_W-1:0] vic_tag,       // replica held by the displaced entry
  output logic             vic_tag_ok,
  // drop a replica
  input  logic             inv_valid,
  input  logic [SET_W-1:0] inv_set,
  input  logic [WAY_W-1:0] inv_way,
  // fault injection
  input  logic             inj_valid,
  input  logic [IDX_W-1:0] inj_idx,
  input  logic [BIT_W-1:0] inj_bit,       // < TAG_W: tag bit, else pointer bit
  output logic [IDX_W:0]   occupancy
);

  logic [ENTRIES-1:0] valid;
  logic [TAG_W-1:0]   tag   [ENTRIES];
  logic               tpar  [ENTRIES];
  logic [PTR_W-1:0]   ptr   [ENTRIES];
  logic               ppar  [ENTRIES];
  logic [IDX_W-1:0]   head;

  // ---------------- CAM search ----------------
  function automatic logic [ENTRIES-1:0] cam(input logic [PTR_W-1:0] key,
                                              input logic [ENTRIES-1:0] v,
                                              input logic [PTR_W-1:0] p [ENTRIES],
                                              input logic pp [ENTRIES]);
    logic [ENTRIES-1:0] m;
    for (int i = 0; i < ENTRIES; i++)
      m[i] = v[i] && (p[i] == key) && ((^p[i]) == pp[i]);
    return m;
  endfunction

  logic [ENTRIES-1:0] lk_match, ins_match, inv_match;
  assign lk_match  = cam({lk_set,  lk_way},  valid, ptr, ppar);
  assign ins_match = cam({ins_set, ins_way}, valid, ptr, ppar);
  assign inv_match = cam({inv_set, inv_way}, valid, ptr, ppar);

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (lk_match[i]) begin
        lk_hit = 1'b1;
        lk_idx = IDX_W'(i);
      end
  end
  assign lk_tag    = tag[lk_idx];
  assign lk_tag_ok = lk_hit && ((^tag[lk_idx]) == tpar[lk_idx]);

  // ---------------- FIFO+ victim choice ----------------
  logic             have_free, have_dup;
  logic [IDX_W-1:0] free_idx, dup_idx, ins_idx;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    have_dup  = 1'b0;
    dup_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid[i])    begin have_free = 1'b1; free_idx = IDX_W'(i); end
      if (ins_match[i]) begin have_dup  = 1'b1; dup_idx  = IDX_W'(i); end
    end
    ins_idx = have_dup ? dup_idx : (have_free ? free_idx : head);
  end

  assign vic_valid = !have_dup && !have_free;
  assign {vic_set, vic_way} = ptr[head];
  assign vic_tag    = tag[head];
  assign vic_tag_ok = (^tag[head]) == tpar[head];

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < ENTRIES; i++) occupancy = occupancy + (IDX_W+1)'(valid[i]);
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      head  <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag[i]  <= '0;
        tpar[i] <= 1'b0;
        ptr[i]  <= '0;
        ppar[i] <= 1'b0;
      end
    end else begin
      if (inv_valid) valid <= valid & ~inv_match;
      if (ins_valid) begin
        valid[ins_idx] <= 1'b1;
        tag[ins_idx]   <= ins_tag;
        tpar[ins_idx]  <= ^ins_tag;
        ptr[ins_idx]   <= {ins_set, ins_way};
        ppar[ins_idx]  <= ^{ins_set, ins_way};
        if (!have_dup && !have_free) head <= head + 1'b1;
      end
      if (inj_valid) begin
        if (int'(inj_bit) < TAG_W) tag[inj_idx][inj_bit] <= ~tag[inj_idx][inj_bit];
        else                       ptr[inj_idx][int'(inj_bit) - TAG_W] <= ~ptr[inj_idx][int'(inj_bit) - TAG_W];
      end
    end
  end

endmodule
