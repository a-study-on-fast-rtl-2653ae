// fppt_set_lookup: hit check, fast-partition address and replacement choice
// for one row (set) of the fast partition page table (FPPT).
//
// Purely combinational. Given the row read for the FPPT index of a slow
// partition address and that address's 7-bit tag, a way hits when its entry
// is valid and its stored tag equals the tag; the fast frame number of a hit
// is index * FP_WAYS + way. On a miss the victim is the lowest-numbered
// invalid way, else the lowest-numbered way whose recently-used bit is clear.
// When way0_reserved is set (Fast-FPPT, a set whose way-0 page holds the
// FPPT itself) way 0 is never a hit or a victim.
//
// Two updated rows are offered to the caller:
//   row_hit  : the row after a hit (used bit set, dirty bit set on a write)
//   row_fill : the row after the victim way is given to the new tag, with
//              its pending-replace bit set and dirty = is_write
// The recently-used bits work as in "bit-PLRU": a touch sets the way's bit
// and, when that would set the bits of all usable ways, clears the others.
// Entry fields, the index*ways+way address and four LRU bits per row follow
// the published FPPT layout; the LRU encoding and victim order are this
// design's choices.
module fppt_set_lookup
  import dta_pkg::*;
(
  input  fppt_row_t                 row,
  input  logic [FPPT_TAG_W-1:0]     tag,
  input  logic [FPPT_IDX_W-1:0]     index,
  input  logic                      way0_reserved,
  input  logic                      is_write,
  output logic                      hit,
  output logic                      hit_pending,
  output logic [FP_WAY_W-1:0]       hit_way,
  output logic [FPFN_W-1:0]         hit_ffn,
  output logic [FP_WAY_W-1:0]       victim_way,
  output fppt_pte_t                 victim_pte,
  output logic [FPFN_W-1:0]         victim_ffn,
  output fppt_row_t                 row_hit,
  output fppt_row_t                 row_fill
);
  logic [FP_WAYS-1:0] usable;

  function automatic logic [FP_WAYS-1:0] touch(input logic [FP_WAYS-1:0] lru,
                                               input logic [FP_WAY_W-1:0] way,
                                               input logic [FP_WAYS-1:0] mask);
    logic [FP_WAYS-1:0] n;
    n = lru | (FP_WAYS'(1) << way);
    if ((n & mask) == mask) n = FP_WAYS'(1) << way;
    return n;
  endfunction

  always_comb begin
    logic found;
    usable = {FP_WAYS{1'b1}};
    if (way0_reserved) usable[0] = 1'b0;

    hit         = 1'b0;
    hit_pending = 1'b0;
    hit_way     = '0;
    for (int w = 0; w < FP_WAYS; w++) begin
      if (usable[w] && row.pte[w].valid && row.pte[w].tag == tag) begin
        hit         = 1'b1;
        hit_pending = row.pte[w].pending;
        hit_way     = FP_WAY_W'(w);
      end
    end
    hit_ffn = {index, hit_way};

    // victim: first invalid usable way, else first usable way not recently used
    found      = 1'b0;
    victim_way = way0_reserved ? FP_WAY_W'(1) : '0;
    for (int w = 0; w < FP_WAYS; w++) begin
      if (!found && usable[w] && !row.pte[w].valid) begin
        found      = 1'b1;
        victim_way = FP_WAY_W'(w);
      end
    end
    for (int w = 0; w < FP_WAYS; w++) begin
      if (!found && usable[w] && !row.lru[w]) begin
        found      = 1'b1;
        victim_way = FP_WAY_W'(w);
      end
    end
    victim_pte = row.pte[victim_way];
    victim_ffn = {index, victim_way};

    row_hit     = row;
    row_hit.lru = touch(row.lru, hit_way, usable);
    if (is_write) row_hit.pte[hit_way].dirty = 1'b1;

    row_fill                 = row;
    row_fill.lru             = touch(row.lru, victim_way, usable);
    row_fill.pte[victim_way] = '{valid: 1'b1, dirty: is_write, pending: 1'b1, tag: tag};
  end

endmodule
