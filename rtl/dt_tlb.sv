// dt_tlb: one level of the DIMM tree TLB (DT-TLB).
//
// A set-associative TLB whose entries carry, besides the valid bit, tag and
// frame number, an L-flag: L=1 means the page is resident in the fast
// partition and the frame field holds its fast-partition frame number; L=0
// means the frame field holds the slow-partition (physical) frame number.
// The L-flag lets a hit go straight to the fast partition without reading the
// fast partition page table (FPPT).
//
// Ports
//   lookup : lk_vpn -> lk_hit / lk_lflag / lk_frame, combinational. The
//            instantiating logic accounts for the level's access latency.
//   fill   : fill_en writes {fill_lflag, fill_frame} for fill_vpn. An entry
//            already holding fill_vpn is updated in place (this is how an
//            L-flag is raised after a page upload); otherwise an invalid way,
//            or else the way named by the set's round-robin pointer, is used.
//   search : srch_en finds every valid entry with L=1 whose frame equals
//            srch_frame (the fast frame of a page evicted from the fast
//            partition) and rewrites it to L=0 with frame srch_new_frame (the
//            page's slow frame). srch_hit reports a match, combinationally.
//   Search and fill both take effect at the next clock edge; a fill of the
//   frame being searched is written already demoted to L=0.
// The entry format and the search on eviction follow the DT-TLB proposal;
// round-robin replacement and a fully parallel search are this design's
// choices.
module dt_tlb #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned WAYS    = 8,
  parameter int unsigned VPN_W   = dta_pkg::VPN_W,
  parameter int unsigned FRAME_W = dta_pkg::FRAME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic [VPN_W-1:0]   lk_vpn,
  output logic               lk_hit,
  output logic               lk_lflag,
  output logic [FRAME_W-1:0] lk_frame,
  // fill / update
  input  logic               fill_en,
  input  logic [VPN_W-1:0]   fill_vpn,
  input  logic               fill_lflag,
  input  logic [FRAME_W-1:0] fill_frame,
  // search on fast-partition eviction
  input  logic               srch_en,
  input  logic [FRAME_W-1:0] srch_frame,
  input  logic [FRAME_W-1:0] srch_new_frame,
  output logic               srch_hit
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = VPN_W - ((SETS > 1) ? $clog2(SETS) : 0);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic               v;
    logic               lflag;
    logic [TAG_W-1:0]   tag;
    logic [FRAME_W-1:0] frame;
  } entry_t;

  entry_t           tbl [SETS][WAYS];
  logic [WAY_W-1:0] rr  [SETS];

  function automatic logic [SET_W-1:0] set_of(input logic [VPN_W-1:0] vpn);
    return (SETS > 1) ? SET_W'(vpn % SETS) : '0;
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [VPN_W-1:0] vpn);
    return TAG_W'(vpn >> ((SETS > 1) ? $clog2(SETS) : 0));
  endfunction

  // ---------------- lookup ----------------
  always_comb begin
    logic [SET_W-1:0] s;
    s        = set_of(lk_vpn);
    lk_hit   = 1'b0;
    lk_lflag = 1'b0;
    lk_frame = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (tbl[s][w].v && tbl[s][w].tag == tag_of(lk_vpn)) begin
        lk_hit   = 1'b1;
        lk_lflag = tbl[s][w].lflag;
        lk_frame = tbl[s][w].frame;
      end
    end
  end

  // ---------------- fill way choice ----------------
  logic [SET_W-1:0] f_set;
  logic [WAY_W-1:0] f_way;
  logic             f_match;
  always_comb begin
    logic found_inv;
    f_set     = set_of(fill_vpn);
    f_way     = rr[f_set];
    f_match   = 1'b0;
    found_inv = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!tbl[f_set][w].v) begin
        found_inv = 1'b1;
        if (!f_match) f_way = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (tbl[f_set][w].v && tbl[f_set][w].tag == tag_of(fill_vpn)) begin
        f_match = 1'b1;
        f_way   = WAY_W'(w);
      end
    end
    if (!f_match && !found_inv) f_way = rr[f_set];
  end

  // ---------------- search ----------------
  always_comb begin
    srch_hit = 1'b0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++)
        if (tbl[s][w].v && tbl[s][w].lflag && tbl[s][w].frame == srch_frame)
          srch_hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) tbl[s][w] <= '0;
      end
    end else begin
      if (srch_en) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (tbl[s][w].v && tbl[s][w].lflag && tbl[s][w].frame == srch_frame) begin
              tbl[s][w].lflag <= 1'b0;
              tbl[s][w].frame <= srch_new_frame;
            end
      end
      if (fill_en) begin
        // a fill racing a search for the same fast frame lands already demoted
        if (srch_en && fill_lflag && fill_frame == srch_frame)
          tbl[f_set][f_way] <= '{v: 1'b1, lflag: 1'b0, tag: tag_of(fill_vpn),
                                 frame: srch_new_frame};
        else
          tbl[f_set][f_way] <= '{v: 1'b1, lflag: fill_lflag, tag: tag_of(fill_vpn),
                                 frame: fill_frame};
        if (!f_match)
          rr[f_set] <= (WAYS > 1) ? WAY_W'((32'(f_way) + 1) % WAYS) : '0;
      end
    end
  end

endmodule
