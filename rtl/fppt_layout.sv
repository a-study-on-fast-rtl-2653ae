// fppt_layout: where a row of the fast partition page table (FPPT) lives.
//
// The FPPT has one 8-byte row per FPPT index (2^20 rows, 8 MB = 2048 pages).
// Row i sits in FPPT page i/512, word i%512. The FPPT page is placed by the
// MODE parameter, the two remedies proposed against "FPPT squatting" (slow
// pages whose fast-partition slot would overlap the table):
//   FAST_FPPT : FPPT page p occupies way 0 of fast-partition set p, i.e. fast
//               frame p*4+0. Sets 0..2047 then lose way 0 for user pages, so
//               way0_reserved is raised for a lookup in those sets.
//   SLOW_FPPT : FPPT page p occupies slow frame SLOW_FPPT_BASE+p, the last
//               8 MB of the 320 GB slow partition, which the operating system
//               keeps out of its allocation; all four ways stay usable.
// Combinational. The placement in way 0 and in the slow partition follows
// the published proposal; the exact pages chosen are this design's choice.
module fppt_layout
  import dta_pkg::*;
#(
  parameter fppt_mode_e MODE = FAST_FPPT
) (
  input  logic [FPPT_IDX_W-1:0] index,
  output logic                  row_in_fast,    // 1: row_frame is a fast frame
  output logic [FRAME_W-1:0]    row_frame,
  output logic [WORD_W-1:0]     row_word,
  output logic                  way0_reserved   // way 0 of this set holds FPPT
);
  localparam int unsigned P_W = FPPT_IDX_W - FPPT_ROWS_PER_PAGE_W;  // 11

  logic [P_W-1:0] fppt_page;
  assign fppt_page = index[FPPT_IDX_W-1:FPPT_ROWS_PER_PAGE_W];
  assign row_word  = WORD_W'(index[FPPT_ROWS_PER_PAGE_W-1:0]);

  always_comb begin
    if (MODE == FAST_FPPT) begin
      row_in_fast   = 1'b1;
      row_frame     = FRAME_W'({FPPT_IDX_W'(fppt_page), FP_WAY_W'(0)});
      way0_reserved = (index < FPPT_IDX_W'(FPPT_PAGES));
    end else begin
      row_in_fast   = 1'b0;
      row_frame     = SLOW_FPPT_BASE + FRAME_W'(fppt_page);
      way0_reserved = 1'b0;
    end
  end

endmodule
