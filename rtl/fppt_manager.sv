// fppt_manager: fast partition page table (FPPT) manager of the DIMM tree
// memory controller.
//
// Serves the cores' DT-TLB controllers one request at a time (round-robin):
//   FP_QUERY  (DT-TLB miss, new translation): read the FPPT row of the slow
//             frame and answer hit + fast frame, or miss. Nothing is moved.
//   FP_UPLOAD (DT-TLB hit with L-flag 0 and a last-level cache miss): read
//             the row; on a hit answer the fast frame; on a miss choose a
//             victim way and bring the slow page into the fast partition.
// Replacement of a valid victim (the evicted page):
//   1. broadcast a DT-TLB search (srch_*) for the victim's fast frame so
//      every DT-TLB entry still pointing at it falls back to L=0 and the
//      victim's slow frame {tag, index}; the search takes one cycle and runs
//      alongside the memory commands that follow,
//   2. write the row with the new entry marked pending-replace,
//   3. copy the victim back fast->slow (DIMM-to-DIMM move). Writes through a
//      DT-TLB entry with L-flag 1 go straight to the fast partition and never
//      reach the FPPT, so the entry's dirty bit (set only by writes that do
//      reach it) cannot prove a page clean: every valid victim is copied.
//   4. copy the requested page slow->fast (DIMM-to-DIMM move),
//   5. write the row again with pending-replace cleared, answer the core.
// A hit rewrites the row to update its LRU (and dirty) bits before answering.
// The FPPT row address comes from fppt_layout (MODE selects Fast-FPPT or
// Slow-FPPT), the hit/victim logic from fppt_set_lookup.
//
// Memory port: one command at a time on cmd_* (valid/ready), each answered by
// one mem_rsp_* beat (read data for MEM_RD, an acknowledge otherwise).
// Core port: req_* per core (valid/ready, held until ready); the answer is a
// one-cycle rsp_valid[core] with rsp_hit and rsp_ffn.
// ev_* pulse once per FPPT hit, miss, page upload, eviction and write-back.
// The order of steps follows the published management flow; the two-write
// use of the pending-replace bit and the single outstanding request are this
// design's choices.
module fppt_manager
  import dta_pkg::*;
#(
  parameter fppt_mode_e  MODE   = FAST_FPPT,
  parameter int unsigned NCORES = N_PROC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // requests from the cores
  input  logic [NCORES-1:0]          req_valid,
  output logic [NCORES-1:0]          req_ready,
  input  fppt_op_e                   req_op    [NCORES],
  input  logic [SPFN_W-1:0]          req_sfn   [NCORES],
  input  logic                       req_write [NCORES],
  output logic [NCORES-1:0]          rsp_valid,
  output logic                       rsp_hit,
  output logic [FPFN_W-1:0]          rsp_ffn,
  // DT-TLB search broadcast (eviction)
  output logic                       srch_en,
  output logic [FRAME_W-1:0]         srch_frame,
  output logic [FRAME_W-1:0]         srch_new_frame,
  // memory commands into the DIMM tree
  output logic                       cmd_valid,
  input  logic                       cmd_ready,
  output mem_cmd_t                   cmd,
  input  logic                       mem_rsp_valid,
  input  mem_rsp_t                   mem_rsp,
  // events
  output logic                       ev_hit,
  output logic                       ev_miss,
  output logic                       ev_upload,
  output logic                       ev_evict,
  output logic                       ev_writeback
);
  localparam int unsigned CID_W = (NCORES > 1) ? $clog2(NCORES) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_DEC, S_WR_PEND, S_WB, S_UP, S_WR_DONE, S_WR_HIT, S_WAIT, S_RSP
  } state_e;

  state_e              state, after_wait;
  logic [CID_W-1:0]    cid, rr_ptr;
  fppt_op_e            op_q;
  logic [SPFN_W-1:0]   sfn_q;
  logic                wr_q;
  fppt_row_t           row_q;
  logic                hit_q;
  logic [FPFN_W-1:0]   ffn_q;
  fppt_pte_t           vpte_q;
  logic [FP_WAY_W-1:0] vway_q;

  // ---------------- address of the row ----------------
  logic [FPPT_TAG_W-1:0] tag;
  logic [FPPT_IDX_W-1:0] index;
  logic                  row_in_fast, way0_reserved;
  logic [FRAME_W-1:0]    row_frame;
  logic [WORD_W-1:0]     row_word;
  assign tag   = sfn_q[SPFN_W-1:FPPT_IDX_W];
  assign index = sfn_q[FPPT_IDX_W-1:0];

  fppt_layout #(.MODE(MODE)) u_layout (
    .index, .row_in_fast, .row_frame, .row_word, .way0_reserved
  );

  logic [DIMM_ID_W-1:0]   row_dimm;
  logic [DIMM_PAGE_W-1:0] row_page;
  assign row_dimm = row_in_fast ? fast_dimm(FPFN_W'(row_frame)) : slow_dimm(SPFN_W'(row_frame));
  assign row_page = row_frame[DIMM_PAGE_W-1:0];

  // ---------------- hit / victim ----------------
  logic                hit, hit_pending;
  logic [FP_WAY_W-1:0] hit_way, victim_way;
  logic [FPFN_W-1:0]   hit_ffn, victim_ffn;
  fppt_pte_t           victim_pte;
  fppt_row_t           row_hit, row_fill;

  fppt_set_lookup u_lookup (
    .row(row_q), .tag, .index, .way0_reserved, .is_write(wr_q),
    .hit, .hit_pending, .hit_way, .hit_ffn, .victim_way, .victim_pte, .victim_ffn,
    .row_hit, .row_fill
  );

  // ---------------- arbitration ----------------
  logic             any_req;
  logic [CID_W-1:0] pick;
  always_comb begin
    logic done;
    any_req = 1'b0;
    pick    = '0;
    done    = 1'b0;
    for (int k = 0; k < NCORES; k++) begin
      int unsigned c;
      c = (32'(rr_ptr) + 32'(k)) % NCORES;
      if (!done && req_valid[c]) begin
        done    = 1'b1;
        any_req = 1'b1;
        pick    = CID_W'(c);
      end
    end
  end

  always_comb begin
    req_ready = '0;
    if (state == S_IDLE && any_req) req_ready[pick] = 1'b1;
  end

  // ---------------- memory commands ----------------
  always_comb begin
    cmd       = '0;
    cmd.src   = SRC_MGR;
    cmd_valid = 1'b0;
    unique case (state)
      S_RD: begin
        cmd_valid = 1'b1;
        cmd.op    = MEM_RD;
        cmd.dimm  = row_dimm;
        cmd.page  = row_page;
        cmd.word  = row_word;
      end
      S_WR_PEND, S_WR_DONE, S_WR_HIT: begin
        cmd_valid  = 1'b1;
        cmd.op     = MEM_WR;
        cmd.dimm   = row_dimm;
        cmd.page   = row_page;
        cmd.word   = row_word;
        cmd.wdata  = row_q;
      end
      S_WB: begin  // evicted page back to its slow frame {tag, index}
        cmd_valid    = 1'b1;
        cmd.op       = MEM_MOVE;
        cmd.dimm     = slow_dimm({vpte_q.tag, index});
        cmd.page     = DIMM_PAGE_W'({vpte_q.tag, index});
        cmd.src_dimm = fast_dimm(ffn_q);
        cmd.src_page = ffn_q[DIMM_PAGE_W-1:0];
      end
      S_UP: begin  // requested slow page into its fast frame
        cmd_valid    = 1'b1;
        cmd.op       = MEM_MOVE;
        cmd.dimm     = fast_dimm(ffn_q);
        cmd.page     = ffn_q[DIMM_PAGE_W-1:0];
        cmd.src_dimm = slow_dimm(sfn_q);
        cmd.src_page = sfn_q[DIMM_PAGE_W-1:0];
      end
      default: ;
    endcase
  end

  logic mem_done;
  assign mem_done = mem_rsp_valid && mem_rsp.src == SRC_MGR;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      after_wait <= S_IDLE;
      cid        <= '0;
      rr_ptr     <= '0;
      op_q       <= FP_QUERY;
      sfn_q      <= '0;
      wr_q       <= 1'b0;
      row_q      <= '0;
      hit_q      <= 1'b0;
      ffn_q      <= '0;
      vpte_q     <= '0;
      vway_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any_req) begin
          cid    <= pick;
          rr_ptr <= CID_W'((32'(pick) + 1) % NCORES);
          op_q   <= req_op[pick];
          sfn_q  <= req_sfn[pick];
          wr_q   <= req_write[pick];
          state  <= S_RD;
        end
        S_RD: if (cmd_ready) begin
          after_wait <= S_DEC;
          state      <= S_WAIT;
        end
        S_WAIT: if (mem_done) begin
          if (after_wait == S_DEC) row_q <= mem_rsp.rdata;
          state <= after_wait;
        end
        S_DEC: begin
          if (hit) begin
            hit_q <= 1'b1;
            ffn_q <= hit_ffn;
            row_q <= row_hit;
            state <= S_WR_HIT;
          end else if (op_q == FP_QUERY) begin
            hit_q <= 1'b0;
            ffn_q <= '0;
            state <= S_RSP;
          end else begin
            hit_q  <= 1'b1;
            ffn_q  <= victim_ffn;
            vpte_q <= victim_pte;
            vway_q <= victim_way;
            row_q  <= row_fill;
            state  <= S_WR_PEND;
          end
        end
        S_WR_PEND: if (cmd_ready) begin
          after_wait <= vpte_q.valid ? S_WB : S_UP;
          state      <= S_WAIT;
        end
        S_WB: if (cmd_ready) begin
          after_wait <= S_UP;
          state      <= S_WAIT;
        end
        S_UP: if (cmd_ready) begin
          row_q.pte[vway_q].pending <= 1'b0;
          after_wait <= S_WR_DONE;
          state      <= S_WAIT;
        end
        S_WR_DONE, S_WR_HIT: if (cmd_ready) begin
          after_wait <= S_RSP;
          state      <= S_WAIT;
        end
        S_RSP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp_valid = '0;
    if (state == S_RSP) rsp_valid[cid] = 1'b1;
  end
  assign rsp_hit = hit_q;
  assign rsp_ffn = ffn_q;

  // search on eviction: one cycle, in the decision cycle of a miss upload
  assign srch_en        = (state == S_DEC) && !hit && op_q == FP_UPLOAD && victim_pte.valid;
  assign srch_frame     = FRAME_W'(victim_ffn);
  assign srch_new_frame = FRAME_W'({victim_pte.tag, index});

  assign ev_hit       = (state == S_DEC) && hit;
  assign ev_miss      = (state == S_DEC) && !hit;
  assign ev_upload    = (state == S_UP) && cmd_ready;
  assign ev_evict     = srch_en;
  assign ev_writeback = (state == S_WB) && cmd_ready;

  // a pending entry can only be seen while its own replacement is running
  a_no_pending_hit: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DEC && hit) |-> !hit_pending);
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && !cmd_ready) |=> (cmd_valid && $stable(cmd)));

endmodule
