// core_mmu: one processor's two-level DT-TLB and its miss/access sequencer.
//
// Every processor request carries a virtual address. The sequencer
//   1. looks the page up in the level-1 DT-TLB (L1_LAT clocks) and, on a
//      miss, in the level-2 DT-TLB (L2_LAT more clocks); a level-2 hit is
//      copied into level 1;
//   2. on a miss in both, asks the page-table walker (ptw_*) for the slow
//      partition frame, then asks the FPPT manager (FP_QUERY) whether that
//      page is already in the fast partition: a hit installs the entry with
//      L-flag 1 and the fast frame, a miss with L-flag 0 and the slow frame
//      (DT-TLB miss and update);
//   3. if the request is a last-level-cache miss (req_llc_miss), accesses
//      memory: with L-flag 1 it goes straight to the fast partition without
//      touching the FPPT; with L-flag 0 it asks the manager to check the FPPT
//      and upload the page (FP_UPLOAD), raises the L-flag in both DT-TLB
//      levels, and then accesses the fast partition (DT-TLB hit, cache miss).
//      A request that is not an LLC miss ends after translation.
// The DT-TLBs also take the manager's eviction search (srch_*). If a search
// names the fast frame this core is about to use before its memory command
// has been accepted, the core withdraws the command and restarts the request
// from step 1.
// Interfaces: processor req/rsp (valid/ready in, one-cycle rsp_valid out);
// ptw_req_valid held until a one-cycle ptw_rsp_valid; fp_req valid/ready and
// a one-cycle fp_rsp_valid; memory command valid/ready, and mem_rsp_valid is
// a response addressed to this core.
// The flows follow the published DT-TLB management; the sequencing, the
// restart rule and the 64-bit word access are this design's choices.
module core_mmu
  import dta_pkg::*;
#(
  parameter int unsigned CORE_ID    = 0,
  parameter int unsigned L1_ENTRIES = 64,
  parameter int unsigned L1_WAYS    = 8,
  parameter int unsigned L1_LAT     = 1,
  parameter int unsigned L2_ENTRIES = 512,
  parameter int unsigned L2_WAYS    = 32,
  parameter int unsigned L2_LAT     = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [VA_W-1:0]     req_vaddr,
  input  logic                req_write,
  input  logic [63:0]         req_wdata,
  input  logic                req_llc_miss,
  output logic                rsp_valid,
  output logic [63:0]         rsp_rdata,
  output logic                rsp_lflag,
  output logic [FRAME_W-1:0]  rsp_frame,
  // page-table walker
  output logic                ptw_req_valid,
  output logic [VPN_W-1:0]    ptw_vpn,
  input  logic                ptw_rsp_valid,
  input  logic [SPFN_W-1:0]   ptw_sfn,
  // FPPT manager
  output logic                fp_req_valid,
  input  logic                fp_req_ready,
  output fppt_op_e            fp_op,
  output logic [SPFN_W-1:0]   fp_sfn,
  output logic                fp_write,
  input  logic                fp_rsp_valid,
  input  logic                fp_rsp_hit,
  input  logic [FPFN_W-1:0]   fp_rsp_ffn,
  // eviction search broadcast
  input  logic                srch_en,
  input  logic [FRAME_W-1:0]  srch_frame,
  input  logic [FRAME_W-1:0]  srch_new_frame,
  // memory
  output logic                mem_cmd_valid,
  input  logic                mem_cmd_ready,
  output mem_cmd_t            mem_cmd,
  input  logic                mem_rsp_valid,
  input  mem_rsp_t            mem_rsp,
  // events
  output logic                ev_l1_hit,
  output logic                ev_l2_hit,
  output logic                ev_tlb_miss,
  output logic                ev_fast_direct,
  output logic                ev_restart
);
  typedef enum logic [3:0] {
    S_IDLE, S_L1, S_L2, S_PTW, S_FPQ, S_FPQ_W, S_FILL, S_DECIDE,
    S_FPU, S_FPU_W, S_MEM, S_MEM_W, S_RSP
  } state_e;

  state_e             state;
  logic [7:0]         cnt;
  logic [VA_W-1:0]    va_q;
  logic               wr_q, llc_q;
  logic [63:0]        wdata_q, rdata_q;
  logic               lflag_q;
  logic [FRAME_W-1:0] frame_q;
  logic               fill_l2_q;

  logic [VPN_W-1:0] vpn;
  assign vpn = va_q[VA_W-1:PAGE_OFS_W];

  // ---------------- DT-TLBs ----------------
  logic               l1_hit, l1_lflag, l2_hit, l2_lflag, l1_fill, l2_fill;
  logic [FRAME_W-1:0] l1_frame, l2_frame;
  logic               l1_srch_hit, l2_srch_hit;

  dt_tlb #(.ENTRIES(L1_ENTRIES), .WAYS(L1_WAYS)) u_tlb1 (
    .clk, .rst_n,
    .lk_vpn(vpn), .lk_hit(l1_hit), .lk_lflag(l1_lflag), .lk_frame(l1_frame),
    .fill_en(l1_fill), .fill_vpn(vpn), .fill_lflag(lflag_q), .fill_frame(frame_q),
    .srch_en, .srch_frame, .srch_new_frame, .srch_hit(l1_srch_hit)
  );
  dt_tlb #(.ENTRIES(L2_ENTRIES), .WAYS(L2_WAYS)) u_tlb2 (
    .clk, .rst_n,
    .lk_vpn(vpn), .lk_hit(l2_hit), .lk_lflag(l2_lflag), .lk_frame(l2_frame),
    .fill_en(l2_fill), .fill_vpn(vpn), .fill_lflag(lflag_q), .fill_frame(frame_q),
    .srch_en, .srch_frame, .srch_new_frame, .srch_hit(l2_srch_hit)
  );

  assign l1_fill = (state == S_FILL);
  assign l2_fill = (state == S_FILL) && fill_l2_q;

  // the frame this core holds is being evicted (before its command is taken)
  logic lost_frame;
  assign lost_frame = srch_en && lflag_q && srch_frame == frame_q &&
                      (state == S_FILL || state == S_DECIDE || state == S_MEM);

  // ---------------- outputs ----------------
  assign req_ready     = (state == S_IDLE);
  assign ptw_req_valid = (state == S_PTW);
  assign ptw_vpn       = vpn;
  assign fp_req_valid  = (state == S_FPQ) || (state == S_FPU);
  assign fp_op         = (state == S_FPU) ? FP_UPLOAD : FP_QUERY;
  assign fp_sfn        = SPFN_W'(frame_q);
  assign fp_write      = wr_q;

  always_comb begin
    mem_cmd       = '0;
    mem_cmd.src   = SRC_W'(CORE_ID);
    mem_cmd.op    = wr_q ? MEM_WR : MEM_RD;
    mem_cmd.dimm  = fast_dimm(FPFN_W'(frame_q));
    mem_cmd.page  = frame_q[DIMM_PAGE_W-1:0];
    mem_cmd.word  = va_q[PAGE_OFS_W-1:3];
    mem_cmd.wdata = wdata_q;
  end
  assign mem_cmd_valid = (state == S_MEM) && !lost_frame;

  assign rsp_valid = (state == S_RSP);
  assign rsp_rdata = rdata_q;
  assign rsp_lflag = lflag_q;
  assign rsp_frame = frame_q;

  assign ev_l1_hit      = (state == S_L1) && cnt == 0 && !srch_en && l1_hit;
  assign ev_l2_hit      = (state == S_L2) && cnt == 0 && !srch_en && l2_hit;
  assign ev_tlb_miss    = (state == S_L2) && cnt == 0 && !srch_en && !l2_hit;
  assign ev_fast_direct = (state == S_DECIDE) && llc_q && lflag_q && !lost_frame;
  assign ev_restart     = lost_frame;

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      va_q      <= '0;
      wr_q      <= 1'b0;
      llc_q     <= 1'b0;
      wdata_q   <= '0;
      rdata_q   <= '0;
      lflag_q   <= 1'b0;
      frame_q   <= '0;
      fill_l2_q <= 1'b0;
    end else if (lost_frame) begin
      state <= S_L1;
      cnt   <= 8'(L1_LAT - 1);
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          va_q    <= req_vaddr;
          wr_q    <= req_write;
          wdata_q <= req_wdata;
          llc_q   <= req_llc_miss;
          lflag_q <= 1'b0;
          state   <= S_L1;
          cnt     <= 8'(L1_LAT - 1);
        end
        S_L1: begin
          if (cnt != 0) cnt <= cnt - 1;
          else if (srch_en) cnt <= '0;             // look again after a search
          else if (l1_hit) begin
            lflag_q <= l1_lflag;
            frame_q <= l1_frame;
            state   <= S_DECIDE;
          end else begin
            state <= S_L2;
            cnt   <= 8'(L2_LAT - 1);
          end
        end
        S_L2: begin
          if (cnt != 0) cnt <= cnt - 1;
          else if (srch_en) cnt <= '0;
          else if (l2_hit) begin
            lflag_q   <= l2_lflag;
            frame_q   <= l2_frame;
            fill_l2_q <= 1'b0;
            state     <= S_FILL;
          end else state <= S_PTW;
        end
        S_PTW: if (ptw_rsp_valid) begin
          frame_q <= FRAME_W'(ptw_sfn);
          state   <= S_FPQ;
        end
        S_FPQ:   if (fp_req_ready) state <= S_FPQ_W;
        S_FPQ_W: if (fp_rsp_valid) begin
          lflag_q   <= fp_rsp_hit;
          if (fp_rsp_hit) frame_q <= FRAME_W'(fp_rsp_ffn);
          fill_l2_q <= 1'b1;
          state     <= S_FILL;
        end
        S_FILL: state <= S_DECIDE;
        S_DECIDE: begin
          if (!llc_q)       state <= S_RSP;
          else if (lflag_q) state <= S_MEM;
          else              state <= S_FPU;
        end
        S_FPU:   if (fp_req_ready) state <= S_FPU_W;
        S_FPU_W: if (fp_rsp_valid) begin
          lflag_q   <= 1'b1;
          frame_q   <= FRAME_W'(fp_rsp_ffn);
          fill_l2_q <= 1'b1;
          state     <= S_FILL;                     // raise the L-flag, then access
        end
        S_MEM:   if (mem_cmd_ready) state <= S_MEM_W;
        S_MEM_W: if (mem_rsp_valid) begin
          rdata_q <= mem_rsp.rdata;
          state   <= S_RSP;
        end
        S_RSP:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_fp_answer_hits: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FPU_W && fp_rsp_valid) |-> fp_rsp_hit);

endmodule
