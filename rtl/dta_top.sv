// dta_top: memory management of a DIMM tree architecture (DTA) server with a
// partitioned DIMM tree: NCORES processors with two-level DT-TLBs, the fast
// partition page table (FPPT) manager and the DIMM tree.
//
// Structure
//   core_mmu[k]   DT-TLB1 + DT-TLB2 and the sequencer of processor k
//   fppt_manager  shared FPPT lookup, page upload/eviction, DT-TLB search
//   arbiter       round-robin merge of the cores' and the manager's memory
//                 commands onto the single controller channel
//   dimm_tree     controller router + 84 T-DIMM routers (4 fast, 80 slow)
// The manager's eviction search is broadcast to every core's DT-TLBs.
// Responses from the tree are steered by their source number (core k = k,
// manager = NCORES) and are always accepted.
// Outside this module: the processors and their caches (req_*/rsp_* per
// core, a request being an access that may or may not have missed the
// last-level cache), the operating system's page table (ptw_* per core)
// and the DRAM ranks of the T-DIMMs (rank_*).
// MODE picks Fast-FPPT (table in way 0 of the fast partition) or Slow-FPPT
// (table at the top of the slow partition).
// The block structure follows the modelled DTA system; the single command
// channel and its arbitration are this design's choices.
module dta_top
  import dta_pkg::*;
#(
  parameter fppt_mode_e  MODE       = FAST_FPPT,
  parameter int unsigned NCORES     = N_PROC,
  parameter int unsigned L1_ENTRIES = 64,
  parameter int unsigned L1_WAYS    = 8,
  parameter int unsigned L2_ENTRIES = 512,
  parameter int unsigned L2_WAYS    = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // processors
  input  logic [NCORES-1:0]   req_valid,
  output logic [NCORES-1:0]   req_ready,
  input  logic [VA_W-1:0]     req_vaddr    [NCORES],
  input  logic [NCORES-1:0]   req_write,
  input  logic [63:0]         req_wdata    [NCORES],
  input  logic [NCORES-1:0]   req_llc_miss,
  output logic [NCORES-1:0]   rsp_valid,
  output logic [63:0]         rsp_rdata    [NCORES],
  output logic [NCORES-1:0]   rsp_lflag,
  output logic [FRAME_W-1:0]  rsp_frame    [NCORES],
  // page-table walkers
  output logic [NCORES-1:0]   ptw_req_valid,
  output logic [VPN_W-1:0]    ptw_vpn      [NCORES],
  input  logic [NCORES-1:0]   ptw_rsp_valid,
  input  logic [SPFN_W-1:0]   ptw_sfn      [NCORES],
  // DRAM ranks of the T-DIMMs
  output logic [N_DIMMS-1:0]  rank_cmd_valid,
  input  logic [N_DIMMS-1:0]  rank_cmd_ready,
  output mem_cmd_t            rank_cmd     [N_DIMMS],
  input  logic [N_DIMMS-1:0]  rank_rsp_valid,
  output logic [N_DIMMS-1:0]  rank_rsp_ready,
  input  mem_rsp_t            rank_rsp     [N_DIMMS],
  // events, one pulse each
  output logic [NCORES-1:0]   ev_l1_hit,
  output logic [NCORES-1:0]   ev_l2_hit,
  output logic [NCORES-1:0]   ev_tlb_miss,
  output logic [NCORES-1:0]   ev_fast_direct,
  output logic [NCORES-1:0]   ev_restart,
  output logic                ev_fppt_hit,
  output logic                ev_fppt_miss,
  output logic                ev_upload,
  output logic                ev_evict,
  output logic                ev_writeback
);
  localparam int unsigned NSRC  = NCORES + 1;
  localparam int unsigned SPT_W = $clog2(NSRC);

  // ---------------- FPPT manager ----------------
  logic [NCORES-1:0]  fp_req_valid, fp_req_ready, fp_write, fp_rsp_valid;
  fppt_op_e           fp_op  [NCORES];
  logic [SPFN_W-1:0]  fp_sfn [NCORES];
  logic               fp_write_a [NCORES];
  logic               fp_rsp_hit;
  logic [FPFN_W-1:0]  fp_rsp_ffn;
  logic               srch_en;
  logic [FRAME_W-1:0] srch_frame, srch_new_frame;

  logic               src_valid [NSRC];
  logic               src_ready [NSRC];
  mem_cmd_t           src_cmd   [NSRC];
  logic               tree_rsp_valid;
  mem_rsp_t           tree_rsp;

  always_comb for (int k = 0; k < NCORES; k++) fp_write_a[k] = fp_write[k];

  fppt_manager #(.MODE(MODE), .NCORES(NCORES)) u_mgr (
    .clk, .rst_n,
    .req_valid(fp_req_valid), .req_ready(fp_req_ready), .req_op(fp_op),
    .req_sfn(fp_sfn), .req_write(fp_write_a),
    .rsp_valid(fp_rsp_valid), .rsp_hit(fp_rsp_hit), .rsp_ffn(fp_rsp_ffn),
    .srch_en, .srch_frame, .srch_new_frame,
    .cmd_valid(src_valid[NCORES]), .cmd_ready(src_ready[NCORES]), .cmd(src_cmd[NCORES]),
    .mem_rsp_valid(tree_rsp_valid), .mem_rsp(tree_rsp),
    .ev_hit(ev_fppt_hit), .ev_miss(ev_fppt_miss), .ev_upload, .ev_evict, .ev_writeback
  );

  // ---------------- cores ----------------
  for (genvar k = 0; k < NCORES; k++) begin : g_core
    logic core_rsp_valid;
    assign core_rsp_valid = tree_rsp_valid && 32'(tree_rsp.src) == k;

    core_mmu #(
      .CORE_ID(k), .L1_ENTRIES(L1_ENTRIES), .L1_WAYS(L1_WAYS),
      .L2_ENTRIES(L2_ENTRIES), .L2_WAYS(L2_WAYS)
    ) u_core (
      .clk, .rst_n,
      .req_valid(req_valid[k]), .req_ready(req_ready[k]), .req_vaddr(req_vaddr[k]),
      .req_write(req_write[k]), .req_wdata(req_wdata[k]), .req_llc_miss(req_llc_miss[k]),
      .rsp_valid(rsp_valid[k]), .rsp_rdata(rsp_rdata[k]), .rsp_lflag(rsp_lflag[k]),
      .rsp_frame(rsp_frame[k]),
      .ptw_req_valid(ptw_req_valid[k]), .ptw_vpn(ptw_vpn[k]),
      .ptw_rsp_valid(ptw_rsp_valid[k]), .ptw_sfn(ptw_sfn[k]),
      .fp_req_valid(fp_req_valid[k]), .fp_req_ready(fp_req_ready[k]), .fp_op(fp_op[k]),
      .fp_sfn(fp_sfn[k]), .fp_write(fp_write[k]),
      .fp_rsp_valid(fp_rsp_valid[k]), .fp_rsp_hit, .fp_rsp_ffn,
      .srch_en, .srch_frame, .srch_new_frame,
      .mem_cmd_valid(src_valid[k]), .mem_cmd_ready(src_ready[k]), .mem_cmd(src_cmd[k]),
      .mem_rsp_valid(core_rsp_valid), .mem_rsp(tree_rsp),
      .ev_l1_hit(ev_l1_hit[k]), .ev_l2_hit(ev_l2_hit[k]), .ev_tlb_miss(ev_tlb_miss[k]),
      .ev_fast_direct(ev_fast_direct[k]), .ev_restart(ev_restart[k])
    );
  end

  // ---------------- command arbiter ----------------
  logic             tree_cmd_valid, tree_cmd_ready;
  mem_cmd_t         tree_cmd;
  logic [SPT_W-1:0] rr, pick;

  always_comb begin
    logic done;
    done           = 1'b0;
    pick           = '0;
    tree_cmd_valid = 1'b0;
    for (int i = 0; i < NSRC; i++) begin
      int unsigned c;
      c = (32'(rr) + 32'(i)) % NSRC;
      if (!done && src_valid[c]) begin
        done           = 1'b1;
        pick           = SPT_W'(c);
        tree_cmd_valid = 1'b1;
      end
    end
    tree_cmd = src_cmd[pick];
    for (int i = 0; i < NSRC; i++)
      src_ready[i] = tree_cmd_valid && tree_cmd_ready && 32'(pick) == i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (tree_cmd_valid && tree_cmd_ready) rr <= SPT_W'((32'(pick) + 1) % NSRC);
  end

  // ---------------- DIMM tree ----------------
  dimm_tree u_tree (
    .clk, .rst_n,
    .cmd_valid(tree_cmd_valid), .cmd_ready(tree_cmd_ready), .cmd(tree_cmd),
    .rsp_valid(tree_rsp_valid), .rsp_ready(1'b1), .rsp(tree_rsp),
    .rank_cmd_valid, .rank_cmd_ready, .rank_cmd,
    .rank_rsp_valid, .rank_rsp_ready, .rank_rsp
  );

endmodule
