// dimm_tree: the DIMM tree, the memory controller's channel router plus one
// DIMM interface router per tree DIMM (T-DIMM), wired level by level.
//
// With BRANCH = 4 and three levels of T-DIMMs there are 4 + 16 + 64 = 84
// T-DIMMs: T-DIMMs 0..3 (nearest the controller) form the fast partition and
// 4..83 the slow partition. T-DIMM j's parent is j/BRANCH-1 (j >= BRANCH),
// otherwise the controller. A command entering at cmd_* reaches T-DIMM j
// after (level of j)+1 clocks when nothing stalls and leaves on
// rank_cmd_*[j]; the rank's response enters at rank_rsp_*[j] and comes back
// to rsp_* one clock per level, plus one for the controller's router.
// The DRAM ranks themselves are outside this module.
// The tree shape and sizes follow the modelled system (branch factor four,
// 4 GB T-DIMMs, 16 GB fast and 320 GB slow partition); the numbering and the
// extra register at the controller are this design's choices.
module dimm_tree
  import dta_pkg::*;
#(
  parameter int unsigned BRANCH = TREE_BRANCH,
  parameter int unsigned LEVELS = TREE_LEVELS,
  parameter int unsigned NDIMM  = N_DIMMS
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the memory controller
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  mem_cmd_t         cmd,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output mem_rsp_t         rsp,
  // to and from each T-DIMM's rank
  output logic [NDIMM-1:0] rank_cmd_valid,
  input  logic [NDIMM-1:0] rank_cmd_ready,
  output mem_cmd_t         rank_cmd [NDIMM],
  input  logic [NDIMM-1:0] rank_rsp_valid,
  output logic [NDIMM-1:0] rank_rsp_ready,
  input  mem_rsp_t         rank_rsp [NDIMM]
);
  // node NDIMM is the controller's router
  localparam int unsigned NN = NDIMM + 1;

  logic [NN-1:0] dn_out_valid, dn_out_ready, dn_in_ready, up_out_valid, up_out_ready;
  mem_cmd_t      dn_out [NN];
  mem_rsp_t      up_out [NN];

  function automatic int unsigned parent_of(input int unsigned j);
    return (j < BRANCH) ? NDIMM : (j / BRANCH - 1);
  endfunction
  function automatic int unsigned child_of(input int unsigned i, input int unsigned k);
    return (i == NDIMM) ? k : (BRANCH * i + BRANCH + k);
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_node
    logic              in_valid;
    mem_cmd_t          in_cmd;
    logic [BRANCH-1:0] ch_valid, ch_ready;
    mem_rsp_t          ch_rsp [BRANCH];
    logic              p_ready;
    logic              lc_valid, lc_ready, lr_valid, lr_ready;
    mem_cmd_t          lc;
    mem_rsp_t          lr;

    if (n == NDIMM) begin : g_root
      assign in_valid  = cmd_valid;
      assign in_cmd    = cmd;
      assign cmd_ready = dn_in_ready[n];
      assign p_ready   = rsp_ready;
      assign rsp_valid = up_out_valid[n];
      assign rsp       = up_out[n];
      assign lc_ready  = 1'b1;
      assign lr_valid  = 1'b0;
      assign lr        = '0;
    end else begin : g_dimm
      assign in_valid  = dn_out_valid[parent_of(n)];
      assign in_cmd    = dn_out[parent_of(n)];
      assign p_ready   = g_node[parent_of(n)].ch_ready[n - child_of(parent_of(n), 0)];
      assign rank_cmd_valid[n] = lc_valid;
      assign rank_cmd[n]       = lc;
      assign lc_ready          = rank_cmd_ready[n];
      assign lr_valid          = rank_rsp_valid[n];
      assign lr                = rank_rsp[n];
      assign rank_rsp_ready[n] = lr_ready;
    end

    // children: responses in, and the ready of the shared lower channel
    always_comb begin
      dn_out_ready[n] = 1'b1;
      for (int unsigned k = 0; k < BRANCH; k++) begin
        ch_valid[k] = 1'b0;
        ch_rsp[k]   = '0;
        if (child_of(n, k) < NDIMM) begin
          ch_valid[k] = up_out_valid[child_of(n, k)];
          ch_rsp[k]   = up_out[child_of(n, k)];
          dn_out_ready[n] = dn_out_ready[n] & dn_in_ready[child_of(n, k)];
        end
      end
    end
    assign up_out_ready[n] = p_ready;

    dir_router #(
      .BRANCH(BRANCH), .LEVELS(LEVELS), .MY_ID((n == NDIMM) ? 0 : n),
      .IS_ROOT(n == NDIMM)
    ) u_dir (
      .clk, .rst_n,
      .dn_in_valid(in_valid), .dn_in_ready(dn_in_ready[n]), .dn_in(in_cmd),
      .dn_out_valid(dn_out_valid[n]), .dn_out_ready(dn_out_ready[n]), .dn_out(dn_out[n]),
      .loc_cmd_valid(lc_valid), .loc_cmd_ready(lc_ready), .loc_cmd(lc),
      .loc_rsp_valid(lr_valid), .loc_rsp_ready(lr_ready), .loc_rsp(lr),
      .up_in_valid(ch_valid), .up_in_ready(ch_ready), .up_in(ch_rsp),
      .up_out_valid(up_out_valid[n]), .up_out_ready(up_out_ready[n]), .up_out(up_out[n])
    );
  end

endmodule
