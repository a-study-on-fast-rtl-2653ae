// dir_router: DIMM interface router (DIR) of one tree DIMM (T-DIMM).
//
// A T-DIMM has an upper channel, a lower channel shared by its children and
// an internal channel to its own DRAM rank. For each command arriving from
// the upper level the router decides, from the target T-DIMM number, to
//   execute it  : the target is this T-DIMM -> internal channel (loc_cmd_*),
//   forward it  : the target lies in this T-DIMM's subtree -> lower channel,
//   abort it    : anything else (it is meant for a sibling subtree); the
//                 command is taken and dropped at once.
// T-DIMMs are numbered level by level (heap order): the controller's
// children are 0..BRANCH-1 and the children of T-DIMM i are
// BRANCH*i+BRANCH .. BRANCH*i+2*BRANCH-1, so the parent of j >= BRANCH is
// j/BRANCH-1. With IS_ROOT set the router serves the memory controller's
// channel: it forwards every command and has no rank of its own.
//
// Responses from the rank and from the BRANCH children are merged towards
// the upper level by a round-robin arbiter.
// Timing: each direction has one register, so a command advances one tree
// level per clock (the 1-clock DIMM-to-DIMM switch time). All channels are
// valid/ready; a register accepts a new beat when empty or being emptied.
// Execute/forward/abort is the published router behaviour; the numbering,
// the broadcast lower channel and the arbitration are this design's choices.
module dir_router
  import dta_pkg::*;
#(
  parameter int unsigned BRANCH  = TREE_BRANCH,
  parameter int unsigned LEVELS  = TREE_LEVELS,
  parameter int unsigned MY_ID   = 0,
  parameter bit          IS_ROOT = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // upper channel, commands in
  input  logic              dn_in_valid,
  output logic              dn_in_ready,
  input  mem_cmd_t          dn_in,
  // lower channel, commands out (seen by every child)
  output logic              dn_out_valid,
  input  logic              dn_out_ready,
  output mem_cmd_t          dn_out,
  // internal channel to the rank
  output logic              loc_cmd_valid,
  input  logic              loc_cmd_ready,
  output mem_cmd_t          loc_cmd,
  input  logic              loc_rsp_valid,
  output logic              loc_rsp_ready,
  input  mem_rsp_t          loc_rsp,
  // lower channel, responses in from each child
  input  logic [BRANCH-1:0] up_in_valid,
  output logic [BRANCH-1:0] up_in_ready,
  input  mem_rsp_t          up_in [BRANCH],
  // upper channel, responses out
  output logic              up_out_valid,
  input  logic              up_out_ready,
  output mem_rsp_t          up_out
);
  // ---------------- route decision ----------------
  function automatic logic in_subtree(input logic [DIMM_ID_W-1:0] target);
    int unsigned a;
    logic        r;
    a = 32'(target);
    r = 1'b0;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      if (a >= BRANCH) begin
        a = a / BRANCH - 1;
        if (a == MY_ID) r = 1'b1;
      end
    end
    return r;
  endfunction

  logic is_local, is_fwd;
  assign is_local = !IS_ROOT && (32'(dn_in.dimm) == MY_ID);
  assign is_fwd   = IS_ROOT || in_subtree(dn_in.dimm);

  // ---------------- command register ----------------
  logic     cq_valid, cq_local, cq_take;
  mem_cmd_t cq;
  assign cq_take       = cq_local ? loc_cmd_ready : dn_out_ready;
  assign dn_in_ready   = (is_local || is_fwd) ? (!cq_valid || cq_take) : 1'b1;
  assign loc_cmd_valid = cq_valid && cq_local;
  assign loc_cmd       = cq;
  assign dn_out_valid  = cq_valid && !cq_local;
  assign dn_out        = cq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cq_valid <= 1'b0;
      cq_local <= 1'b0;
      cq       <= '0;
    end else begin
      if (cq_valid && cq_take) cq_valid <= 1'b0;
      if (dn_in_valid && dn_in_ready && (is_local || is_fwd)) begin
        cq_valid <= 1'b1;
        cq_local <= is_local;
        cq       <= dn_in;
      end
    end
  end

  // ---------------- response merge ----------------
  localparam int unsigned NIN  = BRANCH + 1;   // children, then the rank
  localparam int unsigned PTR_W = $clog2(NIN);

  logic [NIN-1:0] in_valid, grant;
  mem_rsp_t       in_data [NIN];
  logic [PTR_W-1:0] rr;
  logic           rq_valid, rq_free;
  mem_rsp_t       rq;

  always_comb begin
    for (int k = 0; k < BRANCH; k++) begin
      in_valid[k] = up_in_valid[k];
      in_data[k]  = up_in[k];
    end
    in_valid[BRANCH] = loc_rsp_valid;
    in_data[BRANCH]  = loc_rsp;
  end

  assign rq_free = !rq_valid || up_out_ready;

  always_comb begin
    logic done;
    grant = '0;
    done  = 1'b0;
    for (int k = 0; k < NIN; k++) begin
      int unsigned c;
      c = (32'(rr) + 32'(k)) % NIN;
      if (!done && in_valid[c]) begin
        done     = 1'b1;
        grant[c] = rq_free;
      end
    end
  end

  assign up_in_ready   = grant[BRANCH-1:0];
  assign loc_rsp_ready = grant[BRANCH];
  assign up_out_valid  = rq_valid;
  assign up_out        = rq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_valid <= 1'b0;
      rq       <= '0;
      rr       <= '0;
    end else begin
      if (rq_valid && up_out_ready) rq_valid <= 1'b0;
      for (int k = 0; k < NIN; k++) begin
        if (grant[k]) begin
          rq_valid <= 1'b1;
          rq       <= in_data[k];
          rr       <= PTR_W'((k + 1) % NIN);
        end
      end
    end
  end

endmodule
