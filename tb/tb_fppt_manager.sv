// tb_fppt_manager: the FPPT manager (Fast-FPPT, five core ports) against a
// small behavioural memory with a 4-clock response. Sequence on FPPT index 5
// (a set whose way 0 holds the table, so ways 1..3 are usable):
//   query of an absent page -> miss, no row write, no page move
//   upload of it            -> fast frame 5*4+1, one move slow->fast, the row
//                              written pending during the move, then clear
//   query from another core -> hit on the same frame
//   two more uploads        -> ways 2 and 3
//   a fourth page           -> LRU victim way 1: DT-TLB search for frame 21
//                              back to the old slow frame, write-back move,
//                              upload move, row holds the new tag in way 1
// The FPPT row must be read from T-DIMM 0, page 0, word 5.
module tb_fppt_manager;
  import dta_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  localparam int unsigned NC = N_PROC;
  logic [NC-1:0]      req_valid, req_ready, rsp_valid;
  fppt_op_e           req_op [NC];
  logic [SPFN_W-1:0]  req_sfn [NC];
  logic               req_write [NC];
  logic               rsp_hit, srch_en, cmd_valid, cmd_ready, mem_rsp_valid;
  logic [FPFN_W-1:0]  rsp_ffn;
  logic [FRAME_W-1:0] srch_frame, srch_new_frame;
  mem_cmd_t           cmd;
  mem_rsp_t           mem_rsp;
  logic               ev_hit, ev_miss, ev_upload, ev_evict, ev_writeback;

  fppt_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- memory ----------------
  logic [63:0] mem [logic [35:0]];
  int unsigned n_wr = 0, n_mv = 0, n_srch = 0, n_bad_row = 0, pending_seen = 0;
  mem_cmd_t    moves [$];
  logic [FRAME_W-1:0] srch_f, srch_n;
  int unsigned  lat = 0;
  logic         busy = 0;
  mem_rsp_t     rsp_q;
  assign cmd_ready = !busy;
  always @(posedge clk) begin
    mem_rsp_valid <= 0;
    if (srch_en) begin n_srch++; srch_f = srch_frame; srch_n = srch_new_frame; end
    if (busy) begin
      lat++;
      if (lat == 4) begin busy <= 0; mem_rsp_valid <= 1; mem_rsp <= rsp_q; end
    end else if (cmd_valid) begin
      logic [35:0] k;
      k = {cmd.dimm, cmd.page, cmd.word};
      busy <= 1; lat = 0;
      rsp_q.src   = cmd.src;
      rsp_q.rdata = '0;
      if (cmd.op != MEM_MOVE && !(cmd.dimm == 0 && cmd.page == 0 && cmd.word == 5)) n_bad_row++;
      unique case (cmd.op)
        MEM_RD: rsp_q.rdata = mem.exists(k) ? mem[k] : 64'd0;
        MEM_WR: begin mem[k] = cmd.wdata; n_wr++; end
        MEM_MOVE: begin
          fppt_row_t r;
          n_mv++;
          moves.push_back(cmd);
          r = mem.exists(36'd5) ? mem[36'd5] : 64'd0;
          for (int w = 0; w < 4; w++) if (r.pte[w].pending) pending_seen++;
        end
        default: ;
      endcase
    end
  end

  task automatic request(input int c, input fppt_op_e op, input logic [SPFN_W-1:0] sfn,
                         output logic hit, output logic [FPFN_W-1:0] ffn);
    @(negedge clk);
    req_valid[c] = 1; req_op[c] = op; req_sfn[c] = sfn; req_write[c] = 0;
    #1;
    while (!req_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid[c] = 0;
    while (!rsp_valid[c]) @(negedge clk);
    hit = rsp_hit; ffn = rsp_ffn;
  endtask

  function automatic logic [SPFN_W-1:0] sp(input int tag);
    return {FPPT_TAG_W'(tag), FPPT_IDX_W'(5)};
  endfunction

  initial begin
    logic hit;
    logic [FPFN_W-1:0] ffn;
    fppt_row_t row;
    req_valid = '0;
    for (int c = 0; c < NC; c++) begin req_op[c] = FP_QUERY; req_sfn[c] = '0; req_write[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    request(0, FP_QUERY, sp(3), hit, ffn);
    chk(!hit, "query of absent page misses");
    chk(n_wr == 0 && n_mv == 0, "query moves nothing");

    request(0, FP_UPLOAD, sp(3), hit, ffn);
    chk(hit && ffn == {20'd5, 2'd1}, $sformatf("upload into way 1 (got %h)", ffn));
    chk(n_mv == 1 && moves[0].dimm == 0 && moves[0].page == {18'd5, 2'd1} &&
        moves[0].src_dimm == 7'd7 && moves[0].src_page == 20'd5, "upload move slow->fast");
    chk(pending_seen == 1, "row pending during the move");
    row = mem[36'd5];
    chk(row.pte[1] == {1'b1, 1'b0, 1'b0, 7'd3} && !row.pte[0].valid, "row after upload");
    chk(n_srch == 0, "no search without eviction");

    request(3, FP_QUERY, sp(3), hit, ffn);
    chk(hit && ffn == {20'd5, 2'd1}, "query from another core hits");

    request(1, FP_UPLOAD, sp(4), hit, ffn);
    chk(hit && ffn == {20'd5, 2'd2}, "second page in way 2");
    request(2, FP_UPLOAD, sp(5), hit, ffn);
    chk(hit && ffn == {20'd5, 2'd3}, "third page in way 3");
    chk(n_srch == 0 && n_mv == 3, "no eviction while ways free");

    request(4, FP_UPLOAD, sp(6), hit, ffn);
    chk(hit && ffn == {20'd5, 2'd1}, $sformatf("fourth page replaces LRU way 1 (got %h)", ffn));
    chk(n_srch == 1 && srch_f == FRAME_W'({20'd5, 2'd1}) && srch_n == FRAME_W'(sp(3)),
        "DT-TLB search for the evicted page");
    chk(n_mv == 5 && moves[3].dimm == 7'd7 && moves[3].page == 20'd5 &&
        moves[3].src_dimm == 0 && moves[3].src_page == {18'd5, 2'd1}, "write-back move fast->slow");
    chk(moves[4].dimm == 0 && moves[4].page == {18'd5, 2'd1} && moves[4].src_dimm == 7'd10,
        "upload move of the new page");
    row = mem[36'd5];
    chk(row.pte[1].tag == 7'd6 && row.pte[1].valid && !row.pte[1].pending, "row holds new tag");
    chk(row.pte[2].tag == 7'd4 && row.pte[3].tag == 7'd5, "other ways kept");
    chk(n_bad_row == 0, "row always at T-DIMM 0 page 0 word 5");

    request(0, FP_QUERY, sp(3), hit, ffn);
    chk(!hit, "evicted page now misses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
