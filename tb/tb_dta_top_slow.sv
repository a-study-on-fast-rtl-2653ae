// tb_dta_top_slow: the end-to-end test of tb_dta_top run on dta_top built
// with MODE = SLOW_FPPT (five cores, 64/512-entry DT-TLBs, 84 T-DIMMs, FPPT
// rows in the last 2048 pages of the slow partition, all four ways usable)
// with DRAM ranks of 200-clock latency.
//
// Each core works on NPG virtual pages. The page-table model maps page pg of
// every core to the same slow frame (shared memory), and those frames share
// only four FPPT indices, which
// forces FPPT misses, uploads, evictions with DT-TLB searches and
// write-backs. Cores issue random reads and writes of 64-bit words; a
// reference map of the last value written to each virtual word checks every
// read. Each mechanism (L1 and L2 DT-TLB hits, DT-TLB misses, accesses that
// skip the FPPT thanks to the L-flag, FPPT hits and misses, uploads,
// evictions, write-backs, translation-only requests) is counted and must
// occur. The FPPT itself is checked afterwards, read from the slow partition: no
// row may hold an entry still marked pending, and the sets must be full.
module tb_dta_top_slow;
  import dta_pkg::*;

  localparam int unsigned NC   = N_PROC;
  localparam int unsigned NPG  = 72;
  localparam int unsigned NREQ = 150;

  logic clk = 0, rst_n = 1;
  always #2 clk = ~clk;
  initial #1 rst_n = 0;    // asynchronous reset before the first clock edge

  logic [NC-1:0]      req_valid, req_ready, req_write, req_llc_miss, rsp_valid, rsp_lflag;
  logic [VA_W-1:0]    req_vaddr [NC];
  logic [63:0]        req_wdata [NC], rsp_rdata [NC];
  logic [FRAME_W-1:0] rsp_frame [NC];
  logic [NC-1:0]      ptw_req_valid, ptw_rsp_valid;
  logic [VPN_W-1:0]   ptw_vpn [NC];
  logic [SPFN_W-1:0]  ptw_sfn [NC];
  logic [N_DIMMS-1:0] rank_cmd_valid, rank_cmd_ready, rank_rsp_valid, rank_rsp_ready;
  mem_cmd_t           rank_cmd [N_DIMMS];
  mem_rsp_t           rank_rsp [N_DIMMS];
  logic [NC-1:0]      ev_l1_hit, ev_l2_hit, ev_tlb_miss, ev_fast_direct, ev_restart;
  logic               ev_fppt_hit, ev_fppt_miss, ev_upload, ev_evict, ev_writeback;

  dta_top #(.MODE(SLOW_FPPT)) dut (.*);

  dram_model #(.NPORT(N_DIMMS), .LAT(200)) u_dram (
    .clk, .cmd_valid(rank_cmd_valid), .cmd_ready(rank_cmd_ready), .cmd(rank_cmd),
    .rsp_valid(rank_rsp_valid), .rsp_ready(rank_rsp_ready), .rsp(rank_rsp)
  );

  int checks = 0, failures = 0;

  // ---------------- page-table model ----------------
  // Virtual page (k << 8) | pg of core k maps to the same slow frame for
  // every core (shared memory), spread over four FPPT indices.
  localparam int unsigned NIDX = 4;
  localparam logic [FPPT_IDX_W-1:0] IDX [NIDX] = '{20'd5, 20'd3000, 20'd700000, 20'd1000};
  function automatic logic [SPFN_W-1:0] map(input logic [VPN_W-1:0] vpn);
    int unsigned g;
    g = 32'(vpn[7:0]);
    return {FPPT_TAG_W'(g / NIDX + 1), IDX[g % NIDX]};
  endfunction

  for (genvar k = 0; k < NC; k++) begin : g_ptw
    int unsigned wait_c;
    always @(posedge clk) begin
      if (!rst_n) begin ptw_rsp_valid[k] <= 0; wait_c <= 0; end
      else begin
        ptw_rsp_valid[k] <= 0;
        if (ptw_req_valid[k] && !ptw_rsp_valid[k]) begin
          if (wait_c == 20) begin
            ptw_rsp_valid[k] <= 1;
            ptw_sfn[k]       <= map(ptw_vpn[k]);
            wait_c           <= 0;
          end else wait_c <= wait_c + 1;
        end
      end
    end
  end

  // ---------------- traffic and reference ----------------
  // Keyed by virtual address; a core reads and writes only its own words of
  // the shared pages, so no other core can change what it expects.
  logic [63:0] ref_mem [logic [VA_W-1:0]];
  int unsigned done_cnt [NC];
  int unsigned n_xlate = 0;

  for (genvar k = 0; k < NC; k++) begin : g_core
    logic            busy;
    logic [VA_W-1:0] va;
    logic            wr, llc;
    logic [63:0]     wd;
    always @(posedge clk) begin
      if (!rst_n) begin
        req_valid[k] <= 0; busy <= 0; done_cnt[k] = 0;
      end else begin
        if (req_valid[k] && req_ready[k]) req_valid[k] <= 0;
        if (rsp_valid[k]) begin
          busy <= 0;
          done_cnt[k]++;
          if (llc) begin
            if (!rsp_lflag[k]) begin
              failures++;
              $display("core %0d: access completed with L-flag 0", k);
            end
            if (!wr) begin
              checks++;
              if (rsp_rdata[k] !== (ref_mem.exists(va) ? ref_mem[va] : 64'd0)) begin
                failures++;
                $display("core %0d: read va %h got %h expected %h", k, va, rsp_rdata[k],
                         ref_mem.exists(va) ? ref_mem[va] : 64'd0);
              end
            end
          end else n_xlate++;
        end
        if (!busy && !req_valid[k] && !rsp_valid[k] && done_cnt[k] < NREQ) begin
          logic [VPN_W-1:0] vpn;
          vpn = VPN_W'((k << 8) | ($urandom % NPG));
          va  = {vpn, 9'(k * 8 + $urandom % 8), 3'b000};  // words owned by core k
          wr  = ($urandom % 3) == 0;
          llc = ($urandom % 8) != 0;
          wd  = {$urandom, $urandom};
          if (wr && llc) ref_mem[va] = wd;
          req_vaddr[k]    <= va;
          req_write[k]    <= wr;
          req_wdata[k]    <= wd;
          req_llc_miss[k] <= llc;
          req_valid[k]    <= 1;
          busy            <= 1;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int unsigned c_l1 = 0, c_l2 = 0, c_miss = 0, c_direct = 0, c_restart = 0;
  int unsigned c_fhit = 0, c_fmiss = 0, c_up = 0, c_ev = 0, c_wb = 0;
  always @(posedge clk) if (rst_n) begin
    c_l1      += $countones(ev_l1_hit);
    c_l2      += $countones(ev_l2_hit);
    c_miss    += $countones(ev_tlb_miss);
    c_direct  += $countones(ev_fast_direct);
    c_restart += $countones(ev_restart);
    c_fhit    += 32'(ev_fppt_hit);
    c_fmiss   += 32'(ev_fppt_miss);
    c_up      += 32'(ev_upload);
    c_ev      += 32'(ev_evict);
    c_wb      += 32'(ev_writeback);
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  function automatic int unsigned total_done();
    int unsigned t = 0;
    for (int k = 0; k < NC; k++) t += done_cnt[k];
    return t;
  endfunction

  // ---------------- FPPT contents after the run ----------------
  task automatic check_fppt();
    for (int i = 0; i < NIDX; i++) begin
      logic [FPPT_IDX_W-1:0] idx;
      logic [SPFN_W-1:0] sfn;
      fppt_row_t row;
      idx = IDX[i];
      sfn = SPFN_W'(SLOW_FPPT_BASE) + SPFN_W'(idx[FPPT_IDX_W-1:FPPT_ROWS_PER_PAGE_W]);
      row = u_dram.rd({DIMM_ID_W'(slow_dimm(sfn)), sfn[DIMM_PAGE_W-1:0], WORD_W'(idx[8:0])});
      checks++;
      if (!(row.pte[0].valid && row.pte[1].valid && row.pte[2].valid && row.pte[3].valid)) begin
        failures++; $display("set %0d not full after the run", idx);
      end
      for (int w = 0; w < FP_WAYS; w++) begin
        checks++;
        if (row.pte[w].pending) begin failures++; $display("pending left in set %0d", idx); end
      end
      $display("  FPPT set %0d: valid ways %b", idx,
               {row.pte[3].valid, row.pte[2].valid, row.pte[1].valid, row.pte[0].valid});
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (total_done() != NC * NREQ) @(posedge clk);
    repeat (300) @(posedge clk);
    $display("requests done: %0d", total_done());
    need("DT-TLB1 hit", c_l1);
    need("DT-TLB2 hit", c_l2);
    need("DT-TLB miss", c_miss);
    need("L-flag 1 direct access", c_direct);
    need("FPPT hit", c_fhit);
    need("FPPT miss", c_fmiss);
    need("page upload", c_up);
    need("eviction + DT-TLB search", c_ev);
    need("write-back", c_wb);
    need("translation-only request", n_xlate);
    $display("  %-28s %0d", "restart on lost frame", c_restart);
    checks++;
    if (u_dram.misroutes != 0) begin failures++; $display("misrouted commands: %0d", u_dram.misroutes); end
    check_fppt();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d requests", total_done());
    for (int k = 0; k < NC; k++) $display("  core %0d done %0d", k, done_cnt[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
