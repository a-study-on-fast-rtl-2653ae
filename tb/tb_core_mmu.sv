// tb_core_mmu: one core's DT-TLB pair and sequencer with models of the page
// table (slow frame = vpn + 0x1000), the FPPT manager and memory. Checks:
//   DT-TLB miss + FPPT query miss -> L-flag 0 with the slow frame
//   DT-TLB miss + FPPT query hit  -> L-flag 1 with the fast frame
//   translation-only timing: the answer of a level-1 hit is valid 2 clocks
//   after the request is accepted (1-clock DT-TLB1, then decide), that of a
//   level-2 hit 8 clocks after (1-clock DT-TLB1 miss, 5-clock DT-TLB2,
//   level-1 fill, decide)
//   LLC miss with L-flag 0 -> FP_UPLOAD, then the fast frame is accessed and
//   later misses go straight to memory without the manager
//   an eviction search for that frame sends the next access back to the
//   manager.
module tb_core_mmu;
  import dta_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic               req_valid, req_ready, req_write, req_llc_miss, rsp_valid, rsp_lflag;
  logic [VA_W-1:0]    req_vaddr;
  logic [63:0]        req_wdata, rsp_rdata;
  logic [FRAME_W-1:0] rsp_frame;
  logic               ptw_req_valid, ptw_rsp_valid;
  logic [VPN_W-1:0]   ptw_vpn;
  logic [SPFN_W-1:0]  ptw_sfn;
  logic               fp_req_valid, fp_req_ready, fp_write, fp_rsp_valid, fp_rsp_hit;
  fppt_op_e           fp_op;
  logic [SPFN_W-1:0]  fp_sfn;
  logic [FPFN_W-1:0]  fp_rsp_ffn;
  logic               srch_en;
  logic [FRAME_W-1:0] srch_frame, srch_new_frame;
  logic               mem_cmd_valid, mem_cmd_ready, mem_rsp_valid;
  mem_cmd_t           mem_cmd;
  mem_rsp_t           mem_rsp;
  logic               ev_l1_hit, ev_l2_hit, ev_tlb_miss, ev_fast_direct, ev_restart;

  core_mmu #(.CORE_ID(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- models ----------------
  logic [VPN_W-1:0] query_hit_vpn = '1;          // the FPPT "holds" this page
  int unsigned n_query = 0, n_upload = 0, n_mem = 0;
  mem_cmd_t    last_cmd;

  always @(posedge clk) begin
    ptw_rsp_valid <= ptw_req_valid && !ptw_rsp_valid;
    ptw_sfn       <= SPFN_W'(ptw_vpn + 36'h1000);
  end

  assign fp_req_ready = fp_req_valid;
  always @(posedge clk) begin
    fp_rsp_valid <= 0;
    if (fp_req_valid) begin
      fp_rsp_valid <= 1;
      if (fp_op == FP_QUERY) begin
        n_query++;
        fp_rsp_hit <= (fp_sfn == SPFN_W'(query_hit_vpn + 36'h1000));
        fp_rsp_ffn <= FPFN_W'(22'h3_0000 + fp_sfn[15:0]);
      end else begin
        n_upload++;
        fp_rsp_hit <= 1;
        fp_rsp_ffn <= FPFN_W'(22'h2_0000 + fp_sfn[15:0]);
      end
    end
  end

  assign mem_cmd_ready = 1;
  always @(posedge clk) begin
    mem_rsp_valid <= 0;
    if (mem_cmd_valid) begin
      n_mem++;
      last_cmd      <= mem_cmd;
      mem_rsp_valid <= 1;
      mem_rsp       <= '{src: 3'd2, rdata: 64'hCAFE_0000 + 64'(mem_cmd.page)};
    end
  end

  // ---------------- request helper ----------------
  int unsigned lat;
  task automatic access(input logic [VPN_W-1:0] vpn, input logic llc);
    @(negedge clk);
    req_valid = 1; req_vaddr = {vpn, 9'd5, 3'd0}; req_llc_miss = llc; req_write = 0; req_wdata = '0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    lat = 0;
    #1 req_valid = 0;
    while (!rsp_valid) begin @(posedge clk); lat++; #1; end
  endtask

  initial begin
    srch_en = 0; srch_frame = '0; srch_new_frame = '0; req_valid = 0;
    req_vaddr = '0; req_write = 0; req_wdata = '0; req_llc_miss = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // DT-TLB miss, FPPT miss
    access(36'h40, 0);
    chk(!rsp_lflag && rsp_frame == FRAME_W'(36'h1040), "TLB miss + FPPT miss -> L=0, slow frame");
    chk(n_query == 1 && n_upload == 0, "one FPPT query, no upload");
    // level-1 hit timing
    access(36'h40, 0);
    chk(lat == 2, $sformatf("DT-TLB1 hit answers 2 clocks after acceptance (got %0d)", lat));
    chk(n_query == 1, "no FPPT access on a DT-TLB hit");

    // DT-TLB miss, FPPT hit
    query_hit_vpn = 36'h51;
    access(36'h51, 0);
    chk(rsp_lflag && rsp_frame == FRAME_W'(22'h3_0000 + 16'h1051), "TLB miss + FPPT hit -> L=1, fast frame");

    // push page 0x40 out of DT-TLB1 (same level-1 set: vpn % 8), keep it in DT-TLB2
    for (int i = 1; i <= 8; i++) access(36'h40 + 36'(8 * i), 0);
    access(36'h40, 0);
    chk(lat == 8, $sformatf("DT-TLB2 hit answers 8 clocks after acceptance (got %0d)", lat));
    chk(!rsp_lflag && rsp_frame == FRAME_W'(36'h1040), "DT-TLB2 hit keeps the entry");
    access(36'h40, 0);
    chk(lat == 2, "refilled into DT-TLB1");

    // LLC miss with L=0 -> upload, then access the fast frame
    n_mem = 0;
    access(36'h40, 1);
    chk(n_upload == 1, "L=0 access asks for an upload");
    chk(rsp_lflag && rsp_frame == FRAME_W'(22'h2_0000 + 16'h1040), "L-flag raised after upload");
    chk(n_mem == 1 && last_cmd.dimm == fast_dimm(FPFN_W'(22'h2_1040)) &&
        last_cmd.page == 20'h2_1040 && last_cmd.word == 9'd5 && last_cmd.src == 3'd2,
        "memory access to the fast frame");
    chk(rsp_rdata == 64'hCAFE_0000 + 64'h2_1040, "read data returned");
    // L=1, straight to memory
    access(36'h40, 1);
    chk(n_upload == 1 && n_mem == 2, "L=1 access skips the FPPT manager");

    // eviction search demotes the entry in both levels
    @(negedge clk);
    srch_en = 1; srch_frame = FRAME_W'(22'h2_1040); srch_new_frame = FRAME_W'(36'h1040);
    @(negedge clk);
    srch_en = 0;
    access(36'h40, 0);
    chk(!rsp_lflag && rsp_frame == FRAME_W'(36'h1040), "entry demoted to the slow frame");
    access(36'h40, 1);
    chk(n_upload == 2, "demoted page goes through the manager again");

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
