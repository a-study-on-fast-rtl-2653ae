// tb_dt_tlb: self-checking test of one DT-TLB level at its default size
// (64 entries, 8 ways). Checks lookups after reset, fills, round-robin
// replacement within a set, update in place of an existing page, the
// eviction search (only L-flag-1 entries with the searched frame are demoted
// to L-flag 0 with the new frame), and a fill racing a search.
module tb_dt_tlb;
  import dta_pkg::*;
  localparam int unsigned ENT = 64, WAYS = 8, SETS = ENT / WAYS;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic [VPN_W-1:0]   lk_vpn, fill_vpn;
  logic               lk_hit, lk_lflag, fill_en, fill_lflag, srch_en, srch_hit;
  logic [FRAME_W-1:0] lk_frame, fill_frame, srch_frame, srch_new_frame;

  dt_tlb dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_lk(input logic [VPN_W-1:0] v, input logic hit,
                           input logic lf, input logic [FRAME_W-1:0] fr, input string what);
    lk_vpn = v;
    #1;
    checks++;
    if (lk_hit !== hit || (hit && (lk_lflag !== lf || lk_frame !== fr))) begin
      failures++;
      $display("FAIL %s: vpn %h hit %0d L %0d frame %h, expected hit %0d L %0d frame %h",
               what, v, lk_hit, lk_lflag, lk_frame, hit, lf, fr);
    end
  endtask

  task automatic fill(input logic [VPN_W-1:0] v, input logic lf, input logic [FRAME_W-1:0] fr);
    @(negedge clk);
    fill_en = 1; fill_vpn = v; fill_lflag = lf; fill_frame = fr;
    @(negedge clk);
    fill_en = 0;
  endtask

  initial begin
    fill_en = 0; srch_en = 0; fill_vpn = '0; fill_lflag = 0; fill_frame = '0;
    srch_frame = '0; srch_new_frame = '0; lk_vpn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_lk(36'h123, 0, 0, 0, "after reset");

    // fill one set completely: vpn = 3 + SETS*i
    for (int i = 0; i < WAYS; i++) fill(VPN_W'(3 + SETS * i), 0, FRAME_W'(100 + i));
    for (int i = 0; i < WAYS; i++) expect_lk(VPN_W'(3 + SETS * i), 1, 0, FRAME_W'(100 + i), "full set");
    expect_lk(VPN_W'(4), 0, 0, 0, "other set empty");
    // a ninth page replaces way 0 (round-robin), then way 1
    fill(VPN_W'(3 + SETS * 8), 1, FRAME_W'(200));
    expect_lk(VPN_W'(3), 0, 0, 0, "round-robin victim way 0");
    expect_lk(VPN_W'(3 + SETS * 8), 1, 1, FRAME_W'(200), "new page");
    fill(VPN_W'(3 + SETS * 9), 0, FRAME_W'(201));
    expect_lk(VPN_W'(3 + SETS * 1), 0, 0, 0, "round-robin victim way 1");
    expect_lk(VPN_W'(3 + SETS * 2), 1, 0, FRAME_W'(102), "way 2 kept");

    // update in place raises the L-flag without evicting anything
    fill(VPN_W'(3 + SETS * 2), 1, FRAME_W'(55));
    expect_lk(VPN_W'(3 + SETS * 2), 1, 1, FRAME_W'(55), "update in place");
    for (int i = 3; i < WAYS; i++) expect_lk(VPN_W'(3 + SETS * i), 1, 0, FRAME_W'(100 + i), "no eviction on update");

    // search: two L=1 entries with frame 77, one L=0 entry with frame 77
    fill(VPN_W'(1), 1, FRAME_W'(77));
    fill(VPN_W'(2 + SETS * 5), 1, FRAME_W'(77));
    fill(VPN_W'(6), 0, FRAME_W'(77));
    @(negedge clk);
    srch_frame = FRAME_W'(77); srch_new_frame = FRAME_W'(27'h4abcde);
    #1;
    checks++;
    if (!srch_hit) begin failures++; $display("FAIL search hit not reported"); end
    srch_en = 1;
    @(negedge clk);
    srch_en = 0;
    expect_lk(VPN_W'(1), 1, 0, FRAME_W'(27'h4abcde), "search demotes entry 1");
    expect_lk(VPN_W'(2 + SETS * 5), 1, 0, FRAME_W'(27'h4abcde), "search demotes entry 2");
    expect_lk(VPN_W'(6), 1, 0, FRAME_W'(77), "search leaves L=0 entry");
    expect_lk(VPN_W'(3 + SETS * 2), 1, 1, FRAME_W'(55), "search leaves other frame");
    #1;
    checks++;
    if (srch_hit) begin failures++; $display("FAIL search still hits"); end

    // a fill of the searched frame in the same cycle lands demoted
    @(negedge clk);
    fill_en = 1; fill_vpn = VPN_W'(7); fill_lflag = 1; fill_frame = FRAME_W'(90);
    srch_en = 1; srch_frame = FRAME_W'(90); srch_new_frame = FRAME_W'(91);
    @(negedge clk);
    fill_en = 0; srch_en = 0;
    expect_lk(VPN_W'(7), 1, 0, FRAME_W'(91), "fill racing search");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
