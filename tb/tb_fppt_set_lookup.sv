// tb_fppt_set_lookup: random rows of the fast partition page table checked
// against an independent reference: hit = valid and tag equal (way 0 skipped
// in reserved sets), fast frame = index*4 + way, victim = first usable
// invalid way else first usable way with a clear used bit, used bits reset
// to the touched way when all usable ways would be set, dirty set by a
// write hit, and the filled entry {valid, dirty=write, pending, tag}.
module tb_fppt_set_lookup;
  import dta_pkg::*;

  fppt_row_t             row, row_hit, row_fill;
  logic [FPPT_TAG_W-1:0] tag;
  logic [FPPT_IDX_W-1:0] index;
  logic                  way0_reserved, is_write, hit, hit_pending;
  logic [FP_WAY_W-1:0]   hit_way, victim_way;
  logic [FPFN_W-1:0]     hit_ffn, victim_ffn;
  fppt_pte_t             victim_pte;

  fppt_set_lookup dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s row=%h tag=%h res=%0d", what, row, tag, way0_reserved); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int          exp_way, exp_victim;
      logic        exp_hit;
      logic [3:0]  usable, lru;
      row   = {$urandom, $urandom};
      row.rsvd = '0;
      tag   = FPPT_TAG_W'($urandom % 4);           // few tags: frequent hits
      for (int w = 0; w < 4; w++) begin
        row.pte[w].tag     = FPPT_TAG_W'($urandom % 4);
        row.pte[w].pending = 1'b0;
      end
      // make tags unique among valid ways
      for (int w = 0; w < 4; w++)
        for (int v = 0; v < w; v++)
          if (row.pte[v].valid && row.pte[w].tag == row.pte[v].tag) row.pte[w].valid = 1'b0;
      index         = FPPT_IDX_W'($urandom);
      way0_reserved = $urandom % 2;
      is_write      = $urandom % 2;
      #1;
      usable  = way0_reserved ? 4'b1110 : 4'b1111;
      exp_hit = 0; exp_way = 0;
      for (int w = 0; w < 4; w++)
        if (usable[w] && row.pte[w].valid && row.pte[w].tag == tag) begin exp_hit = 1; exp_way = w; end
      chk(hit == exp_hit, "hit");
      if (exp_hit) begin
        chk(hit_way == 2'(exp_way), "hit way");
        chk(hit_ffn == {index, 2'(exp_way)}, "fast frame = index*4+way");
        lru = row.lru | (4'b1 << exp_way);
        if ((lru & usable) == usable) lru = 4'b1 << exp_way;
        chk(row_hit.lru == lru, "lru after hit");
        chk(row_hit.pte[exp_way].dirty == (row.pte[exp_way].dirty | is_write), "dirty after hit");
      end
      exp_victim = -1;
      for (int w = 0; w < 4; w++) if (exp_victim < 0 && usable[w] && !row.pte[w].valid) exp_victim = w;
      for (int w = 0; w < 4; w++) if (exp_victim < 0 && usable[w] && !row.lru[w]) exp_victim = w;
      if (exp_victim < 0) exp_victim = way0_reserved ? 1 : 0;
      chk(victim_way == 2'(exp_victim), "victim way");
      chk(victim_ffn == {index, 2'(exp_victim)}, "victim frame");
      chk(victim_pte == row.pte[exp_victim], "victim entry");
      chk(row_fill.pte[exp_victim] == {1'b1, is_write, 1'b1, tag}, "filled entry");
      for (int w = 0; w < 4; w++)
        if (w != exp_victim) chk(row_fill.pte[w] == row.pte[w], "other entries kept");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
