// tb_dimm_tree: the full 84-T-DIMM tree with behavioural ranks (3-clock
// latency). First a lone command to every T-DIMM: it must arrive only at
// that T-DIMM's rank, after (tree level + 1) clocks (one for the
// controller's router, one per T-DIMM level), and its response must return
// to the controller with the right source and data. Then 400 back-to-back
// commands to random T-DIMMs: every response must come back exactly once.
module tb_dimm_tree;
  import dta_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic               cmd_valid, cmd_ready, rsp_valid, rsp_ready;
  mem_cmd_t           cmd;
  mem_rsp_t           rsp;
  logic [N_DIMMS-1:0] rank_cmd_valid, rank_cmd_ready, rank_rsp_valid, rank_rsp_ready;
  mem_cmd_t           rank_cmd [N_DIMMS];
  mem_rsp_t           rank_rsp [N_DIMMS];

  dimm_tree dut (.*);
  dram_model #(.NPORT(N_DIMMS), .LAT(3)) u_dram (
    .clk, .cmd_valid(rank_cmd_valid), .cmd_ready(rank_cmd_ready), .cmd(rank_cmd),
    .rsp_valid(rank_rsp_valid), .rsp_ready(rank_rsp_ready), .rsp(rank_rsp)
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int unsigned level_of(input int unsigned d);  // 1, 2 or 3
    return (d < 4) ? 1 : (d < 20) ? 2 : 3;
  endfunction

  int unsigned seen [1 << 16];
  int unsigned nrsp = 0;
  always @(posedge clk) if (rsp_valid && rsp_ready) begin
    nrsp++;
    if (rsp.src == 3'd1) seen[rsp.rdata[15:0]]++;
  end

  initial begin
    cmd_valid = 0; cmd = '0; rsp_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // writes then reads to every T-DIMM, one at a time
    for (int d = 0; d < N_DIMMS; d++) begin
      int unsigned t0, n_prev;
      n_prev = u_dram.arrivals[d];
      @(negedge clk);
      cmd = '0; cmd.op = MEM_WR; cmd.dimm = DIMM_ID_W'(d); cmd.page = DIMM_PAGE_W'(d * 3);
      cmd.word = 9'd7; cmd.wdata = 64'hD000 + 64'(d); cmd.src = 3'd2;
      cmd_valid = 1;
      @(posedge clk); t0 = 0;
      @(negedge clk); cmd_valid = 0;
      while (u_dram.arrivals[d] == n_prev && t0 < 20) begin @(posedge clk); t0++; #1; end
      chk(t0 == level_of(d) + 1, $sformatf("latency to T-DIMM %0d: %0d clocks", d, t0));
      chk(u_dram.arrivals[d] == n_prev + 1, $sformatf("one arrival at T-DIMM %0d", d));
      repeat (20) @(posedge clk);
      @(negedge clk);
      cmd.op = MEM_RD; cmd.wdata = '0; cmd.src = 3'd4;
      cmd_valid = 1;
      @(posedge clk);
      @(negedge clk); cmd_valid = 0;
      begin
        int w;
        w = 0;
        while (!(rsp_valid) && w < 40) begin @(negedge clk); w++; end
        chk(rsp_valid && rsp.src == 3'd4 && rsp.rdata == 64'hD000 + 64'(d),
            $sformatf("read back from T-DIMM %0d: valid %0d src %0d data %h", d, rsp_valid, rsp.src, rsp.rdata));
      end
      repeat (3) @(posedge clk);
    end
    chk(u_dram.misroutes == 0, "no misrouted command");

    // burst of reads to random T-DIMMs, each returning a unique tag
    nrsp = 0;
    for (int i = 0; i < 400; i++) begin
      int d;
      d = $urandom % N_DIMMS;
      @(negedge clk);
      cmd = '0; cmd.op = MEM_WR; cmd.dimm = DIMM_ID_W'(d); cmd.page = 20'hFFFFF;
      cmd.word = 9'(i); cmd.wdata = 64'(i);
      cmd_valid = 1;
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      cmd.op = MEM_RD; cmd.src = 3'd1;
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); cmd_valid = 0;
    repeat (200) @(posedge clk);
    chk(nrsp == 800, $sformatf("all 800 burst responses returned (%0d)", nrsp));
    for (int i = 0; i < 400; i++)
      chk(seen[i] == 1, $sformatf("read %0d answered once with its data", i));
    chk(u_dram.misroutes == 0, "no misrouted command in burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
