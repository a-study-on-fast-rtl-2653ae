// tb_dir_router: one DIMM interface router (T-DIMM 1 of a branch-4 tree).
// Commands for T-DIMM 1 must leave on the rank channel, commands for its
// children 8..11 and grandchildren (36..51) on the lower channel, each one
// clock after acceptance; commands for any other T-DIMM must be taken and
// dropped. Responses offered at once by the rank and two children must all
// reach the upper channel, one per clock, none lost or duplicated.
module tb_dir_router;
  import dta_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic       dn_in_valid, dn_in_ready, dn_out_valid, dn_out_ready;
  mem_cmd_t   dn_in, dn_out, loc_cmd;
  logic       loc_cmd_valid, loc_cmd_ready, loc_rsp_valid, loc_rsp_ready;
  mem_rsp_t   loc_rsp, up_out;
  logic [3:0] up_in_valid, up_in_ready;
  mem_rsp_t   up_in [4];
  logic       up_out_valid, up_out_ready;

  dir_router #(.MY_ID(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // send one command and classify where it went during the next clock
  task automatic send(input int unsigned target, input int exp); // 0 abort 1 local 2 down
    logic saw_loc, saw_dn;
    @(negedge clk);
    dn_in = '0; dn_in.dimm = DIMM_ID_W'(target); dn_in.wdata = 64'(target);
    dn_in_valid = 1;
    #1 chk(dn_in_ready, "command accepted");
    @(negedge clk);
    dn_in_valid = 0;
    saw_loc = loc_cmd_valid && loc_cmd.wdata == 64'(target);
    saw_dn  = dn_out_valid && dn_out.wdata == 64'(target);
    chk(saw_loc == (exp == 1), $sformatf("execute decision for %0d", target));
    chk(saw_dn  == (exp == 2), $sformatf("forward decision for %0d", target));
    @(negedge clk);
    chk(!loc_cmd_valid && !dn_out_valid, "register empties after one clock");
  endtask

  initial begin
    int got [3];
    dn_in_valid = 0; dn_in = '0; dn_out_ready = 1; loc_cmd_ready = 1;
    loc_rsp_valid = 0; loc_rsp = '0; up_in_valid = '0; up_out_ready = 1;
    for (int k = 0; k < 4; k++) up_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(1, 1);
    for (int t = 8; t <= 11; t++) send(t, 2);
    send(36, 2); send(51, 2);
    send(0, 0); send(2, 0); send(3, 0); send(4, 0); send(12, 0); send(20, 0); send(52, 0); send(83, 0);

    // back-pressure: lower channel not ready holds the command
    @(negedge clk);
    dn_out_ready = 0;
    dn_in = '0; dn_in.dimm = 9; dn_in_valid = 1;
    @(negedge clk);
    dn_in_valid = 0;
    repeat (3) begin
      @(negedge clk);
      chk(dn_out_valid && dn_out.dimm == 9, "command held under back-pressure");
    end
    dn_out_ready = 1;
    @(negedge clk);
    chk(!dn_out_valid, "released");

    // responses from rank, child 0 and child 3 at once
    got = '{0, 0, 0};
    @(negedge clk);
    loc_rsp_valid = 1; loc_rsp = '{src: 3'd1, rdata: 64'hA};
    up_in_valid   = 4'b1001;
    up_in[0]      = '{src: 3'd2, rdata: 64'hB};
    up_in[3]      = '{src: 3'd3, rdata: 64'hC};
    for (int c = 0; c < 10; c++) begin
      logic lr, c0, c3;
      #1;
      lr = loc_rsp_valid && loc_rsp_ready;
      c0 = up_in_valid[0] && up_in_ready[0];
      c3 = up_in_valid[3] && up_in_ready[3];
      @(posedge clk);
      #1;
      if (lr) loc_rsp_valid  = 0;
      if (c0) up_in_valid[0] = 0;
      if (c3) up_in_valid[3] = 0;
      @(negedge clk);
      if (up_out_valid) begin
        if (up_out.rdata == 64'hA) got[0]++;
        if (up_out.rdata == 64'hB) got[1]++;
        if (up_out.rdata == 64'hC) got[2]++;
      end
    end
    chk(got[0] == 1 && got[1] == 1 && got[2] == 1,
        $sformatf("each response forwarded exactly once (%0d %0d %0d)", got[0], got[1], got[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
