// tb_fppt_layout: checks where both layouts put FPPT rows. Fast-FPPT: row i
// in fast frame (i/512)*4 + 0, word i%512, way 0 reserved exactly for
// indices below 2048. Slow-FPPT: row i in slow frame 80*2^20 - 2048 + i/512,
// no reserved way.
module tb_fppt_layout;
  import dta_pkg::*;

  logic [FPPT_IDX_W-1:0] index;
  logic                  f_in_fast, f_res, s_in_fast, s_res;
  logic [FRAME_W-1:0]    f_frame, s_frame;
  logic [WORD_W-1:0]     f_word, s_word;

  fppt_layout dut_fast (.index, .row_in_fast(f_in_fast), .row_frame(f_frame),
                        .row_word(f_word), .way0_reserved(f_res));
  fppt_layout #(.MODE(SLOW_FPPT)) dut_slow (.index, .row_in_fast(s_in_fast),
                        .row_frame(s_frame), .row_word(s_word), .way0_reserved(s_res));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at index %0d", what, index); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int unsigned i;
      case (n)
        0: i = 0; 1: i = 2047; 2: i = 2048; 3: i = 511; 4: i = 512; 5: i = (1 << 20) - 1;
        default: i = $urandom % (1 << 20);
      endcase
      index = FPPT_IDX_W'(i);
      #1;
      chk(f_in_fast == 1'b1, "fast: row in fast partition");
      chk(f_frame == FRAME_W'((i / 512) * 4), "fast: frame in way 0 of set i/512");
      chk(f_word == WORD_W'(i % 512), "fast: word");
      chk(f_res == (i < 2048), "fast: reserved way 0");
      chk(s_in_fast == 1'b0, "slow: row in slow partition");
      chk(s_frame == FRAME_W'(80 * (1 << 20) - 2048 + i / 512), "slow: frame");
      chk(s_word == WORD_W'(i % 512), "slow: word");
      chk(s_res == 1'b0, "slow: no reserved way");
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
