// dram_model: behavioural stand-in for the DRAM ranks of all T-DIMMs
// (testbench only, not synthesizable).
//
// One command port and one response port per T-DIMM. A command takes effect
// the cycle it arrives (read sampled, write stored, page move copied from the
// source T-DIMM page), and its response is presented LAT clocks later, in
// arrival order per T-DIMM. Memory is a sparse map keyed by
// {T-DIMM, page, word}; unwritten words read as zero. misroutes counts
// commands that arrived at a T-DIMM other than the one they name.
module dram_model
  import dta_pkg::*;
#(
  parameter int unsigned NPORT = N_DIMMS,
  parameter int unsigned LAT   = 200
) (
  input  logic             clk,
  input  logic [NPORT-1:0] cmd_valid,
  output logic [NPORT-1:0] cmd_ready,
  input  mem_cmd_t         cmd [NPORT],
  output logic [NPORT-1:0] rsp_valid,
  input  logic [NPORT-1:0] rsp_ready,
  output mem_rsp_t         rsp [NPORT]
);
  typedef logic [DIMM_ID_W+DIMM_PAGE_W+WORD_W-1:0] key_t;
  typedef struct { longint unsigned due; mem_rsp_t r; } pend_t;

  logic [63:0]      mem [key_t];
  pend_t            q [NPORT][$];
  longint unsigned  now = 0;
  int unsigned      misroutes = 0;
  int unsigned      arrivals [NPORT];
  int unsigned      moves = 0;

  initial for (int p = 0; p < NPORT; p++) arrivals[p] = 0;

  function automatic key_t key(input logic [DIMM_ID_W-1:0] d,
                               input logic [DIMM_PAGE_W-1:0] pg,
                               input logic [WORD_W-1:0] w);
    return {d, pg, w};
  endfunction

  function automatic logic [63:0] rd(input key_t k);
    return mem.exists(k) ? mem[k] : 64'd0;
  endfunction

  assign cmd_ready = '1;

  initial begin
    rsp_valid = '0;
    for (int p = 0; p < NPORT; p++) rsp[p] = '0;
  end

  always @(posedge clk) begin
    now = now + 1;
    for (int p = 0; p < NPORT; p++) begin
      if (rsp_valid[p] && rsp_ready[p]) void'(q[p].pop_front());
      if (cmd_valid[p]) begin
        pend_t e;
        arrivals[p]++;
        if (32'(cmd[p].dimm) != p) misroutes++;
        e.due     = now + LAT;
        e.r.src   = cmd[p].src;
        e.r.rdata = '0;
        unique case (cmd[p].op)
          MEM_RD: e.r.rdata = rd(key(cmd[p].dimm, cmd[p].page, cmd[p].word));
          MEM_WR: mem[key(cmd[p].dimm, cmd[p].page, cmd[p].word)] = cmd[p].wdata;
          MEM_MOVE: begin
            moves++;
            for (int w = 0; w < (1 << WORD_W); w++)
              mem[key(cmd[p].dimm, cmd[p].page, WORD_W'(w))] =
                  rd(key(cmd[p].src_dimm, cmd[p].src_page, WORD_W'(w)));
          end
          default: ;
        endcase
        q[p].push_back(e);
      end
      rsp_valid[p] <= q[p].size() != 0 && q[p][0].due <= now;
      rsp[p]       <= (q[p].size() != 0) ? q[p][0].r : '0;
    end
  end

endmodule
