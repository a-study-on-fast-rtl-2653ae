// dta_pkg: types and constants shared by the DIMM tree architecture (DTA)
// memory-management RTL.
//
// Address split (slow partition = physical address space, 39 bits):
//   [38:32] FPPT tag (7 b) | [31:12] FPPT index (20 b) | [11:0] page offset.
// A fast-partition frame number is index*FP_WAYS + way (22 b for 16 GB of
// 4 KB pages). The fast partition page table (FPPT) holds one row per index:
// four 10-bit entries {valid, dirty, pending-replace, tag} plus 4 LRU bits.
// These splits and fields follow the published FPPT layout. Packing a row
// into one 64-bit memory word, the virtual address width and the command
// format used on the DIMM tree are this design's own choices.
package dta_pkg;

  // ---------------- address geometry ----------------
  localparam int unsigned VA_W        = 48;   // virtual address width (assumed)
  localparam int unsigned PAGE_OFS_W  = 12;   // 4 KB pages
  localparam int unsigned VPN_W       = VA_W - PAGE_OFS_W;
  localparam int unsigned PA_W        = 39;
  localparam int unsigned FPPT_TAG_W  = 7;
  localparam int unsigned FPPT_IDX_W  = 20;
  localparam int unsigned FP_WAYS     = 4;
  localparam int unsigned FP_WAY_W    = 2;
  localparam int unsigned SPFN_W      = FPPT_TAG_W + FPPT_IDX_W;  // 27: slow frame number
  localparam int unsigned FPFN_W      = FPPT_IDX_W + FP_WAY_W;    // 22: fast frame number
  localparam int unsigned FRAME_W     = SPFN_W;                   // DT-TLB frame field

  // ---------------- DIMM tree ----------------
  localparam int unsigned TREE_BRANCH   = 4;   // children per T-DIMM
  localparam int unsigned TREE_LEVELS   = 3;   // levels of T-DIMMs below the controller
  localparam int unsigned N_FAST_DIMMS  = 4;   // 16 GB / 4 GB
  localparam int unsigned N_SLOW_DIMMS  = 80;  // 320 GB / 4 GB
  localparam int unsigned N_DIMMS       = N_FAST_DIMMS + N_SLOW_DIMMS;  // 84
  localparam int unsigned DIMM_ID_W     = 7;
  localparam int unsigned DIMM_PAGE_W   = 20;  // 4 GB / 4 KB pages per T-DIMM
  localparam int unsigned WORD_W        = 9;   // 64-bit word index within a page

  // ---------------- FPPT storage ----------------
  localparam int unsigned FPPT_ROWS_PER_PAGE_W = 9;  // 512 rows of 8 bytes per page
  localparam int unsigned FPPT_PAGES = 1 << (FPPT_IDX_W - FPPT_ROWS_PER_PAGE_W); // 2048

  // Where the FPPT itself is kept (the two remedies for FPPT squatting):
  //   FAST_FPPT : in the first FPPT_PAGES sets of way 0 of the fast partition
  //   SLOW_FPPT : in the last FPPT_PAGES frames of the slow partition
  typedef enum logic {FAST_FPPT = 1'b0, SLOW_FPPT = 1'b1} fppt_mode_e;
  localparam logic [SPFN_W-1:0] SLOW_FPPT_BASE =
      SPFN_W'(N_SLOW_DIMMS * (1 << DIMM_PAGE_W) - FPPT_PAGES);

  typedef struct packed {
    logic                  valid;
    logic                  dirty;
    logic                  pending;   // page replacement in flight
    logic [FPPT_TAG_W-1:0] tag;       // slow partition page number tag
  } fppt_pte_t;

  typedef struct packed {
    logic [19:0]              rsvd;
    logic [FP_WAYS-1:0]       lru;    // one recently-used bit per way
    fppt_pte_t [FP_WAYS-1:0]  pte;
  } fppt_row_t;                       // 64 bits, one memory word

  // ---------------- processes sharing the memory port ----------------
  localparam int unsigned N_PROC  = 5;
  localparam int unsigned SRC_W   = 3;              // cores 0..4, FPPT manager 5
  localparam logic [SRC_W-1:0] SRC_MGR = SRC_W'(N_PROC);

  typedef enum logic [1:0] {MEM_RD = 2'd0, MEM_WR = 2'd1, MEM_MOVE = 2'd2} mem_op_e;

  // A command on the DIMM tree. MEM_MOVE copies the whole page
  // (src_dimm, src_page) into (dimm, page) DIMM-to-DIMM.
  typedef struct packed {
    logic [SRC_W-1:0]       src;
    mem_op_e                op;
    logic [DIMM_ID_W-1:0]   dimm;
    logic [DIMM_PAGE_W-1:0] page;
    logic [WORD_W-1:0]      word;
    logic [DIMM_ID_W-1:0]   src_dimm;
    logic [DIMM_PAGE_W-1:0] src_page;
    logic [63:0]            wdata;
  } mem_cmd_t;

  typedef struct packed {
    logic [SRC_W-1:0] src;
    logic [63:0]      rdata;
  } mem_rsp_t;

  // Requests from a core to the FPPT manager.
  typedef enum logic {FP_QUERY = 1'b0, FP_UPLOAD = 1'b1} fppt_op_e;

  // ---------------- frame -> T-DIMM mapping ----------------
  // Fast frames fill fast T-DIMMs 0..3 in order; slow frames fill slow T-DIMMs
  // 4..83 in order (one 4 GB DIMM = 2^20 frames).
  function automatic logic [DIMM_ID_W-1:0] fast_dimm(input logic [FPFN_W-1:0] ffn);
    return DIMM_ID_W'(ffn[FPFN_W-1:DIMM_PAGE_W]);
  endfunction

  function automatic logic [DIMM_ID_W-1:0] slow_dimm(input logic [SPFN_W-1:0] sfn);
    return DIMM_ID_W'(sfn[SPFN_W-1:DIMM_PAGE_W]) + DIMM_ID_W'(N_FAST_DIMMS);
  endfunction

endpackage
