// dram_pkg: types and constants shared by the subarray-aware DRAM rank and its
// memory controller.
//
// The command set is the DDR3 set (ACTIVATE, PRECHARGE, READ, WRITE, REFRESH)
// plus SA_SEL, the subarray-select command that MASA adds. PRECHARGE carries a
// subarray ID so that one subarray can be closed selectively (SALP-2, MASA).
// The default geometry is one rank of 8 banks, 32K rows per bank, 8 subarrays
// per bank and 8 KB rows, served as 128 columns of one 64-byte cache line.
// Timing constants are in DRAM clock cycles of DDR3-1066 (tCK = 1.875 ns):
// CL, tRCD and tRP of 8 (the "8-8-8" speed bin), tRA = 4 and tWA = 14 come
// from the design description; the other values are standard DDR3-1066
// numbers for a 2 Gb device, chosen here.
package dram_pkg;

  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,
    CMD_ACT   = 3'd1,
    CMD_PRE   = 3'd2,
    CMD_RD    = 3'd3,
    CMD_WR    = 3'd4,
    CMD_SASEL = 3'd5,
    CMD_REF   = 3'd6
  } cmd_e;

  // Which subarray-level parallelism the controller exploits.
  typedef enum logic [1:0] {
    SCHEME_BASE  = 2'd0,  // subarray-oblivious: one open row per bank
    SCHEME_SALP1 = 2'd1,  // tRP waived between PRE and ACT to different subarrays
    SCHEME_SALP2 = 2'd2,  // ACT to a second subarray before the first is precharged
    SCHEME_MASA  = 2'd3   // many activated subarrays, one designated by SA_SEL
  } scheme_e;

  // Default geometry.
  localparam int unsigned NUM_BANKS   = 8;
  localparam int unsigned SA_PER_BANK = 8;
  localparam int unsigned ROW_BITS    = 15;   // 32K rows per bank
  localparam int unsigned COL_BITS    = 7;    // 128 lines of 64 B in an 8 KB row
  localparam int unsigned LINE_BITS   = 512;  // one 64-byte cache line

  // Default timing, DDR3-1066 cycles.
  localparam int unsigned T_CL    = 8;
  localparam int unsigned T_CWL   = 6;
  localparam int unsigned T_RCD   = 8;
  localparam int unsigned T_RP    = 8;
  localparam int unsigned T_RAS   = 20;
  localparam int unsigned T_RTP   = 4;
  localparam int unsigned T_WR    = 8;
  localparam int unsigned T_CCD   = 4;
  localparam int unsigned T_BURST = 4;     // BL8 occupies 4 clock cycles
  localparam int unsigned T_WTR   = 4;
  localparam int unsigned T_RRD   = 4;
  localparam int unsigned T_FAW   = 20;
  localparam int unsigned T_RA    = 4;     // read-to-activate/select
  localparam int unsigned T_WA    = 14;    // write-to-activate/select
  localparam int unsigned T_RFC   = 86;    // 160 ns
  localparam int unsigned T_REFI  = 4160;  // 7.8 us = 64 ms / 8192

  // Event counters kept by the memory controller.
  typedef struct packed {
    logic [31:0] act;            // ACTIVATE commands, PARA ones included
    logic [31:0] pre;            // PRECHARGE commands
    logic [31:0] rd;             // READ commands
    logic [31:0] wr;             // WRITE commands
    logic [31:0] sasel;          // SA_SEL commands (MASA)
    logic [31:0] refresh;        // REFRESH commands
    logic [31:0] para_heads;     // PARA coin flips that came up heads
    logic [31:0] para_act;       // ACTIVATEs issued for PARA refreshes
    logic [31:0] para_overflow;  // PARA refreshes lost to a full queue
    logic [31:0] salp1_overlap;  // ACT inside another subarray's tRP window
    logic [31:0] salp2_overlap;  // ACT while another subarray of the bank is activated
    logic [31:0] masa_multi;     // ACT while two or more subarrays of the bank are activated
    logic [31:0] drain_entries;  // times the write queue started draining
    logic [31:0] req_stall;      // cycles a request waited at the input
  } mc_stats_t;

endpackage
