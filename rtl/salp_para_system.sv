// salp_para_system: a memory system with subarray-level parallelism and PARA.
//
// One channel with one rank: cache-line requests are mapped onto bank, row
// and column by line-interleaving (bank in the lowest bits, then column, then
// row), scheduled by the subarray-aware
// memory controller (mem_ctrl, which holds the PARA unit), and served by a
// rank of MASA-capable banks (dram_rank). The scheme input selects how far
// the controller exploits the subarrays (baseline, SALP-1, SALP-2 or MASA);
// para_en, para_p_thresh and para_lsb_offset configure PARA; refresh_en turns
// periodic refresh on.
//
// Interface: a request is taken on req_valid && req_ready; writes are posted,
// reads return in order on resp_valid with their id. The DRAM command bus and
// the rank's per-subarray activated/designated bits are brought out for
// observation, together with the controller's event counters and three error
// flags of the rank: short_circuit (two subarrays on the global bitlines),
// access_error (column access without a raised wordline) and ref_error
// (REFRESH with an activated subarray). A read takes at least
// 1 (command register) + tRCD + CL cycles from acceptance when its row is closed.
//
// Reset: rst_n is the asynchronous reset of every flip-flop. Lint reports it
// as also used synchronously; that use is only the disable condition of the
// assertions in dram_bank and mem_ctrl.
//
// Follows the source design: line-interleaving, the controller and the rank
// structure. This design's choices: the bit order of the mapping, the
// request/response interface, the monitor outputs and the error flags.
module salp_para_system #(
  parameter int unsigned NUM_BANKS   = dram_pkg::NUM_BANKS,
  parameter int unsigned SA_PER_BANK = dram_pkg::SA_PER_BANK,
  parameter int unsigned ROW_BITS    = dram_pkg::ROW_BITS,
  parameter int unsigned COL_BITS    = dram_pkg::COL_BITS,
  parameter int unsigned LINE_BITS   = dram_pkg::LINE_BITS,
  parameter int unsigned ID_BITS     = 8,
  parameter int unsigned RQ_DEPTH    = 64,
  parameter int unsigned WQ_DEPTH    = 64,
  parameter int unsigned WQ_HIGH     = 48,
  parameter int unsigned WQ_LOW      = 16,
  parameter int unsigned T_REFI      = dram_pkg::T_REFI,
  parameter int unsigned P_BITS      = 20,
  localparam int unsigned BANK_BITS   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned SA_BITS     = (SA_PER_BANK > 1) ? $clog2(SA_PER_BANK) : 1,
  localparam int unsigned SA_ROW_BITS = ROW_BITS - SA_BITS,
  localparam int unsigned ADDR_BITS   = ROW_BITS + COL_BITS + BANK_BITS,
  localparam int unsigned OFF_BITS    = $clog2(ROW_BITS),
  localparam int unsigned NSA         = NUM_BANKS * SA_PER_BANK
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  dram_pkg::scheme_e      scheme,
  input  logic                   refresh_en,
  input  logic                   para_en,
  input  logic [P_BITS-1:0]      para_p_thresh,
  input  logic [OFF_BITS-1:0]    para_lsb_offset,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_write,
  input  logic [ADDR_BITS-1:0]   req_line_addr,
  input  logic [LINE_BITS-1:0]   req_wdata,
  input  logic [ID_BITS-1:0]     req_id,
  output logic                   resp_valid,
  output logic [ID_BITS-1:0]     resp_id,
  output logic [LINE_BITS-1:0]   resp_data,
  output dram_pkg::cmd_e         mon_cmd,
  output logic [BANK_BITS-1:0]   mon_bank,
  output logic [SA_BITS-1:0]     mon_sa,
  output logic [SA_ROW_BITS-1:0] mon_sa_row,
  output logic [NSA-1:0]         sa_activated,
  output logic [NSA-1:0]         sa_designated,
  output logic                   drain_mode,
  output dram_pkg::mc_stats_t    stats,
  output logic                   short_circuit,
  output logic                   access_error,
  output logic                   ref_error
);

  // Line-interleaved address mapping: consecutive cache lines go to
  // consecutive banks; above the bank bits come the column (line within the
  // row) and then the row, whose top bits select the subarray.
  //   req_line_addr = { row, column, bank }
  logic [BANK_BITS-1:0]   m_bank;
  logic [COL_BITS-1:0]    m_col;
  logic [ROW_BITS-1:0]    m_row;
  assign m_bank = req_line_addr[BANK_BITS-1:0];
  assign m_col  = req_line_addr[BANK_BITS +: COL_BITS];
  assign m_row  = req_line_addr[BANK_BITS+COL_BITS +: ROW_BITS];

  dram_pkg::cmd_e         c_cmd;
  logic [BANK_BITS-1:0]   c_bank;
  logic [SA_BITS-1:0]     c_sa;
  logic [SA_ROW_BITS-1:0] c_sa_row;
  logic [COL_BITS-1:0]    c_col;
  logic [LINE_BITS-1:0]   c_wdata;
  logic                   r_valid;
  logic [LINE_BITS-1:0]   r_data;

  mem_ctrl #(.NUM_BANKS(NUM_BANKS), .SA_PER_BANK(SA_PER_BANK), .ROW_BITS(ROW_BITS),
             .COL_BITS(COL_BITS), .LINE_BITS(LINE_BITS), .ID_BITS(ID_BITS),
             .RQ_DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH), .WQ_HIGH(WQ_HIGH),
             .WQ_LOW(WQ_LOW), .T_REFI(T_REFI), .P_BITS(P_BITS)) u_mc (
    .clk, .rst_n,
    .scheme, .refresh_en, .para_en, .para_p_thresh, .para_lsb_offset,
    .req_valid, .req_ready, .req_write,
    .req_bank     (m_bank),
    .req_row      (m_row),
    .req_col      (m_col),
    .req_wdata, .req_id,
    .resp_valid, .resp_id, .resp_data,
    .dram_cmd     (c_cmd),
    .dram_bank    (c_bank),
    .dram_sa      (c_sa),
    .dram_sa_row  (c_sa_row),
    .dram_col     (c_col),
    .dram_wdata   (c_wdata),
    .dram_rd_valid(r_valid),
    .dram_rd_data (r_data),
    .drain_mode,
    .stats
  );

  dram_rank #(.NUM_BANKS(NUM_BANKS), .SA_PER_BANK(SA_PER_BANK),
              .SA_ROW_BITS(SA_ROW_BITS), .COL_BITS(COL_BITS),
              .LINE_BITS(LINE_BITS)) u_rank (
    .clk, .rst_n,
    .cmd          (c_cmd),
    .bank         (c_bank),
    .sa           (c_sa),
    .sa_row       (c_sa_row),
    .col          (c_col),
    .wr_data      (c_wdata),
    .rd_valid     (r_valid),
    .rd_data      (r_data),
    .activated    (sa_activated),
    .designated   (sa_designated),
    .short_circuit,
    .access_error,
    .ref_error
  );

  assign mon_cmd    = c_cmd;
  assign mon_bank   = c_bank;
  assign mon_sa     = c_sa;
  assign mon_sa_row = c_sa_row;

endmodule
