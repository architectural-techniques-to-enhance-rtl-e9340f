// mem_ctrl: subarray-aware DDR3 memory controller with PARA.
//
// The controller serves 64-byte cache-line requests on one rank. It knows
// that every bank is split into SA_PER_BANK subarrays and keeps, per
// subarray, whether it is activated, which row is raised and whether it is
// the bank's designated subarray. With that it can exploit subarray-level
// parallelism in one of four ways, chosen by the `scheme` input (the choice a
// system makes from what the DRAM module reports it supports):
//  * SCHEME_BASE:  subarray-oblivious. One activated row per bank; an ACT
//                  waits tRP after any PRE to the bank.
//  * SCHEME_SALP1: tRP is only kept between a PRE and an ACT to the same
//                  subarray; an ACT to another subarray may follow the PRE
//                  in the next cycle.
//  * SCHEME_SALP2: additionally an ACT to a second subarray may be issued
//                  before the activated one is precharged (its write
//                  recovery overlaps the new activation), as long as the
//                  activated one has no more requests waiting and has met
//                  tRAS. No column command is issued while two are
//                  activated, and an ACT
//                  waits tRA / tWA after a READ / WRITE to the bank.
//  * SCHEME_MASA:  any number of subarrays of a bank may be activated. A
//                  column command goes to the designated subarray; a request
//                  that hits the row of another activated subarray first
//                  gets an SA_SEL. ACT and SA_SEL wait tRA / tWA after a
//                  column command to the bank.
//
// Scheduling is FR-FCFS over separate read and write queues: a ready column
// command (row hit) goes first, then the oldest ready ACT or SA_SEL, then
// precharges. Writes are posted (no response) and drained in batches: the
// controller turns to writes when the write queue reaches WQ_HIGH entries or
// no read is waiting, and back to reads when it falls to WQ_LOW entries with
// reads waiting, or is empty. A write to a line already in the write queue
// replaces its data. A request to a line that waits in the queue of the other
// kind is held at the input (req_ready low) until that entry is served, which
// keeps read/write order per line. The row policy is closed-row: a subarray
// is precharged as soon as no queued request of the kind being served wants
// its row.
//
// Refresh: every T_REFI cycles all subarrays are precharged and a REFRESH is
// issued; ACT and SA_SEL wait until T_RFC after it.
// PARA: every PRECHARGE is reported to para_unit; a refresh of an adjacent
// row it returns is served first: the subarray is precharged if another row is
// raised in it, then the row is activated and, having no requests, closed
// again by the closed-row policy after tRAS.
//
// Interface: requests are accepted on req_valid && req_ready with bank,
// row and column already mapped. Read data returns in order on resp_valid
// with the request's id. DRAM commands are registered: one per cycle on the
// dram_* outputs. Read data from the rank is expected on dram_rd_valid; the
// rank returns it in command order.
// Timing defaults are DDR3-1066 cycles (see dram_pkg).
// Follows the source design: the four schemes and their command rules, tRA
// and tWA, SA_SEL, 64/64 queues, FR-FCFS, writes in batches, closed-row
// policy, tRRD and tFAW across all ACTs, refresh every 7.8 us, and PARA on
// every row close. This design's choices: the drain watermarks, the command
// priority, the SALP-2 rule for when a second subarray may be opened, the
// same-line hazard handling, in-order read return, and the DDR3 timings the
// source does not give (see dram_pkg).
module mem_ctrl #(
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
  parameter int unsigned T_CL        = dram_pkg::T_CL,
  parameter int unsigned T_CWL       = dram_pkg::T_CWL,
  parameter int unsigned T_RCD       = dram_pkg::T_RCD,
  parameter int unsigned T_RP        = dram_pkg::T_RP,
  parameter int unsigned T_RAS       = dram_pkg::T_RAS,
  parameter int unsigned T_RTP       = dram_pkg::T_RTP,
  parameter int unsigned T_WR        = dram_pkg::T_WR,
  parameter int unsigned T_CCD       = dram_pkg::T_CCD,
  parameter int unsigned T_BURST     = dram_pkg::T_BURST,
  parameter int unsigned T_WTR       = dram_pkg::T_WTR,
  parameter int unsigned T_RRD       = dram_pkg::T_RRD,
  parameter int unsigned T_FAW       = dram_pkg::T_FAW,
  parameter int unsigned T_RA        = dram_pkg::T_RA,
  parameter int unsigned T_WA        = dram_pkg::T_WA,
  parameter int unsigned T_RFC       = dram_pkg::T_RFC,
  parameter int unsigned T_REFI      = dram_pkg::T_REFI,
  parameter int unsigned P_BITS      = 20,
  parameter int unsigned PARA_FIFO   = 4,
  localparam int unsigned BANK_BITS   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned SA_BITS     = (SA_PER_BANK > 1) ? $clog2(SA_PER_BANK) : 1,
  localparam int unsigned SA_ROW_BITS = ROW_BITS - SA_BITS,
  localparam int unsigned OFF_BITS    = $clog2(ROW_BITS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  dram_pkg::scheme_e      scheme,
  input  logic                   refresh_en,
  input  logic                   para_en,
  input  logic [P_BITS-1:0]      para_p_thresh,
  input  logic [OFF_BITS-1:0]    para_lsb_offset,
  // requests
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_write,
  input  logic [BANK_BITS-1:0]   req_bank,
  input  logic [ROW_BITS-1:0]    req_row,
  input  logic [COL_BITS-1:0]    req_col,
  input  logic [LINE_BITS-1:0]   req_wdata,
  input  logic [ID_BITS-1:0]     req_id,
  // read responses
  output logic                   resp_valid,
  output logic [ID_BITS-1:0]     resp_id,
  output logic [LINE_BITS-1:0]   resp_data,
  // DRAM command bus
  output dram_pkg::cmd_e         dram_cmd,
  output logic [BANK_BITS-1:0]   dram_bank,
  output logic [SA_BITS-1:0]     dram_sa,
  output logic [SA_ROW_BITS-1:0] dram_sa_row,
  output logic [COL_BITS-1:0]    dram_col,
  output logic [LINE_BITS-1:0]   dram_wdata,
  input  logic                   dram_rd_valid,
  input  logic [LINE_BITS-1:0]   dram_rd_data,
  // status
  output logic                   drain_mode,
  output dram_pkg::mc_stats_t    stats
);
  import dram_pkg::*;

  localparam int unsigned NQ     = RQ_DEPTH + WQ_DEPTH;
  localparam int unsigned QI     = $clog2(NQ);
  localparam int unsigned TW     = 8;   // timer width
  localparam int unsigned CNT_W  = $clog2(NQ + 1);
  localparam int unsigned RFIFO  = 8;
  localparam int unsigned WI     = (WQ_DEPTH > 1) ? $clog2(WQ_DEPTH) : 1;

  localparam logic [TW-1:0] RD2WR   = TW'(T_CL + T_CCD + 2 - T_CWL);
  localparam logic [TW-1:0] WR2RD   = TW'(T_CWL + T_BURST + T_WTR);
  localparam logic [TW-1:0] WR2PRE  = TW'(T_CWL + T_BURST + T_WR);

  typedef struct packed {
    logic                 valid;
    logic [BANK_BITS-1:0] bank;
    logic [ROW_BITS-1:0]  row;
    logic [COL_BITS-1:0]  col;
    logic [ID_BITS-1:0]   id;
    logic [31:0]          age;
  } entry_t;

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  entry_t                q [NQ];              // [0, RQ_DEPTH): reads, rest: writes
  logic [LINE_BITS-1:0]  wq_data [WQ_DEPTH];
  logic [31:0]           stamp;

  logic                  sa_open [NUM_BANKS][SA_PER_BANK];
  logic [ROW_BITS-1:0]   sa_row  [NUM_BANKS][SA_PER_BANK];
  logic [TW-1:0]         t_rcd   [NUM_BANKS][SA_PER_BANK];
  logic [TW-1:0]         t_ras   [NUM_BANKS][SA_PER_BANK];
  logic [TW-1:0]         t_wrp   [NUM_BANKS][SA_PER_BANK]; // column-to-PRE
  logic [TW-1:0]         t_rp    [NUM_BANKS][SA_PER_BANK];
  logic [SA_BITS-1:0]    desig   [NUM_BANKS];
  logic [TW-1:0]         t_brp   [NUM_BANKS];   // tRP after any PRE to the bank
  logic [TW-1:0]         t_ra    [NUM_BANKS];   // tRA / tWA after a column command
  logic [TW-1:0]         t_rrd, t_ccd, t_rtw, t_wtr, t_rfc;
  logic [TW-1:0]         faw [4];
  logic [15:0]           refi_cnt;
  logic                  ref_pending;
  logic                  drain;

  // ---------------------------------------------------------------------
  // Derived state
  // ---------------------------------------------------------------------
  logic [SA_BITS:0]      nopen [NUM_BANKS];
  logic                  any_open, all_rp_done, faw_ok;
  logic [CNT_W-1:0]      rcount, wcount;

  always_comb begin
    any_open    = 1'b0;
    all_rp_done = 1'b1;
    for (int b = 0; b < int'(NUM_BANKS); b++) begin
      nopen[b] = '0;
      if (t_brp[b] != '0) all_rp_done = 1'b0;
      for (int s = 0; s < int'(SA_PER_BANK); s++) begin
        nopen[b] += (SA_BITS+1)'(sa_open[b][s]);
        if (t_rp[b][s] != '0) all_rp_done = 1'b0;
      end
      if (nopen[b] != '0) any_open = 1'b1;
    end
    faw_ok = 1'b0;
    for (int k = 0; k < 4; k++) if (faw[k] == '0) faw_ok = 1'b1;
    rcount = '0;
    wcount = '0;
    for (int i = 0; i < int'(NQ); i++)
      if (q[i].valid) begin
        if (i < int'(RQ_DEPTH)) rcount += 1'b1;
        else                    wcount += 1'b1;
      end
  end

  function automatic logic [SA_BITS-1:0] sa_of(input logic [ROW_BITS-1:0] r);
    return r[ROW_BITS-1 -: SA_BITS];
  endfunction

  // Requests of the kind being served that hit each activated row.
  logic                  wants [NUM_BANKS][SA_PER_BANK];
  always_comb begin
    for (int b = 0; b < int'(NUM_BANKS); b++)
      for (int s = 0; s < int'(SA_PER_BANK); s++) wants[b][s] = 1'b0;
    for (int i = 0; i < int'(NQ); i++)
      if (q[i].valid && ((i >= int'(RQ_DEPTH)) == drain) &&
          sa_open[q[i].bank][sa_of(q[i].row)] &&
          sa_row[q[i].bank][sa_of(q[i].row)] == q[i].row)
        wants[q[i].bank][sa_of(q[i].row)] = 1'b1;
  end

  // ---------------------------------------------------------------------
  // PARA
  // ---------------------------------------------------------------------
  logic                 para_close;
  logic [BANK_BITS-1:0] para_close_bank;
  logic [ROW_BITS-1:0]  para_close_row;
  logic                 para_valid, para_pop, para_heads, para_ovf;
  logic [BANK_BITS-1:0] para_bank;
  logic [ROW_BITS-1:0]  para_row;
  logic [SA_BITS-1:0]   para_sa;

  para_unit #(.ROW_BITS(ROW_BITS), .BANK_BITS(BANK_BITS), .P_BITS(P_BITS),
              .FIFO_DEPTH(PARA_FIFO)) u_para (
    .clk, .rst_n,
    .p_thresh   (para_p_thresh),
    .lsb_offset (para_lsb_offset),
    .close_valid(para_close && para_en),
    .close_bank (para_close_bank),
    .close_row  (para_close_row),
    .ref_valid  (para_valid),
    .ref_bank   (para_bank),
    .ref_row    (para_row),
    .ref_ready  (para_pop),
    .heads      (para_heads),
    .overflow   (para_ovf)
  );
  assign para_sa = sa_of(para_row);

  // ---------------------------------------------------------------------
  // Command legality
  // ---------------------------------------------------------------------
  function automatic logic act_ok(input logic [BANK_BITS-1:0] b,
                                  input logic [SA_BITS-1:0] s);
    logic ok;
    ok = !ref_pending && t_rfc == '0 && t_rrd == '0 && faw_ok &&
         !sa_open[b][s] && t_rp[b][s] == '0;
    unique case (scheme)
      SCHEME_BASE:  ok = ok && nopen[b] == '0 && t_brp[b] == '0;
      SCHEME_SALP1: ok = ok && nopen[b] == '0;
      SCHEME_SALP2: begin
        if (nopen[b] == 1) begin
          // the activated subarray must be finished with: no requests
          // left and tRAS met, so only its write recovery (or tRTP) remains
          for (int x = 0; x < int'(SA_PER_BANK); x++)
            if (sa_open[b][x] && (wants[b][x] || t_ras[b][x] != '0)) ok = 1'b0;
          ok = ok && t_ra[b] == '0;
        end else if (nopen[b] != '0) ok = 1'b0;
      end
      default:      ok = ok && t_ra[b] == '0;
    endcase
    return ok;
  endfunction

  function automatic logic pre_ok(input logic [BANK_BITS-1:0] b,
                                  input logic [SA_BITS-1:0] s);
    return sa_open[b][s] && t_ras[b][s] == '0 && t_wrp[b][s] == '0;
  endfunction

  // ---------------------------------------------------------------------
  // Scheduler
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {SEL_NONE, SEL_REF, SEL_PRE, SEL_PARA_ACT, SEL_COL,
                            SEL_ACT, SEL_SASEL} sel_e;

  sel_e                 sel;
  logic [QI-1:0]        sel_q;
  logic [BANK_BITS-1:0] sel_bank;
  logic [SA_BITS-1:0]   sel_sa;
  logic                 para_done;   // PARA row already activated: drop it

  always_comb begin
    logic          col_found, row_found;
    logic [31:0]   col_age, row_age;
    logic [QI-1:0] col_i, row_i;
    sel_e          row_kind;
    logic          pre_found, fpre_found;
    logic [BANK_BITS-1:0] pre_b, fpre_b;
    logic [SA_BITS-1:0]   pre_s, fpre_s;
    logic                 force_it;

    sel       = SEL_NONE;
    sel_q     = '0;
    sel_bank  = '0;
    sel_sa    = '0;
    para_done = 1'b0;

    // requests
    col_found = 1'b0; row_found = 1'b0;
    col_age = '1;     row_age = '1;
    col_i = '0;       row_i = '0;
    row_kind = SEL_NONE;
    for (int i = 0; i < int'(NQ); i++) begin
      logic [BANK_BITS-1:0] b;
      logic [SA_BITS-1:0]   s;
      logic                 wr, hit;
      b   = q[i].bank;
      s   = sa_of(q[i].row);
      wr  = (i >= int'(RQ_DEPTH));
      hit = sa_open[b][s] && sa_row[b][s] == q[i].row;
      if (q[i].valid && wr == drain) begin
        if (hit && (scheme != SCHEME_MASA || desig[b] == s)) begin
          if (t_rcd[b][s] == '0 && t_ccd == '0 &&
              (wr ? t_rtw == '0 : t_wtr == '0) &&
              (scheme != SCHEME_SALP2 || nopen[b] == 1) &&
              q[i].age < col_age) begin
            col_found = 1'b1; col_age = q[i].age; col_i = QI'(i);
          end
        end else if (hit) begin
          if (!ref_pending && t_ra[b] == '0 && q[i].age < row_age) begin
            row_found = 1'b1; row_age = q[i].age; row_i = QI'(i); row_kind = SEL_SASEL;
          end
        end else if (!sa_open[b][s]) begin
          if (act_ok(b, s) && q[i].age < row_age) begin
            row_found = 1'b1; row_age = q[i].age; row_i = QI'(i); row_kind = SEL_ACT;
          end
        end
      end
    end

    // precharges: forced ones (refresh, PARA, SALP-2 second subarray) and
    // closed-row ones
    pre_found = 1'b0;  fpre_found = 1'b0;
    pre_b = '0; pre_s = '0; fpre_b = '0; fpre_s = '0;
    force_it = 1'b0;
    for (int b = 0; b < int'(NUM_BANKS); b++)
      for (int s = 0; s < int'(SA_PER_BANK); s++)
        if (pre_ok(BANK_BITS'(b), SA_BITS'(s))) begin
          force_it = ref_pending ||
                     (para_en && para_valid && para_bank == BANK_BITS'(b) &&
                      para_sa == SA_BITS'(s) && sa_row[b][s] != para_row) ||
                     (scheme == SCHEME_SALP2 && nopen[b] > 1 && desig[b] != SA_BITS'(s));
          if (force_it && !fpre_found) begin
            fpre_found = 1'b1; fpre_b = BANK_BITS'(b); fpre_s = SA_BITS'(s);
          end
          if (!wants[b][s] && !pre_found) begin
            pre_found = 1'b1; pre_b = BANK_BITS'(b); pre_s = SA_BITS'(s);
          end
        end

    if (ref_pending && !any_open && all_rp_done && t_rfc == '0) begin
      sel = SEL_REF;
    end else if (fpre_found) begin
      sel = SEL_PRE; sel_bank = fpre_b; sel_sa = fpre_s;
    end else if (para_en && para_valid && sa_open[para_bank][para_sa] &&
                 sa_row[para_bank][para_sa] == para_row) begin
      para_done = 1'b1;      // the row is raised already: it is being restored
      if (col_found) begin
        sel = SEL_COL; sel_q = col_i;
      end
    end else if (para_en && para_valid && act_ok(para_bank, para_sa)) begin
      sel = SEL_PARA_ACT; sel_bank = para_bank; sel_sa = para_sa;
    end else if (col_found) begin
      sel = SEL_COL; sel_q = col_i;
    end else if (row_found) begin
      sel = row_kind; sel_q = row_i;
    end else if (pre_found) begin
      sel = SEL_PRE; sel_bank = pre_b; sel_sa = pre_s;
    end
    if (sel == SEL_COL || sel == SEL_ACT || sel == SEL_SASEL) begin
      sel_bank = q[sel_q].bank;
      sel_sa   = sa_of(q[sel_q].row);
    end
  end

  assign para_pop = para_en && para_valid && (sel == SEL_PARA_ACT || para_done);

  // ---------------------------------------------------------------------
  // Request acceptance
  // ---------------------------------------------------------------------
  logic          conflict, merge, slot_found;
  logic [QI-1:0] merge_i, slot_i;

  always_comb begin
    conflict   = 1'b0;
    merge      = 1'b0;
    merge_i    = '0;
    slot_found = 1'b0;
    slot_i     = '0;
    for (int i = 0; i < int'(NQ); i++) begin
      logic wr;
      wr = (i >= int'(RQ_DEPTH));
      if (q[i].valid && q[i].bank == req_bank && q[i].row == req_row &&
          q[i].col == req_col) begin
        if (wr != req_write) conflict = 1'b1;
        else if (wr && !(sel == SEL_COL && sel_q == QI'(i))) begin
          merge = 1'b1; merge_i = QI'(i);
        end
      end
      if (!q[i].valid && wr == req_write && !slot_found) begin
        slot_found = 1'b1; slot_i = QI'(i);
      end
    end
  end

  assign req_ready = !conflict && (merge || slot_found);

  // ---------------------------------------------------------------------
  // Read return
  // ---------------------------------------------------------------------
  logic [ID_BITS-1:0] rid_fifo [RFIFO];
  logic [2:0]         rid_wp, rid_rp;

  assign resp_valid = dram_rd_valid;
  assign resp_id    = rid_fifo[rid_rp];
  assign resp_data  = dram_rd_data;

  // ---------------------------------------------------------------------
  // Sequential part
  // ---------------------------------------------------------------------
  function automatic logic [TW-1:0] dec(input logic [TW-1:0] t);
    return (t == '0) ? '0 : t - 1'b1;
  endfunction

  function automatic logic [TW-1:0] tmax(input logic [TW-1:0] a, input logic [TW-1:0] b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NQ); i++) q[i] <= '0;
      for (int i = 0; i < int'(WQ_DEPTH); i++) wq_data[i] <= '0;
      stamp <= '0;
      for (int b = 0; b < int'(NUM_BANKS); b++) begin
        desig[b] <= '0;
        t_brp[b] <= '0;
        t_ra[b]  <= '0;
        for (int s = 0; s < int'(SA_PER_BANK); s++) begin
          sa_open[b][s] <= 1'b0;
          sa_row[b][s]  <= '0;
          t_rcd[b][s]   <= '0;
          t_ras[b][s]   <= '0;
          t_wrp[b][s]   <= '0;
          t_rp[b][s]    <= '0;
        end
      end
      t_rrd <= '0; t_ccd <= '0; t_rtw <= '0; t_wtr <= '0; t_rfc <= '0;
      for (int k = 0; k < 4; k++) faw[k] <= '0;
      refi_cnt    <= 16'(T_REFI);
      ref_pending <= 1'b0;
      drain       <= 1'b0;
      dram_cmd    <= CMD_NOP;
      dram_bank   <= '0;
      dram_sa     <= '0;
      dram_sa_row <= '0;
      dram_col    <= '0;
      dram_wdata  <= '0;
      rid_wp      <= '0;
      rid_rp      <= '0;
      for (int k = 0; k < int'(RFIFO); k++) rid_fifo[k] <= '0;
      stats       <= '0;
      para_close      <= 1'b0;
      para_close_bank <= '0;
      para_close_row  <= '0;
    end else begin
      // timers
      for (int b = 0; b < int'(NUM_BANKS); b++) begin
        t_brp[b] <= dec(t_brp[b]);
        t_ra[b]  <= dec(t_ra[b]);
        for (int s = 0; s < int'(SA_PER_BANK); s++) begin
          t_rcd[b][s] <= dec(t_rcd[b][s]);
          t_ras[b][s] <= dec(t_ras[b][s]);
          t_wrp[b][s] <= dec(t_wrp[b][s]);
          t_rp[b][s]  <= dec(t_rp[b][s]);
        end
      end
      t_rrd <= dec(t_rrd); t_ccd <= dec(t_ccd); t_rtw <= dec(t_rtw);
      t_wtr <= dec(t_wtr); t_rfc <= dec(t_rfc);
      for (int k = 0; k < 4; k++) faw[k] <= dec(faw[k]);

      // refresh interval
      if (refi_cnt == '0) begin
        refi_cnt    <= 16'(T_REFI - 1);
        if (refresh_en) ref_pending <= 1'b1;
      end else begin
        refi_cnt <= refi_cnt - 1'b1;
      end

      // write batching
      if (!drain && (wcount >= CNT_W'(WQ_HIGH) || (rcount == '0 && wcount != '0))) begin
        drain <= 1'b1;
        stats.drain_entries <= stats.drain_entries + 1;
      end else if (drain && (wcount == '0 || (wcount <= CNT_W'(WQ_LOW) && rcount != '0))) begin
        drain <= 1'b0;
      end

      // accept a request
      if (req_valid && !req_ready) stats.req_stall <= stats.req_stall + 1;
      if (req_valid && req_ready) begin
        if (merge) begin
          wq_data[WI'(merge_i - QI'(RQ_DEPTH))] <= req_wdata;
          q[merge_i].id                    <= req_id;
        end else begin
          q[slot_i] <= '{valid: 1'b1, bank: req_bank, row: req_row, col: req_col,
                         id: req_id, age: stamp};
          if (req_write) wq_data[WI'(slot_i - QI'(RQ_DEPTH))] <= req_wdata;
          stamp <= stamp + 1;
        end
      end

      // read return bookkeeping
      if (dram_rd_valid) rid_rp <= rid_rp + 1'b1;

      // issue
      dram_cmd    <= CMD_NOP;
      dram_bank   <= sel_bank;
      dram_sa     <= sel_sa;
      dram_sa_row <= '0;
      dram_col    <= '0;
      para_close  <= 1'b0;
      unique case (sel)
        SEL_REF: begin
          dram_cmd    <= CMD_REF;
          ref_pending <= 1'b0;
          t_rfc       <= TW'(T_RFC);
          stats.refresh <= stats.refresh + 1;
        end
        SEL_PRE: begin
          dram_cmd <= CMD_PRE;
          sa_open[sel_bank][sel_sa] <= 1'b0;
          t_rp[sel_bank][sel_sa]    <= TW'(T_RP);
          t_brp[sel_bank]           <= TW'(T_RP);
          para_close      <= 1'b1;
          para_close_bank <= sel_bank;
          para_close_row  <= sa_row[sel_bank][sel_sa];
          stats.pre <= stats.pre + 1;
        end
        SEL_ACT, SEL_PARA_ACT: begin
          logic [ROW_BITS-1:0] r;
          r = (sel == SEL_ACT) ? q[sel_q].row : para_row;
          dram_cmd    <= CMD_ACT;
          dram_sa_row <= r[SA_ROW_BITS-1:0];
          sa_open[sel_bank][sel_sa] <= 1'b1;
          sa_row[sel_bank][sel_sa]  <= r;
          t_rcd[sel_bank][sel_sa]   <= TW'(T_RCD);
          t_ras[sel_bank][sel_sa]   <= TW'(T_RAS);
          desig[sel_bank]           <= sel_sa;
          t_rrd <= TW'(T_RRD);
          begin
            logic done;
            done = 1'b0;
            for (int k = 0; k < 4; k++)
              if (!done && faw[k] == '0) begin
                faw[k] <= TW'(T_FAW);
                done = 1'b1;
              end
          end
          stats.act <= stats.act + 1;
          if (sel == SEL_PARA_ACT) stats.para_act <= stats.para_act + 1;
          if (t_brp[sel_bank] != '0 && scheme != SCHEME_BASE)
            stats.salp1_overlap <= stats.salp1_overlap + 1;
          if (nopen[sel_bank] >= 1) stats.salp2_overlap <= stats.salp2_overlap + 1;
          if (nopen[sel_bank] >= 2) stats.masa_multi <= stats.masa_multi + 1;
        end
        SEL_SASEL: begin
          dram_cmd    <= CMD_SASEL;
          dram_sa_row <= q[sel_q].row[SA_ROW_BITS-1:0];
          desig[sel_bank] <= sel_sa;
          stats.sasel <= stats.sasel + 1;
        end
        SEL_COL: begin
          dram_col  <= q[sel_q].col;
          q[sel_q].valid <= 1'b0;
          t_ccd <= TW'(T_CCD);
          if (int'(sel_q) >= int'(RQ_DEPTH)) begin
            dram_cmd   <= CMD_WR;
            dram_wdata <= wq_data[WI'(sel_q - QI'(RQ_DEPTH))];
            t_wtr      <= WR2RD;
            t_wrp[sel_bank][sel_sa] <= WR2PRE;
            t_ra[sel_bank]          <= TW'(T_WA);
            stats.wr <= stats.wr + 1;
          end else begin
            dram_cmd <= CMD_RD;
            rid_fifo[rid_wp] <= q[sel_q].id;
            rid_wp   <= rid_wp + 1'b1;
            t_rtw    <= RD2WR;
            t_wrp[sel_bank][sel_sa] <= tmax(t_wrp[sel_bank][sel_sa], TW'(T_RTP));
            t_ra[sel_bank]          <= tmax(t_ra[sel_bank], TW'(T_RA));
            stats.rd <= stats.rd + 1;
          end
        end
        default: ;
      endcase
      if (para_heads && para_en) stats.para_heads <= stats.para_heads + 1;
      if (para_ovf && para_en)   stats.para_overflow <= stats.para_overflow + 1;
    end
  end

  assign drain_mode = drain;

  // Under SALP-2 a column command needs exactly one activated subarray.
  a_salp2_single: assert property (@(posedge clk) disable iff (!rst_n)
      (sel == SEL_COL && scheme == SCHEME_SALP2) |-> nopen[sel_bank] == 1);

endmodule
