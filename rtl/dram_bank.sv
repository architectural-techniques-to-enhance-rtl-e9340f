// dram_bank: one MASA-capable DRAM bank, built from SA_PER_BANK subarrays.
//
// The bank turns the commands it receives into activity on its global
// structures, as in a conventional bank but with per-subarray latches:
//  * ACTIVATE: the global row-decoder pre-decodes the subarray row-address;
//    ID and row go on the global address-bus with addr_strobe, and the
//    subarray-select wire is pulsed, so the target latches its row and
//    becomes the designated subarray.
//  * SA_SEL: the same bus transfer (the row is one that is already raised)
//    with subarray-select; only the designated bits change.
//  * PRECHARGE: the subarray's ID and the INV row-address go on the bus with
//    addr_strobe, so only that subarray lowers its wordline (selective
//    precharging). Other activated subarrays are untouched.
//  * READ/WRITE: column-select is raised; the designated subarray drives the
//    global bitlines. A read is captured in the global row-buffer at the end
//    of the cycle; a write goes from wr_data into the designated row-buffer.
// The global address-bus is driven only in the cycle of the command and
// carries INV otherwise. rd_data is valid the cycle after READ (CAS latency is
// added by the rank). short_circuit flags two subarrays driving the global
// bitlines at once; access_error flags a column access to a subarray with no
// raised wordline.
// Follows the source design: the command-to-bus behaviour above (ID and row
// for ACTIVATE and SA_SEL, ID and INV for PRECHARGE, the subarray-select
// pulse) and the shared global bitlines. This design's choices: one-cycle bus
// transfers, the registered read, the OR model of the bitlines and the two
// error flags.
module dram_bank #(
  parameter int unsigned SA_ROW_BITS = 12,
  parameter int unsigned SA_PER_BANK = 8,
  parameter int unsigned COL_BITS    = 7,
  parameter int unsigned LINE_BITS   = 512,
  localparam int unsigned SA_BITS = (SA_PER_BANK > 1) ? $clog2(SA_PER_BANK) : 1,
  localparam int unsigned NGRP    = (SA_ROW_BITS + 2) / 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dram_pkg::cmd_e          cmd,
  input  logic [SA_BITS-1:0]      sa,
  input  logic [SA_ROW_BITS-1:0]  sa_row,
  input  logic [COL_BITS-1:0]     col,
  input  logic [LINE_BITS-1:0]    wr_data,
  output logic [LINE_BITS-1:0]    rd_data,
  output logic [SA_PER_BANK-1:0]  activated,
  output logic [SA_PER_BANK-1:0]  designated,
  output logic                    short_circuit,
  output logic                    access_error
);
  import dram_pkg::*;

  logic                   is_act, is_pre, is_sasel, is_rd, is_wr;
  logic [SA_PER_BANK-1:0] dec_id;
  logic [NGRP*8-1:0]      dec_row;
  logic [SA_PER_BANK-1:0] bus_id;
  logic [NGRP*8-1:0]      bus_row;
  logic                   addr_strobe, sa_sel, col_sel;

  assign is_act   = (cmd == CMD_ACT);
  assign is_pre   = (cmd == CMD_PRE);
  assign is_sasel = (cmd == CMD_SASEL);
  assign is_rd    = (cmd == CMD_RD);
  assign is_wr    = (cmd == CMD_WR);

  row_predecoder #(.SA_ROW_BITS(SA_ROW_BITS), .SA_PER_BANK(SA_PER_BANK)) u_gdec (
    .valid     (is_act || is_sasel || is_pre),
    .sa_id     (sa),
    .sa_row    (sa_row),
    .id_onehot (dec_id),
    .row_predec(dec_row)
  );

  // Global address-bus: a PRECHARGE sends the ID with an INV row-address.
  assign bus_id      = dec_id;
  assign bus_row     = is_pre ? '0 : dec_row;
  assign addr_strobe = is_act || is_sasel || is_pre;
  assign sa_sel      = is_act || is_sasel;
  assign col_sel     = is_rd || is_wr;

  logic [SA_PER_BANK-1:0] connect;
  logic [SA_PER_BANK-1:0] cell_err;
  logic [LINE_BITS-1:0]   sa_rd [SA_PER_BANK];

  for (genvar s = 0; s < int'(SA_PER_BANK); s++) begin : g_sa
    logic                   wl_raised;
    logic [SA_ROW_BITS-1:0] wl_index;
    subarray_periph #(.SA_ROW_BITS(SA_ROW_BITS), .SA_PER_BANK(SA_PER_BANK), .MY_ID(s)) u_periph (
      .clk, .rst_n,
      .bus_id, .bus_row, .addr_strobe, .sa_sel, .col_sel,
      .wl_raised, .wl_index,
      .activated   (activated[s]),
      .precharge_en(),  // drives the bitline precharge devices, analog side
      .designated  (designated[s]),
      .gbl_connect (connect[s])
    );

    subarray_cells #(.SA_ROW_BITS(SA_ROW_BITS), .COL_BITS(COL_BITS), .LINE_BITS(LINE_BITS)) u_cells (
      .clk,
      .wl_raised, .wl_index,
      .gbl_connect (connect[s]),
      .wr_en       (is_wr),
      .col,
      .wr_data,
      .rd_data     (sa_rd[s]),
      .access_error(cell_err[s])
    );
  end

  // Global bitlines: wired-OR of the connected local row-buffers.
  logic [LINE_BITS-1:0] gbl;
  always_comb begin
    gbl = '0;
    for (int s = 0; s < int'(SA_PER_BANK); s++) gbl |= sa_rd[s];
  end

  // Global row-buffer.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     rd_data <= '0;
    else if (is_rd) rd_data <= gbl;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                     short_circuit <= 1'b0;
    else if ($countones(connect) > 1) short_circuit <= 1'b1;

  assign access_error = |cell_err;

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $countones(connect) <= 1)
    else $error("dram_bank: more than one subarray drives the global bitlines");

endmodule
