// subarray_periph: peripheral logic of one subarray in a MASA-capable bank.
//
// Holds what one subarray needs to stay activated and to be connected to the
// global bitlines independently of the others:
//  * an ID comparator ("=id?") on the subarray-ID lines of the global
//    address-bus;
//  * the subarray row-address latch (latched subarray row-decoding): when
//    addr_strobe is high and the ID matches, the pre-decoded row-address on
//    the bus is captured. A selective PRECHARGE puts this subarray's ID with
//    the INV row-address (no line set) on the bus, so the latch captures INV
//    and the wordline drops. When the ID lines are INV as well, every
//    subarray captures INV (bank-wide precharge);
//  * the subarray row-decoder fed by the latch. A wordline is raised when
//    every pre-decoded group has exactly one line set. The raised wordline
//    is given as its index plus a flag, not as a one-hot vector of 4096
//    wires: the same information at a fraction of the simulation cost;
//  * the activated signal A, the OR of all wordlines (here: the flag). Its
//    inverse enables the bitline precharge devices;
//  * the designated-bit latch D, strobed by the global subarray-select wire:
//    it is set in the subarray whose ID is on the bus and cleared in all
//    others. ACTIVATE and SA_SEL both pulse subarray-select;
//  * the connection to the global bitlines, D AND column-select.
// Latches are modelled as registers that capture on the rising clock edge in
// the cycle of the strobe; the new wordline is visible the next cycle. D is
// changed only by subarray-select (a PRECHARGE leaves it alone). Reset clears
// both latches.
// Follows the source design: the per-subarray row-address latch, the ID
// match, selective precharge by INV, A as the OR of the wordlines, the
// designated-bit latch strobed by subarray-select and set by both ACTIVATE
// and SA_SEL. This design's choices: the latches are edge-triggered
// registers, the bitline switch is D AND column-select, and the decoder
// output is an index plus a flag.
module subarray_periph #(
  parameter int unsigned SA_ROW_BITS = 12,
  parameter int unsigned SA_PER_BANK = 8,
  parameter int unsigned MY_ID       = 0,
  localparam int unsigned NGRP      = (SA_ROW_BITS + 2) / 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // global address-bus and global control wires
  input  logic [SA_PER_BANK-1:0] bus_id,
  input  logic [NGRP*8-1:0]      bus_row,
  input  logic                   addr_strobe,
  input  logic                   sa_sel,
  input  logic                   col_sel,
  // to the cell array
  output logic                   wl_raised,
  output logic [SA_ROW_BITS-1:0] wl_index,
  output logic                   activated,
  output logic                   precharge_en,
  output logic                   designated,
  output logic                   gbl_connect
);

  logic [NGRP*8-1:0] row_latch;
  logic              id_match;
  logic              id_inv;

  assign id_match = bus_id[MY_ID];
  assign id_inv   = (bus_id == '0);

  // Subarray row-address latch.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                                 row_latch <= '0;
    else if (addr_strobe && (id_match || id_inv)) row_latch <= bus_row;

  // Designated-bit latch, strobed by subarray-select.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      designated <= 1'b0;
    else if (sa_sel) designated <= id_match;

  // Subarray row-decoder: finishes the decoding of the pre-decoded groups.
  always_comb begin
    logic [NGRP*3-1:0] idx;
    logic              all_one;
    idx     = '0;
    all_one = 1'b1;
    for (int g = 0; g < int'(NGRP); g++) begin
      if ($countones(row_latch[g*8 +: 8]) != 1) all_one = 1'b0;
      for (int b = 0; b < 8; b++)
        if (row_latch[g*8 + b]) idx[g*3 +: 3] = 3'(b);
    end
    wl_raised = all_one;
    wl_index  = idx[SA_ROW_BITS-1:0];
  end

  assign activated    = wl_raised;
  assign precharge_en = !activated;
  assign gbl_connect  = designated && col_sel;

endmodule
