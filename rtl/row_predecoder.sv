// row_predecoder: the global row-decoder of a bank.
//
// It turns a binary subarray row-address into a partially pre-decoded one:
// the address is cut into 3-bit groups and each group is decoded 3:8 into a
// one-hot group of 8 lines. With the default 12-bit subarray row-address (4096
// rows per subarray) this gives 32 lines; together with the 8-line one-hot
// subarray ID the global address-bus carries 40 lines, the width of the
// per-subarray row-address latch. The subarray ID is decoded here as well.
// An address whose groups have no line set is the INV (invalid) value; the
// decoder produces it when `valid` is low.
// Purely combinational. A last group narrower than 3 bits decodes into fewer
// than 8 used lines; the unused lines stay 0.
// Follows the source design: 3:8 pre-decoding of the row address, 40 lines
// on the global address-bus, an invalid (INV) value for PRECHARGE. This
// design's choices: INV encoded as all lines low, the ID decoded in the same
// block.
module row_predecoder #(
  parameter int unsigned SA_ROW_BITS = 12,
  parameter int unsigned SA_PER_BANK = 8,
  localparam int unsigned NGRP    = (SA_ROW_BITS + 2) / 3,
  localparam int unsigned SA_BITS = (SA_PER_BANK > 1) ? $clog2(SA_PER_BANK) : 1
) (
  input  logic                   valid,
  input  logic [SA_BITS-1:0]     sa_id,
  input  logic [SA_ROW_BITS-1:0] sa_row,
  output logic [SA_PER_BANK-1:0] id_onehot,
  output logic [NGRP*8-1:0]      row_predec
);

  logic [NGRP*3-1:0] row_ext;
  assign row_ext = (NGRP*3)'(sa_row);

  always_comb begin
    id_onehot = '0;
    if (valid) id_onehot[sa_id] = 1'b1;
  end

  always_comb begin
    row_predec = '0;
    if (valid)
      for (int g = 0; g < int'(NGRP); g++)
        row_predec[g*8 + int'(row_ext[g*3 +: 3])] = 1'b1;
  end

endmodule
