// subarray_cells: behavioural model of the cell array and local row-buffer
// (sense-amplifiers) of one subarray. Behavioural model: DRAM cells and sense
// amplifiers are analog circuits; this model gives their digital effect only.
//
// When a wordline is raised, the whole row is copied into the local
// row-buffer; the row is there from the clock edge after the wordline rises
// (a column access must anyway wait tRCD after ACT). While the
// subarray is connected to the global bitlines, a read puts one column of the
// row-buffer on rd_data and a write updates the row-buffer column and the
// cells. When the wordline is lowered the row-buffer is left stale; the cells
// already hold the written data. Cells that were never written read as 0.
// Storage is sparse (an associative array keyed by row and column) so that
// the full 4096-row subarray costs memory only for the lines that are used.
// The model flags a column access while no wordline is raised.
// Follows the source design: a subarray with its own local row-buffer, whose
// cells are read into it on activation. This design's choices: the sparse
// storage, the one-edge sensing delay, the access-error flag.
module subarray_cells #(
  parameter int unsigned SA_ROW_BITS = 12,
  parameter int unsigned COL_BITS    = 7,
  parameter int unsigned LINE_BITS   = 512
) (
  input  logic                   clk,
  input  logic                   wl_raised,
  input  logic [SA_ROW_BITS-1:0] wl_index,
  input  logic                   gbl_connect,
  input  logic                   wr_en,
  input  logic [COL_BITS-1:0]    col,
  input  logic [LINE_BITS-1:0]   wr_data,
  output logic [LINE_BITS-1:0]   rd_data,
  output logic                   access_error
);

  localparam int unsigned COLS = 1 << COL_BITS;

  logic [LINE_BITS-1:0] cells [longint unsigned];
  logic [LINE_BITS-1:0] row_buf [COLS];
  logic                   wl_q;
  logic [SA_ROW_BITS-1:0] open_row;

  function automatic longint unsigned key(input logic [SA_ROW_BITS-1:0] r,
                                          input logic [COL_BITS-1:0] c);
    return (longint'(r) << COL_BITS) | longint'(c);
  endfunction

  initial begin
    access_error = 1'b0;
    wl_q         = 1'b0;
    open_row     = '0;
    for (int c = 0; c < int'(COLS); c++) row_buf[c] = '0;
  end

  always @(posedge clk) begin
    wl_q <= wl_raised;
    if (wl_raised && (!wl_q || wl_index != open_row)) begin
      // activation: sense the row into the local row-buffer
      open_row <= wl_index;
      for (int c = 0; c < int'(COLS); c++)
        row_buf[c] <= cells.exists(key(wl_index, COL_BITS'(c))) ?
                      cells[key(wl_index, COL_BITS'(c))] : '0;
    end
    if (gbl_connect && !wl_raised) access_error <= 1'b1;
    if (gbl_connect && wl_raised && wr_en) begin
      row_buf[col]              <= wr_data;
      cells[key(wl_index, col)] = wr_data;
    end
  end

  assign rd_data = (gbl_connect && wl_raised) ? row_buf[col] : '0;

endmodule
