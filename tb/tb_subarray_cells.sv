// tb_subarray_cells: the behavioural cell array with a small geometry
// (16 rows, 8 columns of 32 bits). Rows are raised one at a time, random
// columns are written through the global-bitline connection, other rows are
// opened in between, and every column of every row is read back against a
// reference array. A column access with no raised wordline must set
// access_error, and only then.
module tb_subarray_cells;
  logic        clk = 0;
  logic        wl_raised, gbl_connect, wr_en;
  logic [3:0]  wl_index;
  logic [2:0]  col;
  logic [31:0] wr_data, rd_data;
  logic        access_error;
  logic [31:0] ref_mem [16][8];
  int checks = 0, failures = 0;

  subarray_cells #(.SA_ROW_BITS(4), .COL_BITS(3), .LINE_BITS(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic open_row(int r);
    wl_raised = 1; wl_index = 4'(r); gbl_connect = 0; wr_en = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;   // row sensed into the row-buffer
  endtask

  task automatic close_row();
    wl_raised = 0; gbl_connect = 0; wr_en = 0;
    @(posedge clk); #1;
  endtask

  task automatic write_col(int c, logic [31:0] d);
    gbl_connect = 1; wr_en = 1; col = 3'(c); wr_data = d;
    @(posedge clk); #1;
    gbl_connect = 0; wr_en = 0;
    ref_mem[wl_index][c] = d;
  endtask

  task automatic read_col(int c);
    gbl_connect = 1; wr_en = 0; col = 3'(c); #1;
    checks++;
    if (rd_data !== ref_mem[wl_index][c]) begin
      failures++;
      if (failures < 5) $display("row %0d col %0d: %h expected %h", wl_index, c, rd_data, ref_mem[wl_index][c]);
    end
    @(posedge clk); #1;
    gbl_connect = 0;
  endtask

  initial begin
    for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) ref_mem[r][c] = 0;
    wl_raised = 0; wl_index = 0; gbl_connect = 0; wr_en = 0; col = 0; wr_data = 0;
    @(posedge clk); #1;
    for (int it = 0; it < 200; it++) begin
      int r;
      r = $urandom_range(0, 15);
      open_row(r);
      for (int k = 0; k < 3; k++) write_col($urandom_range(0, 7), $urandom);
      for (int c = 0; c < 8; c++) read_col(c);
      close_row();
    end
    for (int r = 0; r < 16; r++) begin
      open_row(r);
      for (int c = 0; c < 8; c++) read_col(c);
      close_row();
    end
    checks++;
    if (access_error) failures++;
    gbl_connect = 1; wr_en = 0;
    @(posedge clk); #1;
    gbl_connect = 0;
    checks++;
    if (!access_error) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
