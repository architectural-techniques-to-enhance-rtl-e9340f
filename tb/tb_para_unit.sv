// tb_para_unit: PARA's coin and neighbour choice.
//  1. p set to (almost) 1: every row close must queue a refresh of a
//     physical neighbour. With lsb_offset 0 that is row +/- 1; with an
//     offset of 3 the physical row is the logical row rotated right by 3,
//     so the neighbour differs by +/- 8 in the logical address (with wrap
//     of the low bits). Edge rows have one neighbour only.
//  2. p = 1049 / 2^20 = 0.001: 400000 row closes must give a number of heads
//     within about four standard deviations of 400, and both neighbours must
//     be picked about equally often.
//  3. Queue full: further heads are counted as overflow.
module tb_para_unit;
  logic        clk = 0, rst_n = 0;
  logic [19:0] p_thresh;
  logic [3:0]  lsb_offset;
  logic        close_valid;
  logic [2:0]  close_bank, ref_bank;
  logic [14:0] close_row, ref_row;
  logic        ref_valid, ref_ready, heads, overflow;
  int checks = 0, failures = 0;
  int cycles = 0;

  para_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // physical <-> logical mapping, written arithmetically
  function automatic int to_phys(int r, int off);
    return ((r >> off) | (r << (15 - off))) & 32'h7FFF;
  endfunction

  int n_heads = 0, n_up = 0, n_down = 0, n_ovf = 0;

  task automatic close(int b, int r);
    close_valid = 1; close_bank = 3'(b); close_row = 15'(r);
    #1;
    if (heads) n_heads++;
    if (overflow) n_ovf++;
    @(posedge clk); #1;
    close_valid = 0;
  endtask

  initial begin
    p_thresh = '1; lsb_offset = 0; close_valid = 0; close_bank = 0; close_row = 0; ref_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int off = 0; off < 15; off += 3) begin
      lsb_offset = 4'(off);
      for (int i = 0; i < 500; i++) begin
        int r, b, pr, pn;
        r = (i == 0) ? 0 : (i == 1) ? 32'h7FFF : $urandom_range(0, 32767);
        if (off != 0 && i < 2) r = to_phys(r, 15 - off);  // physical edges
        b = $urandom_range(0, 7);
        ref_ready = 0;
        close(b, r);
        checks++;
        if (!ref_valid || ref_bank != 3'(b)) begin failures++; continue; end
        pr = to_phys(r, off);
        pn = to_phys(int'(ref_row), off);
        if (!((pn == pr + 1) || (pn == pr - 1)) || (pr == 0 && pn != 1) ||
            (pr == 32'h7FFF && pn != 32'h7FFE)) begin
          failures++;
          if (failures < 6) $display("off %0d row %h -> %h", off, r, ref_row);
        end
        if (pn == pr + 1) n_up++; else n_down++;
        ref_ready = 1;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (n_up < 1000 || n_down < 1000) begin failures++; $display("up %0d down %0d", n_up, n_down); end

    // statistical rate at p = 0.001
    p_thresh = 20'd1049; lsb_offset = 0; n_heads = 0; n_up = 0; n_down = 0;
    for (int i = 0; i < 400000; i++) close($urandom_range(0, 7), $urandom_range(1, 32766));
    checks++;
    if (n_heads < 320 || n_heads > 480) begin failures++; $display("heads %0d of 400000", n_heads); end

    // overflow: queue of 4
    ref_ready = 1;
    repeat (8) @(posedge clk);
    #1 p_thresh = '1; ref_ready = 0; n_ovf = 0;
    for (int i = 0; i < 7; i++) close(1, 100 + i);
    checks++;
    if (n_ovf != 3) begin failures++; $display("overflow %0d", n_ovf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
