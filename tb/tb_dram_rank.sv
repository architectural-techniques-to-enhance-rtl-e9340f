// tb_dram_rank: the rank's command routing and CAS latency. Rows are opened
// in several banks, lines are written and read back; each read must appear on
// rd_data with rd_valid exactly CL = 8 cycles after the READ command and
// carry the written line of the right bank. Commands to one bank must not
// change another bank's subarrays. A REFRESH with a subarray activated must
// raise ref_error; one with all precharged must not.
module tb_dram_rank;
  import dram_pkg::*;
  logic         clk = 0, rst_n = 0;
  cmd_e         cmd;
  logic [2:0]   bank, sa;
  logic [11:0]  sa_row;
  logic [6:0]   col;
  logic [511:0] wr_data, rd_data;
  logic         rd_valid;
  logic [63:0]  activated, designated;
  logic         short_circuit, access_error, ref_error;
  int checks = 0, failures = 0;
  int cycles = 0;

  dram_rank dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(cmd_e c, int b, int s, int r, int cl, logic [511:0] d);
    cmd = c; bank = 3'(b); sa = 3'(s); sa_row = 12'(r); col = 7'(cl); wr_data = d;
    @(posedge clk); #1;
    cmd = CMD_NOP;
  endtask

  function automatic logic [511:0] pattern(int b, int c);
    return {16{32'(b * 1000 + c + 32'hA5000000)}};
  endfunction

  initial begin
    cmd = CMD_NOP; bank = 0; sa = 0; sa_row = 0; col = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int b = 0; b < 8; b++) issue(CMD_ACT, b, b % 8, 'h40 + b, 0, 0);
    checks++;
    begin
      logic [63:0] e = 0;
      for (int b = 0; b < 8; b++) e[b*8 + (b % 8)] = 1'b1;
      if (activated !== e) begin failures++; $display("activated %h", activated); end
    end
    for (int b = 0; b < 8; b++)
      for (int c = 0; c < 4; c++) issue(CMD_WR, b, 0, 0, c, pattern(b, c));
    for (int b = 7; b >= 0; b--)
      for (int c = 0; c < 4; c++) begin
        int t0, lat;
        cmd = CMD_RD; bank = 3'(b); col = 7'(c);
        @(posedge clk); #1;
        cmd = CMD_NOP;
        t0 = cycles - 1;
        lat = 0;
        while (!rd_valid && lat < 50) begin @(posedge clk); #1; lat++; end
        checks++;
        if (cycles - t0 != T_CL || rd_data !== pattern(b, c)) begin
          failures++;
          $display("bank %0d col %0d: latency %0d data %h", b, c, cycles - t0, rd_data[31:0]);
        end
      end
    issue(CMD_REF, 0, 0, 0, 0, 0);
    checks++;
    if (!ref_error) failures++;
    for (int b = 0; b < 8; b++) issue(CMD_PRE, b, b % 8, 0, 0, 0);
    checks++;
    if (activated !== 0) failures++;
    checks++;
    if (short_circuit || access_error) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
