// tb_dram_bank: one MASA-capable bank at full geometry (8 subarrays of 4096
// rows, 128 columns) with 64-bit lines. A random command stream that obeys
// the MASA rules (ACT only to a precharged subarray, SA_SEL only to an
// activated one, column commands to the designated one) is applied; the
// testbench keeps its own model of which subarrays are activated and which
// is designated, and of the data of every written line. It checks the
// activated and designated bits after every command and every read result
// the cycle after READ. Several subarrays stay activated at once, so reads
// that switch between them with SA_SEL test that only the designated row
// drives the global bitlines (short_circuit must stay 0). Each ACT is
// followed by tRCD idle cycles, as the device requires.
module tb_dram_bank;
  import dram_pkg::*;
  logic        clk = 0, rst_n = 0;
  cmd_e        cmd;
  logic [2:0]  sa;
  logic [11:0] sa_row;
  logic [6:0]  col;
  logic [63:0] wr_data, rd_data;
  logic [7:0]  activated, designated;
  logic        short_circuit, access_error;
  int checks = 0, failures = 0;
  int cycles = 0;

  dram_bank #(.SA_ROW_BITS(12), .SA_PER_BANK(8), .COL_BITS(7), .LINE_BITS(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] ref_mem [longint];
  bit          m_open [8];
  int          m_row  [8];
  int          m_desig;

  function automatic longint k(int s, int r, int c);
    return (longint'(s) << 20) | (longint'(r) << 7) | c;
  endfunction

  task automatic issue(cmd_e c, int s, int r, int cl, logic [63:0] d);
    cmd = c; sa = 3'(s); sa_row = 12'(r); col = 7'(cl); wr_data = d;
    @(posedge clk); #1;
    cmd = CMD_NOP;
    // a column access to a newly raised row needs tRCD
    if (c == CMD_ACT) repeat (T_RCD) @(posedge clk);
  endtask

  task automatic check_state();
    logic [7:0] ea, ed;
    ea = 0; ed = 0;
    for (int s = 0; s < 8; s++) ea[s] = m_open[s];
    ed[m_desig] = 1'b1;
    checks++;
    if (activated !== ea || (m_desig >= 0 && designated !== ed)) begin
      failures++;
      if (failures < 6) $display("state: act %b/%b desig %b/%b", activated, ea, designated, ed);
    end
  endtask

  initial begin
    cmd = CMD_NOP; sa = 0; sa_row = 0; col = 0; wr_data = 0;
    for (int s = 0; s < 8; s++) begin m_open[s] = 0; m_row[s] = 0; end
    m_desig = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int it = 0; it < 6000; it++) begin
      int s, op;
      s  = $urandom_range(0, 7);
      op = $urandom_range(0, 9);
      if (!m_open[s]) begin
        // only two rows per subarray so that data is found again
        int r;
        r = $urandom_range(0, 1) * 'h800 + s;
        issue(CMD_ACT, s, r, 0, 0);
        m_open[s] = 1; m_row[s] = r; m_desig = s;
      end else if (op == 0) begin
        issue(CMD_PRE, s, 0, 0, 0);
        m_open[s] = 0;
      end else begin
        if (m_desig != s) begin
          issue(CMD_SASEL, s, m_row[s], 0, 0);
          m_desig = s;
        end
        check_state();
        begin
          int c;
          c = $urandom_range(0, 3);
          if (op < 4) begin
            logic [63:0] d;
            d = {$urandom, $urandom};
            issue(CMD_WR, s, 0, c, d);
            ref_mem[k(s, m_row[s], c)] = d;
          end else begin
            logic [63:0] e;
            issue(CMD_RD, s, 0, c, 0);
            e = ref_mem.exists(k(s, m_row[s], c)) ? ref_mem[k(s, m_row[s], c)] : 64'd0;
            checks++;
            if (rd_data !== e) begin
              failures++;
              if (failures < 6) $display("read sa%0d row %h col %0d: %h expected %h", s, m_row[s], c, rd_data, e);
            end
          end
        end
      end
      check_state();
    end
    checks++;
    if (short_circuit || access_error) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
