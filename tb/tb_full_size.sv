// tb_full_size: the memory system at its default size: 512-bit lines,
// 8 banks of 8 subarrays with 32K rows, 64-entry read and write queues,
// DDR3-1066 timings and a refresh every 4160 cycles (7.8 us at 533 MHz).
// One complete operation under MASA with refresh and PARA on, at the
// default PARA probability of 0.001. The bench writes 256 lines spread
// over all banks and subarrays, reads every one back in a different order,
// and then reads a bank-conflict pattern. It checks:
//  * every read returns the data last written to its line;
//  * a read to a closed row on an idle system takes 3 + tRCD + CL cycles;
//  * refreshes were issued at the refresh interval (at least the run length
//    divided by tREFI, less one);
//  * the rank raised no error flag and every request was answered.
module tb_full_size;
  import dram_pkg::*;
  logic           clk = 0, rst_n = 0;
  scheme_e        scheme;
  logic           refresh_en, para_en;
  logic [19:0]    para_p_thresh;
  logic [3:0]     para_lsb_offset;
  logic           req_valid, req_ready, req_write;
  logic [24:0]    req_line_addr;
  logic [511:0]   req_wdata;
  logic [7:0]     req_id;
  logic           resp_valid;
  logic [7:0]     resp_id;
  logic [511:0]   resp_data;
  cmd_e           mon_cmd;
  logic [2:0]     mon_bank, mon_sa;
  logic [11:0]    mon_sa_row;
  logic [63:0]    sa_activated, sa_designated;
  logic           drain_mode;
  mc_stats_t      stats;
  logic           short_circuit, access_error, ref_error;
  int checks = 0, failures = 0;
  longint cycles = 0;

  salp_para_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] mem_ref [int];
  logic [511:0] exp_data [256];
  int           outstanding = 0;
  int           next_id = 0;
  int           addrs [256];

  always @(posedge clk) if (rst_n && resp_valid) begin
    checks++;
    outstanding--;
    if (resp_data !== exp_data[resp_id]) begin
      failures++;
      if (failures < 8) $display("[%0d] read id %0d differs", cycles, resp_id);
    end
  end

  function automatic logic [511:0] rand_line();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic send(bit wr, int addr);
    req_valid = 1; req_write = wr; req_line_addr = 25'(addr);
    req_wdata = rand_line(); req_id = 8'(next_id);
    #1;
    while (!req_ready) begin @(posedge clk); #1; end
    if (wr) mem_ref[addr] = req_wdata;
    else begin
      exp_data[next_id] = mem_ref.exists(addr) ? mem_ref[addr] : '0;
      next_id = (next_id + 1) % 256;
      outstanding++;
    end
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 60) begin
      @(posedge clk); #1;
      if (outstanding == 0 && sa_activated == 0 && mon_cmd == CMD_NOP) quiet++; else quiet = 0;
    end
  endtask

  initial begin
    longint t_start;
    scheme = SCHEME_MASA; refresh_en = 1; para_en = 1; para_p_thresh = 20'd1049;
    para_lsb_offset = 0;
    req_valid = 0; req_write = 0; req_line_addr = 0; req_wdata = 0; req_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    t_start = cycles;

    begin
      longint t0;
      req_valid = 1; req_write = 0; req_line_addr = 25'h0ABCDE; req_id = 8'(next_id);
      exp_data[next_id] = '0; next_id++; outstanding++;
      #1;
      @(posedge clk); t0 = cycles; #1;
      req_valid = 0;
      while (!resp_valid) begin @(posedge clk); #1; end
      checks++;
      if (cycles - t0 != 3 + T_RCD + T_CL) begin
        failures++;
        $display("closed-row read latency %0d, expected %0d", cycles - t0, 3 + T_RCD + T_CL);
      end
    end

    // 256 lines: every bank, every subarray, a few rows and columns each
    for (int i = 0; i < 256; i++) begin
      int b, s, r, c;
      b = i % 8; s = (i / 8) % 8; r = $urandom_range(0, 4095); c = $urandom_range(0, 127);
      addrs[i] = (((s << 12) | r) << 10) | (c << 3) | b;
      send(1, addrs[i]);
    end
    for (int i = 0; i < 256; i++) begin
      while (outstanding >= 32) begin @(posedge clk); #1; end
      send(0, addrs[(i * 37) % 256]);
    end
    // bank conflicts between subarrays of bank 5
    for (int i = 0; i < 64; i++) begin
      while (outstanding >= 4) begin @(posedge clk); #1; end
      send(0, addrs[5 + 8 * (i % 32)]);
    end
    wait_idle();
    repeat (9000) @(posedge clk);
    wait_idle();

    checks++;
    if (stats.refresh < (cycles - t_start) / T_REFI - 1) begin
      failures++; $display("%0d refreshes in %0d cycles", stats.refresh, cycles - t_start);
    end
    checks++;
    if (short_circuit || access_error || ref_error) begin failures++; $display("rank error flags"); end
    checks++;
    if (outstanding != 0) failures++;
    $display("cycles %0d: act %0d rd %0d wr %0d refresh %0d sasel %0d masa_multi %0d para_act %0d",
             cycles - t_start, stats.act, stats.rd, stats.wr, stats.refresh, stats.sasel,
             stats.masa_multi, stats.para_act);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
