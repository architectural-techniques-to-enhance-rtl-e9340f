// tb_para_overhead: PARA under load, at p = 0.005 (ten possible neighbours per
// row, so five times the 0.001 design point). The memory system has 64-bit
// lines; every other parameter is at its default, including tREFI = 4160.
//  * Overhead: one random stream of 1500 requests over all banks (8 reads in
//    flight) runs with PARA off, then with PARA on. The run with PARA may be
//    at most 3% slower.
//  * Rate: the number of PARA activations must be within four standard
//    deviations of p times the number of row closes.
//  * Hammer: two rows in different subarrays of one bank are read in turn,
//    4000 times each, so each is opened and closed 4000 times. Each of the
//    four physically adjacent rows must then have been activated by PARA at
//    least once (the chance that one is missed is (1 - p/2)^4000, about 5e-5).
//  * Data of every read and the rank error flags are checked throughout.
module tb_para_overhead;
  import dram_pkg::*;
  localparam int LB = 64;
  localparam int NREQ = 1500;
  logic           clk = 0, rst_n = 0;
  scheme_e        scheme;
  logic           refresh_en, para_en;
  logic [19:0]    para_p_thresh;
  logic [3:0]     para_lsb_offset;
  logic           req_valid, req_ready, req_write;
  logic [24:0]    req_line_addr;
  logic [LB-1:0]  req_wdata;
  logic [7:0]     req_id;
  logic           resp_valid;
  logic [7:0]     resp_id;
  logic [LB-1:0]  resp_data;
  cmd_e           mon_cmd;
  logic [2:0]     mon_bank, mon_sa;
  logic [11:0]    mon_sa_row;
  logic [63:0]    sa_activated, sa_designated;
  logic           drain_mode;
  mc_stats_t      stats;
  logic           short_circuit, access_error, ref_error;
  int checks = 0, failures = 0;
  longint cycles = 0;

  salp_para_system #(.LINE_BITS(LB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1500000);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ACTs seen per (bank, row) while the hammer runs
  int  act_count [int];
  bit  hammering = 0;
  always @(posedge clk) if (rst_n && hammering && mon_cmd == CMD_ACT) begin
    int k;
    k = int'(mon_bank) * 32768 + ((int'(mon_sa) << 12) | int'(mon_sa_row));
    act_count[k] = act_count.exists(k) ? act_count[k] + 1 : 1;
  end

  logic [LB-1:0] mem_ref [int];
  logic [LB-1:0] exp_data [256];
  int            outstanding = 0;
  int            next_id = 0;

  always @(posedge clk) if (rst_n && resp_valid) begin
    checks++;
    outstanding--;
    if (resp_data !== exp_data[resp_id]) begin
      failures++;
      if (failures < 8) $display("[%0d] read id %0d: %h expected %h", cycles, resp_id, resp_data, exp_data[resp_id]);
    end
  end

  task automatic send(bit wr, int addr);
    req_valid = 1; req_write = wr; req_line_addr = 25'(addr);
    req_wdata = {$urandom, $urandom}; req_id = 8'(next_id);
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

  int s_write [NREQ];
  int s_addr  [NREQ];

  task automatic run(output longint t);
    longint t0;
    t0 = cycles;
    for (int i = 0; i < NREQ; i++) begin
      while (outstanding >= 8) begin @(posedge clk); #1; end
      send(s_write[i][0], s_addr[i]);
    end
    wait_idle();
    t = cycles - t0 - 60;
  endtask

  localparam int ROW_A = (1 << 12) + 100;
  localparam int ROW_B = (5 << 12) + 200;

  initial begin
    longint t_off, t_on;
    int pre0, act0;
    real expect_acts, sigma, diff;
    scheme = SCHEME_BASE; refresh_en = 1; para_en = 0; para_p_thresh = 20'd5243;
    para_lsb_offset = 0;
    req_valid = 0; req_write = 0; req_line_addr = 0; req_wdata = 0; req_id = 0;
    for (int i = 0; i < NREQ; i++) begin
      s_write[i] = ($urandom_range(0, 2) == 0);
      s_addr[i]  = ($urandom_range(0, 32767) << 10) | ($urandom_range(0, 127) << 3) | $urandom_range(0, 7);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    run(t_off);
    para_en = 1;
    pre0 = stats.pre; act0 = stats.para_act;
    run(t_on);
    $display("random stream: %0d cycles without PARA, %0d with PARA at p = 0.005 (%0.2f%% slower)",
             t_off, t_on, 100.0 * (real'(t_on) - real'(t_off)) / real'(t_off));
    checks++;
    if (real'(t_on) > 1.03 * real'(t_off)) begin failures++; $display("PARA overhead above 3%%"); end

    // hammer
    hammering = 1;
    for (int i = 0; i < 8000; i++) begin
      while (outstanding >= 1) begin @(posedge clk); #1; end
      send(0, (((i % 2 == 0) ? ROW_A : ROW_B) << 10) | (2));
    end
    wait_idle();
    hammering = 0;
    para_en = 0;
    wait_idle();

    expect_acts = 0.005 * real'(stats.pre - pre0);
    sigma = $sqrt(expect_acts);
    $display("row closes with PARA on %0d, PARA activations %0d, expected %0.1f",
             stats.pre - pre0, stats.para_act - act0, expect_acts);
    checks++;
    diff = real'(stats.para_act - act0) - expect_acts;
    if (diff < 0.0) diff = -diff;
    if (diff > 4.0 * sigma + 2.0) begin
      failures++; $display("PARA activation rate off");
    end
    begin
      int nb [4] = '{ROW_A - 1, ROW_A + 1, ROW_B - 1, ROW_B + 1};
      for (int j = 0; j < 4; j++) begin
        int k;
        k = 2 * 32768 + nb[j];
        checks++;
        $display("neighbour row %h of the hammered rows: %0d activations",
                 nb[j], act_count.exists(k) ? act_count[k] : 0);
        if (!act_count.exists(k)) begin failures++; $display("  never refreshed"); end
      end
    end
    checks++;
    if (short_circuit || access_error || ref_error) begin failures++; $display("rank error flags"); end
    checks++;
    if (outstanding != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
