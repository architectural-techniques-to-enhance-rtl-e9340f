// tb_mem_ctrl: the subarray-aware controller driving a real rank, with an
// independent timing checker on the command bus and a scoreboard for data.
//  * Latency: one read to a closed row on an idle system must return
//    exactly 3 + tRCD + CL cycles after it is accepted (request register,
//    command register, ACT, READ).
//  * Three workloads are run under each scheme in turn: a read-conflict
//    load (reads alternating between two rows in different subarrays of
//    one bank, two in flight), a write-conflict load (each write to a new
//    row, alternating between two subarrays of one bank) and a random
//    load. The scheme is
//    switched at run time with the controller idle. Every read is compared
//    with the last data written to its line; the timing checker must see no
//    broken rule; the conflict workload must finish faster under SALP-1 than
//    under the baseline, no slower under SALP-2 than under SALP-1, and
//    faster under MASA than under SALP-1; the write conflicts must finish
//    faster with each scheme from baseline to SALP-2 (write recovery
//    overlapped), and no slower under MASA than under SALP-2.
//  * Mechanisms that must occur: SALP-1 tRP overlap, SALP-2 overlap, MASA
//    multiple activated subarrays and SA_SEL, refresh, PARA refreshes, write
//    drain, input stall.
module tb_mem_ctrl;
  import dram_pkg::*;
  localparam int LB = 64;
  logic           clk = 0, rst_n = 0;
  scheme_e        scheme;
  logic           refresh_en, para_en;
  logic [19:0]    para_p_thresh;
  logic [3:0]     para_lsb_offset;
  logic           req_valid, req_ready, req_write;
  logic [2:0]     req_bank;
  logic [14:0]    req_row;
  logic [6:0]     req_col;
  logic [LB-1:0]  req_wdata;
  logic [7:0]     req_id;
  logic           resp_valid;
  logic [7:0]     resp_id;
  logic [LB-1:0]  resp_data;
  cmd_e           dram_cmd;
  logic [2:0]     dram_bank, dram_sa;
  logic [11:0]    dram_sa_row;
  logic [6:0]     dram_col;
  logic [LB-1:0]  dram_wdata, dram_rd_data;
  logic           dram_rd_valid, drain_mode;
  mc_stats_t      stats;
  logic [63:0]    activated, designated;
  logic           short_circuit, access_error, ref_error;
  int             violations, commands;
  int checks = 0, failures = 0;
  longint cycles = 0;

  mem_ctrl #(.LINE_BITS(LB), .T_REFI(700)) dut (.*);

  dram_rank #(.LINE_BITS(LB)) u_rank (
    .clk, .rst_n, .cmd(dram_cmd), .bank(dram_bank), .sa(dram_sa), .sa_row(dram_sa_row),
    .col(dram_col), .wr_data(dram_wdata), .rd_valid(dram_rd_valid), .rd_data(dram_rd_data),
    .activated, .designated, .short_circuit, .access_error, .ref_error);

  dram_timing_checker u_chk (.clk, .rst_n, .scheme, .cmd(dram_cmd), .bank(dram_bank),
                             .sa(dram_sa), .violations, .commands);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  logic [LB-1:0] mem_ref [longint];
  logic [LB-1:0] exp_data [256];
  int            outstanding = 0;
  int            next_id = 0;

  function automatic longint key(int b, int r, int c);
    return (longint'(r) << 10) | (longint'(c) << 3) | b;
  endfunction

  always @(posedge clk) if (rst_n && resp_valid) begin
    checks++;
    outstanding--;
    if (resp_data !== exp_data[resp_id]) begin
      failures++;
      if (failures < 8) $display("[%0d] read id %0d: %h expected %h", cycles, resp_id, resp_data, exp_data[resp_id]);
    end
  end

  task automatic send(bit wr, int b, int r, int c);
    req_valid = 1; req_write = wr; req_bank = 3'(b); req_row = 15'(r); req_col = 7'(c);
    req_wdata = {$urandom, $urandom}; req_id = 8'(next_id);
    #1;
    while (!req_ready) begin @(posedge clk); #1; end
    // accepted at this edge
    if (wr) mem_ref[key(b, r, c)] = req_wdata;
    else begin
      exp_data[next_id] = mem_ref.exists(key(b, r, c)) ? mem_ref[key(b, r, c)] : '0;
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
      if (outstanding == 0 && activated == 0 && dram_cmd == CMD_NOP) quiet++; else quiet = 0;
    end
  endtask

  // reads that alternate between two rows in subarrays 1 and 5 of bank 3,
  // at most two in flight
  task automatic conflict_load(int n);
    for (int i = 0; i < n; i++) begin
      int r = (i % 2 == 0) ? (1 << 12) + 7 : (5 << 12) + 9;
      while (outstanding >= 2) begin @(posedge clk); #1; end
      send(0, 3, r, (i / 2) % 16);
    end
  endtask

  // posted writes, each to a new row, alternating between subarrays 1 and 5
  // of bank 3: every write is a bank conflict followed by write recovery
  task automatic write_conflict_load(int n, int base);
    for (int i = 0; i < n; i++)
      send(1, 3, ((i % 2 == 0) ? (1 << 12) : (5 << 12)) + base + i, 0);
  endtask

  task automatic random_load(int n);
    for (int i = 0; i < n; i++)
      send($urandom_range(0, 2) == 0, $urandom_range(0, 7),
           ($urandom_range(0, 7) << 12) | $urandom_range(0, 3), $urandom_range(0, 7));
  endtask

  longint t_conf [4], t_wconf [4];

  initial begin
    scheme = SCHEME_BASE; refresh_en = 0; para_en = 0; para_p_thresh = 20'd65536;
    para_lsb_offset = 0;
    req_valid = 0; req_write = 0; req_bank = 0; req_row = 0; req_col = 0; req_wdata = 0; req_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // latency of a read to a closed row
    begin
      longint t0;
      req_valid = 1; req_write = 0; req_bank = 2; req_row = 15'h1234; req_col = 5; req_id = 8'(next_id);
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
    wait_idle();

    for (int sc = 0; sc < 4; sc++) begin
      longint t0;
      scheme = scheme_e'(sc);
      refresh_en = 0;
      para_en = 0;
      wait_idle();
      t0 = cycles;
      conflict_load(64);
      wait_idle();
      t_conf[sc] = cycles - t0 - 60;
      t0 = cycles;
      write_conflict_load(40, 64 * sc);
      wait_idle();
      t_wconf[sc] = cycles - t0 - 60;
      refresh_en = 1;
      para_en = (sc >= 2);
      random_load(400);
      wait_idle();
      $display("scheme %0d: read conflicts %0d cycles, write conflicts %0d cycles; act %0d sasel %0d salp1 %0d salp2 %0d multi %0d",
               sc, t_conf[sc], t_wconf[sc], stats.act, stats.sasel, stats.salp1_overlap, stats.salp2_overlap,
               stats.masa_multi);
    end
    checks++;
    if (!(t_conf[1] < t_conf[0])) begin failures++; $display("SALP-1 not faster than baseline"); end
    checks++;
    if (!(t_conf[3] < t_conf[1])) begin failures++; $display("MASA not faster than SALP-1"); end
    checks++;
    if (!(t_conf[2] <= t_conf[1])) begin failures++; $display("SALP-2 slower than SALP-1"); end
    checks++;
    if (!(t_wconf[0] > t_wconf[1] && t_wconf[1] > t_wconf[2] && t_wconf[3] <= t_wconf[2])) begin
      failures++; $display("write conflicts not served faster with each scheme");
    end

    // mechanism coverage
    begin
      int unsigned m [string];
      m["salp1_overlap"] = stats.salp1_overlap;
      m["salp2_overlap"] = stats.salp2_overlap;
      m["masa_multi"]    = stats.masa_multi;
      m["sasel"]         = stats.sasel;
      m["refresh"]       = stats.refresh;
      m["para_act"]      = stats.para_act;
      m["drain_entries"] = stats.drain_entries;
      m["req_stall"]     = stats.req_stall;
      foreach (m[name]) begin
        checks++;
        $display("  %-14s %0d", name, m[name]);
        if (m[name] == 0) begin failures++; $display("mechanism %s never happened", name); end
      end
    end
    checks++;
    if (violations != 0) begin failures++; $display("%0d timing violations", violations); end
    checks++;
    if (short_circuit || access_error || ref_error) begin failures++; $display("rank error flags"); end
    checks++;
    if (outstanding != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
