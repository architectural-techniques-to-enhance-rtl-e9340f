// tb_salp_para_system: end-to-end test of the whole memory system.
//
// Requests go in as cache-line addresses, so the address mapping, the
// controller with its PARA unit and the rank of subarray banks are all
// exercised together. Lines are 64 bits wide and the refresh interval is
// 700 cycles, to keep the run short. Every other parameter is at its default.
//  * Latency: a read to a closed row on an idle system returns
//    3 + tRCD + CL cycles after it is accepted.
//  * Mapping: every ACT on the command bus must open either a row that some
//    request named (bank and row taken from the line address by this bench's
//    own arithmetic: bank = addr[2:0], column = addr[9:3], row = addr[24:10])
//    or a row physically next to a row closed earlier in the same bank.
//    The physical order is the logical row address rotated right by the
//    PARA bit offset.
//  * Under each scheme, switched at run time while idle: a read-conflict
//    load, a write-conflict load and a random load. Every read is compared
//    with the last write to its line. The timing checker must count no
//    violation, and the rank must raise no error flag.
//  * A burst with PARA at a high probability fills the PARA queue, so refreshes
//    are lost and counted as overflow.
//  * Each mechanism must occur at least once: the SALP-1, SALP-2 and MASA
//    overlaps, SA_SEL, refresh, PARA heads and PARA activations, PARA queue
//    overflow, write-drain mode, input stall (a conflict between a read and
//    a queued write to the same line, or full queues), and a scheme switch
//    that changed the command pattern.
module tb_salp_para_system;
  import dram_pkg::*;
  localparam int LB = 64;
  localparam int OFFSET = 3;
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
  int             violations, commands;
  int checks = 0, failures = 0;
  longint cycles = 0;

  salp_para_system #(.LINE_BITS(LB), .T_REFI(700)) dut (.*);

  dram_timing_checker u_chk (.clk, .rst_n, .scheme, .cmd(mon_cmd), .bank(mon_bank),
                             .sa(mon_sa), .violations, .commands);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 600000);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- rows named by requests, rows closed ----------------
  bit          requested [int];          // key bank*32768 + row
  bit          closed    [int];
  int          open_row  [8][8];
  int          bad_acts = 0, acts_seen = 0;

  function automatic int rotr15(int v, int n);
    int d;
    d = ((v << 15) | v) >> n;
    return d & 32'h7fff;
  endfunction

  function automatic bit is_neighbour(int b, int r);
    int p;
    p = rotr15(r, OFFSET);
    foreach (closed[k]) begin
      if (k / 32768 == b) begin
        int c;
        c = rotr15(k % 32768, OFFSET);
        if (c == p + 1 || c == p - 1) return 1;
      end
    end
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (mon_cmd == CMD_ACT) begin
      int r, k;
      r = (int'(mon_sa) << 12) | int'(mon_sa_row);
      k = int'(mon_bank) * 32768 + r;
      acts_seen++;
      if (!requested.exists(k) && !is_neighbour(int'(mon_bank), r)) begin
        bad_acts++;
        if (bad_acts < 5) $display("[%0d] ACT bank %0d row %h matches no request and no neighbour", cycles, mon_bank, r);
      end
      open_row[mon_bank][mon_sa] = r;
    end
    if (mon_cmd == CMD_PRE) begin
      // PRE names one subarray (SALP-2, MASA) or closes the bank
      if (scheme >= SCHEME_SALP2)
        closed[int'(mon_bank) * 32768 + open_row[mon_bank][mon_sa]] = 1;
      else
        for (int s = 0; s < 8; s++)
          if (sa_activated[mon_bank * 8 + s]) closed[int'(mon_bank) * 32768 + open_row[mon_bank][s]] = 1;
    end
  end

  // ---------------- data scoreboard ----------------
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

  function automatic int line(int b, int r, int c);
    return (r << 10) | (c << 3) | b;
  endfunction

  task automatic send(bit wr, int addr);
    req_valid = 1; req_write = wr; req_line_addr = 25'(addr);
    req_wdata = {$urandom, $urandom}; req_id = 8'(next_id);
    requested[(addr & 7) * 32768 + ((addr >> 10) & 32'h7fff)] = 1;
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

  task automatic conflict_load(int n);
    for (int i = 0; i < n; i++) begin
      while (outstanding >= 2) begin @(posedge clk); #1; end
      send(0, (i % 2 == 0) ? line(3, (1 << 12) + 7, (i / 2) % 16) : line(3, (5 << 12) + 9, (i / 2) % 16));
    end
  endtask

  task automatic write_conflict_load(int n, int base);
    for (int i = 0; i < n; i++)
      send(1, line(3, ((i % 2 == 0) ? (1 << 12) : (5 << 12)) + base + i, 0));
  endtask

  task automatic random_load(int n);
    for (int i = 0; i < n; i++)
      send($urandom_range(0, 2) == 0,
           line($urandom_range(0, 7), ($urandom_range(0, 7) << 12) | $urandom_range(0, 3),
                $urandom_range(0, 7)));
  endtask

  longint t_conf [4], t_wconf [4];
  int     sasel_seen [4], multi_seen [4], salp2_seen [4];
  int     switches = 0;

  initial begin
    scheme = SCHEME_BASE; refresh_en = 0; para_en = 0; para_p_thresh = 20'd65536;
    para_lsb_offset = 4'(OFFSET);
    req_valid = 0; req_write = 0; req_line_addr = 0; req_wdata = 0; req_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    begin
      longint t0;
      int a = line(2, 15'h1234, 5);
      requested[2 * 32768 + 15'h1234] = 1;
      req_valid = 1; req_write = 0; req_line_addr = 25'(a); req_id = 8'(next_id);
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
      int s0, m0, q0;
      if (scheme != scheme_e'(sc)) switches++;
      scheme = scheme_e'(sc);
      refresh_en = 0;
      para_en = 0;
      s0 = stats.sasel; m0 = stats.masa_multi; q0 = stats.salp2_overlap;
      wait_idle();
      t0 = cycles;
      conflict_load(48);
      wait_idle();
      t_conf[sc] = cycles - t0 - 60;
      t0 = cycles;
      write_conflict_load(32, 64 * sc);
      wait_idle();
      t_wconf[sc] = cycles - t0 - 60;
      refresh_en = 1;
      para_en = (sc >= 2);
      random_load(300);
      wait_idle();
      sasel_seen[sc] = stats.sasel - s0;
      multi_seen[sc] = stats.masa_multi - m0;
      salp2_seen[sc] = stats.salp2_overlap - q0;
      $display("scheme %0d: read conflicts %0d cycles, write conflicts %0d cycles", sc, t_conf[sc], t_wconf[sc]);
    end

    // PARA at p = 0.75 over a random burst: the queue of refreshes overflows
    para_p_thresh = 20'd786432;
    random_load(120);
    para_p_thresh = 20'd1049;
    wait_idle();
    repeat (200) @(posedge clk);
    para_en = 0;
    wait_idle();

    checks++;
    if (!(t_conf[1] < t_conf[0] && t_conf[3] < t_conf[1] && t_conf[2] <= t_conf[1])) begin
      failures++; $display("read conflicts not served faster by subarray parallelism");
    end
    checks++;
    if (!(t_wconf[0] > t_wconf[1] && t_wconf[1] > t_wconf[2] && t_wconf[3] <= t_wconf[2])) begin
      failures++; $display("write conflicts not served faster with each scheme");
    end
    // the scheme switch changes what the controller issues
    checks++;
    if (sasel_seen[0] + sasel_seen[1] + sasel_seen[2] != 0 || sasel_seen[3] == 0 ||
        multi_seen[0] + multi_seen[1] + multi_seen[2] != 0 || salp2_seen[0] + salp2_seen[1] != 0) begin
      failures++; $display("a scheme switch did not change the command pattern");
    end

    begin
      int unsigned m [string];
      m["salp1_overlap"] = stats.salp1_overlap;
      m["salp2_overlap"] = stats.salp2_overlap;
      m["masa_multi"]    = stats.masa_multi;
      m["sasel"]         = stats.sasel;
      m["refresh"]       = stats.refresh;
      m["para_heads"]    = stats.para_heads;
      m["para_act"]      = stats.para_act;
      m["para_overflow"] = stats.para_overflow;
      m["drain_entries"] = stats.drain_entries;
      m["req_stall"]     = stats.req_stall;
      m["scheme_switch"] = switches;
      foreach (m[name]) begin
        checks++;
        $display("  %-14s %0d", name, m[name]);
        if (m[name] == 0) begin failures++; $display("mechanism %s never happened", name); end
      end
    end
    checks++;
    if (bad_acts != 0 || acts_seen == 0) begin failures++; $display("%0d ACTs to unexpected rows", bad_acts); end
    checks++;
    if (violations != 0) begin failures++; $display("%0d timing violations", violations); end
    checks++;
    if (short_circuit || access_error || ref_error) begin failures++; $display("rank error flags"); end
    checks++;
    if (outstanding != 0) failures++;
    $display("commands %0d, ACTs %0d, cycles %0d", commands, acts_seen, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
