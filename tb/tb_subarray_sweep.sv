// tb_subarray_sweep: the subarrays-per-bank sweep. Four copies of the memory
// system are built with 2, 8, 32 and 128 subarrays per bank (64-bit lines,
// tREFI 700; all else at the defaults). Each copy runs the same random stream
// of requests, confined to two banks so that bank conflicts are frequent.
// Rows are uniform over all 32K rows, with up to 8 reads in flight. The
// stream runs once under the baseline and once under MASA, with refresh on.
// Checks:
//  * every read returns the last data written to its line, in every copy;
//  * no rank error flag is raised;
//  * MASA is faster than the baseline in every copy;
//  * the MASA speed-up grows with the number of subarrays, from 2 to 128
//    (more conflicts fall into different subarrays).
module tb_subarray_sweep;
  import dram_pkg::*;
  localparam int LB = 64;
  localparam int NCFG = 4;
  localparam int NREQ = 400;
  localparam int SPB [NCFG] = '{2, 8, 32, 128};

  logic   clk = 0, rst_n = 0;
  int     checks = 0, failures = 0;
  longint cycles = 0;
  longint t_base [NCFG], t_masa [NCFG];
  bit     done [NCFG];

  // one request stream shared by all copies
  int     s_write [NREQ];
  int     s_addr  [NREQ];

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog: stopped at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NREQ; i++) begin
      s_write[i] = ($urandom_range(0, 2) == 0);
      s_addr[i]  = ($urandom_range(0, 32767) << 10) | ($urandom_range(0, 127) << 3) | $urandom_range(0, 1);
    end
  end

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int N   = SPB[g];
    localparam int SB  = $clog2(N);
    scheme_e        scheme;
    logic           req_valid, req_ready, req_write;
    logic [24:0]    req_line_addr;
    logic [LB-1:0]  req_wdata;
    logic [7:0]     req_id;
    logic           resp_valid;
    logic [7:0]     resp_id;
    logic [LB-1:0]  resp_data;
    cmd_e           mon_cmd;
    logic [2:0]     mon_bank;
    logic [SB-1:0]  mon_sa;
    logic [15-SB-1:0] mon_sa_row;
    logic [8*N-1:0] sa_activated, sa_designated;
    logic           drain_mode;
    mc_stats_t      stats;
    logic           short_circuit, access_error, ref_error;

    salp_para_system #(.SA_PER_BANK(N), .LINE_BITS(LB), .T_REFI(700)) dut (
      .clk, .rst_n, .scheme, .refresh_en(1'b1), .para_en(1'b0), .para_p_thresh(20'd1049),
      .para_lsb_offset(4'd0), .req_valid, .req_ready, .req_write, .req_line_addr, .req_wdata,
      .req_id, .resp_valid, .resp_id, .resp_data, .mon_cmd, .mon_bank, .mon_sa, .mon_sa_row,
      .sa_activated, .sa_designated, .drain_mode, .stats, .short_circuit, .access_error,
      .ref_error);

    logic [LB-1:0] mem_ref [int];
    logic [LB-1:0] exp_data [256];
    int            outstanding = 0;
    int            next_id = 0;

    always @(posedge clk) if (rst_n && resp_valid) begin
      checks++;
      outstanding--;
      if (resp_data !== exp_data[resp_id]) begin
        failures++;
        if (failures < 8) $display("[%0d] %0d subarrays: read id %0d wrong", cycles, N, resp_id);
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

    initial begin
      scheme = SCHEME_BASE;
      req_valid = 0; req_write = 0; req_line_addr = 0; req_wdata = 0; req_id = 0;
      wait (rst_n);
      @(posedge clk); #1;
      run(t_base[g]);
      scheme = SCHEME_MASA;
      wait_idle();
      run(t_masa[g]);
      checks++;
      if (short_circuit || access_error || ref_error) begin
        failures++; $display("%0d subarrays: rank error flag", N);
      end
      checks++;
      if (outstanding != 0) failures++;
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NCFG; g++) wait (done[g]);
    for (int g = 0; g < NCFG; g++) begin
      $display("%0d subarrays per bank: baseline %0d cycles, MASA %0d cycles, speed-up %0.3f",
               SPB[g], t_base[g], t_masa[g], real'(t_base[g]) / real'(t_masa[g]));
      checks++;
      if (!(t_masa[g] < t_base[g])) begin failures++; $display("  MASA not faster"); end
    end
    checks++;
    if (!(real'(t_base[NCFG-1]) / real'(t_masa[NCFG-1]) > real'(t_base[0]) / real'(t_masa[0]))) begin
      failures++; $display("speed-up does not grow with the number of subarrays");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
