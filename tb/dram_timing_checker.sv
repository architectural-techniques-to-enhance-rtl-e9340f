// dram_timing_checker: watches a DRAM command bus and counts every command
// that breaks a timing or state rule of the selected scheme. It keeps its own
// record of each subarray (activated, designated) and of the cycle of the
// last command of each kind, and applies the DDR3-1066 rules (tRCD, tRAS,
// tRP, tRC, tRTP, write recovery, tCCD, tRRD, tFAW, read/write turnaround)
// plus the subarray rules:
//   baseline: ACT needs the whole bank precharged and tRP since any PRE to it;
//   SALP-1:   ACT needs the bank precharged; tRP only within one subarray;
//   SALP-2:   at most two subarrays activated, tRA/tWA before an ACT, column
//             commands only with one subarray activated;
//   MASA:     tRA/tWA before ACT and SA_SEL, column commands to the
//             designated subarray.
// REFRESH needs every subarray precharged and tRP elapsed.
module dram_timing_checker #(
  parameter int NB = 8,
  parameter int NS = 8
) (
  input logic               clk,
  input logic               rst_n,
  input dram_pkg::scheme_e  scheme,
  input dram_pkg::cmd_e     cmd,
  input logic [2:0]         bank,
  input logic [2:0]         sa,
  output int                violations,
  output int                commands
);
  import dram_pkg::*;
  localparam longint NEVER = -100000;

  longint now;
  bit     open_ [NB][NS];
  int     desig [NB];
  longint l_act [NB][NS], l_pre [NB][NS], l_rd [NB][NS], l_wr [NB][NS];
  longint l_bpre [NB], l_brd [NB], l_bwr [NB];
  longint l_anyact, l_col, l_rdc, l_wrc, l_ref, l_anypre;
  longint faw_hist [4];

  initial begin
    violations = 0; commands = 0; now = 0;
    for (int b = 0; b < NB; b++) begin
      desig[b] = 0; l_bpre[b] = NEVER; l_brd[b] = NEVER; l_bwr[b] = NEVER;
      for (int s = 0; s < NS; s++) begin
        open_[b][s] = 0; l_act[b][s] = NEVER; l_pre[b][s] = NEVER;
        l_rd[b][s] = NEVER; l_wr[b][s] = NEVER;
      end
    end
    l_anyact = NEVER; l_col = NEVER; l_rdc = NEVER; l_wrc = NEVER; l_ref = NEVER; l_anypre = NEVER;
    for (int k = 0; k < 4; k++) faw_hist[k] = NEVER;
  end

  function automatic int nopen(int b);
    int n = 0;
    for (int s = 0; s < NS; s++) n += int'(open_[b][s]);
    return n;
  endfunction

  task automatic bad(string why);
    violations++;
    if (violations < 10) $display("[%0d] timing rule broken: %s (bank %0d sa %0d)", now, why, bank, sa);
  endtask

  always @(posedge clk) begin
    int b, s;
    now++;
    b = int'(bank); s = int'(sa);
    if (rst_n && cmd != CMD_NOP) begin
      commands++;
      unique case (cmd)
        CMD_ACT: begin
          if (open_[b][s]) bad("ACT to activated subarray");
          if (now - l_pre[b][s] < T_RP) bad("tRP same subarray");
          if (now - l_act[b][s] < T_RAS + T_RP) bad("tRC");
          if (now - l_anyact < T_RRD) bad("tRRD");
          if (now - faw_hist[3] < T_FAW) bad("tFAW");
          if (now - l_ref < T_RFC) bad("tRFC");
          unique case (scheme)
            SCHEME_BASE: begin
              if (nopen(b) != 0) bad("baseline: bank not precharged");
              if (now - l_bpre[b] < T_RP) bad("baseline: tRP bank");
            end
            SCHEME_SALP1: if (nopen(b) != 0) bad("SALP-1: bank not precharged");
            SCHEME_SALP2: begin
              if (nopen(b) > 1) bad("SALP-2: third activated subarray");
              if (now - l_brd[b] < T_RA || now - l_bwr[b] < T_WA) bad("SALP-2: tRA/tWA");
            end
            default:
              if (now - l_brd[b] < T_RA || now - l_bwr[b] < T_WA) bad("MASA: tRA/tWA");
          endcase
          open_[b][s] = 1; desig[b] = s; l_act[b][s] = now; l_anyact = now;
          for (int k = 3; k > 0; k--) faw_hist[k] = faw_hist[k-1];
          faw_hist[0] = now;
        end
        CMD_SASEL: begin
          if (scheme != SCHEME_MASA) bad("SA_SEL outside MASA");
          if (!open_[b][s]) bad("SA_SEL to precharged subarray");
          if (now - l_brd[b] < T_RA || now - l_bwr[b] < T_WA) bad("SA_SEL tRA/tWA");
          desig[b] = s;
        end
        CMD_PRE: begin
          if (!open_[b][s]) bad("PRE to precharged subarray");
          if (now - l_act[b][s] < T_RAS) bad("tRAS");
          if (now - l_rd[b][s] < T_RTP) bad("tRTP");
          if (now - l_wr[b][s] < T_CWL + T_BURST + T_WR) bad("tWR");
          open_[b][s] = 0; l_pre[b][s] = now; l_bpre[b] = now; l_anypre = now;
        end
        CMD_RD, CMD_WR: begin
          int d;
          d = desig[b];
          if (d != s) bad("column command not to designated subarray");
          if (!open_[b][d]) bad("column command to precharged subarray");
          if (now - l_act[b][d] < T_RCD) bad("tRCD");
          if (now - l_col < T_CCD) bad("tCCD");
          if (scheme != SCHEME_MASA && nopen(b) != 1) bad("column command with several activated");
          if (cmd == CMD_RD) begin
            if (now - l_wrc < T_CWL + T_BURST + T_WTR) bad("tWTR");
            l_rd[b][d] = now; l_brd[b] = now; l_rdc = now;
          end else begin
            if (now - l_rdc < T_CL + T_CCD + 2 - T_CWL) bad("tRTW");
            l_wr[b][d] = now; l_bwr[b] = now; l_wrc = now;
          end
          l_col = now;
        end
        CMD_REF: begin
          for (int x = 0; x < NB; x++) if (nopen(x) != 0) begin bad("REF with activated subarray"); break; end
          if (now - l_anypre < T_RP) bad("REF tRP");
          if (now - l_ref < T_RFC) bad("tRFC between REF");
          l_ref = now;
        end
        default: ;
      endcase
    end
  end
endmodule
