// dram_rank: a rank of NUM_BANKS MASA-capable banks behind one command bus.
//
// The chips of a rank work in lockstep, so the rank is modelled as one device
// whose column is a whole 64-byte cache line. Each cycle the rank takes one
// command with its bank, subarray, subarray row and column; the command goes
// to the addressed bank only, except REFRESH, which needs every subarray of
// every bank precharged (ref_error flags a violation; refreshing itself has
// no visible effect on the cell model). Write data travels with the WRITE
// command. Read data leaves on rd_data with rd_valid exactly CL cycles after
// the READ command, as one beat (the burst is not split into beats).
// Status outputs expose every subarray's activated and designated bits.
// Follows the source design: 8 banks per rank sharing one command bus, and
// the CAS latency of DDR3-1066 (CL = 8). This design's choices: the rank as
// one device with line-wide columns, the REFRESH check, the status outputs.
module dram_rank #(
  parameter int unsigned NUM_BANKS   = dram_pkg::NUM_BANKS,
  parameter int unsigned SA_PER_BANK = dram_pkg::SA_PER_BANK,
  parameter int unsigned SA_ROW_BITS = dram_pkg::ROW_BITS - $clog2(dram_pkg::SA_PER_BANK),
  parameter int unsigned COL_BITS    = dram_pkg::COL_BITS,
  parameter int unsigned LINE_BITS   = dram_pkg::LINE_BITS,
  parameter int unsigned T_CL        = dram_pkg::T_CL,
  localparam int unsigned BANK_BITS = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned SA_BITS   = (SA_PER_BANK > 1) ? $clog2(SA_PER_BANK) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  dram_pkg::cmd_e         cmd,
  input  logic [BANK_BITS-1:0]   bank,
  input  logic [SA_BITS-1:0]     sa,
  input  logic [SA_ROW_BITS-1:0] sa_row,
  input  logic [COL_BITS-1:0]    col,
  input  logic [LINE_BITS-1:0]   wr_data,
  output logic                   rd_valid,
  output logic [LINE_BITS-1:0]   rd_data,
  output logic [NUM_BANKS*SA_PER_BANK-1:0] activated,
  output logic [NUM_BANKS*SA_PER_BANK-1:0] designated,
  output logic                   short_circuit,
  output logic                   access_error,
  output logic                   ref_error
);
  import dram_pkg::*;

  logic [LINE_BITS-1:0] bank_rd [NUM_BANKS];
  logic [NUM_BANKS-1:0] bank_sc, bank_ae;

  for (genvar b = 0; b < int'(NUM_BANKS); b++) begin : g_bank
    cmd_e bcmd;
    assign bcmd = (bank == BANK_BITS'(b) && cmd != CMD_REF) ? cmd : CMD_NOP;
    dram_bank #(.SA_ROW_BITS(SA_ROW_BITS), .SA_PER_BANK(SA_PER_BANK),
                .COL_BITS(COL_BITS), .LINE_BITS(LINE_BITS)) u_bank (
      .clk, .rst_n,
      .cmd          (bcmd),
      .sa, .sa_row, .col, .wr_data,
      .rd_data      (bank_rd[b]),
      .activated    (activated[b*SA_PER_BANK +: SA_PER_BANK]),
      .designated   (designated[b*SA_PER_BANK +: SA_PER_BANK]),
      .short_circuit(bank_sc[b]),
      .access_error (bank_ae[b])
    );
  end

  assign short_circuit = |bank_sc;
  assign access_error  = |bank_ae;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                             ref_error <= 1'b0;
    else if (cmd == CMD_REF && |activated)  ref_error <= 1'b1;

  // CAS latency pipeline. The bank's global row-buffer holds the line one
  // cycle after READ; T_CL-1 further stages bring it out at CL.
  logic [T_CL-1:0]      rd_pipe_v;
  logic [BANK_BITS-1:0] rd_pipe_b [T_CL];
  logic [LINE_BITS-1:0] rd_stage  [T_CL];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_pipe_v <= '0;
      for (int i = 0; i < int'(T_CL); i++) begin
        rd_pipe_b[i] <= '0;
        rd_stage[i]  <= '0;
      end
    end else begin
      rd_pipe_v[0] <= (cmd == CMD_RD);
      rd_pipe_b[0] <= bank;
      rd_stage[0]  <= '0;
      // stage 1 takes the line from the bank's global row-buffer
      for (int i = 1; i < int'(T_CL); i++) begin
        rd_pipe_v[i] <= rd_pipe_v[i-1];
        rd_pipe_b[i] <= rd_pipe_b[i-1];
        rd_stage[i]  <= (i == 1) ? bank_rd[rd_pipe_b[0]] : rd_stage[i-1];
      end
    end

  assign rd_valid = rd_pipe_v[T_CL-1];
  assign rd_data  = rd_stage[T_CL-1];

endmodule
