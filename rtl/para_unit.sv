// para_unit: PARA, probabilistic adjacent row activation.
//
// Whenever the memory controller closes a row (close_valid with the bank and
// logical row), this unit flips a biased coin that shows heads with
// probability p = p_thresh / 2^P_BITS. On heads it picks one of the row's two
// physically adjacent rows, each with equal probability (so each neighbour is
// chosen with p/2), and queues a refresh of that row for the controller,
// which opens and closes it. Nothing about past activations is stored: the
// unit is stateless apart from the random source and the small output queue.
//
// Adjacency: the logical-to-physical row mapping is taken to be a rotation
// of the row address, given by lsb_offset, the bit of the logical row-address
// that becomes the least-significant bit of the physical row-address
// (lsb_offset = 0: logical and physical rows coincide). The neighbour is
// physical row +1 or -1, mapped back to a logical row. A row at either edge
// of the bank has only one neighbour, which is then always taken.
//
// Randomness comes from a 32-bit xorshift generator advanced every cycle.
// The default p_thresh of 1049 with P_BITS = 20 gives p = 0.0010004, the
// design point p = 0.001. The queue holds FIFO_DEPTH refreshes; a coin that
// shows heads while it is full is counted on `overflow` and lost.
// Timing: a refresh enters the queue the cycle after close_valid and leaves it
// on ref_valid && ref_ready.
// Follows the source design: a coin of probability p on every row close, and
// one of the two adjacent rows chosen with p/2 each, given by a bit-offset
// mapping. This design's choices: the rotation reading of that mapping, the
// random generator, the edge-row rule and the queue.
module para_unit #(
  parameter int unsigned ROW_BITS   = dram_pkg::ROW_BITS,
  parameter int unsigned BANK_BITS  = 3,
  parameter int unsigned P_BITS     = 20,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter logic [31:0] SEED       = 32'h2545_F491,
  localparam int unsigned OFF_BITS = $clog2(ROW_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P_BITS-1:0]    p_thresh,
  input  logic [OFF_BITS-1:0]  lsb_offset,
  input  logic                 close_valid,
  input  logic [BANK_BITS-1:0] close_bank,
  input  logic [ROW_BITS-1:0]  close_row,
  output logic                 ref_valid,
  output logic [BANK_BITS-1:0] ref_bank,
  output logic [ROW_BITS-1:0]  ref_row,
  input  logic                 ref_ready,
  output logic                 heads,
  output logic                 overflow
);

  // --- random source ---------------------------------------------------
  logic [31:0] rng, rng_next;
  always_comb begin
    rng_next = rng;
    rng_next ^= rng_next << 13;
    rng_next ^= rng_next >> 17;
    rng_next ^= rng_next << 5;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rng <= SEED;
    else        rng <= rng_next;

  // --- adjacency -------------------------------------------------------
  function automatic logic [ROW_BITS-1:0] rotr(input logic [ROW_BITS-1:0] v,
                                               input logic [OFF_BITS-1:0] n);
    logic [2*ROW_BITS-1:0] d;
    d = {v, v} >> n;
    return d[ROW_BITS-1:0];
  endfunction

  function automatic logic [ROW_BITS-1:0] rotl(input logic [ROW_BITS-1:0] v,
                                               input logic [OFF_BITS-1:0] n);
    logic [2*ROW_BITS-1:0] d;
    d = {v, v} << n;
    return d[2*ROW_BITS-1:ROW_BITS];
  endfunction

  logic                coin, go_up;
  logic [ROW_BITS-1:0] phys, nphys, nrow;

  assign coin  = close_valid && (rng[P_BITS-1:0] < p_thresh);
  assign phys  = rotr(close_row, lsb_offset);
  always_comb begin
    if (phys == '0)      go_up = 1'b1;
    else if (&phys)      go_up = 1'b0;
    else                 go_up = rng[31];
    nphys = go_up ? phys + 1'b1 : phys - 1'b1;
  end
  assign nrow  = rotl(nphys, lsb_offset);
  assign heads = coin;

  // --- refresh queue -----------------------------------------------------
  localparam int unsigned PTR_BITS = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  logic [BANK_BITS-1:0] q_bank [FIFO_DEPTH];
  logic [ROW_BITS-1:0]  q_row  [FIFO_DEPTH];
  logic [PTR_BITS-1:0]  rd_ptr, wr_ptr;
  logic [PTR_BITS:0]    count;
  logic                 push, pop, full;

  assign full      = (count == (PTR_BITS+1)'(FIFO_DEPTH));
  assign pop       = ref_valid && ref_ready;
  assign push      = coin && (!full || pop);
  assign overflow  = coin && full && !pop;
  assign ref_valid = (count != '0);
  assign ref_bank  = q_bank[rd_ptr];
  assign ref_row   = q_row[rd_ptr];

  function automatic logic [PTR_BITS-1:0] incr(input logic [PTR_BITS-1:0] p);
    return (p == PTR_BITS'(FIFO_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < int'(FIFO_DEPTH); i++) begin
        q_bank[i] <= '0;
        q_row[i]  <= '0;
      end
    end else begin
      if (push) begin
        q_bank[wr_ptr] <= close_bank;
        q_row[wr_ptr]  <= nrow;
        wr_ptr         <= incr(wr_ptr);
      end
      if (pop) rd_ptr <= incr(rd_ptr);
      count <= count + (PTR_BITS+1)'(push) - (PTR_BITS+1)'(pop);
    end

endmodule
