// tb_row_predecoder: exhaustive check of the global row-decoder.
// Every subarray ID and every 12-bit subarray row-address is applied; the
// expected 40 pre-decoded lines are built from integer arithmetic (one line
// per 3-bit digit of the address) and compared. With valid low all lines
// must be INV (zero).
module tb_row_predecoder;
  localparam int SA_ROW_BITS = 12;
  localparam int SA_PER_BANK = 8;
  logic        valid;
  logic [2:0]  sa_id;
  logic [11:0] sa_row;
  logic [7:0]  id_onehot;
  logic [31:0] row_predec;
  int checks = 0, failures = 0;

  row_predecoder #(.SA_ROW_BITS(SA_ROW_BITS), .SA_PER_BANK(SA_PER_BANK)) dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int id = 0; id < SA_PER_BANK; id++)
      for (int r = 0; r < (1 << SA_ROW_BITS); r++) begin
        logic [31:0] exp_row;
        valid = 1'b1; sa_id = 3'(id); sa_row = 12'(r); #1;
        exp_row = 0;
        for (int g = 0; g < 4; g++) exp_row |= 32'(1) << (g * 8 + ((r / (8 ** g)) % 8));
        checks++;
        if (id_onehot != 8'(1 << id) || row_predec != exp_row) begin
          failures++;
          if (failures < 5) $display("mismatch id=%0d row=%0d: %h %h", id, r, id_onehot, row_predec);
        end
      end
    valid = 1'b0; sa_id = 3'd5; sa_row = 12'h123; #1;
    checks++;
    if (id_onehot != 0 || row_predec != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
