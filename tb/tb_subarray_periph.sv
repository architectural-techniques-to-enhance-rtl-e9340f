// tb_subarray_periph: the latches of one subarray (ID 3 of 8) under random
// global address-bus traffic. The testbench builds the bus values itself
// (one-hot ID, pre-decoded row or INV) and keeps a reference of what the
// subarray must hold: the raised wordline after an ACTIVATE to its ID, no
// wordline after a selective PRECHARGE to its ID or a bank-wide INV, and the
// designated bit set by subarray-select with its ID and cleared by
// subarray-select with any other ID. Checked every cycle: wl_raised,
// wl_index, activated, precharge_en, designated, gbl_connect.
module tb_subarray_periph;
  localparam int MY_ID = 3;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  bus_id;
  logic [31:0] bus_row;
  logic        addr_strobe, sa_sel, col_sel;
  logic        wl_raised, activated, precharge_en, designated, gbl_connect;
  logic [11:0] wl_index;
  int checks = 0, failures = 0;

  subarray_periph #(.SA_ROW_BITS(12), .SA_PER_BANK(8), .MY_ID(MY_ID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] predec(input int r);
    logic [31:0] v = 0;
    for (int g = 0; g < 4; g++) v[g*8 + ((r >> (3*g)) & 7)] = 1'b1;
    return v;
  endfunction

  bit ref_raised = 0, ref_desig = 0;
  int ref_row = 0;

  task automatic check(string what);
    checks++;
    if (wl_raised !== ref_raised || activated !== ref_raised ||
        precharge_en !== !ref_raised || designated !== ref_desig ||
        (ref_raised && wl_index !== 12'(ref_row)) || gbl_connect !== (ref_desig && col_sel)) begin
      failures++;
      if (failures < 6)
        $display("%s: raised %b/%b idx %0d/%0d desig %b/%b conn %b", what, wl_raised, ref_raised,
                 wl_index, ref_row, designated, ref_desig, gbl_connect);
    end
  endtask

  // one command per cycle: 0 idle, 1 ACT, 2 SA_SEL, 3 PRE, 4 global PRE, 5 column
  task automatic drive(int kind, int id, int row);
    bus_id = 0; bus_row = 0; addr_strobe = 0; sa_sel = 0; col_sel = 0;
    unique case (kind)
      1: begin bus_id = 8'(1 << id); bus_row = predec(row); addr_strobe = 1; sa_sel = 1; end
      2: begin bus_id = 8'(1 << id); bus_row = predec(row); addr_strobe = 1; sa_sel = 1; end
      3: begin bus_id = 8'(1 << id); addr_strobe = 1; end
      4: begin addr_strobe = 1; end
      5: begin col_sel = 1; end
      default: ;
    endcase
    #1 check($sformatf("comb kind %0d", kind));
    @(posedge clk);
    // reference update
    if (kind == 1 && id == MY_ID) begin ref_raised = 1; ref_row = row; end
    if (kind == 2 && id == MY_ID) begin ref_raised = 1; ref_row = row; end
    if ((kind == 3 && id == MY_ID) || kind == 4) ref_raised = 0;
    if (kind == 1 || kind == 2) ref_desig = (id == MY_ID);
    #1 bus_id = 0; bus_row = 0; addr_strobe = 0; sa_sel = 0; col_sel = 0;
    #1 check($sformatf("after kind %0d", kind));
  endtask

  initial begin
    bus_id = 0; bus_row = 0; addr_strobe = 0; sa_sel = 0; col_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check("reset");
    // activate, select and selectively precharge wordline 0x20 of this subarray
    drive(1, MY_ID, 'h20);
    drive(0, 0, 0);
    drive(5, 0, 0);
    drive(1, 5, 'h11);     // another subarray activates: this one stays raised
    drive(5, 0, 0);        // but is no longer connected
    drive(2, MY_ID, 'h20); // SA_SEL back to this one
    drive(5, 0, 0);
    drive(3, 5, 0);        // precharge of the other subarray: no effect here
    drive(3, MY_ID, 0);    // selective precharge
    drive(1, MY_ID, 'hFFF);
    drive(4, 0, 0);        // bank-wide INV
    for (int i = 0; i < 3000; i++) begin
      int k, id;
      k  = $urandom_range(0, 5);
      id = ($urandom_range(0, 2) == 0) ? MY_ID : $urandom_range(0, 7);
      drive(k, id, $urandom_range(0, 4095));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
