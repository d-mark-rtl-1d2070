// tb_dm_regfile: random byte and row writes to the register array, checked
// against a shadow copy; every read port value and the PC output are
// compared after each clock, with a random row read. Reset must clear all rows.
module tb_dm_regfile;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  rd_row, wr_row;
  logic [15:0] rd_data, wdata;
  logic [1:0]  be;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;

  dm_regfile #(.ROWS(8), .ROW_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(logic [15:0] got, logic [15:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  initial begin
    be = 2'b00; wr_row = 0; wdata = 0; rd_row = 0;
    #12;
    for (int r = 0; r < 8; r++) begin
      rd_row = 3'(r); #1 cmp(rd_data, 16'h0000, "after reset");
      shadow[r] = 16'h0000;
    end
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      wr_row = 3'($urandom); be = 2'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (be[0]) shadow[wr_row][7:0]  = wdata[7:0];
      if (be[1]) shadow[wr_row][15:8] = wdata[15:8];
      #1;
      be = 2'b00;
      rd_row = 3'($urandom);
      #1 cmp(rd_data, shadow[rd_row], $sformatf("row %0d", rd_row));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
