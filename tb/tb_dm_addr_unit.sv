// tb_dm_addr_unit: loads, increments and decrements of the MAR, including
// the 16-bit wrap at FFFF/0000 and load priority over increment; the
// incrementer output is checked in both directions.
module tb_dm_addr_unit;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, inc, down;
  logic [15:0] load_val, mar, incr, model;
  int checks = 0, failures = 0;

  dm_addr_unit #(.AW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    load = 0; inc = 0; down = 0; load_val = 0; model = 0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) == 0);
      inc  = 1'($urandom);
      down = 1'($urandom);
      load_val = (k % 50 == 0) ? 16'hFFFF : (k % 50 == 1) ? 16'h0000 : 16'($urandom);
      #1;
      checks++;
      if (incr !== (down ? model - 16'd1 : model + 16'd1)) begin
        failures++;
        $display("FAIL incr %h for mar %h down %b", incr, model, down);
      end
      @(posedge clk);
      if (load)     model = load_val;
      else if (inc) model = down ? model - 16'd1 : model + 16'd1;
      #1;
      checks++;
      if (mar !== model) begin
        failures++;
        if (failures < 10) $display("FAIL mar %h want %h", mar, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
