// tb_dm_booth_mul: exhaustive test of the 8x8 signed Booth multiplier;
// every product is compared with SystemVerilog signed multiplication.
module tb_dm_booth_mul;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  dm_booth_mul #(.W(8)) dut (.*);

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if ($signed(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, $signed(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
