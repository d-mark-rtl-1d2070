// tb_dm_shifter: exhaustive test of the one-place shifter, all four shift
// kinds on all 256 operands, result and shifted-out bit compared with the
// SystemVerilog shift operators.
module tb_dm_shifter;
  import dm_pkg::*;
  shift_op_e  op;
  logic [7:0] a, y;
  logic       c_out;
  int checks = 0, failures = 0;

  dm_shifter #(.W(8)) dut (.*);

  initial begin
    for (int o = 0; o < 4; o++) begin
      for (int v = 0; v < 256; v++) begin
        logic [7:0] ey;
        logic       ec;
        op = shift_op_e'(o); a = 8'(v);
        #1;
        case (op)
          SH_LSR:  begin ey = a >> 1; ec = a[0]; end
          SH_ASR:  begin ey = 8'($signed(a) >>> 1); ec = a[0]; end
          default: begin ey = a << 1; ec = a[7]; end
        endcase
        checks++;
        if (y !== ey || c_out !== ec) begin
          failures++;
          if (failures < 10) $display("FAIL %s a=%h y=%h/%h", op.name(), a, y, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
