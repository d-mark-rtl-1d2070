// tb_dm_alu: tests the 8-bit ALU against integer arithmetic.
// Every one of the twelve operations is applied to corner values and to
// random operands with both carry-in values; result, carry out (arithmetic
// operations only), zero and negative are compared with plain SystemVerilog
// arithmetic.
module tb_dm_alu;
  import dm_pkg::*;
  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       c_in, c_out, zero, neg;
  int checks = 0, failures = 0;

  dm_alu #(.W(8)) dut (.*);

  task automatic one(alu_op_e o, logic [7:0] av, logic [7:0] bv, logic ci);
    logic [8:0] t;
    logic [7:0] ey;
    logic       ec, arith;
    op = o; a = av; b = bv; c_in = ci;
    #1;
    arith = 1'b1;
    case (o)
      ALU_ADD:  t = av + bv;
      ALU_ADC:  t = av + bv + ci;
      ALU_SUB:  t = {1'b0, av} + {1'b0, ~bv} + 9'd1;
      ALU_SBB:  t = {1'b0, av} + {1'b0, ~bv} + ci;
      ALU_INC:  t = av + 9'd1;
      ALU_DEC:  t = {1'b0, av} + 9'h0FF;
      ALU_PASS: t = {1'b0, av};
      default:  begin arith = 1'b0; t = '0; end
    endcase
    case (o)
      ALU_AND:  ey = av & bv;
      ALU_OR:   ey = av | bv;
      ALU_XOR:  ey = av ^ bv;
      ALU_XNOR: ey = ~(av ^ bv);
      ALU_NOT:  ey = ~av;
      default:  ey = t[7:0];
    endcase
    ec = arith ? t[8] : c_out;   // no carry result for logic operations
    checks++;
    if (y !== ey || c_out !== ec || zero !== (ey == 0) || neg !== ey[7]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h ci=%b: y=%h/%h c=%b/%b", o.name(), av, bv, ci, y, ey, c_out, ec);
    end
  endtask

  initial begin
    logic [7:0] corner [5] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF};
    for (int o = 0; o < 12; o++) begin
      foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++)
        one(alu_op_e'(o), corner[i], corner[j], c[0]);
      for (int k = 0; k < 200; k++)
        one(alu_op_e'(o), 8'($urandom), 8'($urandom), 1'($urandom));
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
