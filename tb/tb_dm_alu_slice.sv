// tb_dm_alu_slice: exhaustive test of one ALU bit slice.
// All 64 combinations of {S2,S1,S0,A,B,CIN} are applied; the expected ALU
// and COUT bits are worked out from the slice's function table (operand B'
// chosen from 0/B/~B/1, ripple or bypassed carry, SUM or CARRY output).
module tb_dm_alu_slice;
  import dm_pkg::*;
  slice_ctrl_t ctrl;
  logic a, b, cin, y, cout;
  int checks = 0, failures = 0;

  dm_alu_slice dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic bm, ey, ec;
      int   n;
      {ctrl.s2, ctrl.s1, ctrl.s0, a, b, cin} = 6'(v);
      #1;
      // B' from the (s1,s0) code: 00 -> 0, 01 -> B, 10 -> ~B, 11 -> 1
      case ({ctrl.s1, ctrl.s0})
        2'b00: bm = 1'b0;
        2'b01: bm = b;
        2'b10: bm = !b;
        default: bm = 1'b1;
      endcase
      n = int'(a) + int'(bm) + int'(cin);
      if (!ctrl.s2) begin
        ey = n[0]; ec = n[1];
      end else begin
        ey = ctrl.s0 ? n[1] : n[0]; ec = cin;
      end
      checks++;
      if (y !== ey || cout !== ec) begin
        failures++;
        $display("FAIL v=%b y=%b/%b cout=%b/%b", 6'(v), y, ey, cout, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
