// tb_dm_datapath: loads TR2 then TR1 from the bus (one clock each), then
// checks the result of each MUX source (TR2, MUL low/high, shifter, BR) with
// A gated off, ALU operations on TR1 and TR2, and the flag updates.
// Expected values come from plain SystemVerilog arithmetic.
module tb_dm_datapath;
  import dm_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  bus_in, y;
  logic        tr1_load, tr2_load, a_zero, mul_hi, flag_zn_we, flag_c_alu, flag_c_sh;
  alu_op_e     alu_op;
  src_sel_e    src_sel;
  shift_op_e   shift_op;
  logic        flag_z, flag_c, flag_n;
  int checks = 0, failures = 0;

  dm_datapath #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(logic [7:0] got, logic [7:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  task automatic load(logic [7:0] t1, logic [7:0] t2);
    @(negedge clk); bus_in = t2; tr2_load = 1; tr1_load = 0;
    @(negedge clk); bus_in = t1; tr2_load = 0; tr1_load = 1;
    @(negedge clk); tr1_load = 0;
  endtask

  function automatic logic [7:0] br_ref(logic [7:0] base, logic [7:0] pat);
    // one-hot pattern at bit k: bits k..0 reversed, incremented, reversed
    int k = 0;
    logic [8:0] lo;
    logic [7:0] r;
    for (int i = 0; i < 8; i++) if (pat[i]) k = i;
    lo = '0;
    for (int i = 0; i <= k; i++) lo[k - i] = base[i];
    lo = lo + 9'd1;
    r = base;
    for (int i = 0; i <= k; i++) r[i] = lo[k - i];
    if (lo[k + 1]) r = r + 8'((1 << (k + 1)));
    return r;
  endfunction

  initial begin
    logic [7:0] x1, x2;
    logic [15:0] pr;
    tr1_load = 0; tr2_load = 0; bus_in = 0; a_zero = 0; mul_hi = 0;
    flag_zn_we = 0; flag_c_alu = 0; flag_c_sh = 0;
    alu_op = ALU_ADD; src_sel = SRC_TR2; shift_op = SH_LSL;
    #12 rst_n = 1;
    for (int k = 0; k < 150; k++) begin
      x1 = 8'($urandom); x2 = 8'($urandom);
      if (k % 10 == 0) x2 = 8'(1 << (k / 10 % 8));
      load(x1, x2);
      pr = 16'($signed(x1) * $signed(x2));
      a_zero = 1; alu_op = ALU_ADD;
      src_sel = SRC_TR2; #1 cmp(y, x2, "pass TR2");
      src_sel = SRC_MUL; mul_hi = 0; #1 cmp(y, pr[7:0], "MUL low");
      mul_hi = 1; #1 cmp(y, pr[15:8], "MUL high");
      src_sel = SRC_SHR; shift_op = SH_ASR; #1 cmp(y, 8'($signed(x2) >>> 1), "ASR");
      shift_op = SH_LSL; #1 cmp(y, x2 << 1, "LSL");
      if (x2 != 0 && (x2 & (x2 - 1)) == 0) begin
        src_sel = SRC_BR; #1 cmp(y, br_ref(x1, x2), "BR");
      end
      a_zero = 0; src_sel = SRC_TR2;
      alu_op = ALU_SUB; #1 cmp(y, x1 - x2, "SUB");
      alu_op = ALU_OR;  #1 cmp(y, x1 | x2, "OR");
      // flags from SUB
      alu_op = ALU_SUB; flag_zn_we = 1; flag_c_alu = 1;
      @(posedge clk); #1; flag_zn_we = 0; flag_c_alu = 0;
      cmp({5'd0, flag_n, flag_c, flag_z}, {5'd0, 1'(8'(x1 - x2) >> 7), x1 >= x2, x1 == x2}, "flags SUB");
      // carry from the shifter
      a_zero = 1; src_sel = SRC_SHR; shift_op = SH_LSR; flag_c_sh = 1;
      @(posedge clk); #1; flag_c_sh = 0;
      cmp({7'd0, flag_c}, {7'd0, x2[0]}, "flag C from shift");
      // ADC uses the carry flag
      a_zero = 0; src_sel = SRC_TR2; alu_op = ALU_ADC;
      #1 cmp(y, x1 + x2 + 8'(x2[0]), "ADC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
