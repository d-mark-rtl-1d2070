// tb_dm_control: feeds a list of instructions to the control FSM (high byte
// in T2, low byte in T3, as a memory would) and checks, state by state, the
// control word it produces: the seven-state sequence, fetch reads and PC
// advance, register reads into TR1/TR2, write-back, memory cycles, pointer
// post-increment/decrement, jump taken or not by the flags, and HALT.
module tb_dm_control;
  import dm_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data_in, imm;
  logic       flag_z, flag_c, halted, instr_done;
  ctrl_t      ctrl;
  state_e     state;
  int checks = 0, failures = 0;

  dm_control dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state %s)", what, state.name());
    end
  endtask

  // run one instruction; returns control words of T4..T7 in w
  task automatic run(logic [15:0] ins, output ctrl_t w [4]);
    // at entry: state == T1 (after a negedge)
    chk(state == ST_T1, "T1 at instruction start");
    chk(ctrl.mar_load && ctrl.rsel == 0, "T1 loads MAR from PC");
    @(negedge clk);
    chk(state == ST_T2, "T2");
    data_in = ins[15:8];
    chk(ctrl.mem_rd && ctrl.mar_inc && ctrl.rf_be == 2'b11 && ctrl.rf_wrow == 0 &&
        ctrl.wb_sel == WB_INCR, "T2 fetch high byte, PC advance");
    @(negedge clk);
    chk(state == ST_T3, "T3");
    data_in = ins[7:0];
    chk(ctrl.mem_rd && !ctrl.mar_inc && ctrl.rf_be == 2'b11 && ctrl.wb_sel == WB_INCR,
        "T3 fetch low byte, PC advance");
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      w[t] = ctrl;
      if (state == ST_HALT) break;
      chk(state == state_e'(3 + t), $sformatf("T%0d", 4 + t));
      chk(instr_done == (t == 3), "instr_done only in T7");
    end
    if (state != ST_HALT) @(negedge clk);
  endtask

  initial begin
    ctrl_t w [4];
    data_in = 0; flag_z = 0; flag_c = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;   // state T1
    // LDI b11, 0x3C
    run({4'hF, 4'd11, 8'h3C}, w);
    chk(w[0].rf_be == 2'b10 && w[0].rf_wrow == 5 && w[0].wb_sel == WB_IMM && imm == 8'h3C, "LDI writes high byte of row 5");
    chk(w[1].rf_be == 0 && w[2].rf_be == 0, "LDI writes once");
    // SUB b4, b3 : rd = 4 (row 2 low), rs = 3 (row 1 high)
    run({OP_SUB, 4'd4, 4'd3, 3'b0}, w);
    chk(w[0].tr2_load && w[0].rsel == 1 && w[0].rbyte == 1, "T4 TR2 <= rs");
    chk(w[1].tr1_load && w[1].rsel == 2 && w[1].rbyte == 0, "T5 TR1 <= rd");
    chk(w[2].rf_be == 2'b01 && w[2].rf_wrow == 2 && w[2].wb_sel == WB_ALU &&
        w[2].alu_op == ALU_SUB && !w[2].a_zero && w[2].flag_zn_we && w[2].flag_c_alu, "T6 write back SUB");
    // CMP writes flags only
    run({OP_CMP, 4'd4, 4'd3, 3'b0}, w);
    chk(w[2].rf_be == 0 && w[2].flag_zn_we && w[2].alu_op == ALU_SUB, "CMP no write-back");
    // MULH b6, b7
    run({OP_MULH, 4'd6, 4'd7, 3'b0}, w);
    chk(w[2].src_sel == SRC_MUL && w[2].mul_hi && w[2].a_zero && w[2].rf_be == 2'b01, "MULH");
    // MULL b6, b7 with combine AND (multiply-and-AND)
    run({OP_MULL, 4'd6, 4'd7, 3'd1}, w);
    chk(w[2].src_sel == SRC_MUL && !w[2].mul_hi && !w[2].a_zero && w[2].alu_op == ALU_AND, "MULL combined with AND");
    // SHR b6, b7 with combine ADD: carry from the ALU
    run({OP_SHR, 4'd6, 4'd7, 3'd4}, w);
    chk(w[2].src_sel == SRC_SHR && w[2].alu_op == ALU_ADD && !w[2].a_zero && w[2].flag_c_alu && !w[2].flag_c_sh,
        "SHR combined with ADD");
    // BR b2, b3
    run({OP_BR, 4'd2, 4'd3, 3'b0}, w);
    chk(w[2].src_sel == SRC_BR && w[2].a_zero && w[2].rf_wrow == 1, "BR");
    // ASR b2, b5
    run({OP_ASR, 4'd2, 4'd5, 3'b0}, w);
    chk(w[2].src_sel == SRC_SHR && w[2].shift_op == SH_ASR && w[2].flag_c_sh, "ASR");
    // LD b5, (P1)+   pointer row 5
    run({OP_LD, 4'd5, 2'd1, AM_INC, 3'b0}, w);
    chk(w[0].mar_load && w[0].rsel == 5, "LD T4 MAR <= pointer");
    chk(w[1].mem_rd && w[1].rf_wrow == 2 && w[1].rf_be == 2'b10 && w[1].wb_sel == WB_MEM, "LD T5 read");
    chk(w[2].rf_wrow == 5 && w[2].rf_be == 2'b11 && w[2].wb_sel == WB_INCR && !w[2].incr_down, "LD T6 post-increment");
    // ST b6, (P3)-   pointer row 7
    run({OP_ST, 4'd6, 2'd3, AM_DEC, 3'b0}, w);
    chk(w[0].mar_load && w[0].rsel == 7, "ST T4 MAR <= pointer");
    chk(w[1].mem_wr && !w[1].mem_rd && w[1].rsel == 3 && w[1].rbyte == 0 && w[1].rf_be == 0, "ST T5 write");
    chk(w[2].rf_wrow == 7 && w[2].wb_sel == WB_INCR && w[2].incr_down, "ST T6 post-decrement");
    // ST without post-modify
    run({OP_ST, 4'd6, 2'd3, AM_NONE, 3'b0}, w);
    chk(w[2].rf_be == 0, "ST no pointer update");
    // JZ row 6, Z = 1 -> taken
    flag_z = 1;
    run({OP_JZ, 3'd6, 8'h00}, w);
    chk(w[0].rf_wrow == 0 && w[0].rf_be == 2'b11 && w[0].wb_sel == WB_ROW && w[0].rsel == 6, "JZ taken");
    // JNZ with Z = 1 -> not taken
    run({OP_JNZ, 3'd6, 8'h00}, w);
    chk(w[0].rf_be == 0, "JNZ not taken");
    flag_c = 1;
    run({OP_JNC, 3'd3, 8'h00}, w);
    chk(w[0].rf_be == 0, "JNC not taken");
    run({OP_JC, 3'd3, 8'h00}, w);
    chk(w[0].rf_be == 2'b11 && w[0].rsel == 3, "JC taken");
    // HALT
    run({OP_HALT, 11'd0}, w);
    chk(halted && state == ST_HALT, "HALT stops");
    repeat (5) @(negedge clk);
    chk(halted && ctrl.rf_be == 0 && !ctrl.mem_rd, "stays halted, idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
