// dm_control: the D-mark control unit, a rising-edge FSM with the
// instruction register (Irh, Irl).
//
// Every instruction takes seven states, T1..T7:
//   T1  MAR <= PC
//   T2  Irh <= memory[MAR]; PC <= MAR + 1; MAR <= MAR + 1
//   T3  Irl <= memory[MAR]; PC <= MAR + 1
//   T4..T7 execute and write back, depending on the opcode:
//   ALU/MOV/shift/MUL/BR  T4 TR2 <= rs, T5 TR1 <= rd, T6 rd <= result, flags
//   LD rd,(P)             T4 MAR <= P, T5 rd <= memory, T6 P <= P +/- 1
//   ST rs,(P)             T4 MAR <= P, T5 memory <= rs, T6 P <= P +/- 1
//   LDI rd,imm            T4 rd <= imm
//   JMP/Jcc P             T4 PC <= P when the condition holds
//   HALT                  T4 stop; the FSM then stays in ST_HALT
// The seven-cycle rhythm with a three-cycle fetch, the 16-bit instruction
// and the register-pair jump are published; the encoding is this design's:
//   [15:11] opcode (dm_pkg::opcode_e)
//   ALU, MOV, shift, MUL, BR: [10:7] rd, [6:3] rs (byte register index
//       {row, half}, half 1 = high byte), [2:0] combine field
//   For MOV, shifts, MULL/MULH and BR the combine field chooses how the
//   unit's result U (taken from rs, or from rd and rs) meets rd in the ALU:
//   0 rd = U, 1 rd = rd AND U, 2 rd = rd OR U, 3 rd = rd XOR U,
//   4 rd = rd + U (carry flag from the ALU), 5..7 as 0. This gives the fused
//   operations such as multiply-and-AND.
//   LD/ST: [10:7] rd/rs, [6:5] pointer row 4..7, [4:3] addr_mode_e
//   JMP/Jcc: [10:8] row holding the 16-bit target
//   LDI: [15:12] = 4'hF, [11:8] rd, [7:0] immediate
// Outputs are decoded combinationally from the state and the IR.
module dm_control
  import dm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  data_in,
  input  logic        flag_z,
  input  logic        flag_c,
  output ctrl_t       ctrl,
  output logic [7:0]  imm,
  output state_e      state,
  output logic        halted,
  output logic        instr_done   // high in T7: one instruction retired
);
  // The state sequence below is written out for this fetch/execute split.
  if (CYCLES_PER_INSTR != 7 || FETCH_CYCLES != 3 || INSTR_W != 16) begin : g_cfg_check
    $error("dm_control implements 16-bit instructions in 3 fetch + 4 execute cycles");
  end

  logic [7:0] irh, irl;
  opcode_e    op;
  logic [3:0] rd, rs;
  logic [2:0] jrow, prow;
  addr_mode_e amode;
  logic       is_ldi, jtaken;
  logic       is_dp, is_unit;
  logic [2:0] cmb;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_T1;
      irh   <= '0;
      irl   <= '0;
    end else begin
      if (state == ST_T2) irh <= data_in;
      if (state == ST_T3) irl <= data_in;
      unique case (state)
        ST_T1:   state <= ST_T2;
        ST_T2:   state <= ST_T3;
        ST_T3:   state <= ST_T4;
        ST_T4:   state <= (!is_ldi && op == OP_HALT) ? ST_HALT : ST_T5;
        ST_T5:   state <= ST_T6;
        ST_T6:   state <= ST_T7;
        ST_T7:   state <= ST_T1;
        ST_HALT: state <= ST_HALT;
        default: state <= ST_T1;
      endcase
    end
  end

  assign halted     = (state == ST_HALT);
  assign instr_done = (state == ST_T7);

  // --------------------------------------------------------------- decode
  always_comb begin
    op     = opcode_e'(irh[7:3]);
    is_ldi = (irh[7:4] == 4'hF);
    rd     = is_ldi ? irh[3:0] : {irh[2:0], irl[7]};
    rs     = irl[6:3];
    prow   = {1'b1, irl[6:5]};
    amode  = addr_mode_e'(irl[4:3]);
    jrow   = irh[2:0];
    imm    = irl;
    unique case (op)
      OP_JMP:  jtaken = 1'b1;
      OP_JZ:   jtaken = flag_z;
      OP_JNZ:  jtaken = !flag_z;
      OP_JC:   jtaken = flag_c;
      OP_JNC:  jtaken = !flag_c;
      default: jtaken = 1'b0;
    endcase
    is_dp   = !is_ldi && (op <= OP_BR);
    is_unit = !is_ldi && (op >= OP_MOV) && (op <= OP_BR);
    cmb     = irl[2:0];
  end

  // --------------------------------------------------------------- outputs
  always_comb begin
    ctrl            = '0;
    ctrl.alu_op     = ALU_PASS;
    ctrl.src_sel    = SRC_TR2;
    ctrl.shift_op   = SH_LSL;
    ctrl.wb_sel     = WB_ALU;

    // datapath function of the current instruction (used in T6)
    unique case (op)
      OP_ADD:  ctrl.alu_op = ALU_ADD;
      OP_ADC:  ctrl.alu_op = ALU_ADC;
      OP_SUB:  ctrl.alu_op = ALU_SUB;
      OP_SBB:  ctrl.alu_op = ALU_SBB;
      OP_AND:  ctrl.alu_op = ALU_AND;
      OP_OR:   ctrl.alu_op = ALU_OR;
      OP_XOR:  ctrl.alu_op = ALU_XOR;
      OP_NOT:  ctrl.alu_op = ALU_NOT;
      OP_INC:  ctrl.alu_op = ALU_INC;
      OP_DEC:  ctrl.alu_op = ALU_DEC;
      OP_CMP:  ctrl.alu_op = ALU_SUB;
      OP_MOV:  begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_TR2; end
      OP_SHL:  begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_SHR; ctrl.shift_op = SH_LSL; end
      OP_SHR:  begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_SHR; ctrl.shift_op = SH_LSR; end
      OP_ASR:  begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_SHR; ctrl.shift_op = SH_ASR; end
      OP_MULL: begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_MUL; end
      OP_MULH: begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_MUL; ctrl.mul_hi = 1'b1; end
      OP_BR:   begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b1; ctrl.src_sel = SRC_BR; end
      default: ;
    endcase
    // combine field of the unit instructions
    if (is_unit) begin
      unique case (cmb)
        3'd1:    begin ctrl.alu_op = ALU_AND; ctrl.a_zero = 1'b0; end
        3'd2:    begin ctrl.alu_op = ALU_OR;  ctrl.a_zero = 1'b0; end
        3'd3:    begin ctrl.alu_op = ALU_XOR; ctrl.a_zero = 1'b0; end
        3'd4:    begin ctrl.alu_op = ALU_ADD; ctrl.a_zero = 1'b0; end
        default: ;
      endcase
    end

    unique case (state)
      ST_T1: begin
        ctrl.rsel     = 3'd0;
        ctrl.mar_load = 1'b1;
      end
      ST_T2: begin
        ctrl.mem_rd   = 1'b1;
        ctrl.mar_inc  = 1'b1;
        ctrl.rf_wrow  = 3'd0;
        ctrl.rf_be    = 2'b11;
        ctrl.wb_sel   = WB_INCR;
      end
      ST_T3: begin
        ctrl.mem_rd   = 1'b1;
        ctrl.rf_wrow  = 3'd0;
        ctrl.rf_be    = 2'b11;
        ctrl.wb_sel   = WB_INCR;
      end
      ST_T4: begin
        if (is_ldi) begin
          ctrl.rf_wrow = rd[3:1];
          ctrl.rf_be   = rd[0] ? 2'b10 : 2'b01;
          ctrl.wb_sel  = WB_IMM;
        end else if (is_dp) begin
          ctrl.rsel     = rs[3:1];
          ctrl.rbyte    = rs[0];
          ctrl.tr2_load = 1'b1;
        end else if (op == OP_LD || op == OP_ST) begin
          ctrl.rsel     = prow;
          ctrl.mar_load = 1'b1;
        end else if (jtaken) begin
          ctrl.rsel    = jrow;
          ctrl.rf_wrow = 3'd0;
          ctrl.rf_be   = 2'b11;
          ctrl.wb_sel  = WB_ROW;
        end
      end
      ST_T5: begin
        if (!is_ldi && is_dp) begin
          ctrl.rsel     = rd[3:1];
          ctrl.rbyte    = rd[0];
          ctrl.tr1_load = 1'b1;
        end else if (!is_ldi && op == OP_LD) begin
          ctrl.mem_rd  = 1'b1;
          ctrl.rf_wrow = rd[3:1];
          ctrl.rf_be   = rd[0] ? 2'b10 : 2'b01;
          ctrl.wb_sel  = WB_MEM;
        end else if (!is_ldi && op == OP_ST) begin
          ctrl.rsel   = rd[3:1];   // source register sits in the rd field
          ctrl.rbyte  = rd[0];
          ctrl.mem_wr = 1'b1;
        end
      end
      ST_T6: begin
        if (!is_ldi && is_dp) begin
          ctrl.flag_zn_we = 1'b1;
          ctrl.flag_c_alu = (op <= OP_SBB) || op == OP_INC || op == OP_DEC ||
                            op == OP_CMP || (is_unit && cmb == 3'd4);
          ctrl.flag_c_sh  = ((op == OP_SHL) || op == OP_SHR || op == OP_ASR) && cmb != 3'd4;
          if (op != OP_CMP) begin
            ctrl.rf_wrow = rd[3:1];
            ctrl.rf_be   = rd[0] ? 2'b10 : 2'b01;
            ctrl.wb_sel  = WB_ALU;
          end
        end else if (!is_ldi && (op == OP_LD || op == OP_ST) &&
                     (amode == AM_INC || amode == AM_DEC)) begin
          ctrl.incr_down = (amode == AM_DEC);
          ctrl.rf_wrow   = prow;
          ctrl.rf_be     = 2'b11;
          ctrl.wb_sel    = WB_INCR;
        end
      end
      default: ;
    endcase
  end

  // A write to the program counter happens only in fetch or by a jump.
  a_pc_write: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.rf_be != 2'b00 && ctrl.rf_wrow == 3'd0) |->
      (state inside {ST_T2, ST_T3} || (state == ST_T4 && ctrl.wb_sel == WB_ROW)));
  a_one_mem_op: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.mem_rd && ctrl.mem_wr));
endmodule
