// tb_dm_core: end-to-end test of the D-mark processor.
//
// Assembles a program into a 64 KiB byte memory, runs it on dm_core and, in
// lock step, on an instruction-level reference model written here from the
// instruction set description. At every retired instruction (instr_done) the
// register rows, flags and program counter of the core are compared with the
// model; each instruction must take exactly seven cycles; at HALT the whole
// memory is compared. The program contains:
//   * a multiply loop (load with post-increment, MULL/MULH, stores, DEC, JNZ)
//   * the radix-2 FFT stage-3 address sequence from the BR unit, stored with
//     post-decrement and checked against 0,4,2,6,1,5,3,7
//   * every ALU instruction, shifts, CMP and all conditional jumps taken and
//     not taken
//   * fused operations (multiply-and-AND, multiply-high-and-add)
//   * a seeded random run of datapath instructions
// Each mechanism (auto-increment, auto-decrement, BR, MUL high/low, the
// shifts, carry produced, jump taken and not taken, compare, HALT) is counted
// and must occur at least once. The memory model answers reads in the same
// cycle and writes at the rising edge.
module tb_dm_core;
  import dm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] addr;
  logic [7:0]  data_in, data_out;
  logic        data_oe, mem_rd, mem_wr, halted, instr_done;
  state_e      state;
  logic [2:0]  flags;

  int checks = 0, failures = 0;

  dm_core dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ memory
  logic [7:0] mem [65536];
  assign data_in = mem[addr];
  always_ff @(posedge clk) if (mem_wr && data_oe) mem[addr] <= data_out;

  // ------------------------------------------------------------ assembler
  int unsigned ap;   // assembly address
  task automatic emit(input logic [15:0] w);
    mem[ap[15:0]]       = w[15:8];
    mem[ap[15:0] + 16'd1] = w[7:0];
    ap += 2;
  endtask
  function automatic logic [15:0] r_(opcode_e op, int rd, int rs, int cm = 0);
    return {op, rd[3:0], rs[3:0], cm[2:0]};
  endfunction
  function automatic logic [15:0] m_(opcode_e op, int r, int p, addr_mode_e am);
    return {op, r[3:0], p[1:0], am, 3'b000};
  endfunction
  function automatic logic [15:0] j_(opcode_e op, int row);
    return {op, row[2:0], 8'h00};
  endfunction
  function automatic logic [15:0] ldi(int rd, int imm);
    return {4'hF, rd[3:0], imm[7:0]};
  endfunction
  // load a 16-bit constant into a row (two LDIs)
  task automatic ldrow(input int row, input int val);
    emit(ldi(2 * row, val & 8'hFF));
    emit(ldi(2 * row + 1, (val >> 8) & 8'hFF));
  endtask

  // ------------------------------------------------------------ reference model
  logic [15:0] r [8];
  logic        rz, rc, rn, rhalt;
  logic [7:0]  rmem [65536];
  int n_ainc, n_adec, n_br, n_mull, n_mulh, n_shl, n_shr, n_asr, n_carry,
      n_jtaken, n_jnot, n_cmp, n_halt, n_ld, n_st, n_ldi, n_alu, n_fused;

  function automatic logic [7:0] gb(int b);
    return b[0] ? r[b >> 1][15:8] : r[b >> 1][7:0];
  endfunction
  task automatic sb(int b, logic [7:0] v);
    if (b[0]) r[b >> 1][15:8] = v; else r[b >> 1][7:0] = v;
  endtask
  // reverse the low m bits of v
  function automatic int unsigned rev(int unsigned v, int m);
    int unsigned o = 0;
    for (int i = 0; i < m; i++) if (v[i]) o |= 1 << (m - 1 - i);
    return o;
  endfunction
  // BR: reverse-carry add below/at the top pattern bit, carry wraps upward
  function automatic logic [7:0] ref_br(logic [7:0] base, logic [7:0] pat);
    int k = -1;
    int unsigned lo, s, up;
    for (int i = 0; i < 8; i++) if (pat[i]) k = i;
    if (k < 0) return base;
    lo = rev(base & ((1 << (k + 1)) - 1), k + 1) + rev(pat, k + 1);
    s  = rev(lo & ((1 << (k + 1)) - 1), k + 1);
    up = (base >> (k + 1)) + (lo >> (k + 1));
    return 8'((up << (k + 1)) | s);
  endfunction

  task automatic ref_step();
    logic [15:0] ir;
    logic [4:0]  op;
    int rd, rs, p;
    logic [7:0] a, b, res;
    logic [8:0] t;
    logic [15:0] prod;
    logic        wr, jt, shc;
    int          cm;
    ir = {rmem[r[0]], rmem[r[0] + 16'd1]};
    r[0] = r[0] + 16'd2;
    op = ir[15:11];
    if (ir[15:12] == 4'hF) begin
      sb(ir[11:8], ir[7:0]); n_ldi++;
      return;
    end
    rd = ir[10:7]; rs = ir[6:3]; p = 4 + ir[6:5];
    a = gb(rd); b = gb(rs); wr = 1'b1; res = 8'h00; cm = ir[2:0]; shc = rc;
    if (op <= 5'd17) begin
      case (op)
        5'd0:  begin t = a + b;                 res = t[7:0]; rc = t[8]; end
        5'd1:  begin t = a + b + rc;            res = t[7:0]; rc = t[8]; end
        5'd2:  begin t = {1'b0, a} - b;         res = t[7:0]; rc = !t[8]; end
        5'd3:  begin t = {1'b0, a} - b - !rc;   res = t[7:0]; rc = !t[8]; end
        5'd4:  res = a & b;
        5'd5:  res = a | b;
        5'd6:  res = a ^ b;
        5'd7:  res = ~a;
        5'd8:  begin t = a + 1;                 res = t[7:0]; rc = t[8]; end
        5'd9:  begin res = a - 8'd1;            rc = (a != 0); end
        5'd10: begin t = {1'b0, a} - b;         res = t[7:0]; rc = !t[8]; wr = 1'b0; n_cmp++; end
        5'd11: res = b;
        5'd12: begin res = b << 1;              shc = b[7]; n_shl++; end
        5'd13: begin res = b >> 1;              shc = b[0]; n_shr++; end
        5'd14: begin res = 8'($signed(b) >>> 1); shc = b[0]; n_asr++; end
        5'd15: begin prod = 16'($signed(a) * $signed(b)); res = prod[7:0];  n_mull++; end
        5'd16: begin prod = 16'($signed(a) * $signed(b)); res = prod[15:8]; n_mulh++; end
        default: begin res = ref_br(a, b); n_br++; end
      endcase
      // unit instructions: combine the unit result with rd
      if (op >= 5'd11) begin
        case (cm)
          1: begin res = a & res; n_fused++; end
          2: begin res = a | res; n_fused++; end
          3: begin res = a ^ res; n_fused++; end
          4: begin t = a + res; res = t[7:0]; rc = t[8]; n_fused++; end
          default: ;
        endcase
        if (op >= 5'd12 && op <= 5'd14 && cm != 4) rc = shc;
      end
      if (op <= 5'd3 || op == 5'd8 || op == 5'd9 || op == 5'd10) begin
        n_alu++;
        if (rc) n_carry++;
      end
      rz = (res == 0); rn = res[7];
      if (wr) sb(rd, res);
    end else if (op == 5'd18 || op == 5'd19) begin
      if (op == 5'd18) begin sb(rd, rmem[r[p]]); n_ld++; end
      else             begin rmem[r[p]] = gb(rd); n_st++; end
      if (ir[4:3] == 2'd1) begin r[p] = r[p] + 16'd1; n_ainc++; end
      if (ir[4:3] == 2'd2) begin r[p] = r[p] - 16'd1; n_adec++; end
    end else if (op >= 5'd20 && op <= 5'd24) begin
      case (op)
        5'd20: jt = 1'b1;
        5'd21: jt = rz;
        5'd22: jt = !rz;
        5'd23: jt = rc;
        default: jt = !rc;
      endcase
      if (jt) begin r[0] = r[ir[10:8]]; n_jtaken++; end else n_jnot++;
    end else if (op == 5'd25) begin
      rhalt = 1'b1; n_halt++;
    end
  endtask

  // ------------------------------------------------------------ program
  int unsigned loop1, loop2, skip;
  task automatic assemble();
    int unsigned seed = 32'h1234_5678;
    ap = 0;
    // multiply loop: y[i] = x[i] * c for 4 samples at 0x0200 -> 0x0300
    ldrow(4, 16'h0200);            // P0 = row 4
    ldrow(5, 16'h0300);            // P1 = row 5
    emit(ldi(6, 8'hFD));           // b6 = c = -3
    emit(ldi(7, 4));               // b7 = count
    loop1 = ap + 4;
    ldrow(6, loop1);               // row 6 = loop target
    emit(m_(OP_LD, 2, 0, AM_INC)); // b2 = *P0++
    emit(r_(OP_MOV, 4, 2));
    emit(r_(OP_MULL, 4, 6));
    emit(r_(OP_MOV, 5, 2));
    emit(r_(OP_MULH, 5, 6));
    emit(m_(OP_ST, 4, 1, AM_INC));
    emit(m_(OP_ST, 5, 1, AM_INC));
    emit(r_(OP_DEC, 7, 7));
    emit(j_(OP_JNZ, 6));
    // BR: FFT stage-3 sequence, stored downward from 0x0417
    ldrow(7, 16'h0417);            // P3 = row 7
    emit(ldi(2, 0));               // base
    emit(ldi(3, 4));               // pattern 0b100
    emit(ldi(7, 8));
    loop2 = ap + 4;
    ldrow(6, loop2);
    emit(m_(OP_ST, 2, 3, AM_DEC));
    emit(r_(OP_BR, 2, 3));
    emit(r_(OP_DEC, 7, 7));
    emit(j_(OP_JNZ, 6));
    // every ALU op on A = 0xA7, B = 0x5C, results stored through P1
    emit(ldi(2, 8'hA7));
    emit(ldi(3, 8'h5C));
    foreach (ops_list[i]) begin
      emit(r_(OP_MOV, 4, 2));
      emit(r_(ops_list[i], 4, 3));
      emit(m_(OP_ST, 4, 1, AM_INC));
    end
    // fused multiply-and-AND and multiply-accumulate into rd
    emit(r_(OP_MOV, 4, 2));
    emit(r_(OP_MULL, 4, 3, 1)); emit(m_(OP_ST, 4, 1, AM_INC));
    emit(r_(OP_MOV, 4, 2));
    emit(r_(OP_MULH, 4, 3, 4)); emit(m_(OP_ST, 4, 1, AM_INC));
    // shifts of B and A
    emit(r_(OP_SHL, 4, 2)); emit(m_(OP_ST, 4, 1, AM_INC));
    emit(r_(OP_SHR, 4, 2)); emit(m_(OP_ST, 4, 1, AM_INC));
    emit(r_(OP_ASR, 4, 2)); emit(m_(OP_ST, 4, 1, AM_INC));
    emit(r_(OP_ASR, 4, 3)); emit(m_(OP_ST, 4, 1, AM_INC));
    // conditional jumps, each taken once and not taken once
    foreach (jops[i]) begin
      for (int t = 0; t < 2; t++) begin
        // set flags: CMP equal (Z=1, C=1) or CMP 0x5C - 0xA7 (Z=0, C=0)
        emit(r_(OP_CMP, 3, (t == 0) ? 3 : 2));
        skip = ap + 8;             // past two LDIs, the jump and one store
        ldrow(6, skip);
        emit(j_(jops[i], 6));
        emit(m_(OP_ST, 3, 1, AM_INC));   // skipped when the jump is taken
      end
    end
    // unconditional jump over a store
    ldrow(6, ap + 4 + 4);
    emit(j_(OP_JMP, 6));
    emit(m_(OP_ST, 2, 1, AM_INC));
    // random datapath instructions, results stored
    for (int i = 0; i < 60; i++) begin
      seed = seed * 1103515245 + 12345;
      emit(r_(opcode_e'(seed[20:16] % 18), 2 + (seed[26:24] % 6), seed[30:27], seed[9:7]));
      if (seed[10]) emit(m_(OP_ST, 2 + (seed[13:11] % 6), 1, AM_INC));
    end
    emit(j_(OP_HALT, 0));
  endtask
  opcode_e ops_list [12] = '{OP_ADD, OP_ADC, OP_SUB, OP_SBB, OP_AND, OP_OR,
                             OP_XOR, OP_NOT, OP_INC, OP_DEC, OP_ADD, OP_ADC};
  opcode_e jops [4] = '{OP_JZ, OP_JNZ, OP_JC, OP_JNC};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ run
  int cyc = 0, last_done = 0, retired = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 7 + 3);
    assemble();
    for (int i = 0; i < 65536; i++) rmem[i] = mem[i];
    for (int i = 0; i < 8; i++) r[i] = '0;
    {rz, rc, rn, rhalt} = '0;
    {n_ainc, n_adec, n_br, n_mull, n_mulh, n_shl, n_shr, n_asr, n_carry,
     n_jtaken, n_jnot, n_cmp, n_halt, n_ld, n_st, n_ldi, n_alu, n_fused} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!halted) begin
      @(posedge clk);
      if (instr_done) begin
        // the instruction completes at this edge
        ref_step();
        retired++;
        #1;
        for (int i = 0; i < 8; i++)
          check(dut.u_rf.rows[i] == r[i],
                $sformatf("instr %0d row %0d: %h, expected %h", retired, i, dut.u_rf.rows[i], r[i]));
        check(flags == {rn, rc, rz}, $sformatf("instr %0d flags %b, expected %b", retired, flags, {rn, rc, rz}));
        if (last_done != 0)
          check(cyc - last_done == CYCLES_PER_INSTR,
                $sformatf("instr %0d took %0d cycles", retired, cyc - last_done));
        last_done = cyc;
      end
    end
    // HALT is stopped in T4: run it in the model too
    ref_step();
    retired++;
    check(rhalt, "model reached HALT together with the core");
    check(dut.u_rf.rows[0] == r[0], "PC at halt");
    repeat (3) @(posedge clk);
    for (int i = 0; i < 65536; i++)
      if (mem[i] != rmem[i]) check(1'b0, $sformatf("mem[%h] = %h, expected %h", i, mem[i], rmem[i]));
    checks++;
    // FFT stage-3 order, independent of both models
    begin
      logic [7:0] want [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
      for (int i = 0; i < 8; i++)
        check(mem[16'h0417 - i] == want[i], $sformatf("BR sequence item %0d = %0d", i, mem[16'h0417 - i]));
    end
    // every mechanism happened
    check(n_ainc > 0,   "auto-increment used");
    check(n_adec > 0,   "auto-decrement used");
    check(n_br > 0,     "BR used");
    check(n_mull > 0 && n_mulh > 0, "MUL low and high used");
    check(n_shl > 0 && n_shr > 0 && n_asr > 0, "all shifts used");
    check(n_carry > 0,  "carry produced");
    check(n_jtaken > 0 && n_jnot > 0, "jumps taken and not taken");
    check(n_cmp > 0,    "compare used");
    check(n_fused > 0,  "fused unit-and-ALU operation used");
    check(n_halt == 1,  "halt reached");
    check(n_ld > 0 && n_st > 0 && n_ldi > 0, "load, store, load-immediate used");
    $display("instructions=%0d cycles=%0d ainc=%0d adec=%0d br=%0d mul=%0d/%0d shifts=%0d/%0d/%0d carry=%0d jtaken=%0d jnot=%0d cmp=%0d fused=%0d",
             retired, cyc, n_ainc, n_adec, n_br, n_mull, n_mulh, n_shl, n_shr, n_asr, n_carry,
             n_jtaken, n_jnot, n_cmp, n_fused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
