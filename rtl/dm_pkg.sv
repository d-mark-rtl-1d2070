// dm_pkg: types and constants shared by the D-mark processor blocks.
//
// D-mark is a tiny 8-bit DSP processor with a 16-bit address space. Every
// instruction is 16 bits long and takes exactly seven clock cycles: three to
// fetch it over the 8-bit data bus and four to execute and write back.
// The widths, the seven-cycle rhythm, the register array of eight 16-bit rows
// with R0 as program counter, the twelve-operation ALU and the BR, shift and
// multiply units follow the published architecture. The instruction encoding
// below, the flag set and the ALU operation list are this design's own
// choices, since no encoding was published.
package dm_pkg;

  localparam int unsigned DATA_W      = 8;   // data bus [7..0]
  localparam int unsigned ADDR_W      = 16;  // address bus [15..0]
  localparam int unsigned ROWS        = 8;   // register rows, R0 = PC
  localparam int unsigned ROW_W       = 16;  // bits per register row
  localparam int unsigned INSTR_W     = 16;  // fixed instruction length
  localparam int unsigned CYCLES_PER_INSTR = 7;
  localparam int unsigned FETCH_CYCLES     = 3;

  // Control lines of one ALU bit slice: s1/s0 form operand B' = B ? s0 : s1,
  // s2 selects logic mode (carry bypass, CARRY or SUM output chosen by s0).
  typedef struct packed {
    logic s2;
    logic s1;
    logic s0;
  } slice_ctrl_t;

  // The twelve ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,   // A + B
    ALU_ADC  = 4'd1,   // A + B + C
    ALU_SUB  = 4'd2,   // A - B        (A + ~B + 1)
    ALU_SBB  = 4'd3,   // A - B - !C   (A + ~B + C)
    ALU_INC  = 4'd4,   // A + 1
    ALU_DEC  = 4'd5,   // A - 1
    ALU_PASS = 4'd6,   // A
    ALU_AND  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_XOR  = 4'd9,
    ALU_XNOR = 4'd10,
    ALU_NOT  = 4'd11   // ~A
  } alu_op_e;

  // Second ALU operand source (the MUX in front of the ALU).
  typedef enum logic [1:0] {
    SRC_TR2 = 2'd0,
    SRC_MUL = 2'd1,
    SRC_SHR = 2'd2,
    SRC_BR  = 2'd3
  } src_sel_e;

  typedef enum logic [1:0] {
    SH_LSL = 2'd0,
    SH_LSR = 2'd1,
    SH_ASL = 2'd2,
    SH_ASR = 2'd3
  } shift_op_e;

  // Opcodes: instruction bits [15:11]. 5'b1111x is LDI.
  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,  OP_ADC  = 5'd1,  OP_SUB  = 5'd2,  OP_SBB  = 5'd3,
    OP_AND  = 5'd4,  OP_OR   = 5'd5,  OP_XOR  = 5'd6,  OP_NOT  = 5'd7,
    OP_INC  = 5'd8,  OP_DEC  = 5'd9,  OP_CMP  = 5'd10, OP_MOV  = 5'd11,
    OP_SHL  = 5'd12, OP_SHR  = 5'd13, OP_ASR  = 5'd14, OP_MULL = 5'd15,
    OP_MULH = 5'd16, OP_BR   = 5'd17, OP_LD   = 5'd18, OP_ST   = 5'd19,
    OP_JMP  = 5'd20, OP_JZ   = 5'd21, OP_JNZ  = 5'd22, OP_JC   = 5'd23,
    OP_JNC  = 5'd24, OP_HALT = 5'd25,
    OP_LDI0 = 5'd30, OP_LDI1 = 5'd31
  } opcode_e;

  // Post-modification of the pointer row used by LD/ST.
  typedef enum logic [1:0] {
    AM_NONE = 2'd0,
    AM_INC  = 2'd1,
    AM_DEC  = 2'd2,
    AM_RSV  = 2'd3
  } addr_mode_e;

  // Control FSM: T1..T7 of one instruction, plus the stopped state.
  typedef enum logic [2:0] {
    ST_T1 = 3'd0, ST_T2 = 3'd1, ST_T3 = 3'd2, ST_T4 = 3'd3,
    ST_T5 = 3'd4, ST_T6 = 3'd5, ST_T7 = 3'd6, ST_HALT = 3'd7
  } state_e;

  // Source of the register-array write data.
  typedef enum logic [2:0] {
    WB_ALU  = 3'd0,   // byte: ALU result
    WB_MEM  = 3'd1,   // byte: data bus input
    WB_IMM  = 3'd2,   // byte: Irl (immediate)
    WB_INCR = 3'd3,   // row: MAR +/- 1
    WB_ROW  = 3'd4    // row: row read (jump target to PC)
  } wb_sel_e;

  typedef struct packed {
    logic [2:0]  rsel;       // register row read address
    logic        rbyte;      // byte of the read row: 1 = high
    logic        mar_load;   // MAR <= row read
    logic        mar_inc;    // MAR <= MAR +/- 1
    logic        incr_down;  // incrementer counts down
    logic        mem_rd;
    logic        mem_wr;
    logic [1:0]  rf_be;      // register write byte enables {hi, lo}
    logic [2:0]  rf_wrow;
    wb_sel_e     wb_sel;
    logic        tr1_load;
    logic        tr2_load;
    alu_op_e     alu_op;
    src_sel_e    src_sel;
    logic        a_zero;     // gate TR1 off the ALU A input
    shift_op_e   shift_op;
    logic        mul_hi;     // MUX takes high byte of the product
    logic        flag_zn_we;
    logic        flag_c_alu; // C <= ALU carry out
    logic        flag_c_sh;  // C <= shifter carry out
  } ctrl_t;

endpackage
