// dm_core: the D-mark processor, top level.
//
// An 8-bit DSP processor with a 16-bit address bus, a 16-bit fixed-length
// instruction and a fixed seven-cycle instruction time (three fetch cycles,
// four execute/write-back cycles). The control FSM (dm_control) steers:
//   * the register array (dm_regfile), eight 16-bit rows, R0 = PC;
//   * the addressing unit (dm_addr_unit), MAR + incrementer on the address bus;
//   * the datapath (dm_datapath): TR1, TR2, multiplier, shifter, BR unit,
//     operand MUX and bit-sliced ALU.
// The byte mux after the register array puts the selected byte of the row on
// the internal bus (to TR1/TR2) and on the outgoing data bus; the write mux
// in front of the array selects ALU result, memory byte, immediate,
// incrementer output or a whole row (jump).
// Memory interface: addr is valid from the cycle after MAR is loaded; in a
// cycle with mem_rd the memory must return data_in combinationally (same
// cycle); in a cycle with mem_wr, data_out is valid with data_oe high and the
// memory takes it at the rising edge. The bidirectional pad of the data bus
// is left to the pad ring: data_in, data_out and data_oe are its three sides.
// Status pins: state, flags, halted and instr_done, for observing the
// processor. Counting the bidirectional data bus once, the core has 36
// signal pins: clk, rst_n, addr[16], data[8], mem_rd, mem_wr, state[3],
// flags[3], halted, instr_done.
// The block structure follows the published block diagram; the interface
// timing and the status pin set are this design's choices.
module dm_core
  import dm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe,
  output logic              mem_rd,
  output logic              mem_wr,
  output state_e            state,
  output logic [2:0]        flags,      // {N, C, Z}
  output logic              halted,
  output logic              instr_done
);
  ctrl_t             ctrl;
  logic [7:0]        imm;
  logic [ROW_W-1:0]  row, wdata;
  logic [ADDR_W-1:0] incr;
  logic [DATA_W-1:0] bus_byte, alu_y;
  logic              fz, fc, fn;

  dm_control u_ctrl (
    .clk, .rst_n, .data_in,
    .flag_z(fz), .flag_c(fc),
    .ctrl, .imm, .state, .halted, .instr_done
  );

  dm_regfile #(.ROWS(ROWS), .ROW_W(ROW_W)) u_rf (
    .clk, .rst_n,
    .rd_row (ctrl.rsel),
    .rd_data(row),
    .wr_row (ctrl.rf_wrow),
    .be     (ctrl.rf_be),
    .wdata  (wdata)
  );

  dm_addr_unit #(.AW(ADDR_W)) u_au (
    .clk, .rst_n,
    .load    (ctrl.mar_load),
    .load_val(row),
    .inc     (ctrl.mar_inc),
    .down    (ctrl.incr_down),
    .mar     (addr),
    .incr    (incr)
  );

  assign bus_byte = ctrl.rbyte ? row[ROW_W-1:DATA_W] : row[DATA_W-1:0];

  dm_datapath #(.W(DATA_W)) u_dp (
    .clk, .rst_n,
    .bus_in    (bus_byte),
    .tr1_load  (ctrl.tr1_load),
    .tr2_load  (ctrl.tr2_load),
    .alu_op    (ctrl.alu_op),
    .src_sel   (ctrl.src_sel),
    .a_zero    (ctrl.a_zero),
    .shift_op  (ctrl.shift_op),
    .mul_hi    (ctrl.mul_hi),
    .flag_zn_we(ctrl.flag_zn_we),
    .flag_c_alu(ctrl.flag_c_alu),
    .flag_c_sh (ctrl.flag_c_sh),
    .y         (alu_y),
    .flag_z    (fz),
    .flag_c    (fc),
    .flag_n    (fn)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wdata = {alu_y, alu_y};
      WB_MEM:  wdata = {data_in, data_in};
      WB_IMM:  wdata = {imm, imm};
      WB_INCR: wdata = incr;
      WB_ROW:  wdata = row;
      default: wdata = row;
    endcase
  end

  assign data_out = bus_byte;
  assign data_oe  = ctrl.mem_wr;
  assign mem_rd   = ctrl.mem_rd;
  assign mem_wr   = ctrl.mem_wr;
  assign flags    = {fn, fc, fz};
endmodule
