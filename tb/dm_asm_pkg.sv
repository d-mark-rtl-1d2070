// dm_asm_pkg: instruction encoders for D-mark test programs.
// Each function returns one 16-bit instruction word; the caller stores it
// big-endian (high byte, which the core fetches first, at the lower address).
// Byte registers are numbered {row, half}: 2*row is the low byte of a row,
// 2*row+1 its high byte. Pointer numbers 0..3 name rows 4..7.
package dm_asm_pkg;
  import dm_pkg::*;

  // register form: rd <- rd op rs, with the combine field for unit ops
  function automatic logic [15:0] a_r(opcode_e op, int rd, int rs, int cm = 0);
    return {op, rd[3:0], rs[3:0], cm[2:0]};
  endfunction

  // LD/ST through pointer row 4+p with post-modify mode
  function automatic logic [15:0] a_m(opcode_e op, int r, int p, addr_mode_e am);
    return {op, r[3:0], p[1:0], am, 3'b000};
  endfunction

  // jump to the address held in a row
  function automatic logic [15:0] a_j(opcode_e op, int row);
    return {op, row[2:0], 8'h00};
  endfunction

  function automatic logic [15:0] a_ldi(int rd, int imm);
    return {4'hF, rd[3:0], imm[7:0]};
  endfunction

  function automatic logic [15:0] a_halt();
    return {OP_HALT, 11'd0};
  endfunction
endpackage
