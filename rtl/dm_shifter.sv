// dm_shifter: the single-bit combinational shifter (SHR in the block diagram).
//
// Shifts the operand by one place: logical left, logical right, arithmetic
// left (same result as logical left) or arithmetic right (sign bit kept).
// c_out is the bit shifted out, which the processor copies into its carry
// flag. The four shift kinds follow the published description; the carry
// output is this design's addition. Combinational.
module dm_shifter
  import dm_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  shift_op_e    op,
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         c_out
);
  always_comb begin
    unique case (op)
      SH_LSL, SH_ASL: begin y = {a[W-2:0], 1'b0};   c_out = a[W-1]; end
      SH_LSR:         begin y = {1'b0, a[W-1:1]};   c_out = a[0];   end
      SH_ASR:         begin y = {a[W-1], a[W-1:1]}; c_out = a[0];   end
      default:        begin y = a;                  c_out = 1'b0;   end
    endcase
  end
endmodule
