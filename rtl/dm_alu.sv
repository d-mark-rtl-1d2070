// dm_alu: the D-mark bit-sliced ALU, W copies of dm_alu_slice.
//
// Decodes one of twelve operations (dm_pkg::alu_op_e) into the slice
// controls {S2,S1,S0} and the carry-in of slice 0, then ripples the carry
// through the slices. Arithmetic: ADD, ADC, SUB, SBB, INC, DEC, PASS.
// Logic (carry bypass): AND, OR, XOR, XNOR, NOT. The flag c_in is the
// processor's carry flag, used by ADC and SBB; for subtraction the carry out
// is 1 when no borrow occurred. Outputs: result y, carry out of the top slice
// (meaningful for arithmetic operations only), zero and negative.
// The twelve-operation count and the slice structure follow the published
// design; the list of operations and their control codes are this design's
// own. Combinational.
module dm_alu
  import dm_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_in,
  output logic [W-1:0] y,
  output logic         c_out,
  output logic         zero,
  output logic         neg
);
  slice_ctrl_t ctrl;
  logic        c0;
  logic [W:0]  c;

  always_comb begin
    ctrl = '{s2: 1'b0, s1: 1'b0, s0: 1'b0};
    c0   = 1'b0;
    unique case (op)
      ALU_ADD:  begin ctrl = '{1'b0, 1'b0, 1'b1}; c0 = 1'b0; end
      ALU_ADC:  begin ctrl = '{1'b0, 1'b0, 1'b1}; c0 = c_in; end
      ALU_SUB:  begin ctrl = '{1'b0, 1'b1, 1'b0}; c0 = 1'b1; end
      ALU_SBB:  begin ctrl = '{1'b0, 1'b1, 1'b0}; c0 = c_in; end
      ALU_INC:  begin ctrl = '{1'b0, 1'b0, 1'b0}; c0 = 1'b1; end
      ALU_DEC:  begin ctrl = '{1'b0, 1'b1, 1'b1}; c0 = 1'b0; end
      ALU_PASS: begin ctrl = '{1'b0, 1'b0, 1'b0}; c0 = 1'b0; end
      ALU_AND:  begin ctrl = '{1'b1, 1'b0, 1'b1}; c0 = 1'b0; end
      ALU_OR:   begin ctrl = '{1'b1, 1'b0, 1'b1}; c0 = 1'b1; end
      ALU_XOR:  begin ctrl = '{1'b1, 1'b1, 1'b0}; c0 = 1'b1; end
      ALU_XNOR: begin ctrl = '{1'b1, 1'b1, 1'b0}; c0 = 1'b0; end
      ALU_NOT:  begin ctrl = '{1'b1, 1'b0, 1'b0}; c0 = 1'b1; end
      default:  begin ctrl = '{1'b0, 1'b0, 1'b0}; c0 = 1'b0; end
    endcase
  end

  assign c[0] = c0;

  for (genvar i = 0; i < W; i++) begin : g_slice
    dm_alu_slice u_slice (
      .ctrl (ctrl),
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .y    (y[i]),
      .cout (c[i+1])
    );
  end

  assign c_out = c[W];
  assign zero  = (y == '0);
  assign neg   = y[W-1];
endmodule
