// dm_alu_slice: one bit of the D-mark ALU.
//
// The slice is a full adder surrounded by 2:1 multiplexers, as in the
// published bit-slice schematic (names S0, S1, S2, A, B, CIN, SUM, CARRY, COUT,
// ALU):
//   * operand mux   B' = B ? S0 : S1  -> gives 0, B, ~B or 1 to the adder
//   * full adder    SUM = A ^ B' ^ CIN, CARRY = majority(A, B', CIN)
//   * carry mux     COUT = S2 ? CIN : CARRY
//   * output muxes  ALU = S2 ? (S0 ? CARRY : SUM) : SUM
// With S2 = 0 the slices form a ripple-carry adder. With S2 = 1 the carry
// chain is bypassed, so every slice sees the ALU's carry-in, and the adder
// itself becomes the logic unit: CARRY gives AND (cin 0) or OR (cin 1), SUM
// gives XOR/XNOR or pass/invert. The operand mux, adder and carry mux are
// drawn in the schematic; which control drives the selects of the two output
// muxes is not legible there, and the assignment above (S0 and S2) is this
// design's reading. Purely combinational.
module dm_alu_slice
  import dm_pkg::*;
(
  input  slice_ctrl_t ctrl,
  input  logic        a,
  input  logic        b,
  input  logic        cin,
  output logic        y,
  output logic        cout
);
  logic bmod, sum, carry, logic_out;

  always_comb begin
    bmod      = b ? ctrl.s0 : ctrl.s1;
    sum       = a ^ bmod ^ cin;
    carry     = (a & bmod) | (a & cin) | (bmod & cin);
    cout      = ctrl.s2 ? cin : carry;
    logic_out = ctrl.s0 ? carry : sum;
    y         = ctrl.s2 ? logic_out : sum;
  end
endmodule
