// dm_datapath: TR1, TR2, the operand MUX, the ALU and the status flags.
//
// TR1 and TR2 are loaded from the internal data bus (a byte of a register
// row). The ALU's A input is TR1, or zero when a_zero is set, so that a value
// from the MUX can be passed straight through (ADD with A = 0). The MUX picks
// the ALU's B input from TR2, the multiplier, the shifter or the BR unit:
//   MUL = TR1 * TR2 (signed, low or high byte of the product)
//   SHR = shift of TR2 by one place
//   BR  = bit-reverse addition of pattern TR2 to base TR1
// The flags Z and N follow every result written with flag_zn_we; C takes the
// ALU carry out (arithmetic) or the bit shifted out (shifts).
// The blocks and their connection through the MUX follow the published block
// diagram; which temporary register feeds which unit, the A gating and the
// flag set are this design's choices. Result y is combinational from TR1,
// TR2 and the controls; registers update on the rising edge.
module dm_datapath
  import dm_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] bus_in,
  input  logic         tr1_load,
  input  logic         tr2_load,
  input  alu_op_e      alu_op,
  input  src_sel_e     src_sel,
  input  logic         a_zero,
  input  shift_op_e    shift_op,
  input  logic         mul_hi,
  input  logic         flag_zn_we,
  input  logic         flag_c_alu,
  input  logic         flag_c_sh,
  output logic [W-1:0] y,
  output logic         flag_z,
  output logic         flag_c,
  output logic         flag_n
);
  logic [W-1:0]   tr1, tr2, alu_a, alu_b, sh_y, br_y;
  logic [2*W-1:0] prod;
  logic           alu_c, alu_z, alu_n, sh_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr1 <= '0;
      tr2 <= '0;
    end else begin
      if (tr1_load) tr1 <= bus_in;
      if (tr2_load) tr2 <= bus_in;
    end
  end

  dm_booth_mul #(.W(W)) u_mul (.a(tr1), .b(tr2), .p(prod));
  dm_shifter   #(.W(W)) u_shr (.op(shift_op), .a(tr2), .y(sh_y), .c_out(sh_c));
  dm_bitrev    #(.W(W)) u_br  (.base(tr1), .pattern(tr2), .result(br_y));

  always_comb begin
    unique case (src_sel)
      SRC_TR2: alu_b = tr2;
      SRC_MUL: alu_b = mul_hi ? prod[2*W-1:W] : prod[W-1:0];
      SRC_SHR: alu_b = sh_y;
      SRC_BR:  alu_b = br_y;
      default: alu_b = tr2;
    endcase
    alu_a = a_zero ? '0 : tr1;
  end

  dm_alu #(.W(W)) u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .c_in(flag_c),
    .y(y), .c_out(alu_c), .zero(alu_z), .neg(alu_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_z <= 1'b0;
      flag_c <= 1'b0;
      flag_n <= 1'b0;
    end else begin
      if (flag_zn_we) begin
        flag_z <= alu_z;
        flag_n <= alu_n;
      end
      if (flag_c_alu)     flag_c <= alu_c;
      else if (flag_c_sh) flag_c <= sh_c;
    end
  end
endmodule
