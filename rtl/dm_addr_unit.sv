// dm_addr_unit: memory address register cum incrementer (MAR + INCR).
//
// MAR drives the address bus. It is loaded with a whole register row
// (program counter or pointer) or with its own incremented value. The
// incrementer continuously offers MAR + 1, or MAR - 1 when down is set; the
// control unit writes that value back to the register row it came from,
// which gives the program-counter advance and the post-increment and
// post-decrement of pointer registers. Load has priority over increment.
// Registered MAR, combinational incrementer. The pairing of MAR and
// incrementer is published; the count-down input is this design's way of
// providing auto-decrement.
module dm_addr_unit #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] load_val,
  input  logic          inc,
  input  logic          down,
  output logic [AW-1:0] mar,
  output logic [AW-1:0] incr
);
  assign incr = down ? mar - AW'(1) : mar + AW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mar <= '0;
    else if (load) mar <= load_val;
    else if (inc)  mar <= incr;
  end
endmodule
