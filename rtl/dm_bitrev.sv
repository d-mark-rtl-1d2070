// dm_bitrev: the BR (bit-reverser) address adder used for FFT addressing.
//
// Adds a control pattern P to a base address A. Below and at the highest set
// bit k of P the carry runs the "wrong" way, from bit k down toward bit 0;
// the carry that leaves bit 0 re-enters at bit k+1 and from there ripples
// upward as in an ordinary adder. Adding P = 1<<(s-1) again and again to an
// aligned base visits the samples of radix-2 FFT stage s: with P = 0b100 the
// low three bits run 0,4,2,6,1,5,3,7 and the wrapped carry moves to the next
// group of eight. P = 0 returns A unchanged. The carry directions follow the
// published carry-propagation figure; taking k from the highest set bit of a
// general pattern is this design's choice (the published patterns are
// one-hot). Combinational; one W-bit result, no carry out.
module dm_bitrev #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] base,
  input  logic [W-1:0] pattern,
  output logic [W-1:0] result
);
  logic [W-1:0] low;     // bits at or below the highest set pattern bit
  logic         c;
  logic         seen;

  always_comb begin
    // low[i] = 1 when pattern has a set bit at position i or above
    seen = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      seen   = seen | pattern[i];
      low[i] = seen;
    end
    // reverse carry chain over the low segment, from the top down
    c = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (low[i]) begin
        result[i] = base[i] ^ pattern[i] ^ c;
        c         = (base[i] & pattern[i]) | (base[i] & c) | (pattern[i] & c);
      end else begin
        result[i] = 1'b0;
      end
    end
    // wrapped carry enters just above the low segment and ripples upward
    for (int i = 0; i < W; i++) begin
      if (!low[i]) begin
        result[i] = base[i] ^ c;
        c         = base[i] & c;
      end
    end
  end
endmodule
