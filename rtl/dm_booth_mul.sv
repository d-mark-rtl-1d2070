// dm_booth_mul: signed (two's complement) radix-2 Booth multiplier.
//
// Multiplies two W-bit signed operands into a 2W-bit signed product. For
// each multiplier bit pair (b[i], b[i-1]), with b[-1] = 0, the Booth
// recoding adds +A (pair 01), subtracts A (pair 10) or adds nothing (00, 11),
// weighted by 2^i; the W partial products are summed as an array, so the
// unit is combinational. That the multiplier is a signed Booth multiplier is
// published; the array (not iterative) form is this design's choice, made
// so that a product is ready within one execute cycle.
module dm_booth_mul #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  logic [2*W-1:0] a_ext;
  logic [2*W-1:0] acc;
  logic           prev;

  always_comb begin
    a_ext = {{W{a[W-1]}}, a};
    acc   = '0;
    prev  = 1'b0;
    for (int i = 0; i < W; i++) begin
      unique case ({b[i], prev})
        2'b01:   acc = acc + (a_ext << i);
        2'b10:   acc = acc - (a_ext << i);
        default: acc = acc;
      endcase
      prev = b[i];
    end
    p = acc;
  end
endmodule
