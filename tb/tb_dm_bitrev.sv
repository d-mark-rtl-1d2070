// tb_dm_bitrev: tests the BR unit.
// 1. For 8-, 16- and 32-point FFTs and every stage s, repeated addition of
//    the pattern 1 << (s-1) from base 0 must visit the radix-2 stage order;
//    for 8 points that is 0..7, then 0,2,1,3,4,6,5,7, then 0,4,2,6,1,5,3,7.
//    The expected order is built by reversing the low s bits of a counter.
// 2. Random base and one-hot pattern: result = reverse(reverse(low) + 1)
//    with the overflow carried into the upper bits.
module tb_dm_bitrev;
  logic [7:0] base, pattern, result;
  int checks = 0, failures = 0;

  dm_bitrev #(.W(8)) dut (.*);

  function automatic int unsigned rev(int unsigned v, int m);
    int unsigned o = 0;
    for (int i = 0; i < m; i++) if (v[i]) o |= 1 << (m - 1 - i);
    return o;
  endfunction

  task automatic expect_eq(logic [7:0] got, logic [7:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    // paper's 8-point sequences
    int unsigned seq3 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    int unsigned seq2 [8] = '{0, 2, 1, 3, 4, 6, 5, 7};
    base = 0; pattern = 8'b100;
    for (int i = 0; i < 8; i++) begin
      #1 expect_eq(base, 8'(seq3[i]), "8-point stage 3");
      base = result;
    end
    #1 expect_eq(base, 8'd8, "wrap into next group");
    base = 0; pattern = 8'b010;
    for (int i = 0; i < 8; i++) begin
      #1 expect_eq(base, 8'(seq2[i]), "8-point stage 2");
      base = result;
    end
    // general stage orders for N = 8, 16, 32 from base 0x40
    for (int m = 3; m <= 5; m++) begin
      for (int s = 1; s <= m; s++) begin
        base = 8'h40; pattern = 8'(1 << (s - 1));
        for (int i = 0; i < (1 << m); i++) begin
          // stage s: low s bits reversed, bits above counted normally
          int unsigned want;
          want = 32'h40 + ((i >> s) << s) + rev(i & ((1 << s) - 1), s);
          #1 expect_eq(base, 8'(want), $sformatf("N=%0d stage %0d item %0d", 1 << m, s, i));
          base = result;
        end
      end
    end
    // random base, one-hot pattern
    for (int k = 0; k < 500; k++) begin
      int kk;
      int unsigned lo, want;
      kk = $urandom_range(0, 7);
      base = 8'($urandom); pattern = 8'(1 << kk);
      lo   = rev(base & ((1 << (kk + 1)) - 1), kk + 1) + 1;
      want = ((base >> (kk + 1)) + (lo >> (kk + 1))) << (kk + 1);
      want = want | rev(lo & ((1 << (kk + 1)) - 1), kk + 1);
      #1 expect_eq(result, 8'(want), "random one-hot");
    end
    base = 8'h5A; pattern = 0;
    #1 expect_eq(result, 8'h5A, "zero pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
