// tb_dm_sort: array-sorting benchmark on the D-mark core at default sizes.
//
// Bubble-sorts N unsigned bytes in memory. The inner loop loads a[i] with
// post-increment and a[i+1] without post-modify, compares them with CMP, and
// jumps over the swap on carry (no borrow); the swap stores back with
// post-decrement then post-increment. Three register rows hold the jump
// targets. The result must equal the array sorted here, and every
// instruction must take 7 cycles.
module tb_dm_sort;
  import dm_pkg::*;
  import dm_asm_pkg::*;

  localparam int N = 16;
  localparam logic [15:0] AB = 16'h0600;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] addr;
  logic [7:0]  data_in, data_out;
  logic        data_oe, mem_rd, mem_wr, halted, instr_done;
  state_e      state;
  logic [2:0]  flags;
  int checks = 0, failures = 0;

  dm_core dut (.*);
  always #5 clk = ~clk;

  logic [7:0] mem [65536];
  assign data_in = mem[addr];
  always_ff @(posedge clk) if (mem_wr && data_oe) mem[addr] <= data_out;

  int unsigned ap, l_outer, l_inner, l_skip;
  task automatic emit(input logic [15:0] w);
    mem[ap[15:0]] = w[15:8];
    mem[ap[15:0] + 16'd1] = w[7:0];
    ap += 2;
  endtask

  // two passes: the first fixes the label addresses
  task automatic assemble();
    for (int pass = 0; pass < 2; pass++) begin
      ap = 0;
      emit(a_ldi(5, N - 1));
      emit(a_ldi(12, l_outer & 255)); emit(a_ldi(13, l_outer >> 8));
      emit(a_ldi(10, l_inner & 255)); emit(a_ldi(11, l_inner >> 8));
      emit(a_ldi(14, l_skip & 255));  emit(a_ldi(15, l_skip >> 8));
      l_outer = ap;
      emit(a_ldi(8, AB & 255)); emit(a_ldi(9, AB >> 8));
      emit(a_ldi(4, N - 1));
      l_inner = ap;
      emit(a_m(OP_LD, 2, 0, AM_INC));
      emit(a_m(OP_LD, 3, 0, AM_NONE));
      emit(a_r(OP_CMP, 3, 2));
      emit(a_j(OP_JC, 7));
      emit(a_m(OP_ST, 2, 0, AM_DEC));
      emit(a_m(OP_ST, 3, 0, AM_INC));
      l_skip = ap;
      emit(a_r(OP_DEC, 4, 4));
      emit(a_j(OP_JNZ, 5));
      emit(a_r(OP_DEC, 5, 5));
      emit(a_j(OP_JNZ, 6));
      emit(a_halt());
    end
  endtask

  initial begin
    logic [7:0] a [N];
    int cyc = 0, retired = 0, swaps = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    for (int i = 0; i < N; i++) begin a[i] = 8'($urandom); mem[AB + i] = a[i]; end
    a[3] = a[7];                       // one duplicate value
    mem[AB + 3] = a[3];
    assemble();
    a.sort();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!halted) begin
      @(posedge clk);
      #1;
      cyc++;
      if (instr_done) retired++;
      if (mem_wr) swaps++;
    end
    retired++;
    checks++;
    if (cyc != 7 * (retired - 1) + 4) begin
      failures++;
      $display("FAIL %0d cycles for %0d instructions", cyc, retired);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (mem[AB + i] != a[i]) begin
        failures++;
        $display("FAIL a[%0d] = %0d, expected %0d", i, mem[AB + i], a[i]);
      end
    end
    checks++;
    if (swaps == 0) begin
      failures++;
      $display("FAIL no swap happened");
    end
    $display("sort of %0d bytes: %0d instructions, %0d cycles, %0d stores", N, retired, cyc, swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
