// tb_dm_fft: FFT-structured benchmark on the D-mark core at default sizes.
//
// Runs all log2(N) radix-2 butterfly stages over N bytes in place, stepping
// through the samples of each stage with the BR instruction: stage s uses the
// pattern 2^(s-1), so consecutive BR results pair sample a with a + 2^(s-1).
// Each butterfly replaces the pair (u, v) by (u + v, u - v). With all
// twiddle factors equal to one this is the Walsh-Hadamard transform, which
// has exactly the data flow and addressing of a radix-2 FFT in 8-bit
// arithmetic. Checked here:
//   * the order of the data reads in every stage against the radix-2 stage
//     order (low s index bits reversed), built independently;
//   * the final memory against the transform computed here (mod 256);
//   * 7 cycles per instruction.
module tb_dm_fft;
  import dm_pkg::*;
  import dm_asm_pkg::*;

  localparam int N    = 16;
  localparam int LOGN = 4;
  localparam logic [7:0] PAGE = 8'h05;

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

  int unsigned ap, l_stage, l_pair;
  task automatic emit(input logic [15:0] w);
    mem[ap[15:0]] = w[15:8];
    mem[ap[15:0] + 16'd1] = w[7:0];
    ap += 2;
  endtask

  task automatic assemble();
    for (int pass = 0; pass < 2; pass++) begin
      ap = 0;
      emit(a_ldi(9, PAGE));                 // P0 high byte: data page
      emit(a_ldi(3, 1));                    // pattern of stage 1
      emit(a_ldi(11, LOGN));                // stage counter
      emit(a_ldi(12, l_stage & 255)); emit(a_ldi(13, l_stage >> 8));
      emit(a_ldi(14, l_pair & 255));  emit(a_ldi(15, l_pair >> 8));
      l_stage = ap;
      emit(a_ldi(2, 0));                    // index
      emit(a_ldi(10, N / 2));               // butterflies per stage
      l_pair = ap;
      emit(a_r(OP_MOV, 8, 2));              // P0 = &x[a]
      emit(a_m(OP_LD, 4, 0, AM_NONE));      // u
      emit(a_r(OP_MOV, 6, 2));              // keep a
      emit(a_r(OP_BR, 2, 3));               // a + P
      emit(a_r(OP_MOV, 8, 2));
      emit(a_m(OP_LD, 5, 0, AM_NONE));      // v
      emit(a_r(OP_MOV, 7, 4));
      emit(a_r(OP_ADD, 7, 5));              // u + v
      emit(a_r(OP_SUB, 4, 5));              // u - v
      emit(a_m(OP_ST, 4, 0, AM_NONE));      // x[a+P] = u - v
      emit(a_r(OP_MOV, 8, 6));
      emit(a_m(OP_ST, 7, 0, AM_NONE));      // x[a] = u + v
      emit(a_r(OP_BR, 2, 3));               // next a
      emit(a_r(OP_DEC, 10, 10));
      emit(a_j(OP_JNZ, 7));
      emit(a_r(OP_SHL, 3, 3));              // next stage pattern
      emit(a_r(OP_DEC, 11, 11));
      emit(a_j(OP_JNZ, 6));
      emit(a_halt());
    end
  endtask

  function automatic int unsigned rev(int unsigned v, int m);
    int unsigned o = 0;
    for (int i = 0; i < m; i++) if (v[i]) o |= 1 << (m - 1 - i);
    return o;
  endfunction

  int unsigned reads [$];

  initial begin
    logic [7:0] x [N];
    int cyc = 0, retired = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    for (int i = 0; i < N; i++) begin x[i] = 8'($urandom); mem[{PAGE, 8'(i)}] = x[i]; end
    assemble();
    // reference transform, same butterfly convention
    for (int h = 1; h < N; h *= 2)
      for (int i = 0; i < N; i++)
        if ((i & h) == 0) begin
          logic [7:0] u, v;
          u = x[i]; v = x[i + h];
          x[i] = u + v; x[i + h] = u - v;
        end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!halted) begin
      @(posedge clk);
      #1;
      cyc++;
      if (instr_done) retired++;
      // data reads happen in T5; record the sample index
      if (state == ST_T5 && mem_rd) reads.push_back(addr[7:0]);
    end
    retired++;
    checks++;
    if (cyc != 7 * (retired - 1) + 4) begin
      failures++;
      $display("FAIL %0d cycles for %0d instructions", cyc, retired);
    end
    checks++;
    if (reads.size() != N * LOGN) begin
      failures++;
      $display("FAIL %0d data reads, expected %0d", reads.size(), N * LOGN);
    end else begin
      for (int s = 1; s <= LOGN; s++)
        for (int i = 0; i < N; i++) begin
          int unsigned want;
          want = ((i >> s) << s) + rev(i & ((1 << s) - 1), s);
          checks++;
          if (reads[(s - 1) * N + i] != want) begin
            failures++;
            $display("FAIL stage %0d read %0d: sample %0d, expected %0d", s, i, reads[(s - 1) * N + i], want);
          end
        end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (mem[{PAGE, 8'(i)}] != x[i]) begin
        failures++;
        $display("FAIL X[%0d] = %h, expected %h", i, mem[{PAGE, 8'(i)}], x[i]);
      end
    end
    $display("%0d-point radix-2 transform: %0d instructions, %0d cycles", N, retired, cyc);
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
