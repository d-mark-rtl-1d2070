// tb_dm_fir: FIR filter benchmark on the D-mark core at its default sizes.
//
// Computes y[n] = sum_{k=0..TAPS-1} h[k] * x[n-k] for n = TAPS-1 .. N-1 with
// signed 8-bit samples and coefficients and a 16-bit accumulator. Per tap the
// program loads x with post-decrement and h with post-increment, forms the
// product bytes with MULL/MULH and accumulates with ADD/ADC (the carry flag
// links the two bytes). The taps are unrolled; the output loop jumps through
// a register row. Results are compared with the same sum computed here in
// plain SystemVerilog, and the run must take exactly 7 cycles per
// instruction.
module tb_dm_fir;
  import dm_pkg::*;
  import dm_asm_pkg::*;

  localparam int N    = 24;
  localparam int TAPS = 4;
  localparam logic [15:0] XB = 16'h0310, HB = 16'h0380, YB = 16'h0400;

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

  int unsigned ap;
  task automatic emit(input logic [15:0] w);
    mem[ap[15:0]] = w[15:8];
    mem[ap[15:0] + 16'd1] = w[7:0];
    ap += 2;
  endtask

  logic signed [7:0] x [N];
  logic signed [7:0] h [TAPS];

  initial begin
    int unsigned loop;
    int cyc = 0, retired = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    for (int i = 0; i < N; i++)    begin x[i] = 8'($urandom); mem[XB + i] = x[i]; end
    for (int k = 0; k < TAPS; k++) begin h[k] = 8'($urandom); mem[HB + k] = h[k]; end
    // program
    ap = 0;
    emit(a_ldi(8,  (XB + TAPS - 1) & 255)); emit(a_ldi(9,  XB >> 8));   // P0 = &x[TAPS-1]
    emit(a_ldi(10, HB & 255));              emit(a_ldi(11, HB >> 8));   // P1 = &h[0]
    emit(a_ldi(12, YB & 255));              emit(a_ldi(13, YB >> 8));   // P2 = &y[0]
    emit(a_ldi(5, N - TAPS + 1));                                        // outputs
    loop = ap + 4;
    emit(a_ldi(14, loop & 255));            emit(a_ldi(15, loop >> 8)); // row 7 = loop
    emit(a_ldi(6, 0)); emit(a_ldi(7, 0));                                // acc = 0
    for (int k = 0; k < TAPS; k++) begin
      emit(a_m(OP_LD, 2, 0, AM_DEC));      // x[n-k]
      emit(a_m(OP_LD, 3, 1, AM_INC));      // h[k]
      emit(a_r(OP_MOV, 4, 2));
      emit(a_r(OP_MULL, 4, 3));
      emit(a_r(OP_ADD, 6, 4));             // acc low, sets C
      emit(a_r(OP_MOV, 4, 2));             // MOV/MULH keep C
      emit(a_r(OP_MULH, 4, 3));
      emit(a_r(OP_ADC, 7, 4));             // acc high
    end
    emit(a_m(OP_ST, 6, 2, AM_INC));
    emit(a_m(OP_ST, 7, 2, AM_INC));
    // P0 = &x[n+1]; byte-wide steps, so x must not cross a 256-byte page
    for (int k = 0; k <= TAPS; k++) emit(a_r(OP_INC, 8, 8));
    emit(a_ldi(10, HB & 255));                                  // P1 = &h[0]
    emit(a_r(OP_DEC, 5, 5));
    emit(a_j(OP_JNZ, 7));
    emit(a_halt());

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!halted) begin
      @(posedge clk);
      #1;
      cyc++;
      if (instr_done) retired++;
    end
    retired++;   // HALT stops in T4
    checks++;
    if (cyc != 7 * (retired - 1) + 4) begin
      failures++;
      $display("FAIL %0d cycles for %0d instructions", cyc, retired);
    end
    for (int n = TAPS - 1; n < N; n++) begin
      logic [15:0] want, got;
      want = '0;
      for (int k = 0; k < TAPS; k++) want += 16'(x[n - k] * h[k]);
      got = {mem[YB + 2 * (n - TAPS + 1) + 1], mem[YB + 2 * (n - TAPS + 1)]};
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL y[%0d] = %h, expected %h", n, got, want);
      end
    end
    $display("FIR %0d taps, %0d outputs: %0d instructions, %0d cycles", TAPS, N - TAPS + 1, retired, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
