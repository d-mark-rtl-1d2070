// dm_regfile: the D-mark register array, ROWS rows of ROW_W bits.
//
// Row 0 is the program counter; rows 1..7 are general purpose, and the
// control unit uses rows 4..7 as pointers for register-indirect addressing
// and any row as a jump target. A read returns a whole row (both bytes) at
// once, as in the published design, where the row goes to the addressing
// unit and to the byte mux in front of the data bus. Reads are
// combinational from rd_row. One write per cycle: be selects which byte(s)
// of row wr_row take wdata at the rising clock edge. Reset clears every row,
// so execution starts at address 0.
// The row count, width and R0 = PC follow the published design. It loads
// data while the clock is high (a latch array); here the array is written
// with edge-triggered flip-flops, and the reset and the single write port are
// this design's choices.
module dm_regfile #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned ROW_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  output logic [ROW_W-1:0]        rd_data,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  logic [1:0]              be,      // {high byte, low byte}
  input  logic [ROW_W-1:0]        wdata
);
  localparam int unsigned HALF = ROW_W / 2;

  logic [ROW_W-1:0] rows [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) rows[r] <= '0;
    end else begin
      if (be[0]) rows[wr_row][HALF-1:0]     <= wdata[HALF-1:0];
      if (be[1]) rows[wr_row][ROW_W-1:HALF] <= wdata[ROW_W-1:HALF];
    end
  end

  assign rd_data = rows[rd_row];
endmodule
