// summation_circuit: counts how many PEs of the array output a 1.
//
// This is the feature-extraction path from the PE array to the controller: it
// sums all PE outputs without adding a clock of delay, so a PE instruction that
// reads, say, a binary target mask yields the target's area (zeroth moment)
// in the same cycle, and masks weighted by coordinate bit planes give the first
// moments. It is purely combinational: first a count per PE row, then the sum
// of the row counts.
//
// Interface: bits[r][c] is the own_bit of PE (r, c); sum is the number of ones,
// 0 .. ROWS*COLS. That the circuit sums all PE outputs with no delay is the
// architecture's; the two-level row/total adder structure is this design's.
module summation_circuit #(
  parameter int ROWS = 128,
  parameter int COLS = 128,
  localparam int SUM_W = $clog2(ROWS*COLS + 1),
  localparam int ROW_W = $clog2(COLS + 1)
) (
  input  logic [ROWS-1:0][COLS-1:0] bits,
  output logic [SUM_W-1:0]          sum
);

  logic [ROW_W-1:0] row_sum [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_comb begin
      row_sum[r] = '0;
      for (int c = 0; c < COLS; c++) row_sum[r] += ROW_W'(bits[r][c]);
    end
  end

  always_comb begin
    sum = '0;
    for (int r = 0; r < ROWS; r++) sum += SUM_W'(row_sum[r]);
  end

endmodule
