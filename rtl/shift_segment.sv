// shift_segment: a piece of the image-transfer shift register of one PE row.
//
// The PD array hands over one pixel per row at a time, 128 rows in parallel.
// In each row the pixels travel along a chain of registers, one stage per PE
// column, until after 128 shifts every PE's stage holds the pixel of its own
// column; the PEs then latch them. A PE chip holds a LEN-stage segment of each
// of its rows, and segments are chained from chip to chip.
//
// Interface and timing: on a rising edge with shift = 1, stage[0] takes din
// and stage[i] takes stage[i-1]; dout is stage[LEN-1], the input of the next
// segment. stage[] is visible to the PEs at all times. Synchronous active-low
// reset clears all stages.
//
// The row-wise shift register is the architecture's (one pixel moving one PE
// per shift); the 8-bit parallel stage width (a whole pixel per shift rather
// than one bit) is this design's choice.
module shift_segment
  import cpv_pkg::*;
#(
  parameter int LEN = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic [PIX_BITS-1:0] din,
  output logic [PIX_BITS-1:0] stage [LEN],
  output logic [PIX_BITS-1:0] dout
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) stage[i] <= '0;
    end else if (shift) begin
      stage[0] <= din;
      for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[LEN-1];

endmodule
