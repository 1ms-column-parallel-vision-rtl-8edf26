// buffer_memory_1d: the controller's 1D buffer memory, the column-parallel
// data path between the controller and the border of the PE array.
//
// It holds LINES lines of WIDTH bits, one bit per PE row or column. A line
// can be filled in one clock from the PE array's X edge (one bit per row, the
// own bits of the last PE column) or Y edge (one bit per column, the own bits
// of the last PE row), and the line selected by line_sel can be driven back
// into the array's X and Y edge inputs, again one bit per row/column. On the
// controller's data bus the buffer looks like LINES * WIDTH/32 words of 32 bits
// (word w of line l at address l * WIDTH/32 + w, bit 0 = row/column 32*w).
//
// Timing: captures and bus writes take effect on the rising edge; bus reads
// and the edge drive are combinational. If a capture and a bus write hit the
// same line on one edge, the capture wins; cap_x wins over cap_y. Reset clears
// all lines.
//
// The block and its X/Y neighbour I/O connection to the S3PE array are the
// architecture's; the depth, the word mapping and the priorities are this
// design's choice.
module buffer_memory_1d #(
  parameter int LINES = 16,
  parameter int WIDTH = 128,
  localparam int LW = $clog2(LINES),
  localparam int WPL = WIDTH / 32,                 // 32-bit words per line
  localparam int BAW = $clog2(LINES * WPL)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LW-1:0]    line_sel,
  // PE array edge side
  input  logic             cap_x,
  input  logic             cap_y,
  input  logic [WIDTH-1:0] x_edge,
  input  logic [WIDTH-1:0] y_edge,
  input  logic             drive_en,
  output logic [WIDTH-1:0] x_drive,
  output logic [WIDTH-1:0] y_drive,
  // data bus side
  input  logic [BAW-1:0]   bus_addr,
  input  logic             bus_we,
  input  logic [31:0]      bus_wdata,
  output logic [31:0]      bus_rdata
);

  logic [WIDTH-1:0] line [LINES];

  logic [LW-1:0] bus_line;
  logic [$clog2(WPL > 1 ? WPL : 2)-1:0] bus_word;
  assign bus_line = LW'(bus_addr / BAW'(WPL));
  assign bus_word = $bits(bus_word)'(bus_addr % BAW'(WPL));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) line[i] <= '0;
    end else begin
      if (bus_we) line[bus_line][32*bus_word +: 32] <= bus_wdata;
      if (cap_x)      line[line_sel] <= x_edge;
      else if (cap_y) line[line_sel] <= y_edge;
    end
  end

  assign bus_rdata = line[bus_line][32*bus_word +: 32];
  assign x_drive   = drive_en ? line[line_sel] : '0;
  assign y_drive   = drive_en ? line[line_sel] : '0;

endmodule
