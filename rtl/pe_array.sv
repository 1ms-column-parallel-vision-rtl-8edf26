// pe_array: the ROWS x COLS SIMD processing-element array of the CPV system,
// one PE per pixel, built as a grid of pe_chip tiles.
//
// All PEs receive the same broadcast instruction. Each PE talks to its four
// neighbours; across chip borders the neighbour bits are wired chip to chip.
// At the array's outer border the column-parallel data I/O of the controller's
// 1D buffer memory takes part: the west neighbour of column 0 in row r is
// x_in[r] and the north neighbour of row 0 in column c is y_in[c]; in the other
// direction x_out[r] is the own_bit of the PE in the last column of row r and
// y_out[c] the own_bit of the PE in the last row of column c. East of the last
// column and south of the last row a PE reads 0.
//
// Image input: pix_col[r] is the pixel entering row r's transfer shift register
// at column 0. After COLS shifts the pixel that entered first sits at the last
// column, so the PD array is read out starting from its last column. latch then
// copies every stage into its PE's pixel register in one clock.
//
// own[r][c] is every PE's own_bit, the input of the summation circuit. All
// outputs are combinational from the broadcast instruction and PE state; all
// state changes on the rising clock edge.
//
// 128x128 PEs in 128 chips of 16x8 follows the architecture; the edge I/O
// mapping (which borders connect to X and Y) is this design's choice.
module pe_array
  import cpv_pkg::*;
#(
  parameter int ROWS      = 128,
  parameter int COLS      = 128,
  parameter int CHIP_ROWS = 8,
  parameter int CHIP_COLS = 16,
  parameter int MEM_BITS  = PE_MEM_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  pe_instr_t                 instr,
  input  logic                      instr_valid,
  input  logic                      latch,
  input  logic                      shift,
  input  logic [PIX_BITS-1:0]       pix_col [ROWS],
  input  logic [ROWS-1:0]           x_in,
  input  logic [COLS-1:0]           y_in,
  output logic [ROWS-1:0]           x_out,
  output logic [COLS-1:0]           y_out,
  output logic [ROWS-1:0][COLS-1:0] own
);

  localparam int NCR = ROWS / CHIP_ROWS;   // chips down
  localparam int NCC = COLS / CHIP_COLS;   // chips across

  // pixel links between chips of one chip row; link[i][0] is the array input
  logic [PIX_BITS-1:0] link [NCR][NCC+1][CHIP_ROWS];

  for (genvar i = 0; i < NCR; i++) begin : g_cr
    for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_in
      assign link[i][0][r] = pix_col[i*CHIP_ROWS + r];
    end

    for (genvar j = 0; j < NCC; j++) begin : g_cc
      logic [CHIP_COLS-1:0] n_in, s_in;
      logic [CHIP_ROWS-1:0] w_in, e_in;
      logic [CHIP_ROWS-1:0][CHIP_COLS-1:0] co;

      for (genvar c = 0; c < CHIP_COLS; c++) begin : g_ns
        localparam int GC = j*CHIP_COLS + c;
        assign n_in[c] = (i == 0)       ? y_in[GC] : own[(i == 0) ? 0 : i*CHIP_ROWS - 1][GC];
        assign s_in[c] = (i == NCR - 1) ? 1'b0     : own[(i == NCR - 1) ? 0 : (i+1)*CHIP_ROWS][GC];
      end
      for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_we
        localparam int GR = i*CHIP_ROWS + r;
        assign w_in[r] = (j == 0)       ? x_in[GR] : own[GR][(j == 0) ? 0 : j*CHIP_COLS - 1];
        assign e_in[r] = (j == NCC - 1) ? 1'b0     : own[GR][(j == NCC - 1) ? 0 : (j+1)*CHIP_COLS];
        for (genvar c = 0; c < CHIP_COLS; c++) begin : g_own
          assign own[GR][j*CHIP_COLS + c] = co[r][c];
        end
      end

      pe_chip #(
        .CHIP_ROWS(CHIP_ROWS), .CHIP_COLS(CHIP_COLS), .MEM_BITS(MEM_BITS)
      ) u_chip (
        .clk, .rst_n, .instr, .instr_valid, .latch, .shift,
        .row_din (link[i][j]),
        .row_dout(link[i][j+1]),
        .n_in, .s_in, .w_in, .e_in,
        .own     (co)
      );
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_xo
    assign x_out[r] = own[r][COLS-1];
  end
  assign y_out = own[ROWS-1];

endmodule
