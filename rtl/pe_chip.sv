// pe_chip: the PEs of one FPGA of the PE array, CHIP_ROWS x CHIP_COLS of them,
// with their part of the image-transfer shift registers.
//
// Inside, the PEs are wired to their 4 neighbours; PEs on the chip's border
// take the missing neighbour from the n_in/e_in/s_in/w_in ports, which the
// array connects to the bordering chips (or to the array's edge I/O). Each PE
// row owns one shift_segment; its input row_din comes from the chip to the
// west and row_dout goes to the chip to the east. Every PE's own_bit leaves the
// chip in own[][], for the neighbouring chips and the summation circuit.
//
// Timing is that of s3pe and shift_segment: one broadcast instruction per
// clock with instr_valid, one pixel shift per clock with shift, and latch
// copies the shift stages into the PEs' pixel registers.
//
// The chip size (16x8 PEs, 128 chips for the array) is the architecture's.
// Which of the two numbers counts columns is not stated; here a chip is 16 PE
// columns wide and 8 PE rows high.
module pe_chip
  import cpv_pkg::*;
#(
  parameter int CHIP_ROWS = 8,
  parameter int CHIP_COLS = 16,
  parameter int MEM_BITS  = PE_MEM_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_instr_t           instr,
  input  logic                instr_valid,
  input  logic                latch,
  input  logic                shift,
  input  logic [PIX_BITS-1:0] row_din  [CHIP_ROWS],
  output logic [PIX_BITS-1:0] row_dout [CHIP_ROWS],
  input  logic [CHIP_COLS-1:0] n_in,    // own_bit of the PEs just north of row 0
  input  logic [CHIP_COLS-1:0] s_in,    // ... just south of the last row
  input  logic [CHIP_ROWS-1:0] w_in,    // ... just west of column 0
  input  logic [CHIP_ROWS-1:0] e_in,    // ... just east of the last column
  output logic [CHIP_ROWS-1:0][CHIP_COLS-1:0] own
);

  for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_row
    logic [PIX_BITS-1:0] stage [CHIP_COLS];

    shift_segment #(.LEN(CHIP_COLS)) u_shift (
      .clk, .rst_n, .shift,
      .din  (row_din[r]),
      .stage(stage),
      .dout (row_dout[r])
    );

    for (genvar c = 0; c < CHIP_COLS; c++) begin : g_col
      logic nn, ne, ns, nw;
      assign nn = (r == 0)             ? n_in[c] : own[(r == 0) ? 0 : r-1][c];
      assign ns = (r == CHIP_ROWS - 1) ? s_in[c] : own[(r == CHIP_ROWS - 1) ? r : r+1][c];
      assign nw = (c == 0)             ? w_in[r] : own[r][(c == 0) ? 0 : c-1];
      assign ne = (c == CHIP_COLS - 1) ? e_in[r] : own[r][(c == CHIP_COLS - 1) ? c : c+1];

      s3pe #(.MEM_BITS(MEM_BITS)) u_pe (
        .clk, .rst_n, .instr, .instr_valid, .latch,
        .pix_in (stage[c]),
        .nbr_n  (nn),
        .nbr_e  (ne),
        .nbr_s  (ns),
        .nbr_w  (nw),
        .own_bit(own[r][c])
      );
    end
  end

endmodule
