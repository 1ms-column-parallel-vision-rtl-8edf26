// tb_pe_array: self-checking test of the PE array (reduced to 16 x 32 PEs in
// 2 x 2 chips of 8 x 16, so that chip borders are crossed in both directions).
//
// Shifts a random 8-bit image in through the row shift registers (last column
// first), checks the shift count, latches it, copies all 8 pixel bits into
// local memory, and checks every PE's bit against the image. It then moves bit
// 0 from the north, east, south and west neighbour into separate memory bits,
// with random data on the X/Y edge inputs, and checks each PE against the
// shifted image, including the array border. x_out, y_out and the own[][] bus
// are checked against the image too.
module tb_pe_array;
  import cpv_pkg::*;
  localparam int ROWS = 16, COLS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pe_instr_t instr;
  logic instr_valid = 1'b0, latch = 1'b0, shift = 1'b0;
  logic [PIX_BITS-1:0] pix_col [ROWS];
  logic [ROWS-1:0] x_in, x_out;
  logic [COLS-1:0] y_in, y_out;
  logic [ROWS-1:0][COLS-1:0] own;

  pe_array #(.ROWS(ROWS), .COLS(COLS), .CHIP_ROWS(8), .CHIP_COLS(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] img [ROWS][COLS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(pe_instr_t i);
    instr = i; instr_valid = 1'b1;
    @(posedge clk); #1 instr_valid = 1'b0;
  endtask

  // read one memory bit of every PE through own[][] and compare
  task automatic check_plane(string tag, int addr, int dr, int dc);
    instr = pe_i(PE_NOP, DIR_SELF, 5'(addr), 5'd0, 1'b0);
    #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic exp;
        int sr, sc;
        sr = r + dr; sc = c + dc;
        if (sr < 0)          exp = y_in[c];
        else if (sc < 0)     exp = x_in[r];
        else if (sr >= ROWS || sc >= COLS) exp = 1'b0;
        else                 exp = img[sr][sc][0];
        if (dr == 0 && dc == 0 && addr < 8) exp = img[r][c][addr];
        checks++;
        if (own[r][c] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL %s PE(%0d,%0d) got %0b exp %0b", tag, r, c, own[r][c], exp);
        end
      end
  endtask

  initial begin
    int shifts;
    instr = '0;
    x_in = ROWS'($urandom); y_in = COLS'($urandom);
    for (int r = 0; r < ROWS; r++) pix_col[r] = '0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) img[r][c] = 8'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // image transfer: column COLS-1 enters first
    shifts = 0;
    for (int k = 0; k < COLS; k++) begin
      for (int r = 0; r < ROWS; r++) pix_col[r] = img[r][COLS-1-k];
      shift = 1'b1; @(posedge clk); #1 shift = 1'b0; shifts++;
    end
    checks++; if (shifts != COLS) failures++;
    latch = 1'b1; @(posedge clk); #1 latch = 1'b0;

    // 8 pixel bits into memory bits 0..7, one instruction each
    for (int b = 0; b < 8; b++) issue(pe_i(PE_MOV, DIR_SELF, PE_ADDR_PIXEL, 5'(b), 1'b1, 1'b0, 3'(b)));
    for (int b = 0; b < 8; b++) check_plane($sformatf("bit%0d", b), b, 0, 0);

    // x_out / y_out follow the last column / last row
    instr = pe_i(PE_NOP, DIR_SELF, 5'd0, 5'd0, 1'b0); #1;
    for (int r = 0; r < ROWS; r++) begin checks++; if (x_out[r] !== img[r][COLS-1][0]) failures++; end
    for (int c = 0; c < COLS; c++) begin checks++; if (y_out[c] !== img[ROWS-1][c][0]) failures++; end

    // 4-neighbour moves of bit plane 0
    issue(pe_i(PE_MOV, DIR_NORTH, 5'd0, 5'd10, 1'b1));
    issue(pe_i(PE_MOV, DIR_EAST,  5'd0, 5'd11, 1'b1));
    issue(pe_i(PE_MOV, DIR_SOUTH, 5'd0, 5'd12, 1'b1));
    issue(pe_i(PE_MOV, DIR_WEST,  5'd0, 5'd13, 1'b1));
    check_plane("north", 10, -1, 0);
    check_plane("east",  11, 0, 1);
    check_plane("south", 12, 1, 0);
    check_plane("west",  13, 0, -1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
