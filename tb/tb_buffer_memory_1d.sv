// tb_buffer_memory_1d: self-checking test of the 1D buffer memory (16 lines
// of 128 bits). Random captures from the X and Y edges, 32-bit bus writes and
// reads, and edge drives, all compared with a reference copy of the lines;
// also checks the capture-over-bus-write and X-over-Y priorities and that the
// drive outputs are zero when drive_en is low.
module tb_buffer_memory_1d;
  localparam int LINES = 16, WIDTH = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] line_sel;
  logic cap_x = 1'b0, cap_y = 1'b0, drive_en = 1'b0, bus_we = 1'b0;
  logic [WIDTH-1:0] x_edge, y_edge, x_drive, y_drive;
  logic [5:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  buffer_memory_1d #(.LINES(LINES), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_line [LINES];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    line_sel = '0; x_edge = '0; y_edge = '0; bus_addr = '0; bus_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < LINES; i++) ref_line[i] = '0;
    for (int n = 0; n < 5000; n++) begin
      line_sel  = 4'($urandom);
      cap_x     = ($urandom_range(0, 3) == 0);
      cap_y     = ($urandom_range(0, 3) == 0);
      bus_we    = ($urandom_range(0, 2) == 0);
      drive_en  = ($urandom_range(0, 1) == 0);
      x_edge    = {4{32'($urandom)}} ^ (WIDTH'($urandom) << 64);
      y_edge    = {4{32'($urandom)}} ^ (WIDTH'($urandom) << 32);
      bus_addr  = 6'($urandom);
      bus_wdata = 32'($urandom);
      #1;
      chk("bus read", WIDTH'(bus_rdata), WIDTH'(ref_line[bus_addr / 4][32 * (bus_addr % 4) +: 32]));
      chk("x drive", x_drive, drive_en ? ref_line[line_sel] : '0);
      chk("y drive", y_drive, drive_en ? ref_line[line_sel] : '0);
      @(posedge clk);
      if (bus_we) ref_line[bus_addr / 4][32 * (bus_addr % 4) +: 32] = bus_wdata;
      if (cap_x) ref_line[line_sel] = x_edge;
      else if (cap_y) ref_line[line_sel] = y_edge;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
