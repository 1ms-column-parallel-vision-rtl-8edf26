// tb_frame_sync: self-checking test of the frame-transfer sequencer (full
// 128-column size). A responder in the testbench answers each conversion
// request with conv_done after a fixed ADC latency. The test checks that the
// columns are requested from 127 down to 0, one shift strobe per column exactly
// on conv_done, busy/ready behaviour, that start while busy is ignored, and
// that busy lasts COLS * (LAT + 1) clocks, LAT being the clocks from a request
// to its conv_done.
module tb_frame_sync;
  localparam int COLS = 128, LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, ready, pd_conv_start, pd_conv_done, shift;
  logic [6:0] pd_col_sel;

  frame_sync #(.COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  // ADC responder: conv_done LAT clocks after the clock of the request
  int cnt = -1;
  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= -1;
    else if (pd_conv_start && cnt < 0) cnt <= LAT - 1;
    else if (cnt >= 0) cnt <= cnt - 1;
  end
  assign pd_conv_done = (cnt == 0);

  // monitor
  int n_shift = 0, n_req = 0, exp_col = COLS - 1;
  always @(posedge clk) if (rst_n) begin
    if (pd_conv_start) begin
      n_req++;
      checks++;
      if (int'(pd_col_sel) != exp_col) begin
        failures++; $display("FAIL request col %0d expected %0d", pd_col_sel, exp_col);
      end
    end
    if (shift) begin
      n_shift++; exp_col--;
      checks++; if (!pd_conv_done) begin failures++; $display("FAIL shift without done"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (busy || ready) begin failures++; $display("FAIL reset state"); end
    for (int f = 0; f < 2; f++) begin
      int cycles;
      cycles = 0;
      n_shift = 0; n_req = 0; exp_col = COLS - 1;
      start = 1'b1; @(posedge clk); #1 start = 1'b0;
      checks++; if (!busy || ready) begin failures++; $display("FAIL not busy after start"); end
      while (busy) begin
        cycles++;
        start = (cycles == 50);          // ignored while busy
        @(posedge clk); #1;
      end
      start = 1'b0;
      checks++; if (!ready) begin failures++; $display("FAIL ready"); end
      checks++; if (n_shift != COLS) begin failures++; $display("FAIL shifts %0d", n_shift); end
      checks++; if (n_req != COLS) begin failures++; $display("FAIL requests %0d", n_req); end
      checks++;
      if (cycles != COLS * (LAT + 1)) begin
        failures++; $display("FAIL frame took %0d clocks, expected %0d", cycles, COLS * (LAT + 1));
      end
      repeat (5) @(posedge clk); #1;
      checks++; if (!ready || busy) begin failures++; $display("FAIL ready not sticky"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
