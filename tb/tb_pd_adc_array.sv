// tb_pd_adc_array: self-checking test of the PD/ADC array model at full size.
// Writes a random 128 x 128 scene, converts every column in random order and
// checks the 128 parallel results against the scene, that conv_done comes
// exactly ADC_CYCLES clocks after the request, and that a request made while
// a conversion runs is ignored.
module tb_pd_adc_array;
  import cpv_pkg::*;
  localparam int ROWS = 128, COLS = 128, ADC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic scene_we = 1'b0;
  logic [6:0] scene_row, scene_col, col_sel;
  logic [7:0] scene_val;
  logic conv_start = 1'b0, conv_done;
  logic [7:0] pix_out [ROWS];

  pd_adc_array #(.ROWS(ROWS), .COLS(COLS), .ADC_CYCLES(ADC)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] scene [ROWS][COLS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scene_row = '0; scene_col = '0; scene_val = '0; col_sel = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        scene[r][c] = 8'($urandom);
        scene_we = 1'b1; scene_row = 7'(r); scene_col = 7'(c); scene_val = scene[r][c];
        @(posedge clk); #1;
      end
    scene_we = 1'b0;
    for (int n = 0; n < 160; n++) begin
      int c, lat;
      c = $urandom_range(0, COLS-1);
      col_sel = 7'(c); conv_start = 1'b1;
      @(posedge clk); #1 conv_start = 1'b0;
      col_sel = 7'($urandom);          // must not matter any more
      lat = 0;
      while (!conv_done) begin
        // a second request during the conversion is ignored
        conv_start = (lat == 1); 
        @(posedge clk); #1 lat++;
      end
      conv_start = 1'b0;
      checks++;
      if (lat != ADC) begin failures++; $display("FAIL latency %0d", lat); end
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (pix_out[r] != scene[r][c]) begin
          failures++; if (failures < 10) $display("FAIL col %0d row %0d: %h vs %h", c, r, pix_out[r], scene[r][c]);
        end
      end
      @(posedge clk); #1;
      checks++; if (conv_done) begin failures++; $display("FAIL done is not a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
