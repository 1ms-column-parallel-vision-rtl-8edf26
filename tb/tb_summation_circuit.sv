// tb_summation_circuit: self-checking test of the summation circuit at its
// full 128 x 128 size. Applies all-zero, all-one, single-bit and random
// patterns of several densities and compares sum with a count made by
// $countones in the testbench, in the same time step (no clock of delay).
module tb_summation_circuit;
  localparam int ROWS = 128, COLS = 128;
  logic [ROWS-1:0][COLS-1:0] bits;
  logic [$clog2(ROWS*COLS+1)-1:0] sum;

  summation_circuit #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int exp;
    #1 exp = $countones(bits);
    checks++;
    if (int'(sum) != exp) begin
      failures++; $display("FAIL sum %0d expected %0d", sum, exp);
    end
  endtask

  initial begin
    bits = '0; check();
    bits = '1; check();
    for (int k = 0; k < 20; k++) begin
      bits = '0; bits[$urandom_range(0, ROWS-1)][$urandom_range(0, COLS-1)] = 1'b1; check();
    end
    for (int d = 1; d <= 15; d++)
      for (int k = 0; k < 4; k++) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) bits[r][c] = ($urandom_range(0, 15) < d);
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
