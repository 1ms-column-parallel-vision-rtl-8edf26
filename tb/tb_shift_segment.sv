// tb_shift_segment: self-checking test of the image-transfer shift register.
//
// Shifts a random pixel sequence into a LEN-stage segment, with random idle
// clocks between shifts, and checks after every clock that stage[i] holds the
// pixel that entered i+1 shifts ago and that dout is the last stage; it also
// checks reset and that a segment holds still without shift.
module tb_shift_segment;
  import cpv_pkg::*;
  localparam int LEN = 16;

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  always #5 clk = ~clk;
  logic [PIX_BITS-1:0] din = '0, dout;
  logic [PIX_BITS-1:0] stage [LEN];

  shift_segment #(.LEN(LEN)) dut (.*);

  int checks = 0, failures = 0;
  logic [PIX_BITS-1:0] hist [$];     // pixels in order of entry

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      checks++; if (stage[i] != 0) begin failures++; $display("FAIL reset stage %0d", i); end
    end
    for (int n = 0; n < 300; n++) begin
      shift = ($urandom_range(0, 3) != 0);
      din   = PIX_BITS'($urandom);
      @(posedge clk);
      if (shift) hist.push_front(din);
      #1;
      for (int i = 0; i < LEN; i++) begin
        logic [PIX_BITS-1:0] exp;
        exp = (i < hist.size()) ? hist[i] : '0;
        checks++;
        if (stage[i] != exp) begin
          failures++; $display("FAIL n=%0d stage %0d = %h, expected %h", n, i, stage[i], exp);
        end
      end
      checks++; if (dout != stage[LEN-1]) begin failures++; $display("FAIL dout"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
