// tb_main_memory: self-checking test of the dual-port 32 x 64k main memory.
// Random reads and writes on both ports against a reference array, checking
// the one-clock read latency, read-old-data on a same-address read/write, and
// that port A wins when both ports write one address on the same edge.
module tb_main_memory;
  localparam int DEPTH = 65536;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [15:0] a_addr, b_addr;
  logic a_we = 1'b0, b_we = 1'b0;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;

  main_memory #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, collisions = 0;
  logic [31:0] ref_mem [logic [15:0]];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, exp_b;
    logic chk_a, chk_b;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // initialise a small window of addresses through both ports
    for (int i = 0; i < 64; i++) begin
      a_addr = 16'(i); a_wdata = 32'($urandom); a_we = 1'b1;
      b_addr = 16'(16'hFFC0 + i); b_wdata = 32'($urandom); b_we = 1'b1;
      @(posedge clk); #1;
      ref_mem[a_addr] = a_wdata; ref_mem[b_addr] = b_wdata;
    end
    a_we = 1'b0; b_we = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      a_addr = ($urandom_range(0, 1)) ? 16'($urandom_range(0, 63)) : 16'(16'hFFC0 + $urandom_range(0, 63));
      b_addr = ($urandom_range(0, 3) == 0) ? a_addr : 16'(16'hFFC0 + $urandom_range(0, 63));
      if ($urandom_range(0, 1)) b_addr = 16'($urandom_range(0, 63));
      a_we = ($urandom_range(0, 2) == 0); a_wdata = 32'($urandom);
      b_we = ($urandom_range(0, 2) == 0); b_wdata = 32'($urandom);
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      @(posedge clk);
      if (b_we) ref_mem[b_addr] = b_wdata;
      if (a_we) ref_mem[a_addr] = a_wdata;
      if (a_we && b_we && a_addr == b_addr) collisions++;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL A read %h: %h vs %h", a_addr, a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL B read %h: %h vs %h", b_addr, b_rdata, exp_b); end
    end
    a_we = 1'b0; b_we = 1'b0;
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
