// tb_s3pe: self-checking test of one processing element.
//
// Drives a random stream of broadcast instructions (every opcode, every
// neighbour direction, conditional writes, pixel-bit reads) plus pixel latches
// into one s3pe, and compares own_bit and the memory contents, read back
// through own_bit, with a reference model kept in the testbench. Also checks
// directed cases: a bit-serial 4-bit addition, the 1-clock instruction latency
// and reset.
module tb_s3pe;
  import cpv_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pe_instr_t instr;
  logic      instr_valid, latch;
  logic [PIX_BITS-1:0] pix_in;
  logic nbr_n, nbr_e, nbr_s, nbr_w, own_bit;

  s3pe dut (.*);

  int checks = 0, failures = 0;

  // reference model
  logic [23:0] m_mem;
  logic [7:0]  m_pix;
  logic        m_a, m_b, m_c;

  function automatic logic m_read(pe_instr_t i);
    if (i.src < 24)            return m_mem[i.src];
    if (i.src == PE_ADDR_PIXEL) return m_pix[i.bsel];
    if (i.src == PE_ADDR_ONE)   return 1'b1;
    return 1'b0;
  endfunction

  task automatic m_exec(pe_instr_t i);
    logic x, r, nc;
    logic wr;
    case (i.dir)
      DIR_NORTH: x = nbr_n;
      DIR_EAST:  x = nbr_e;
      DIR_SOUTH: x = nbr_s;
      DIR_WEST:  x = nbr_w;
      default:   x = m_read(i);
    endcase
    wr = 1'b1; r = 1'b0; nc = m_c;
    case (i.op)
      PE_LDA: begin m_a = x; wr = 1'b0; end
      PE_LDB: begin m_b = x; wr = 1'b0; end
      PE_MOV:  r = x;
      PE_AND:  r = m_a & x;
      PE_OR:   r = m_a | x;
      PE_XOR:  r = m_a ^ x;
      PE_ANDN: r = m_a & !x;
      PE_NOT:  r = !x;
      PE_ADD:  begin r = m_a ^ x ^ m_c;  nc = (m_a + x + m_c) >= 2; end
      PE_SUB:  begin r = m_a ^ !x ^ m_c; nc = (m_a + !x + m_c) >= 2; end
      PE_CLC:  begin nc = 1'b0; wr = 1'b0; end
      PE_SEC:  begin nc = 1'b1; wr = 1'b0; end
      PE_STC:  r = m_c;
      default: wr = 1'b0;
    endcase
    m_c = nc;
    if (wr) begin
      if (i.wm && (!i.cnd || m_b) && i.dst < 24) m_mem[i.dst] = r;
      m_a = r;
    end
  endtask

  task automatic issue(pe_instr_t i);
    instr = i; instr_valid = 1'b1;
    @(posedge clk);
    m_exec(i);
    #1 instr_valid = 1'b0;
  endtask

  task automatic check_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // compare every memory bit, pixel bits and A (via a harmless read)
  task automatic check_state(string tag);
    pe_instr_t i;
    for (int a = 0; a < 26; a++) begin
      i = pe_i(PE_NOP, DIR_SELF, 5'(a), 5'd0, 1'b0, 1'b0, 3'(a % 8));
      instr = i; instr_valid = 1'b0;
      #1 check_bit($sformatf("%s addr %0d", tag, a), own_bit, m_read(i));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_instr_t i;
    instr = '0; instr_valid = 1'b0; latch = 1'b0; pix_in = '0;
    {nbr_n, nbr_e, nbr_s, nbr_w} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m_mem = '0; m_pix = '0; m_a = 0; m_b = 0; m_c = 0;
    check_state("reset");

    // latch a pixel, read its bits through the memory-mapped input
    pix_in = 8'hA5; latch = 1'b1;
    @(posedge clk); m_pix = 8'hA5; #1 latch = 1'b0; pix_in = 8'h00;
    check_state("latched");

    // 3-bit data input: three MOVs from the pixel input into mem[0..2]
    for (int b = 0; b < 3; b++) issue(pe_i(PE_MOV, DIR_SELF, PE_ADDR_PIXEL, 5'(b), 1'b1, 1'b0, 3'(b + 5)));
    check_state("input3");

    // bit-serial addition: mem[4..7] = 4'd9, mem[8..11] = 4'd5 -> mem[12..16]
    for (int b = 0; b < 4; b++) begin
      issue(pe_i(((9 >> b) & 1) ? PE_MOV : PE_NOT, DIR_SELF, PE_ADDR_ONE, 5'(4 + b), 1'b1));
      issue(pe_i(((5 >> b) & 1) ? PE_MOV : PE_NOT, DIR_SELF, PE_ADDR_ONE, 5'(8 + b), 1'b1));
    end
    issue(pe_i(PE_CLC, DIR_SELF, 5'd0, 5'd0, 1'b0));
    for (int b = 0; b < 4; b++) begin
      issue(pe_i(PE_LDA, DIR_SELF, 5'(4 + b), 5'd0, 1'b0));
      issue(pe_i(PE_ADD, DIR_SELF, 5'(8 + b), 5'(12 + b), 1'b1));
    end
    issue(pe_i(PE_STC, DIR_SELF, 5'd0, 5'd16, 1'b1));
    begin
      logic [4:0] s;
      for (int b = 0; b < 5; b++) begin
        instr = pe_i(PE_NOP, DIR_SELF, 5'(12 + b), 5'd0, 1'b0); #1 s[b] = own_bit;
      end
      checks++;
      if (s != 5'd14) begin failures++; $display("FAIL add: %0d", s); end
    end

    // timing: a write is visible exactly one clock later
    instr = pe_i(PE_NOT, DIR_SELF, 5'd20, 5'd20, 1'b1); instr_valid = 1'b1;
    #1 check_bit("before edge", own_bit, m_mem[20]);
    @(posedge clk); m_exec(instr); #1 instr_valid = 1'b0;
    check_bit("after edge", own_bit, m_mem[20]);

    // random instruction stream
    for (int n = 0; n < 4000; n++) begin
      i = pe_instr_t'($urandom);
      i.op  = pe_op_e'($urandom_range(0, 13));
      i.dir = pe_dir_e'($urandom_range(0, 4));
      {nbr_n, nbr_e, nbr_s, nbr_w} = 4'($urandom);
      if ($urandom_range(0, 15) == 0) begin
        pix_in = 8'($urandom); latch = 1'b1;
        @(posedge clk); m_pix = pix_in; #1 latch = 1'b0;
      end
      instr = i;
      #1 if (i.dir == DIR_SELF) check_bit("own_bit", own_bit, m_read(i));
      issue(i);
      if (n % 500 == 499) check_state($sformatf("random %0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
