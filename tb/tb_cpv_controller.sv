// tb_cpv_controller: self-checking test of the controller, reduced to a
// 16 x 16 PE array and a 1k-word main memory.
//
// The testbench stands in for the PE array and the PD array: sum_in and the
// X/Y edge bits are fixed functions of the broadcast instruction, and a
// responder answers conversion requests. Through the host port it downloads a
// program that uses every instruction class (immediate load, load/store, the
// ALU, a counted branch loop, PE broadcasts with SUM and edge capture, buffer
// read/write and edge drive, a frame transfer with wait and latch), runs it,
// and checks the results in main memory, every broadcast instruction, the
// drive outputs, the frame-transfer column order and the stall. A second
// program checks the cycle count: 2 clocks per instruction.
module tb_cpv_controller;
  import cpv_pkg::*;
  localparam int ROWS = 16, COLS = 16, DEPTH = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, halted;
  logic [9:0] host_addr = '0;
  logic host_we = 1'b0;
  logic [31:0] host_wdata = '0, host_rdata;
  pe_instr_t pe_instr;
  logic pe_valid, pe_latch, pe_shift;
  logic [8:0] sum_in;
  logic [ROWS-1:0] x_edge, x_drive;
  logic [COLS-1:0] y_edge, y_drive;
  logic [3:0] pd_col_sel;
  logic pd_conv_start, pd_conv_done, frame_busy, stall;

  cpv_controller #(.ROWS(ROWS), .COLS(COLS), .MAIN_DEPTH(DEPTH), .BUF_LINES(16)) dut (.*);

  int checks = 0, failures = 0;

  // stand-in PE array: responses are functions of the instruction
  function automatic logic [8:0] f_sum(pe_instr_t i);
    return 9'({i.src, i.dst} ^ 10'h0A5);
  endfunction
  function automatic logic [15:0] f_edge(pe_instr_t i);
    return 16'({i.op, i.dir, i.src, i.dst} * 37);
  endfunction
  assign sum_in = pe_valid ? f_sum(pe_instr) : 9'h1FF;
  assign x_edge = pe_valid ? f_edge(pe_instr) : '1;
  assign y_edge = pe_valid ? ~f_edge(pe_instr) : '1;

  // PD responder: conv_done 3 clocks after the request clock
  int pd_cnt = -1;
  always_ff @(posedge clk) begin
    if (!rst_n) pd_cnt <= -1;
    else if (pd_conv_start && pd_cnt < 0) pd_cnt <= 2;
    else if (pd_cnt >= 0) pd_cnt <= pd_cnt - 1;
  end
  assign pd_conv_done = (pd_cnt == 0);

  // monitors
  pe_instr_t exp_pe [$];
  int n_pe = 0, n_shift = 0, n_latch = 0, n_stall = 0, exp_col = COLS - 1;
  logic prev_valid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (pe_valid) begin
      n_pe++;
      checks++;
      if (exp_pe.size() == 0 || pe_instr !== exp_pe[0]) begin
        failures++; $display("FAIL unexpected PE instruction %h", pe_instr);
      end
      if (exp_pe.size() != 0) void'(exp_pe.pop_front());
      checks++;
      if (prev_valid) begin failures++; $display("FAIL pe_valid longer than one clock"); end
    end
    prev_valid <= pe_valid;
    if (pe_shift) n_shift++;
    if (stall) n_stall++;
    if (pe_latch) begin
      n_latch++;
      checks++; if (frame_busy || n_shift != COLS) begin failures++; $display("FAIL latch before frame end"); end
    end
    if (pd_conv_start) begin
      checks++; if (int'(pd_col_sel) != exp_col) begin failures++; $display("FAIL column order"); end
      exp_col--;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(int addr, logic [31:0] data);
    host_addr = 10'(addr); host_wdata = data; host_we = 1'b1;
    @(posedge clk); #1 host_we = 1'b0;
  endtask
  task automatic host_check(int addr, logic [31:0] exp, string what);
    host_addr = 10'(addr);
    @(posedge clk); #1;
    checks++;
    if (host_rdata !== exp) begin failures++; $display("FAIL %s: M[%0d] = %h, expected %h", what, addr, host_rdata, exp); end
  endtask
  function automatic logic [31:0] c_alu(alu_op_e f);
    return {C_ALU, 24'h0, f};
  endfunction
  function automatic logic [31:0] c_br(br_cond_e c, int tgt);
    return {C_BR, 8'h0, c, 16'(tgt)};
  endfunction

  int run_cycles;
  task automatic run();
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    run_cycles = 1;
    while (!halted) begin @(posedge clk); #1 run_cycles++; end
  endtask

  initial begin
    pe_instr_t pa, pb;
    logic [31:0] prog [$];
    pa = pe_i(PE_OR, DIR_EAST, 5'd7, 5'd9, 1'b1);
    pb = pe_i(PE_MOV, DIR_SELF, PE_ADDR_PIXEL, 5'd3, 1'b1, 1'b0, 3'd6);
    prog = '{
      c_imm(C_LDI, 5),          // 0
      c_imm(C_ST, 100),         // 1  M[100] = 5
      c_imm(C_LDI, 7),          // 2
      c_alu(ALU_MOVB),          // 3  B = 7
      c_imm(C_LD, 100),         // 4  A = 5
      c_alu(ALU_ADD),           // 5  A = 12
      c_imm(C_ST, 101),         // 6  M[101] = 12
      c_imm(C_LDI, 3),          // 7  loop counter
      c_imm(C_LDB, 102),        // 8  B = M[102] = 1
      c_alu(ALU_SUB),           // 9  loop: A = A - 1
      c_pei(pa, 1'b1),          // 10 broadcast, capture SUM
      c_br(BR_NZERO, 9),        // 11
      c_imm(C_LDS, 0),          // 12 A = SUM
      c_imm(C_ST, 103),         // 13
      {C_EDGE, 12'h0, 16'd3},   // 14 line 3, no drive
      c_pei(pb, 1'b0, 1'b1),    // 15 broadcast, capture X edge into line 3
      c_imm(C_BRD, 3),          // 16 A = line 3 (one word per 16-bit line)
      c_imm(C_ST, 104),         // 17
      c_pei(pb, 1'b0, 1'b0, 1'b1), // 18 capture Y edge into line 3
      c_imm(C_BRD, 3),          // 19
      c_imm(C_ST, 105),         // 20
      c_imm(C_LDI, 16'hBEEF),   // 21
      c_imm(C_BWR, 5),          // 22 line 5
      {C_EDGE, 12'h1, 16'd5},   // 23 drive line 5
      c_alu(ALU_SHL),           // 24 A = 0x17DDE
      c_br(BR_NEG, 0),          // 25 not taken
      c_imm(C_ST, 106),         // 26
      c_imm(C_FRM, 7),          // 27 start, wait, latch
      {C_HALT, 28'h0}           // 28
    };
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (!halted) begin failures++; $display("FAIL not halted after reset"); end
    for (int i = 0; i < prog.size(); i++) host_write(i, prog[i]);
    host_write(102, 32'd1);
    exp_pe = '{pa, pa, pa, pb, pb};
    run();
    host_check(100, 32'd5, "store");
    host_check(101, 32'd12, "ALU add");
    host_check(103, 32'(f_sum(pa)), "SUM capture");
    host_check(104, 32'(f_edge(pb)), "X edge capture");
    host_check(105, 32'(16'(~f_edge(pb))), "Y edge capture");
    host_check(106, 32'h17DDE, "shift / branch not taken");
    checks++; if (n_pe != 5) begin failures++; $display("FAIL %0d PE broadcasts", n_pe); end
    checks++; if (x_drive !== 16'hBEEF || y_drive !== 16'hBEEF) begin failures++; $display("FAIL edge drive %h %h", x_drive, y_drive); end
    checks++; if (n_shift != COLS) begin failures++; $display("FAIL %0d shifts", n_shift); end
    checks++; if (n_latch != 1) begin failures++; $display("FAIL %0d latches", n_latch); end
    checks++; if (n_stall < COLS * 4) begin failures++; $display("FAIL stall %0d clocks", n_stall); end

    // timing: 6 NOPs and HALT = 7 instructions of 2 clocks, plus the start clock
    for (int i = 0; i < 6; i++) host_write(i, {C_NOP, 28'h0});
    host_write(6, {C_HALT, 28'h0});
    run();
    checks++; if (run_cycles != 15) begin failures++; $display("FAIL 7 instructions took %0d clocks", run_cycles); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
