// tb_cpv_system: end-to-end test of the whole CPV system, reduced to 32 x 32
// pixels and PEs (4 x 2 PE chips) so that it builds and runs quickly. The
// same test also passes at the default 128 x 128 with ROWS/COLS set to 128.
//
// The testbench plays the host DSP: it puts a scene in front of the sensor,
// downloads a program into main memory, pulses start, waits for halted and
// reads the results back. Two runs follow the target-tracking use:
//
//  run 1, frame 1: transfer a frame (sensor -> shift registers -> latch),
//    input the 3 most significant pixel bits (3 PE steps), threshold them into
//    a binary target image, keep it as the tracking window and measure its area
//    with the summation circuit.
//  run 2, frame 2 (target moved one pixel down and right, plus a distractor
//    far away): transfer, input and threshold again, then self-windowing in 6
//    PE steps (new target = thresholded image AND the 4-neighbour dilation of
//    the previous target), a masked write that only PEs inside the target
//    perform, area, and the first moments sum(x) and sum(y). For the moments
//    the controller drives column- and row-index bit patterns from its 1D
//    buffer into the array border and shifts them across the array, then sums
//    target AND bit-plane k for every k and accumulates the sums with shifts.
//    Finally it captures a row-index plane from the X edge into the buffer.
//
// Expected values are computed from the scenes in the testbench. Every
// mechanism used (frame transfer, stall on the frame, latch, neighbour access,
// masked write, SUM capture, edge drive, edge capture, taken branch) is
// counted, and one that never happened counts as a failure. The frame transfer
// is also checked to take COLS * 6 clocks.
module tb_cpv_system;
  import cpv_pkg::*;
  localparam int ROWS = 32, COLS = 32;
  localparam int CB = $clog2(COLS), RB = $clog2(ROWS);
  localparam int WPL = (COLS + 31) / 32;   // buffer words per line

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic scene_we = 1'b0;
  logic [RB-1:0] scene_row = '0;
  logic [CB-1:0] scene_col = '0;
  logic [7:0] scene_val = '0;
  logic start = 1'b0, halted;
  logic [15:0] host_addr = '0;
  logic host_we = 1'b0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic frame_busy, stall, pe_valid;
  logic [$clog2(ROWS*COLS+1)-1:0] feature;

  cpv_system #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitors ---
  int n_frames = 0, n_shift = 0, n_stall = 0, n_latch = 0, n_nbr = 0, n_cnd = 0,
      n_sumcap = 0, n_drive = 0, n_capx = 0, n_branch = 0, n_pe = 0;
  int busy_len = 0, max_busy = 0;
  logic [15:0] prev_pc = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.frame_start) n_frames++;
    if (dut.pe_shift) n_shift++;
    if (stall) n_stall++;
    if (dut.pe_latch) n_latch++;
    if (pe_valid) begin
      n_pe++;
      if (dut.pe_instr.dir != DIR_SELF) n_nbr++;
      if (dut.pe_instr.cnd && dut.pe_instr.wm) n_cnd++;
      if (dut.u_ctrl.sumcap_q) n_sumcap++;
      if (dut.u_ctrl.capx_q) n_capx++;
      if (dut.u_ctrl.drive_q && dut.x_in != '0) n_drive++;
    end
    // a taken branch shows as a PC change that is not +1 and not a restart
    if (dut.u_ctrl.pc != prev_pc && dut.u_ctrl.pc != 16'(prev_pc + 1) && dut.u_ctrl.pc != '0) n_branch++;
    prev_pc = dut.u_ctrl.pc;
    if (frame_busy) busy_len++;
    else begin if (busy_len > max_busy) max_busy = busy_len; busy_len = 0; end
  end

  // -------------------------------------------------------- host helpers ---
  logic [31:0] prog [$];
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask
  task automatic pe(pe_instr_t i, bit sumcap = 0, bit capx = 0); emit(c_pei(i, sumcap, capx)); endtask
  function automatic logic [31:0] c_alu(alu_op_e f); return {C_ALU, 24'h0, f}; endfunction

  task automatic host_write(int addr, logic [31:0] data);
    host_addr = 16'(addr); host_wdata = data; host_we = 1'b1;
    @(posedge clk); #1 host_we = 1'b0;
  endtask
  task automatic host_read(int addr, output logic [31:0] data);
    host_addr = 16'(addr);
    @(posedge clk); #1 data = host_rdata;
  endtask
  task automatic load_and_run();
    for (int i = 0; i < prog.size(); i++) host_write(i, prog[i]);
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    while (!halted) @(posedge clk);
    #1;
  endtask
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
    else $display("ok   %s = %0d", what, got);
  endtask

  // ------------------------------------------------------------- scenes ---
  logic [7:0] scene [ROWS][COLS];
  bit bin1 [ROWS][COLS], bin2 [ROWS][COLS], win [ROWS][COLS];
  localparam int T_R = ROWS * 5 / 16, T_C = COLS * 9 / 16, T_S = 6;  // target, frame 1
  localparam int D_R = ROWS * 25 / 32, D_C = COLS * 3 / 32;          // distractor

  function automatic bit thr(logic [7:0] v); return v[7:5] >= 3'd5; endfunction

  task automatic make_scene(int tr, int tc, bit distractor);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        scene[r][c] = 8'($urandom_range(0, 8'h5F));
        if (r >= tr && r < tr + T_S && c >= tc && c < tc + T_S) scene[r][c] = 8'($urandom_range(8'hA0, 8'hFF));
        if (distractor && r >= D_R && r < D_R + 4 && c >= D_C && c < D_C + 5) scene[r][c] = 8'hF0;
      end
    scene[tr][tc + T_S] = 8'hC0;   // a bump on the target's edge
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        scene_we = 1'b1; scene_row = RB'(r); scene_col = CB'(c); scene_val = scene[r][c];
        @(posedge clk); #1;
      end
    scene_we = 1'b0;
  endtask

  // input 3 MSBs into mem 0..2, threshold (value >= 0xA0) into mem 3
  task automatic emit_input_threshold();
    for (int b = 0; b < 3; b++) pe(pe_i(PE_MOV, DIR_SELF, PE_ADDR_PIXEL, 5'(b), 1'b1, 1'b0, 3'(5 + b)));
    pe(pe_i(PE_LDA, DIR_SELF, 5'd1, 5'd0, 1'b0));
    pe(pe_i(PE_OR,  DIR_SELF, 5'd0, 5'd0, 1'b0));
    pe(pe_i(PE_AND, DIR_SELF, 5'd2, 5'd3, 1'b1));
  endtask

  // area of memory bit `src` -> M[dst]
  task automatic emit_area(int src, int dst);
    pe(pe_i(PE_NOP, DIR_SELF, 5'(src), 5'd0, 1'b0), 1'b1);
    emit(c_imm(C_LDS, 0));
    emit(c_imm(C_ST, dst));
  endtask

  localparam int D_ONE = 1002, D_ACC = 1020, D_PAT = 2000;

  // build coordinate bit plane k into memory bit `plane` by driving buffer
  // line `line` (holding the pattern at D_PAT) in from the border and shifting
  // it `steps` times in direction `dir`
  task automatic emit_plane(int line, int plane, pe_dir_e dir, int steps);
    int loop;
    for (int w = 0; w < WPL; w++) begin
      emit(c_imm(C_LD, D_PAT + line * WPL + w));
      emit(c_imm(C_BWR, line * WPL + w));
    end
    emit({C_EDGE, 12'h1, 16'(line)});
    emit(c_imm(C_LDI, steps));
    emit(c_imm(C_LDB, D_ONE));
    loop = prog.size();
    emit(c_alu(ALU_SUB));
    pe(pe_i(PE_MOV, dir, 5'(plane), 5'(plane), 1'b1));
    emit({C_BR, 8'h0, BR_NZERO, 16'(loop)});
  endtask

  // sum over k of 2^k * area(window AND plane base+k) -> M[dst]
  task automatic emit_moment(int base, int nbits, int dst);
    emit(c_imm(C_LDI, 0));
    emit(c_imm(C_ST, D_ACC));
    for (int k = nbits - 1; k >= 0; k--) begin
      pe(pe_i(PE_LDA, DIR_SELF, 5'd4, 5'd0, 1'b0));
      pe(pe_i(PE_AND, DIR_SELF, 5'(base + k), 5'd20, 1'b1));
      pe(pe_i(PE_NOP, DIR_SELF, 5'd20, 5'd0, 1'b0), 1'b1);
      emit(c_imm(C_LD, D_ACC));
      emit(c_alu(ALU_SHL));
      emit(c_alu(ALU_MOVB));
      emit(c_imm(C_LDS, 0));
      emit(c_alu(ALU_ADD));
      emit(c_imm(C_ST, D_ACC));
    end
    emit(c_imm(C_LD, D_ACC));
    emit(c_imm(C_ST, dst));
  endtask

  initial begin
    logic [31:0] d;
    int e_area1, e_area2, e_sx, e_sy, e_cnd;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------------------------------------------------- run 1 ---
    make_scene(T_R, T_C, 1'b0);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) bin1[r][c] = thr(scene[r][c]);
    prog = {};
    emit(c_imm(C_FRM, 7));                       // start, wait, latch
    emit_input_threshold();
    pe(pe_i(PE_MOV, DIR_SELF, 5'd3, 5'd4, 1'b1)); // window = target
    emit_area(4, 1000);
    emit({C_HALT, 28'h0});
    load_and_run();
    e_area1 = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) e_area1 += bin1[r][c];
    host_read(1000, d); check("frame 1 area", d, e_area1);
    check("frame transfer clocks", max_busy, COLS * 6);

    // ---------------------------------------------------------- run 2 ---
    make_scene(T_R + 1, T_C + 1, 1'b1);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) bin2[r][c] = thr(scene[r][c]);
    e_area2 = 0; e_sx = 0; e_sy = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        bit d4;
        d4 = bin1[r][c] | (r > 0 && bin1[r-1][c]) | (r < ROWS-1 && bin1[r+1][c])
                        | (c > 0 && bin1[r][c-1]) | (c < COLS-1 && bin1[r][c+1]);
        win[r][c] = d4 & bin2[r][c];
        e_area2 += win[r][c]; e_sx += c * win[r][c]; e_sy += r * win[r][c];
      end
    // coordinate patterns: line k has bit c = c[k]; line CB+k has bit r = r[k]
    host_write(D_ONE, 32'd1);
    for (int k = 0; k < CB; k++)
      for (int w = 0; w < WPL; w++) begin
        logic [31:0] p;
        for (int b = 0; b < 32; b++) p[b] = ((32 * w + b) >> k) & 1;
        host_write(D_PAT + k * WPL + w, p);
      end
    for (int k = 0; k < RB; k++)
      for (int w = 0; w < WPL; w++) begin
        logic [31:0] p;
        for (int b = 0; b < 32; b++) p[b] = ((32 * w + b) >> k) & 1;
        host_write(D_PAT + (CB + k) * WPL + w, p);
      end

    prog = {};
    emit(c_imm(C_FRM, 7));
    emit_input_threshold();
    // self windowing, 6 PE steps
    pe(pe_i(PE_LDA, DIR_SELF,  5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_OR,  DIR_NORTH, 5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_OR,  DIR_EAST,  5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_OR,  DIR_SOUTH, 5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_OR,  DIR_WEST,  5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_AND, DIR_SELF,  5'd3, 5'd4, 1'b1));
    // masked write: mem 5 = 1 only inside the target
    pe(pe_i(PE_LDB, DIR_SELF, 5'd4, 5'd0, 1'b0));
    pe(pe_i(PE_MOV, DIR_SELF, PE_ADDR_ONE, 5'd5, 1'b1, 1'b1));
    emit_area(4, 1001);
    emit_area(5, 1005);
    // coordinate planes: columns in mem 6.., rows in mem 6+CB..
    for (int k = 0; k < CB; k++) emit_plane(k, 6 + k, DIR_NORTH, ROWS);
    for (int k = 0; k < RB; k++) emit_plane(CB + k, 6 + CB + k, DIR_WEST, COLS);
    emit({C_EDGE, 12'h0, 16'd0});                   // stop driving
    emit_moment(6, CB, 1003);
    emit_moment(6 + CB, RB, 1004);
    // capture the row-index bit 0 plane from the X edge into buffer line 15
    emit({C_EDGE, 12'h0, 16'd15});
    pe(pe_i(PE_NOP, DIR_SELF, 5'(6 + CB), 5'd0, 1'b0), 1'b0, 1'b1);
    for (int w = 0; w < WPL; w++) begin
      emit(c_imm(C_BRD, 15 * WPL + w));
      emit(c_imm(C_ST, 1010 + w));
    end
    emit({C_HALT, 28'h0});
    load_and_run();

    host_read(1001, d); check("frame 2 windowed area", d, e_area2);
    host_read(1005, d); check("masked-write area", d, e_area2);
    host_read(1003, d); check("sum of x", d, e_sx);
    host_read(1004, d); check("sum of y", d, e_sy);
    for (int w = 0; w < WPL; w++) begin
      host_read(1010 + w, d); check($sformatf("X edge capture word %0d", w), d, 32'hAAAA_AAAA);
    end
    check("window excludes distractor", (e_area2 > 0 && e_area2 < T_S * T_S + 2) ? 1 : 0, 1);
    $display("target centroid x = %0d / %0d, y = %0d / %0d", e_sx, e_area2, e_sy, e_area2);

    // every mechanism must have happened
    check("frame transfers", n_frames, 2);
    check("shift strobes", n_shift, 2 * COLS);
    check("latch pulses", n_latch, 2);
    check("stall on frame wait", n_stall > 0 ? 1 : 0, 1);
    check("neighbour accesses", n_nbr > 0 ? 1 : 0, 1);
    check("masked writes", n_cnd > 0 ? 1 : 0, 1);
    check("SUM captures", n_sumcap > 0 ? 1 : 0, 1);
    check("edge drive", n_drive > 0 ? 1 : 0, 1);
    check("edge capture", n_capx, 1);
    check("taken branches", n_branch > 0 ? 1 : 0, 1);
    $display("PE instructions %0d, stall clocks %0d, taken branches %0d", n_pe, n_stall, n_branch);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
