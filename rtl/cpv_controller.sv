// cpv_controller: the controller of the CPV system. It runs the user program
// held in its main memory, sends SIMD instructions to the PE array, collects
// the summed PE outputs as image feature values, moves 128-bit lines between
// its 1D buffer memory and the PE array's border, drives the PD array's frame
// readout, and shares its main memory with the host DSP network.
//
// Datapath (as in the architecture's controller diagram): PC, IR and decoder;
// accumulator registers A and B around a 32-bit ALU; a SUM register that takes
// the summation circuit's output; a dual-port 32x64k main memory; the 1D buffer
// memory with the PE array's X/Y neighbour I/O; the frame-transfer sequencer.
//
// Program model (this design's own instruction set, see cpv_pkg): 32-bit
// instructions, op in [31:28]. A program starts at address 0 when the host
// pulses start, and runs until HALT, which raises halted. Each instruction
// takes a fetch clock and an execute clock; LD and LDB take one more clock,
// FRM with "wait" stalls in S_WAITF until the frame transfer is over.
//
// PE interface timing: for a PEI instruction, pe_instr/pe_valid are registered
// and valid for exactly one clock, in which the PE array executes it. In that
// same clock the summation result (sum_in) and the PE edge bits (x_edge,
// y_edge) reflect the instruction, and are captured into SUM or the buffer on
// the clock edge that ends it if the instruction asked for it. pe_latch is a
// one-clock pulse from FRM bit 2; if the same FRM also waits, the pulse comes
// when the wait ends, so start+wait+latch in one instruction loads a fresh
// frame into the PEs. x_drive/y_drive are the buffer line chosen by
// the last EDGE instruction, or zero if its drive bit was clear.
//
// Host interface: host_* is port B of the main memory (synchronous, one clock
// read latency). The rest of the protocol (writing the program, pulsing
// start, waiting for halted, reading results) is the host's business.
module cpv_controller
  import cpv_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 128,
  parameter int MAIN_DEPTH = 65536,
  parameter int BUF_LINES  = 16,
  localparam int SUM_W = $clog2(ROWS*COLS + 1),
  localparam int CW    = $clog2(COLS),
  localparam int MAW   = $clog2(MAIN_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host DSP side
  input  logic              start,
  output logic              halted,
  input  logic [MAW-1:0]    host_addr,
  input  logic              host_we,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  // PE array side
  output pe_instr_t         pe_instr,
  output logic              pe_valid,
  output logic              pe_latch,
  output logic              pe_shift,
  input  logic [SUM_W-1:0]  sum_in,
  input  logic [ROWS-1:0]   x_edge,
  input  logic [COLS-1:0]   y_edge,
  output logic [ROWS-1:0]   x_drive,
  output logic [COLS-1:0]   y_drive,
  // PD array side
  output logic [CW-1:0]     pd_col_sel,
  output logic              pd_conv_start,
  input  logic              pd_conv_done,
  // status
  output logic              frame_busy,
  output logic              stall
);

  localparam int EDGE_MAX = (ROWS > COLS) ? ROWS : COLS;
  localparam int BW  = ((EDGE_MAX + 31) / 32) * 32;   // buffer line width
  localparam int LW  = $clog2(BUF_LINES);
  localparam int BAW = $clog2(BUF_LINES * BW / 32);

  typedef enum logic [2:0] {S_HALT, S_FETCH, S_EXEC, S_MEM, S_WAITF} state_e;
  state_e state;

  logic [MAW-1:0] pc;
  logic [31:0]    ir_q;
  logic [31:0]    a_q, b_q;
  logic [SUM_W-1:0] sum_q;
  logic [LW-1:0]  line_q;
  logic           drive_q;
  logic           sumcap_q, capx_q, capy_q;

  logic [MAW-1:0] mem_addr;
  logic           mem_we;
  logic [31:0]    mem_rdata;

  // ---------------------------------------------------------------- decode ---
  logic [31:0]    ir;
  ctrl_op_e       op;
  logic [15:0]    imm;
  assign ir  = (state == S_EXEC) ? mem_rdata : ir_q;
  assign op  = ctrl_op_e'(ir[31:28]);
  assign imm = ir[15:0];

  // ----------------------------------------------------------- main memory ---
  always_comb begin
    mem_addr = pc;
    mem_we   = 1'b0;
    if (state == S_EXEC && op inside {C_LD, C_LDB, C_ST}) mem_addr = MAW'(imm);
    if (state == S_EXEC && op == C_ST) mem_we = 1'b1;
  end

  main_memory #(.WIDTH(32), .DEPTH(MAIN_DEPTH)) u_main (
    .clk,
    .a_addr(mem_addr), .a_we(mem_we), .a_wdata(a_q), .a_rdata(mem_rdata),
    .b_addr(host_addr), .b_we(host_we), .b_wdata(host_wdata), .b_rdata(host_rdata)
  );

  // ------------------------------------------------------------------ ALU ---
  logic [31:0] alu_y;
  ctrl_alu u_alu (.op(alu_op_e'(ir[3:0])), .a(a_q), .b(b_q), .y(alu_y));

  // ------------------------------------------------------ 1D buffer memory ---
  logic [31:0] buf_rdata;
  logic [BW-1:0] x_edge_w, y_edge_w, x_drv_w, y_drv_w;
  assign x_edge_w = BW'(x_edge);
  assign y_edge_w = BW'(y_edge);
  assign x_drive  = x_drv_w[ROWS-1:0];
  assign y_drive  = y_drv_w[COLS-1:0];

  buffer_memory_1d #(.LINES(BUF_LINES), .WIDTH(BW)) u_buf (
    .clk, .rst_n,
    .line_sel (line_q),
    .cap_x    (pe_valid && capx_q),
    .cap_y    (pe_valid && capy_q),
    .x_edge   (x_edge_w),
    .y_edge   (y_edge_w),
    .drive_en (drive_q),
    .x_drive  (x_drv_w),
    .y_drive  (y_drv_w),
    .bus_addr (BAW'(imm)),
    .bus_we   (state == S_EXEC && op == C_BWR),
    .bus_wdata(a_q),
    .bus_rdata(buf_rdata)
  );

  // ------------------------------------------------ frame-transfer control ---
  logic frame_start;
  assign frame_start = (state == S_EXEC) && (op == C_FRM) && ir[0];

  frame_sync #(.COLS(COLS)) u_sync (
    .clk, .rst_n,
    .start        (frame_start),
    .busy         (frame_busy),
    .ready        (),
    .pd_col_sel,
    .pd_conv_start,
    .pd_conv_done,
    .shift        (pe_shift)
  );

  // -------------------------------------------------------------- control ---
  logic branch_taken;
  always_comb begin
    unique case (br_cond_e'(ir[19:16]))
      BR_ALWAYS: branch_taken = 1'b1;
      BR_ZERO:   branch_taken = (a_q == '0);
      BR_NZERO:  branch_taken = (a_q != '0);
      BR_NEG:    branch_taken = a_q[31];
      default:   branch_taken = 1'b0;
    endcase
  end

  assign halted = (state == S_HALT);
  assign stall  = (state == S_WAITF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_HALT;
      pc       <= '0;
      ir_q     <= '0;
      a_q      <= '0;
      b_q      <= '0;
      sum_q    <= '0;
      line_q   <= '0;
      drive_q  <= 1'b0;
      pe_instr <= '0;
      pe_valid <= 1'b0;
      pe_latch <= 1'b0;
      sumcap_q <= 1'b0;
      capx_q   <= 1'b0;
      capy_q   <= 1'b0;
    end else begin
      pe_valid <= 1'b0;
      pe_latch <= 1'b0;
      if (pe_valid && sumcap_q) sum_q <= sum_in;

      unique case (state)
        S_HALT: if (start) begin
          pc    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_EXEC;
        S_EXEC: begin
          ir_q  <= mem_rdata;
          pc    <= pc + 1'b1;
          state <= S_FETCH;
          unique case (op)
            C_PEI: begin
              pe_instr <= pe_instr_t'(ir[PE_INSTR_W-1:0]);
              pe_valid <= 1'b1;
              sumcap_q <= ir[27];
              capx_q   <= ir[26];
              capy_q   <= ir[25];
            end
            C_LDI:  a_q <= 32'(imm);
            C_LD, C_LDB: state <= S_MEM;
            C_ALU: begin
              if (alu_op_e'(ir[3:0]) == ALU_MOVB) b_q <= a_q;
              else                                a_q <= alu_y;
            end
            C_LDS:  a_q <= 32'(sum_q);
            C_EDGE: begin
              line_q  <= LW'(ir[4:0]);
              drive_q <= ir[16];
            end
            C_BRD:  a_q <= buf_rdata;
            C_BR:   if (branch_taken) pc <= MAW'(imm);
            C_FRM: begin
              if (ir[2] && !ir[1]) pe_latch <= 1'b1;
              if (ir[1]) state <= S_WAITF;
            end
            C_HALT: state <= S_HALT;
            default: ;
          endcase
        end
        S_MEM: begin
          if (ctrl_op_e'(ir_q[31:28]) == C_LDB) b_q <= mem_rdata;
          else                                  a_q <= mem_rdata;
          state <= S_FETCH;
        end
        S_WAITF: if (!frame_busy) begin
          state <= S_FETCH;
          if (ir_q[2]) pe_latch <= 1'b1;   // latch after the wait
        end
        default: state <= S_HALT;
      endcase
    end
  end

  // A PE instruction is broadcast for exactly one clock.
  a_pe_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                               pe_valid |=> !pe_valid);

endmodule
