// cpv_pkg: types and constants shared by the Column Parallel Vision (CPV) system.
//
// Two instruction sets live here.
//
// * The S3PE instruction is what the controller broadcasts, SIMD style, to every
//   processing element in one cycle. Each instruction fetches one operand bit X
//   (from the PE's own memory-mapped space or from one of its four neighbours),
//   combines it with the A register in a bit-serial ALU, and can write the result
//   to one local-memory bit. The 24-bit local memory, the A/B registers, the
//   bit-serial ALU, the 4-neighbour connection and the memory-mapped pixel input
//   are the architecture's; the field layout, opcodes and address map are this
//   design's own choice.
//
// * The controller instruction is a 32-bit word in the controller's main memory.
//   Its opcodes (PE broadcast, loads/stores, a small accumulator ALU, branches,
//   frame-transfer control, 1D-buffer access) are this design's own choice.
package cpv_pkg;

  // ------------------------------------------------------------------ S3PE ---
  localparam int PE_MEM_BITS = 24;       // local memory per PE, in bits
  localparam int PIX_BITS    = 8;        // ADC gray-scale resolution
  localparam int PE_ADDR_W   = 5;        // memory-mapped address space: 32 bits
  localparam logic [PE_ADDR_W-1:0] PE_ADDR_PIXEL = 5'd24; // pixel input bit
  localparam logic [PE_ADDR_W-1:0] PE_ADDR_ONE   = 5'd25; // constant 1
  // addresses 26..31 read as 0

  typedef enum logic [3:0] {
    PE_NOP  = 4'd0,   // nothing
    PE_LDA  = 4'd1,   // A <= X
    PE_LDB  = 4'd2,   // B <= X
    PE_MOV  = 4'd3,   // R = X
    PE_AND  = 4'd4,   // R = A & X
    PE_OR   = 4'd5,   // R = A | X
    PE_XOR  = 4'd6,   // R = A ^ X
    PE_ANDN = 4'd7,   // R = A & ~X
    PE_NOT  = 4'd8,   // R = ~X
    PE_ADD  = 4'd9,   // R = A ^ X ^ C,  C <= maj(A, X, C)
    PE_SUB  = 4'd10,  // R = A ^ ~X ^ C, C <= maj(A, ~X, C)  (set C first)
    PE_CLC  = 4'd11,  // C <= 0
    PE_SEC  = 4'd12,  // C <= 1
    PE_STC  = 4'd13   // R = C
  } pe_op_e;

  typedef enum logic [2:0] {
    DIR_SELF  = 3'd0,
    DIR_NORTH = 3'd1,  // row - 1
    DIR_EAST  = 3'd2,  // col + 1
    DIR_SOUTH = 3'd3,  // row + 1
    DIR_WEST  = 3'd4   // col - 1
  } pe_dir_e;

  // 22-bit broadcast instruction. Ops that produce R also load A <= R; the
  // result is written to mem[dst] when wm is set, and, if cnd is set, only in
  // PEs whose B register is 1.
  typedef struct packed {
    pe_op_e                 op;    // [21:18]
    pe_dir_e                dir;   // [17:15]
    logic [PE_ADDR_W-1:0]   src;   // [14:10]
    logic [PE_ADDR_W-1:0]   dst;   // [9:5]
    logic                   wm;    // [4]
    logic                   cnd;   // [3]
    logic [2:0]             bsel;  // [2:0] pixel bit read at PE_ADDR_PIXEL
  } pe_instr_t;

  localparam int PE_INSTR_W = $bits(pe_instr_t);

  function automatic logic pe_op_writes_r(pe_op_e op);
    return op inside {PE_MOV, PE_AND, PE_OR, PE_XOR, PE_ANDN, PE_NOT,
                      PE_ADD, PE_SUB, PE_STC};
  endfunction

  // ------------------------------------------------------------ controller ---
  typedef enum logic [3:0] {
    C_NOP  = 4'h0,  // nothing
    C_PEI  = 4'h1,  // broadcast [21:0] to the PE array; [27] capture SUM,
                    // [26] capture X edge, [25] capture Y edge into buffer line
    C_LDI  = 4'h2,  // A <= zero-extended imm16
    C_LD   = 4'h3,  // A <= M[imm16]
    C_ST   = 4'h4,  // M[imm16] <= A
    C_LDB  = 4'h5,  // B <= M[imm16]
    C_ALU  = 4'h6,  // A <= A op B   (op in [3:0], see alu_op_e)
    C_LDS  = 4'h7,  // A <= SUM register
    C_EDGE = 4'h8,  // buffer line <= [4:0]; edge drive enable <= [16]
    C_BRD  = 4'h9,  // A <= buffer word [imm]
    C_BWR  = 4'hA,  // buffer word [imm] <= A
    C_BR   = 4'hB,  // branch to imm16 if condition [19:16] (see br_cond_e)
    C_FRM  = 4'hC,  // frame control: [0] start transfer, [1] wait done, [2] latch
    C_HALT = 4'hD   // stop and signal the host
  } ctrl_op_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SHL  = 4'd5,   // A << 1
    ALU_SHR  = 4'd6,   // A >> 1 (logical)
    ALU_PASB = 4'd7,   // A <= B
    ALU_MOVB = 4'd8    // B <= A (A unchanged)
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_ALWAYS = 4'd0,
    BR_ZERO   = 4'd1,
    BR_NZERO  = 4'd2,
    BR_NEG    = 4'd3
  } br_cond_e;

  // Helpers for writing programs (testbenches and documentation).
  function automatic pe_instr_t pe_i(pe_op_e op, pe_dir_e dir,
                                     logic [PE_ADDR_W-1:0] src,
                                     logic [PE_ADDR_W-1:0] dst,
                                     bit wm, bit cnd = 1'b0,
                                     logic [2:0] bsel = 3'd0);
    pe_instr_t i;
    i.op = op; i.dir = dir; i.src = src; i.dst = dst;
    i.wm = wm; i.cnd = cnd; i.bsel = bsel;
    return i;
  endfunction

  function automatic logic [31:0] c_pei(pe_instr_t i, bit sumcap = 1'b0,
                                        bit capx = 1'b0, bit capy = 1'b0);
    return {C_PEI, sumcap, capx, capy, 3'b000, i};
  endfunction

  function automatic logic [31:0] c_imm(ctrl_op_e op, logic [15:0] imm);
    return {op, 12'h000, imm};
  endfunction

endpackage
