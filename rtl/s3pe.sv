// s3pe: one processing element of the Column Parallel Vision PE array.
//
// The PE follows the S3PE scheme: SIMD control (every PE executes the same
// broadcast instruction), a one-bit (bit-serial) ALU, an A and a B register,
// 24 bits of local memory, memory-mapped I/O and a 4-neighbour connection.
//
// How it works. Each instruction reads one bit, X. The PE first reads its own
// memory-mapped space at instr.src (0..23 local memory, 24 the pixel bit
// instr.bsel of its latched pixel, 25 constant 1, others 0); this bit leaves
// the PE as own_bit, where the four neighbours and the summation circuit see
// it. X is then own_bit or one of the neighbours' own_bit, chosen by instr.dir.
// Because all PEs run the same instruction, a neighbour's own_bit is always
// its bit at the same address. The ALU combines A with X (plus the carry C for
// ADD/SUB); the result R goes back into A and, if instr.wm, into mem[dst]. With
// instr.cnd the write happens only where B = 1, which masks PEs.
//
// Interface and timing. instr/instr_valid are sampled on the rising clock
// edge; own_bit is combinational from instr.src, so a full instruction
// (read, neighbour exchange, ALU, write-back) takes one clock. latch copies the
// pixel held by this PE's stage of the transfer shift register (pix_in) into
// the PE's pixel register, so a new frame can be shifted in while the PE works
// on the previous one. Reset (active low, synchronous) clears everything.
//
// From the source architecture: the register set, the 24-bit memory, the
// bit-serial ALU, 4-neighbour access and memory-mapped pixel input. This
// design's own choices: the instruction fields and opcodes (cpv_pkg), A
// receiving every ALU result, the B-register write mask and the carry flag.
module s3pe
  import cpv_pkg::*;
#(
  parameter int MEM_BITS = PE_MEM_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_instr_t           instr,
  input  logic                instr_valid,
  input  logic                latch,        // take pix_in into the pixel register
  input  logic [PIX_BITS-1:0] pix_in,       // from this PE's shift register stage
  input  logic                nbr_n,        // own_bit of the PE at row-1
  input  logic                nbr_e,        // own_bit of the PE at col+1
  input  logic                nbr_s,        // own_bit of the PE at row+1
  input  logic                nbr_w,        // own_bit of the PE at col-1
  output logic                own_bit       // bit read at instr.src
);

  logic [MEM_BITS-1:0] mem;
  logic [PIX_BITS-1:0] pix;
  logic a_q, b_q, c_q;
  logic x, r, c_next;

  // memory-mapped read of the own address space
  always_comb begin
    if (int'(instr.src) < MEM_BITS)        own_bit = mem[instr.src];
    else if (instr.src == PE_ADDR_PIXEL)   own_bit = pix[instr.bsel];
    else if (instr.src == PE_ADDR_ONE)     own_bit = 1'b1;
    else                                   own_bit = 1'b0;
  end

  // 4-neighbour operand select
  always_comb begin
    unique case (instr.dir)
      DIR_NORTH: x = nbr_n;
      DIR_EAST:  x = nbr_e;
      DIR_SOUTH: x = nbr_s;
      DIR_WEST:  x = nbr_w;
      default:   x = own_bit;
    endcase
  end

  // bit-serial ALU
  always_comb begin
    r      = 1'b0;
    c_next = c_q;
    unique case (instr.op)
      PE_MOV:  r = x;
      PE_AND:  r = a_q & x;
      PE_OR:   r = a_q | x;
      PE_XOR:  r = a_q ^ x;
      PE_ANDN: r = a_q & ~x;
      PE_NOT:  r = ~x;
      PE_ADD: begin
        r      = a_q ^ x ^ c_q;
        c_next = (a_q & x) | (a_q & c_q) | (x & c_q);
      end
      PE_SUB: begin
        r      = a_q ^ ~x ^ c_q;
        c_next = (a_q & ~x) | (a_q & c_q) | (~x & c_q);
      end
      PE_CLC:  c_next = 1'b0;
      PE_SEC:  c_next = 1'b1;
      PE_STC:  r = c_q;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem <= '0;
      pix <= '0;
      a_q <= 1'b0;
      b_q <= 1'b0;
      c_q <= 1'b0;
    end else begin
      if (latch) pix <= pix_in;
      if (instr_valid) begin
        c_q <= c_next;
        if (instr.op == PE_LDA) a_q <= x;
        if (instr.op == PE_LDB) b_q <= x;
        if (pe_op_writes_r(instr.op)) begin
          a_q <= r;
          if (instr.wm && (!instr.cnd || b_q) && int'(instr.dst) < MEM_BITS)
            mem[instr.dst] <= r;
        end
      end
    end
  end

endmodule
