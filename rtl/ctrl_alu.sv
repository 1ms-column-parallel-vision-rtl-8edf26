// ctrl_alu: the controller's 32-bit ALU, between its A and B registers.
//
// The controller uses it to post-process feature values (for example to add
// up bit-plane sums into moments or to compare a value with a threshold). It
// is combinational: y = a op b, with op one of add, subtract, and, or, xor,
// shift a left or right by one, pass b; ALU_MOVB passes a (the controller then
// writes it to B). The ALU sitting between A and B is the architecture's; its
// operation list is this design's own.
module ctrl_alu
  import cpv_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SHL:  y = a << 1;
      ALU_SHR:  y = a >> 1;
      ALU_PASB: y = b;
      default:  y = a;
    endcase
  end

endmodule
