// tb_ctrl_alu: self-checking test of the controller ALU. Every operation with
// random and corner-case operands, compared with results computed in the
// testbench.
module tb_ctrl_alu;
  import cpv_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  ctrl_alu dut (.*);
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] exp;
      op = alu_op_e'($urandom_range(0, 8));
      a = (n % 7 == 0) ? 32'hFFFF_FFFF : 32'($urandom);
      b = (n % 11 == 0) ? 32'h0 : 32'($urandom);
      case (op)
        ALU_ADD:  exp = 32'(longint'(a) + longint'(b));
        ALU_SUB:  exp = 32'(longint'(a) - longint'(b));
        ALU_AND:  exp = a & b;
        ALU_OR:   exp = a | b;
        ALU_XOR:  exp = a ^ b;
        ALU_SHL:  exp = {a[30:0], 1'b0};
        ALU_SHR:  exp = {1'b0, a[31:1]};
        ALU_PASB: exp = b;
        default:  exp = a;
      endcase
      #1;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op %0d a %h b %h: %h vs %h", op, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
