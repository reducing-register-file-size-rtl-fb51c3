// tb_tsd_alu: exhaustive-by-operation, random-operand test of the integer
// ALU against expressions written in the testbench.
module tb_tsd_alu;
  import tsd_pkg::*;
  op_e op;
  logic [31:0] a, b, imm, y, e;
  int checks = 0, failures = 0;
  tsd_alu dut (.op, .a, .b, .imm, .y);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      op  = op_e'($urandom_range(0, 7));
      a   = $urandom; b = $urandom; imm = $urandom;
      if (n < 8) begin a = 32'hffff_ffff; b = 32'h1; imm = 32'h1; end
      #1;
      case (op)
        OP_ADD:  e = a + b;
        OP_SUB:  e = a - b;
        OP_AND:  e = a & b;
        OP_OR:   e = a | b;
        OP_XOR:  e = a ^ b;
        default: e = a + imm;
      endcase
      if (op == OP_LOAD) continue;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h imm=%h y=%h exp=%h", op.name(), a, b, imm, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
