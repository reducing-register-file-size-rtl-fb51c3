// tsd_alu: integer ALU of the core (one of the eight integer ALUs of the
// configuration). Purely combinational: y is valid in the same cycle as the
// operands, so a result can be broadcast on the bypass and consumed by a
// dependent instruction issued in the next cycle. OP_AGEN computes the
// reference address of a split load (rs1 + imm). The operation set is this
// design's own choice; the ALU itself is only named by the configuration.
module tsd_alu
  import tsd_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  op_e             op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] imm,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (op)
      OP_ADD:           y = a + b;
      OP_SUB:           y = a - b;
      OP_AND:           y = a & b;
      OP_OR:            y = a | b;
      OP_XOR:           y = a ^ b;
      OP_ADDI, OP_AGEN: y = a + imm;
      default:          y = a + imm;   // OP_LOAD never reaches an ALU
    endcase
  end
endmodule
