// siwa_alu: the integer ALU of the Siwa RV32I core.
// Purely combinational. Computes add, subtract, shifts, set-less-than
// (signed and unsigned) and the bitwise operations of RV32I; ALU_PASSB
// forwards operand b (used for LUI). The core also uses it for address and
// link computations. Branch comparison is done in the core with the same
// SLT/SLTU/SUB results. Result is valid in the same cycle as the operands.
module siwa_alu
  import siwa_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
