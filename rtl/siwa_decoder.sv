// siwa_decoder: instruction decoder of the Siwa RV32I core.
// Combinational. Splits a 32-bit instruction into a control word (dec_t):
// instruction class, ALU operation and operand selects, sign-extended
// immediate, register numbers and flags for CSR access, MRET, ECALL/EBREAK,
// WFI and the two custom clock-gating instructions. Anything it does not
// recognise is class CL_ILLEGAL, which the core turns into a trap.
// Supported: all RV32I (LUI, AUIPC, JAL, JALR, branches, loads, stores,
// register-immediate and register-register ALU ops, FENCE as a no-op,
// ECALL, EBREAK), the six Zicsr instructions, MRET and WFI.
// Custom instructions (opcode custom-0 = 0001011, I-type layout):
//   CG.OFF mask  (funct3 = 000): clear clock-enable bits given by imm[5:0]
//   CG.ON  mask  (funct3 = 001): set   clock-enable bits given by imm[5:0]
// The clock-gating instructions exist in the original core; their encoding
// here is this design's own.
module siwa_decoder
  import siwa_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'b0};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  function automatic alu_op_e f3_to_op(input logic [2:0] f, input logic alt, input logic regop);
    unique case (f)
      3'b000: return (regop && alt) ? ALU_SUB : ALU_ADD;
      3'b001: return ALU_SLL;
      3'b010: return ALU_SLT;
      3'b011: return ALU_SLTU;
      3'b100: return ALU_XOR;
      3'b101: return alt ? ALU_SRA : ALU_SRL;
      3'b110: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    dec        = '0;
    dec.cls    = CL_ILLEGAL;
    dec.alu_op = ALU_ADD;
    dec.a_sel  = ASEL_RS1;
    dec.rd     = instr[11:7];
    dec.rs1    = instr[19:15];
    dec.rs2    = instr[24:20];
    dec.funct3 = f3;
    unique case (opc)
      7'b0110111: begin // LUI
        dec.cls = CL_ALU; dec.a_sel = ASEL_ZERO; dec.b_imm = 1'b1; dec.imm = imm_u; dec.rd_we = 1'b1;
      end
      7'b0010111: begin // AUIPC
        dec.cls = CL_ALU; dec.a_sel = ASEL_PC; dec.b_imm = 1'b1; dec.imm = imm_u; dec.rd_we = 1'b1;
      end
      7'b1101111: begin // JAL
        dec.cls = CL_JUMP; dec.imm = imm_j; dec.rd_we = 1'b1;
      end
      7'b1100111: if (f3 == 3'b000) begin // JALR
        dec.cls = CL_JUMP; dec.imm = imm_i; dec.rd_we = 1'b1; dec.jalr = 1'b1;
      end
      7'b1100011: if (f3 != 3'b010 && f3 != 3'b011) begin // branches
        dec.cls = CL_BRANCH; dec.imm = imm_b;
      end
      7'b0000011: if (f3 == 3'b000 || f3 == 3'b001 || f3 == 3'b010 || f3 == 3'b100 || f3 == 3'b101) begin
        dec.cls = CL_LOAD; dec.b_imm = 1'b1; dec.imm = imm_i; dec.rd_we = 1'b1;
      end
      7'b0100011: if (f3 <= 3'b010) begin // stores
        dec.cls = CL_STORE; dec.b_imm = 1'b1; dec.imm = imm_s;
      end
      7'b0010011: begin // OP-IMM
        if (f3 == 3'b001 && f7 != 7'b0) dec.cls = CL_ILLEGAL;
        else if (f3 == 3'b101 && f7 != 7'b0 && f7 != 7'b0100000) dec.cls = CL_ILLEGAL;
        else begin
          dec.cls = CL_ALU; dec.b_imm = 1'b1; dec.imm = imm_i; dec.rd_we = 1'b1;
          dec.alu_op = f3_to_op(f3, instr[30], 1'b0);
        end
      end
      7'b0110011: if (f7 == 7'b0 || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101))) begin
        dec.cls = CL_ALU; dec.rd_we = 1'b1;
        dec.alu_op = f3_to_op(f3, instr[30], 1'b1);
      end
      7'b0001111: begin // FENCE / FENCE.I: nothing to order in this core
        dec.cls = CL_ALU; dec.rd = 5'd0;
      end
      7'b1110011: begin // SYSTEM
        if (f3 == 3'b000) begin
          if (instr == 32'h0000_0073 || instr == 32'h0010_0073) begin
            dec.cls = CL_SYSTEM; dec.is_ecall = 1'b1;
          end else if (instr == 32'h3020_0073) begin
            dec.cls = CL_SYSTEM; dec.is_mret = 1'b1;
          end else if (instr == 32'h1050_0073) begin
            dec.cls = CL_SYSTEM; dec.is_wfi = 1'b1;
          end
        end else if (f3 != 3'b100) begin
          dec.cls = CL_SYSTEM; dec.is_csr = 1'b1; dec.rd_we = 1'b1;
          dec.imm = {27'b0, instr[19:15]};
        end
      end
      OPC_CUSTOM0: if (f3 == 3'b000 || f3 == 3'b001) begin
        dec.cls = CL_CGATE; dec.imm = imm_i; dec.cg_on = f3[0];
      end
      default: ;
    endcase
  end
endmodule
