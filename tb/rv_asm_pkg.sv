// rv_asm_pkg: RV32I instruction encoders for the testbenches, so that test
// programs can be written as readable function calls. Also encodes the
// CSR instructions, MRET, WFI and the Siwa clock-gating instructions
// (custom-0 opcode, funct3 0 = CG.OFF, 1 = CG.ON, mask in imm[11:0]).
package rv_asm_pkg;
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1,
                                      input logic [2:0] f3, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], op};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] LUI  (int rd, int imm20);   return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20);   return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] JAL  (int rd, int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BLT (int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] BGE (int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] BLTU(int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b110); endfunction
  function automatic logic [31:0] BGEU(int rs1, int rs2, int off); return b_t(off, rs2, rs1, 3'b111); endfunction
  function automatic logic [31:0] LB (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LH (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b001, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LW (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LBU(int rd, int rs1, int imm); return i_t(imm, rs1, 3'b100, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(int rd, int rs1, int imm); return i_t(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SB (int rs2, int rs1, int imm); return s_t(imm, rs2, rs1, 3'b000, 7'b0100011); endfunction
  function automatic logic [31:0] SH (int rs2, int rs1, int imm); return s_t(imm, rs2, rs1, 3'b001, 7'b0100011); endfunction
  function automatic logic [31:0] SW (int rs2, int rs1, int imm); return s_t(imm, rs2, rs1, 3'b010, 7'b0100011); endfunction
  function automatic logic [31:0] ADDI (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b010, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTIU(int rd, int rs1, int imm); return i_t(imm, rs1, 3'b011, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b100, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI  (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI (int rd, int rs1, int imm); return i_t(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI (int rd, int rs1, int sh);  return i_t(sh, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI (int rd, int rs1, int sh);  return i_t(sh, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI (int rd, int rs1, int sh);  return i_t(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_t(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (int rd, int rs1, int rs2); return r_t(7'h20, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b111, rd, 7'b0110011); endfunction
  function automatic logic [31:0] CSRRW (int rd, logic [11:0] csr, int rs1); return i_t(int'(csr), rs1, 3'b001, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRS (int rd, logic [11:0] csr, int rs1); return i_t(int'(csr), rs1, 3'b010, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRC (int rd, logic [11:0] csr, int rs1); return i_t(int'(csr), rs1, 3'b011, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRWI(int rd, logic [11:0] csr, int zimm); return i_t(int'(csr), zimm, 3'b101, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRSI(int rd, logic [11:0] csr, int zimm); return i_t(int'(csr), zimm, 3'b110, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRCI(int rd, logic [11:0] csr, int zimm); return i_t(int'(csr), zimm, 3'b111, rd, 7'b1110011); endfunction
  function automatic logic [31:0] ECALL(); return 32'h0000_0073; endfunction
  function automatic logic [31:0] MRET();  return 32'h3020_0073; endfunction
  function automatic logic [31:0] WFI();   return 32'h1050_0073; endfunction
  function automatic logic [31:0] NOP();   return 32'h0000_0013; endfunction
  function automatic logic [31:0] CGOFF(int mask); return i_t(mask, 0, 3'b000, 0, 7'b0001011); endfunction
  function automatic logic [31:0] CGON (int mask); return i_t(mask, 0, 3'b001, 0, 7'b0001011); endfunction

  // load a 32-bit constant into rd (two instructions)
  function automatic logic [63:0] LI(int rd, logic [31:0] v);
    logic [31:0] hi = (v + 32'h800) >> 12;
    return {LUI(rd, int'(hi)), ADDI(rd, rd, int'({{20{v[11]}}, v[11:0]}))};
  endfunction
endpackage
