// tb_siwa_decoder: decodes one instruction of each kind (encoded with
// rv_asm_pkg) and checks class, ALU operation, operand selects, immediate,
// register fields and flags; also checks that bad encodings are illegal.
module tb_siwa_decoder;
  import siwa_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] instr;
  dec_t dec;
  siwa_decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic d(logic [31:0] w); instr = w; #1; endtask

  initial begin
    d(ADDI(3, 4, -5));
    c("addi cls", dec.cls, CL_ALU); c("addi op", dec.alu_op, ALU_ADD); c("addi imm", dec.imm, -5);
    c("addi rd", dec.rd, 3); c("addi rs1", dec.rs1, 4); c("addi bimm", dec.b_imm, 1); c("addi we", dec.rd_we, 1);
    d(SUB(1, 2, 3));  c("sub op", dec.alu_op, ALU_SUB); c("sub bimm", dec.b_imm, 0); c("sub rs2", dec.rs2, 3);
    d(SRAI(1, 2, 7)); c("srai op", dec.alu_op, ALU_SRA); c("srai sh", dec.imm[4:0], 7);
    d(SRLI(1, 2, 7)); c("srli op", dec.alu_op, ALU_SRL);
    d(SLTU(1, 2, 3)); c("sltu op", dec.alu_op, ALU_SLTU);
    d(XORI(1, 2, 9)); c("xori op", dec.alu_op, ALU_XOR);
    d(LUI(5, 32'hABCDE)); c("lui asel", dec.a_sel, ASEL_ZERO); c("lui imm", dec.imm, 32'hABCDE000);
    d(AUIPC(5, 1)); c("auipc asel", dec.a_sel, ASEL_PC); c("auipc imm", dec.imm, 32'h1000);
    d(JAL(1, -2048)); c("jal cls", dec.cls, CL_JUMP); c("jal imm", dec.imm, -2048); c("jal jalr", dec.jalr, 0);
    d(JALR(1, 2, 12)); c("jalr flag", dec.jalr, 1); c("jalr imm", dec.imm, 12);
    d(BGEU(1, 2, -16)); c("bgeu cls", dec.cls, CL_BRANCH); c("bgeu imm", dec.imm, -16); c("bgeu f3", dec.funct3, 3'b111); c("bgeu we", dec.rd_we, 0);
    d(LHU(7, 8, 6)); c("lhu cls", dec.cls, CL_LOAD); c("lhu f3", dec.funct3, 3'b101); c("lhu imm", dec.imm, 6);
    d(SB(7, 8, -3)); c("sb cls", dec.cls, CL_STORE); c("sb imm", dec.imm, -3); c("sb we", dec.rd_we, 0);
    d(CSRRSI(4, CSR_MSTATUS, 8)); c("csr flag", dec.is_csr, 1); c("csr zimm", dec.imm, 8); c("csr f3", dec.funct3, 3'b110);
    d(MRET()); c("mret", dec.is_mret, 1); c("mret cls", dec.cls, CL_SYSTEM);
    d(WFI());  c("wfi", dec.is_wfi, 1);
    d(ECALL()); c("ecall", dec.is_ecall, 1);
    d(CGON(12)); c("cgon cls", dec.cls, CL_CGATE); c("cgon on", dec.cg_on, 1); c("cgon mask", dec.imm, 12);
    d(CGOFF(3)); c("cgoff on", dec.cg_on, 0);
    d(32'hFFFF_FFFF); c("illegal", dec.cls, CL_ILLEGAL);
    d(32'h0000_0000); c("zero word illegal", dec.cls, CL_ILLEGAL);
    d(SLLI(1, 2, 3) | 32'h4000_0000); c("bad slli", dec.cls, CL_ILLEGAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
