// tb_siwa_core: self-checking test of the multicycle RV32I core.
// The core runs a program against a memory model with the same timing as
// the SRAM path (ready one cycle after the request). The program exercises
// every ALU operation, loads and stores of all sizes, all branch kinds,
// JAL/JALR, internal and external CSRs, ECALL, an illegal instruction, an
// external interrupt taken from WFI, the timer and the clock-gating
// instructions. Results are stored to memory and compared with values
// computed here. Cycle counts: 4 cycles per ALU instruction, 6 per load.
module tb_siwa_core;
  import siwa_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        mem_req, mem_we, mem_ready;
  logic [3:0]  mem_be;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        csr_we, csr_re;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic        irq, timer_tick, instr_done;
  logic [NCG-1:0] cg_en;

  siwa_core dut (.*);

  // memory model
  logic [31:0] mem [1024];
  logic        busy;
  always_ff @(posedge clk) begin
    mem_ready <= 1'b0;
    if (mem_req && !mem_ready && !busy) begin
      busy <= 1'b1;
      if (mem_we) for (int b = 0; b < 4; b++)
        if (mem_be[b]) mem[mem_addr[11:2]][8*b +: 8] <= mem_wdata[8*b +: 8];
      mem_rdata <= mem[mem_addr[11:2]];
      mem_ready <= 1'b1;
    end else busy <= 1'b0;
  end

  // external CSR model: one register at CSR_GPIO_OUT; writing CSR_IRQ_PEND clears irq
  logic [31:0] ext_reg = 32'h0;
  assign csr_rdata = (csr_addr == CSR_GPIO_OUT) ? ext_reg : 32'h0;
  always_ff @(posedge clk) begin
    if (csr_we && csr_addr == CSR_GPIO_OUT) ext_reg <= csr_wdata;
    if (csr_we && csr_addr == CSR_IRQ_PEND) irq <= 1'b0;
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int pc;
  task automatic emit(input logic [31:0] w);
    mem[pc/4] = w;
    pc += 4;
  endtask
  task automatic emit_li(input int rd, input logic [31:0] v);
    logic [63:0] p = LI(rd, v);
    emit(p[63:32]);
    emit(p[31:0]);
  endtask

  localparam int HANDLER = 32'h300;
  localparam logic [31:0] A = 32'h1234_5678, B = 32'hFFFF_FF80;
  int jal_pc, auipc_pc, jalr_tgt, wfi_pc;

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = NOP();
    irq = 0;
    pc = 0;
    emit_li(1, A);                          // 0x00
    emit_li(2, B);
    emit(ADD(3, 1, 2));   emit(SW(3, 0, 32'h400));
    emit(SUB(3, 1, 2));   emit(SW(3, 0, 32'h404));
    emit(AND(3, 1, 2));   emit(SW(3, 0, 32'h408));
    emit(OR(3, 1, 2));    emit(SW(3, 0, 32'h40C));
    emit(XOR(3, 1, 2));   emit(SW(3, 0, 32'h410));
    emit(SLT(3, 2, 1));   emit(SW(3, 0, 32'h414));
    emit(SLTU(3, 2, 1));  emit(SW(3, 0, 32'h418));
    emit(SLLI(3, 1, 5));  emit(SW(3, 0, 32'h41C));
    emit(SRAI(3, 2, 3));  emit(SW(3, 0, 32'h420));
    emit(SRLI(3, 2, 3));  emit(SW(3, 0, 32'h424));
    emit(ADDI(5, 0, 7));
    emit(SLL(3, 1, 5));   emit(SW(3, 0, 32'h428));
    emit(SRA(3, 2, 5));   emit(SW(3, 0, 32'h42C));
    emit(SRL(3, 2, 5));   emit(SW(3, 0, 32'h430));
    emit(SLTI(3, 2, -1)); emit(SW(3, 0, 32'h434));
    emit(SLTIU(3, 2, 5)); emit(SW(3, 0, 32'h438));
    emit(XORI(3, 1, -1)); emit(SW(3, 0, 32'h43C));
    emit(ORI(3, 1, 32'h0F0)); emit(SW(3, 0, 32'h440));
    emit(ANDI(3, 1, 32'h0F0)); emit(SW(3, 0, 32'h444));
    emit(LUI(3, 32'hABCDE)); emit(SW(3, 0, 32'h448));
    auipc_pc = pc;
    emit(AUIPC(3, 1));    emit(SW(3, 0, 32'h44C));
    emit(SW(0, 0, 32'h450)); emit(SB(1, 0, 32'h451));
    emit(SW(0, 0, 32'h454)); emit(SH(1, 0, 32'h456));
    emit(LB(3, 0, 32'h451)); emit(SW(3, 0, 32'h458));
    emit(SB(2, 0, 32'h45C));
    emit(LB(3, 0, 32'h45C)); emit(SW(3, 0, 32'h460));
    emit(LBU(3, 0, 32'h45C)); emit(SW(3, 0, 32'h464));
    emit(SH(2, 0, 32'h468));
    emit(LH(3, 0, 32'h468)); emit(SW(3, 0, 32'h46C));
    emit(LHU(3, 0, 32'h468)); emit(SW(3, 0, 32'h470));
    // branches: a taken branch skips an add of 100, a fall-through adds 1
    emit(ADDI(6, 0, 0));
    emit(BEQ(1, 1, 8));  emit(ADDI(6, 6, 100));
    emit(BNE(1, 1, 8));  emit(ADDI(6, 6, 1));
    emit(BLT(2, 1, 8));  emit(ADDI(6, 6, 100));
    emit(BGE(2, 1, 8));  emit(ADDI(6, 6, 1));
    emit(BLTU(1, 2, 8)); emit(ADDI(6, 6, 100));
    emit(BGEU(1, 2, 8)); emit(ADDI(6, 6, 1));
    emit(BGE(1, 2, 8));  emit(ADDI(6, 6, 100));
    emit(BNE(1, 2, 8));  emit(ADDI(6, 6, 100));
    emit(SW(6, 0, 32'h474));
    jal_pc = pc;
    emit(JAL(7, 8));     emit(ADDI(6, 6, 100));
    emit(SW(7, 0, 32'h478));
    jalr_tgt = pc + 16;
    emit_li(8, jalr_tgt);
    emit(JALR(9, 8, 0)); emit(ADDI(6, 6, 100));
    emit(SW(9, 0, 32'h47C)); emit(SW(6, 0, 32'h4A0));
    // external and internal CSRs
    emit(ADDI(10, 0, 32'h55));
    emit(CSRRW(11, CSR_GPIO_OUT, 10));
    emit(CSRRSI(12, CSR_GPIO_OUT, 2));
    emit(CSRRS(12, CSR_GPIO_OUT, 0)); emit(SW(12, 0, 32'h480));
    emit(ADDI(20, 0, 32'h484));
    emit_li(13, HANDLER);
    emit(CSRRW(0, CSR_MTVEC, 13));
    emit(CSRRS(14, CSR_MTVEC, 0)); emit(SW(14, 0, 32'h4A4));
    // traps
    emit(ECALL());
    emit(32'hFFFF_FFFF);                    // illegal
    // interrupts
    emit(ADDI(16, 0, 1)); emit(SLLI(16, 16, 11));
    emit(CSRRS(0, CSR_MIE, 16));
    emit(CSRRSI(0, CSR_MSTATUS, 8));
    wfi_pc = pc;
    emit(WFI());
    // timer and clock gating
    emit(ADDI(21, 0, 10));
    emit(CSRRW(0, CSR_TMR_CMP, 21));
    emit(CSRRWI(0, CSR_TMR_CTRL, 1));
    emit(CGOFF(3));
    emit(CGON(1));
    emit(CSRRS(22, CSR_CGATE, 0)); emit(SW(22, 0, 32'h4A8));
    emit(CSRRS(23, CSR_MINSTRET, 0)); emit(SW(23, 0, 32'h4AC));
    emit(ADDI(24, 0, 1)); emit(SW(24, 0, 32'h4FC));
    emit(JAL(0, 0));
    if (pc > HANDLER) $fatal(1, "program overlaps handler");
    // trap handler: log mcause; for exceptions skip the instruction
    pc = HANDLER;
    emit(CSRRS(14, CSR_MCAUSE, 0));
    emit(SW(14, 20, 0)); emit(ADDI(20, 20, 4));
    emit(BLT(14, 0, 20));
    emit(CSRRS(15, CSR_MEPC, 0)); emit(ADDI(15, 15, 4)); emit(CSRRW(0, CSR_MEPC, 15));
    emit(MRET());
    emit(CSRRS(15, CSR_MEPC, 0)); emit(SW(15, 0, 32'h4B0));
    emit(CSRRW(0, CSR_IRQ_PEND, 0));
    emit(MRET());
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // cycle measurements and event counts
  logic irq_req = 0, irq_fired = 0;
  int cyc = 0, last_done = -1, n_done = 0, ticks = 0, last_tick = -1, tick_period = 0;
  int gap [64];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (instr_done) begin
      if (n_done < 64 && last_done >= 0) gap[n_done] = cyc - last_done;
      last_done = cyc;
      n_done++;
    end
    if (timer_tick) begin
      if (last_tick >= 0) tick_period = cyc - last_tick;
      last_tick = cyc;
      ticks++;
    end
    if (dut.state == 2'd2 && dut.ir == WFI() && !irq && !irq_fired) begin irq_req = 1; irq_fired = 1; end
  end
  always @(posedge clk) if (irq_req && !irq) begin
    repeat (5) @(posedge clk);
    irq <= 1'b1;
    irq_req = 0;
  end

  initial begin
    automatic logic [31:0] exp;
    wait (rst_n);
    fork
      wait (mem[32'h4FC/4] == 32'd1);
      begin repeat (5000) @(posedge clk); end
    join_any
    repeat (40) @(posedge clk);
    check("done marker", mem[32'h4FC/4], 1);
    check("ADD", mem[32'h400/4], A + B);
    check("SUB", mem[32'h404/4], A - B);
    check("AND", mem[32'h408/4], A & B);
    check("OR",  mem[32'h40C/4], A | B);
    check("XOR", mem[32'h410/4], A ^ B);
    check("SLT", mem[32'h414/4], 1);
    check("SLTU", mem[32'h418/4], 0);
    check("SLLI", mem[32'h41C/4], A << 5);
    check("SRAI", mem[32'h420/4], 32'($signed(B) >>> 3));
    check("SRLI", mem[32'h424/4], B >> 3);
    check("SLL", mem[32'h428/4], A << 7);
    check("SRA", mem[32'h42C/4], 32'($signed(B) >>> 7));
    check("SRL", mem[32'h430/4], B >> 7);
    check("SLTI", mem[32'h434/4], 1);
    check("SLTIU", mem[32'h438/4], 0);
    check("XORI", mem[32'h43C/4], ~A);
    check("ORI", mem[32'h440/4], A | 32'h0F0);
    check("ANDI", mem[32'h444/4], A & 32'h0F0);
    check("LUI", mem[32'h448/4], 32'hABCDE000);
    check("AUIPC", mem[32'h44C/4], auipc_pc + 32'h1000);
    check("SB", mem[32'h450/4], {16'h0, A[7:0], 8'h0});
    check("SH", mem[32'h454/4], {A[15:0], 16'h0});
    check("LB+", mem[32'h458/4], 32'h78);
    check("LB-", mem[32'h460/4], 32'hFFFF_FF80);
    check("LBU", mem[32'h464/4], 32'h80);
    check("LH", mem[32'h46C/4], 32'hFFFF_FF80);
    check("LHU", mem[32'h470/4], 32'h0000_FF80);
    check("branches", mem[32'h474/4], 3);
    check("JAL link", mem[32'h478/4], jal_pc + 4);
    check("JALR link", mem[32'h47C/4], jalr_tgt - 4);
    check("no skipped instr executed", mem[32'h4A0/4], 3);
    check("ext CSR read-modify", mem[32'h480/4], 32'h57);
    check("mtvec", mem[32'h4A4/4], HANDLER);
    check("mcause ecall", mem[32'h484/4], 11);
    check("mcause illegal", mem[32'h488/4], 2);
    check("mcause interrupt", mem[32'h48C/4], 32'h8000_000B);
    check("mepc interrupt", mem[32'h4B0/4], wfi_pc + 4);
    check("clock enables", mem[32'h4A8/4], 32'b111101);
    check("cg_en port", 32'(cg_en), 32'b111101);
    check("timer ticked", 32'(ticks > 2), 1);
    check("timer period", tick_period, 11);
    // ALU instructions take 4 cycles, loads and stores 6
    check("CPI of LUI", gap[1], 4);
    check("CPI of ADDI", gap[2], 4);
    check("CPI of ADD", gap[4], 4);
    check("CPI of SW", gap[5], 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
