// siwa_prog_pkg: the test program that the SoC and chip testbenches place
// in the boot flash. Memory map and CSR numbers as in siwa_pkg.
//   0x000 main : clears the event registers x25/x26, sets up UART (8
//                clocks/bit), trap vector, interrupt enables;
//                GPIO out/oe and sends the GPIO input byte; programs the HV
//                interface (src = snk = 0x40, trim 33, LS = 1010, both on);
//                turns the HV clock off, tries to overwrite the source code,
//                turns it on again and sends the source code back (0x40);
//                sends 'a'..'h' (fills the UART transmit FIFO); runs the
//                timer until 3 timer interrupts; sends 'R'; sleeps (WFI)
//                until the SPI-receive (after sending one SPI byte),
//                external-pin, comparator and UART-receive interrupts
//                have all been served; executes ECALL; sends 'D'.
//   0x200 putc : waits while the UART transmit FIFO is full, sends x10.
//   0x280 trap : ECALL sends 'T'; interrupts: timer counts in x25, external
//                pin sends 'E', comparator sends 'C', an SPI byte is read
//                and dropped (x26 bit 3), a received UART byte
//                is echoed plus one.
// Expected UART output: gpio_i, 40, 61..68, 'R', then the events in the
// order the testbench causes them, then 'T', 'D'.
package siwa_prog_pkg;
  import siwa_pkg::*;
  import rv_asm_pkg::*;

  localparam int PUTC    = 32'h200;
  localparam int HANDLER = 32'h280;
  localparam int IMG_WORDS = 256;

  function automatic void build(output logic [31:0] img [IMG_WORDS]);
    int pc;
    logic [63:0] li;
    for (int i = 0; i < IMG_WORDS; i++) img[i] = NOP();
    pc = 0;
    `define E(w) begin img[pc/4] = (w); pc += 4; end
    `define CALLPUTC `E(JAL(1, PUTC - pc))
    `E(LUI(28, 32'h80000))
    `E(ADDI(25, 0, 0)) `E(ADDI(26, 0, 0))  // event counters start at zero
    `E(ADDI(5, 0, 8)) `E(SW(5, 28, 12))
    li = LI(6, HANDLER); `E(li[63:32]) `E(li[31:0])
    `E(CSRRW(0, CSR_MTVEC, 6))
    `E(ADDI(5, 0, 32'h1D)) `E(CSRRW(0, CSR_IRQ_EN, 5))
    `E(ADDI(5, 0, 1)) `E(SLLI(5, 5, 11)) `E(CSRRS(0, CSR_MIE, 5)) `E(CSRRSI(0, CSR_MSTATUS, 8))
    // GPIO
    `E(ADDI(5, 0, 255)) `E(CSRRW(0, CSR_GPIO_OE, 5))
    `E(ADDI(5, 0, 32'hA5)) `E(CSRRW(0, CSR_GPIO_OUT, 5))
    `E(CSRRS(10, CSR_GPIO_IN, 0)) `CALLPUTC
    // HV stimulation interface
    `E(ADDI(5, 0, 32'h40)) `E(CSRRW(0, CSR_HV_SRC, 5)) `E(CSRRW(0, CSR_HV_SNK, 5))
    `E(ADDI(5, 0, 33)) `E(CSRRW(0, CSR_HV_TRIM, 5))
    `E(ADDI(5, 0, 10)) `E(CSRRW(0, CSR_HV_LS, 5))
    `E(CSRRWI(0, CSR_HV_CTRL, 3))
    // clock gating of the HV interface
    `E(CGOFF(1 << CG_HV)) `E(ADDI(5, 0, 32'h7F)) `E(CSRRW(0, CSR_HV_SRC, 5)) `E(CGON(1 << CG_HV))
    `E(CSRRS(10, CSR_HV_SRC, 0)) `CALLPUTC
    // 'a'..'h'
    `E(ADDI(10, 0, 32'h61)) `E(ADDI(7, 0, 8))
    `CALLPUTC `E(ADDI(10, 10, 1)) `E(ADDI(7, 7, -1)) `E(BNE(7, 0, -12))
    // timer
    `E(ADDI(5, 0, 300)) `E(CSRRW(0, CSR_TMR_CMP, 5)) `E(CSRRWI(0, CSR_TMR_CTRL, 1))
    `E(WFI()) `E(ADDI(5, 0, 3)) `E(BLT(25, 5, -8))
    `E(CSRRWI(0, CSR_TMR_CTRL, 0))
    `E(ADDI(10, 0, 32'h52)) `CALLPUTC
    // wait for external pin, comparator and UART receive
    // one SPI byte exchange: its receive interrupt sets x26 bit 3
    `E(ADDI(5, 0, 32'h1F)) `E(CSRRW(0, CSR_IRQ_EN, 5))
    `E(ADDI(5, 0, 32'hA7)) `E(SW(5, 28, 32'h100))
    `E(WFI()) `E(ADDI(5, 0, 15)) `E(BNE(26, 5, -8))
    `E(ECALL())
    `E(ADDI(10, 0, 32'h44)) `CALLPUTC
    `E(JAL(0, 0))
    if (pc > PUTC) $fatal(1, "main too long");
    // putc
    pc = PUTC;
    `E(LW(29, 28, 8)) `E(ANDI(29, 29, 1)) `E(BNE(29, 0, -8)) `E(SW(10, 28, 0)) `E(JALR(0, 1, 0))
    // trap handler
    pc = HANDLER;
    `E(ADD(11, 1, 0)) `E(ADD(12, 10, 0)) `E(ADD(13, 29, 0))
    `E(CSRRS(14, CSR_MCAUSE, 0))
    `E(BLT(14, 0, 40))
    `E(ADDI(10, 0, 32'h54)) `CALLPUTC
    `E(CSRRS(15, CSR_MEPC, 0)) `E(ADDI(15, 15, 4)) `E(CSRRW(0, CSR_MEPC, 15))
    `E(ADD(1, 11, 0)) `E(ADD(10, 12, 0)) `E(ADD(29, 13, 0)) `E(MRET())
    // interrupts
    `E(CSRRS(14, CSR_IRQ_PEND, 0)) `E(CSRRW(0, CSR_IRQ_PEND, 14))
    `E(ANDI(15, 14, 4))  `E(BEQ(15, 0, 8))  `E(ADDI(25, 25, 1))
    `E(ANDI(15, 14, 8))  `E(BEQ(15, 0, 16)) `E(ORI(26, 26, 2)) `E(ADDI(10, 0, 32'h45)) `CALLPUTC
    `E(ANDI(15, 14, 16)) `E(BEQ(15, 0, 16)) `E(ORI(26, 26, 4)) `E(ADDI(10, 0, 32'h43)) `CALLPUTC
    `E(ANDI(15, 14, 2))  `E(BEQ(15, 0, 12)) `E(LW(15, 28, 32'h104)) `E(ORI(26, 26, 8))
    `E(ANDI(15, 14, 1))  `E(BEQ(15, 0, 20)) `E(LW(10, 28, 4)) `E(ADDI(10, 10, 1)) `E(ORI(26, 26, 1)) `CALLPUTC
    `E(ADD(1, 11, 0)) `E(ADD(10, 12, 0)) `E(ADD(29, 13, 0)) `E(MRET())
    `undef E
    `undef CALLPUTC
  endfunction
endpackage
