// siwa_pkg: types and constants shared by the Siwa SoC modules.
// Holds the ALU operation codes, the decoded-instruction control word, the
// packet format of the central peripheral bus, the CSR map (standard
// machine-mode CSRs plus the custom CSRs that reach GPIO, HV stimulator,
// interrupt handler and timer) and the memory map. The packet format, CSR
// numbers and memory map are this design's own choices; the ISA (RV32I) and
// the split into these units follow the Siwa block diagram.
package siwa_pkg;

  // ---------------- ALU ----------------
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  // ---------------- decoder ----------------
  typedef enum logic [2:0] {
    CL_ALU, CL_LOAD, CL_STORE, CL_BRANCH, CL_JUMP, CL_SYSTEM, CL_CGATE, CL_ILLEGAL
  } iclass_e;

  typedef enum logic [1:0] { ASEL_RS1, ASEL_PC, ASEL_ZERO } asel_e;

  typedef struct packed {
    iclass_e     cls;
    alu_op_e     alu_op;
    asel_e       a_sel;
    logic        b_imm;      // ALU operand b is the immediate
    logic [31:0] imm;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        rd_we;
    logic [2:0]  funct3;     // branch condition, load/store size, CSR op
    logic        jalr;       // jump target from rs1
    logic        is_csr;
    logic        is_mret;
    logic        is_ecall;   // ECALL/EBREAK (trap)
    logic        is_wfi;
    logic        cg_on;      // custom clock-gate instruction: set (1) / clear (0)
  } dec_t;

  // ---------------- memory map ----------------
  localparam logic [31:0] SRAM_BASE = 32'h0000_0000;
  localparam logic [31:0] IO_BASE   = 32'h8000_0000;   // packet-bus devices
  // device number in address bits [11:8], register in [5:2]

  // ---------------- packet bus ----------------
  localparam int DEV_UART = 0;
  localparam int DEV_SPI  = 1;

  typedef struct packed {
    logic [1:0]  dev;
    logic        wr;
    logic [3:0]  regn;
    logic [31:0] data;
  } pkt_req_t;

  typedef struct packed {
    logic [1:0]  dev;
    logic        err;        // no such device
    logic [31:0] data;
  } pkt_rsp_t;

  // peripheral register numbers (same layout for UART and SPI)
  localparam logic [3:0] REG_DATA   = 4'd0;  // write: queue a byte to send
  localparam logic [3:0] REG_RXDATA = 4'd1;  // read: pop received byte, bit 31 = valid
  localparam logic [3:0] REG_STATUS = 4'd2;
  localparam logic [3:0] REG_CTRL   = 4'd3;

  // ---------------- CSRs ----------------
  localparam logic [11:0] CSR_MSTATUS = 12'h300;
  localparam logic [11:0] CSR_MIE     = 12'h304;
  localparam logic [11:0] CSR_MTVEC   = 12'h305;
  localparam logic [11:0] CSR_MEPC    = 12'h341;
  localparam logic [11:0] CSR_MCAUSE  = 12'h342;
  localparam logic [11:0] CSR_MIP     = 12'h344;
  localparam logic [11:0] CSR_MCYCLE  = 12'hB00;
  localparam logic [11:0] CSR_MINSTRET= 12'hB02;
  // custom, machine read/write range 0x7C0-0x7FF
  localparam logic [11:0] CSR_GPIO_OUT = 12'h7C0;
  localparam logic [11:0] CSR_GPIO_OE  = 12'h7C1;
  localparam logic [11:0] CSR_GPIO_IN  = 12'h7C2;
  localparam logic [11:0] CSR_HV_SRC   = 12'h7C4;  // source amplitude code [7:0]
  localparam logic [11:0] CSR_HV_SNK   = 12'h7C5;  // sink amplitude code [7:0]
  localparam logic [11:0] CSR_HV_TRIM  = 12'h7C6;  // sink Vref trim [5:0]
  localparam logic [11:0] CSR_HV_LS    = 12'h7C7;  // level-shifter port [3:0]
  localparam logic [11:0] CSR_HV_CTRL  = 12'h7C8;  // [0] source on, [1] sink on
  localparam logic [11:0] CSR_CGATE    = 12'h7CC;  // clock enables (read only)
  localparam logic [11:0] CSR_TMR_CTRL = 12'h7D0;  // [0] enable
  localparam logic [11:0] CSR_TMR_CMP  = 12'h7D1;
  localparam logic [11:0] CSR_TMR_CNT  = 12'h7D2;
  localparam logic [11:0] CSR_IRQ_PEND = 12'h7E0;  // write 1 to clear
  localparam logic [11:0] CSR_IRQ_EN   = 12'h7E1;

  // interrupt source numbers
  localparam int IRQ_UART  = 0;
  localparam int IRQ_SPI   = 1;
  localparam int IRQ_TIMER = 2;
  localparam int IRQ_EXT   = 3;
  localparam int IRQ_COMP  = 4;
  localparam int NIRQ      = 5;

  // clock-gate enable bits
  localparam int CG_BUS  = 0;  // MBC-side FIFOs and packet bus interface
  localparam int CG_UART = 1;
  localparam int CG_SPI  = 2;
  localparam int CG_GPIO = 3;
  localparam int CG_HV   = 4;
  localparam int CG_TMR  = 5;
  localparam int NCG     = 6;

  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

endpackage
