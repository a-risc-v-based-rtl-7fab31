// siwa_soc: the Siwa microcontroller, the digital part of the implantable
// stimulator SoC.
// A multicycle RV32I core (siwa_core, with PC, decoder, ALU, latch register
// file, timer and CSRs) reaches its 8 kB SRAM and the serial peripherals
// through the memory and bus controller (siwa_mbc). The UART and SPI sit on
// a packet-based bus: the controller queues request packets in a FIFO, the
// packet bus interface (siwa_pbus) executes them at the device and queues
// response packets in a second FIFO; UART and SPI queue their own data in
// transmit and receive FIFOs. GPIO, the interrupt handler and the HV
// stimulation interface are attached to the core through custom CSRs.
// Interrupt sources: UART receive, SPI receive, timer, external pin and the
// analog comparator of the sensing amplifier.
// After reset the controller boots the system from an SPI serial flash
// (BOOT_BYTES into SRAM), then releases the core at address 0.
// Clock gating: the core's CG.ON/CG.OFF instructions drive cg_en; the
// packet bus (both FIFOs), UART, SPI, GPIO and HV interface each run on
// their own gated clock (siwa_clkgate) and the timer on a count enable.
// All are on after reset. Software must not access a device whose clock,
// or the bus clock, is off: the access would wait for ever.
// The HV interface outputs go to the analog stimulators: 8-bit source and
// sink switch codes, the 6-bit sink trim and the 4-bit level-shifter port.
// Memory map (this design's choice): SRAM at 0x0000_0000, UART at
// 0x8000_0000, SPI at 0x8000_0100, registers at 4-byte steps.
module siwa_soc
  import siwa_pkg::*;
#(
  parameter int SRAM_BYTES = 8192,
  parameter int BOOT_BYTES = 8192,
  parameter int GPIO_W     = 8,
  parameter int FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rx,
  output logic              uart_tx,
  output logic              spi_sclk,
  output logic              spi_cs_n,
  output logic              spi_mosi,
  input  logic              spi_miso,
  input  logic [GPIO_W-1:0] gpio_i,
  output logic [GPIO_W-1:0] gpio_o,
  output logic [GPIO_W-1:0] gpio_oe,
  input  logic              ext_irq,
  input  logic              comp_irq,
  output logic [7:0]        src_code,
  output logic [7:0]        snk_code,
  output logic [5:0]        snk_trim,
  output logic [3:0]        ls_out,
  output logic              boot_done,
  output logic              instr_done,
  output logic [NCG-1:0]    cg_en
);
  localparam int AW = $clog2(SRAM_BYTES / 4);

  // gated clocks
  logic clk_bus, clk_uart, clk_spi, clk_gpio, clk_hv;
  siwa_clkgate u_cg_bus  (.clk(clk), .en(cg_en[CG_BUS]),  .gclk(clk_bus));
  siwa_clkgate u_cg_uart (.clk(clk), .en(cg_en[CG_UART]), .gclk(clk_uart));
  siwa_clkgate u_cg_spi  (.clk(clk), .en(cg_en[CG_SPI]),  .gclk(clk_spi));
  siwa_clkgate u_cg_gpio (.clk(clk), .en(cg_en[CG_GPIO]), .gclk(clk_gpio));
  siwa_clkgate u_cg_hv   (.clk(clk), .en(cg_en[CG_HV]),   .gclk(clk_hv));

  // core
  logic        mem_req, mem_we, mem_ready, core_rst_n;
  logic [3:0]  mem_be;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        csr_we, csr_re;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata, gpio_csr, irq_csr, hv_csr;
  logic        irq, timer_tick;

  siwa_core u_core (
    .clk, .rst_n(core_rst_n),
    .mem_req, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
    .csr_we, .csr_re, .csr_addr, .csr_wdata, .csr_rdata,
    .irq, .timer_tick, .cg_en, .instr_done
  );
  assign csr_rdata = gpio_csr | irq_csr | hv_csr;

  // memory and bus controller, SRAM
  logic          sram_ce, sram_we;
  logic [3:0]    sram_be;
  logic [AW-1:0] sram_addr;
  logic [31:0]   sram_wdata, sram_rdata;
  logic          req_push, req_full, req_empty, req_pop;
  logic          rsp_push, rsp_full, rsp_empty, rsp_pop;
  pkt_req_t      req_in, req_head;
  pkt_rsp_t      rsp_in, rsp_head;

  siwa_mbc #(.SRAM_BYTES(SRAM_BYTES), .BOOT_BYTES(BOOT_BYTES)) u_mbc (
    .clk, .rst_n,
    .core_req(mem_req), .core_we(mem_we), .core_be(mem_be), .core_addr(mem_addr),
    .core_wdata(mem_wdata), .core_rdata(mem_rdata), .core_ready(mem_ready),
    .core_rst_n, .boot_done,
    .sram_ce, .sram_we, .sram_be, .sram_addr, .sram_wdata, .sram_rdata,
    .req_push, .req_pkt(req_in), .req_full,
    .rsp_pop, .rsp_pkt(rsp_head), .rsp_empty
  );

  siwa_sram #(.BYTES(SRAM_BYTES)) u_sram (
    .clk, .ce(sram_ce), .we(sram_we), .be(sram_be), .addr(sram_addr),
    .wdata(sram_wdata), .rdata(sram_rdata)
  );

  // packet bus: request and response FIFOs, bus interface
  logic [$clog2(FIFO_DEPTH):0] req_cnt, rsp_cnt;
  siwa_fifo #(.T(pkt_req_t), .DEPTH(FIFO_DEPTH)) u_req_fifo (
    .clk(clk_bus), .rst_n, .push(req_push), .din(req_in), .pop(req_pop),
    .dout(req_head), .empty(req_empty), .full(req_full), .count(req_cnt));
  siwa_fifo #(.T(pkt_rsp_t), .DEPTH(FIFO_DEPTH)) u_rsp_fifo (
    .clk(clk_bus), .rst_n, .push(rsp_push), .din(rsp_in), .pop(rsp_pop),
    .dout(rsp_head), .empty(rsp_empty), .full(rsp_full), .count(rsp_cnt));

  logic        uart_sel, spi_sel, reg_we;
  logic [3:0]  reg_n;
  logic [31:0] reg_wdata, uart_rdata, spi_rdata;
  siwa_pbus u_pbus (
    .req_empty, .req(req_head), .req_pop, .rsp_full, .rsp_push, .rsp(rsp_in),
    .uart_sel, .spi_sel, .reg_we, .reg_n, .reg_wdata, .uart_rdata, .spi_rdata
  );

  logic uart_irq, spi_irq;
  siwa_uart #(.FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk(clk_uart), .rst_n, .sel(uart_sel), .we(reg_we), .regn(reg_n), .wdata(reg_wdata),
    .rdata(uart_rdata), .tx(uart_tx), .rx(uart_rx), .irq(uart_irq));
  siwa_spi #(.FIFO_DEPTH(FIFO_DEPTH)) u_spi (
    .clk(clk_spi), .rst_n, .sel(spi_sel), .we(reg_we), .regn(reg_n), .wdata(reg_wdata),
    .rdata(spi_rdata), .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .irq(spi_irq));

  // CSR-attached units
  siwa_gpio #(.W(GPIO_W)) u_gpio (
    .clk(clk_gpio), .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata(gpio_csr),
    .gpio_i, .gpio_o, .gpio_oe);

  logic [NIRQ-1:0] irq_src;
  always_comb begin
    irq_src            = '0;
    irq_src[IRQ_UART]  = uart_irq;
    irq_src[IRQ_SPI]   = spi_irq;
    irq_src[IRQ_TIMER] = timer_tick;
    irq_src[IRQ_EXT]   = ext_irq;
    irq_src[IRQ_COMP]  = comp_irq;
  end
  siwa_irq u_irq (
    .clk, .rst_n(core_rst_n), .src(irq_src), .csr_we, .csr_addr, .csr_wdata,
    .csr_rdata(irq_csr), .irq);

  siwa_hvstim u_hv (
    .clk(clk_hv), .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata(hv_csr),
    .src_code, .snk_code, .snk_trim, .ls_out);
endmodule
