// tb_siwa_soc: end-to-end test of the Siwa microcontroller with a reduced
// boot image (BOOT_BYTES = 1024) to keep the run short. The SPI flash model
// holds the program of siwa_prog_pkg; the SoC boots it over SPI, runs it, and
// reports over the UART, which this testbench decodes. It drives the GPIO
// inputs, the external interrupt pin, the comparator interrupt and a UART
// byte, and checks the UART byte stream, the GPIO outputs and the HV
// interface codes. It counts how often each mechanism happened and fails
// any that never did.
module tb_siwa_soc;
  import siwa_pkg::*;
  import siwa_prog_pkg::*;

  localparam int BOOT = 1024;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic uart_rx = 1, uart_tx, spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic [7:0] gpio_i = 8'h3C, gpio_o, gpio_oe;
  logic ext_irq = 0, comp_irq = 0, boot_done, instr_done;
  logic [NCG-1:0] cg_en;
  logic [7:0] src_code, snk_code;
  logic [5:0] snk_trim;
  logic [3:0] ls_out;

  siwa_soc #(.BOOT_BYTES(BOOT)) dut (.*);

  spi_flash_model #(.BYTES(8192)) flash (.sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  task automatic check_real(input string what, input real got, input real exp);
    checks++;
    if ((got - exp > 0 ? got - exp : exp - got) > 1e-4 * (exp > 0 ? exp : -exp) + 1e-12) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, exp);
    end
  endtask

  // UART receiver / transmitter at 8 clocks per bit
  logic [7:0] rx_bytes [$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_tx);
    repeat (12) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      b[i] = uart_tx;
      repeat (8) @(posedge clk);
    end
    rx_bytes.push_back(b);
  end
  task automatic uart_send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx <= f[i];
      repeat (8) @(posedge clk);
    end
  endtask
  task automatic wait_bytes(input int n);
    int t = 0;
    while (rx_bytes.size() < n && t < 200000) begin
      @(posedge clk);
      t++;
    end
  endtask

  // mechanism counters
  int n_sram = 0, n_pkt = 0, n_txfull = 0, n_hv_off = 0, n_wfi = 0, n_trap = 0;
  int n_instr = 0, n_run = 0;  // retired instructions, core cycles not spent in WFI
  int n_irq [NIRQ];
  int boot_cycles = 0, cyc = 0;
  logic [NIRQ-1:0] pend_q = '0;
  always @(posedge clk) begin
    cyc++;
    if (!boot_done && rst_n) boot_cycles++;
    if (dut.u_mbc.sram_ce) n_sram++;
    if (dut.u_pbus.req_pop) n_pkt++;
    if (dut.u_uart.txf_full) n_txfull++;
    if (!cg_en[CG_HV]) n_hv_off++;
    if (dut.u_core.state == 2'd2 && dut.u_core.dec.is_wfi) n_wfi++;
    else if (boot_done) n_run++;
    if (boot_done && instr_done) n_instr++;
    // ECALL/EBREAK reaching the execute stage (2 = S_EXEC)
    if (dut.u_core.rst_n && 2'(dut.u_core.state) == 2'd2 && dut.u_core.dec.cls == CL_SYSTEM &&
        !dut.u_core.dec.is_csr && !dut.u_core.dec.is_mret && !dut.u_core.dec.is_wfi) n_trap++;
    for (int i = 0; i < NIRQ; i++) if (dut.u_irq.pending[i] && !pend_q[i]) n_irq[i]++;
    pend_q <= dut.u_irq.pending;
  end

  logic [31:0] img [IMG_WORDS];
  logic [7:0] exp_bytes [$];
  initial begin
    for (int i = 0; i < NIRQ; i++) n_irq[i] = 0;
    build(img);
    for (int i = 0; i < 8192; i++) flash.mem[i] = 8'(i * 7 + 3);   // filler beyond the program
    for (int i = 0; i < IMG_WORDS; i++)
      for (int b = 0; b < 4; b++) flash.mem[4*i+b] = img[i][8*b +: 8];
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (boot_done);
    check("flash bytes read", flash.reads, BOOT + 1);
    // SRAM holds the image, including filler at the last boot word
    check("SRAM word 0", dut.u_sram.mem[0], img[0]);
    check("SRAM last boot word", dut.u_sram.mem[BOOT/4-1], (BOOT > 4 * IMG_WORDS) ?
          {8'(BOOT*7-4), 8'(BOOT*7-11), 8'(BOOT*7-18), 8'(BOOT*7-25)} : img[BOOT/4-1]);
    wait_bytes(11);
    repeat (20) @(posedge clk);
    check("gpio_o", 32'(gpio_o), 32'hA5);
    check("gpio_oe", 32'(gpio_oe), 32'hFF);
    check("source code", 32'(src_code), 32'h40);
    check("sink code", 32'(snk_code), 32'h40);
    check("sink trim", 32'(snk_trim), 33);
    check("LS port", 32'(ls_out), 4'b1010);
    ext_irq = 1; repeat (10) @(posedge clk); ext_irq = 0;
    wait_bytes(12);
    check("byte after external-pin pulse", 32'(rx_bytes.size() == 12 && rx_bytes[11] == 8'h45), 1);
    comp_irq = 1; repeat (10) @(posedge clk); comp_irq = 0;
    wait_bytes(13);
    check("byte after comparator pulse", 32'(rx_bytes.size() == 13 && rx_bytes[12] == 8'h43), 1);
    uart_send(8'h5A);
    wait_bytes(16);
    exp_bytes = {8'h3C, 8'h40, 8'h61, 8'h62, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68,
                 8'h52, 8'h45, 8'h43, 8'h5B, 8'h54, 8'h44};
    check("UART byte count", rx_bytes.size(), exp_bytes.size());
    for (int i = 0; i < exp_bytes.size() && i < rx_bytes.size(); i++)
      check($sformatf("UART byte %0d", i), 32'(rx_bytes[i]), 32'(exp_bytes[i]));
    // boot time: per byte a dummy byte out (16 clocks) plus the packet round trips
    check("boot took under 64 cycles per byte", 32'(boot_cycles < 64 * (BOOT + 4)), 1);
    // every mechanism happened
    check("SRAM accesses", 32'(n_sram > 100), 1);
    check("packets", 32'(n_pkt > BOOT), 1);
    check("UART tx FIFO full", 32'(n_txfull > 0), 1);
    check("HV clock gated", 32'(n_hv_off > 0), 1);
    check("WFI sleep", 32'(n_wfi > 0), 1);
    // average clocks per instruction over the whole program, WFI sleep excluded:
    // 4 for ALU/branch/CSR, 6 for SRAM loads/stores, more for packet-bus I/O
    $display("average CPI x100 = %0d (%0d instructions)", 100 * n_run / n_instr, n_instr);
    check("average CPI between 4 and 6", 32'(n_run >= 4 * n_instr && n_run <= 6 * n_instr), 1);
    check("trap", 32'(n_trap), 1);
    check("UART irq", 32'(n_irq[IRQ_UART]), 1);
    check("SPI irq", 32'(n_irq[IRQ_SPI]), 1);
    check("timer irqs", 32'(n_irq[IRQ_TIMER] >= 3), 1);
    check("ext irq", 32'(n_irq[IRQ_EXT]), 1);
    check("comparator irq", 32'(n_irq[IRQ_COMP]), 1);
    $display("mechanisms: boot_cycles=%0d sram=%0d packets=%0d txfull=%0d hv_off=%0d wfi=%0d trap=%0d irq uart=%0d spi=%0d timer=%0d ext=%0d comp=%0d",
             boot_cycles, n_sram, n_pkt, n_txfull, n_hv_off, n_wfi, n_trap,
             n_irq[0], n_irq[1], n_irq[2], n_irq[3], n_irq[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 * (BOOT + 4) + 400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
