// tb_siwa_mbc: the memory and bus controller with the real SRAM, packet
// FIFOs, packet bus interface and SPI master, and a flash model here.
// Checks the bootstrap (64 bytes copied, core held in reset until done),
// then core-side SRAM writes with byte enables and reads with their
// two-cycle timing, and packet reads/writes of an SPI register through the
// FIFOs, including an access to an absent device.
module tb_siwa_mbc;
  import siwa_pkg::*;
  localparam int BOOT = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic core_req = 0, core_we = 0, core_ready, core_rst_n, boot_done;
  logic [3:0] core_be = 4'hF;
  logic [31:0] core_addr = 0, core_wdata = 0, core_rdata;
  logic sram_ce, sram_we;
  logic [3:0] sram_be;
  logic [10:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic req_push, req_full, req_empty, req_pop, rsp_push, rsp_full, rsp_empty, rsp_pop;
  pkt_req_t req_pkt, req_head;
  pkt_rsp_t rsp_in, rsp_pkt;
  logic [2:0] c1, c2;
  logic uart_sel, spi_sel, reg_we;
  logic [3:0] reg_n;
  logic [31:0] reg_wdata, spi_rdata;
  logic sclk, cs_n, mosi, miso, spi_irq;

  siwa_mbc #(.BOOT_BYTES(BOOT)) dut (.*);
  siwa_sram u_sram (.clk, .ce(sram_ce), .we(sram_we), .be(sram_be), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  siwa_fifo #(.T(pkt_req_t), .DEPTH(4)) u_qf (.clk, .rst_n, .push(req_push), .din(req_pkt), .pop(req_pop),
    .dout(req_head), .empty(req_empty), .full(req_full), .count(c1));
  siwa_fifo #(.T(pkt_rsp_t), .DEPTH(4)) u_rf (.clk, .rst_n, .push(rsp_push), .din(rsp_in), .pop(rsp_pop),
    .dout(rsp_pkt), .empty(rsp_empty), .full(rsp_full), .count(c2));
  siwa_pbus u_pbus (.req_empty, .req(req_head), .req_pop, .rsp_full, .rsp_push, .rsp(rsp_in),
    .uart_sel, .spi_sel, .reg_we, .reg_n, .reg_wdata, .uart_rdata(32'h0), .spi_rdata);
  siwa_spi u_spi (.clk, .rst_n, .sel(spi_sel), .we(reg_we), .regn(reg_n), .wdata(reg_wdata), .rdata(spi_rdata),
    .sclk, .cs_n, .mosi, .miso, .irq(spi_irq));
  spi_flash_model #(.BYTES(256)) flash (.sclk, .cs_n, .mosi, .miso);

  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  task automatic access(logic w, logic [31:0] a, logic [3:0] be, logic [31:0] d, output logic [31:0] q, output int cycles);
    @(negedge clk); core_req = 1; core_we = w; core_addr = a; core_be = be; core_wdata = d; cycles = 0;
    do begin @(posedge clk); cycles++; end while (!core_ready);
    q = core_rdata;
    @(negedge clk); core_req = 0;
  endtask
  int held = 0;
  always @(posedge clk) if (rst_n && !boot_done && !core_rst_n) held++;
  initial begin
    logic [31:0] q;
    int n;
    for (int i = 0; i < 256; i++) flash.mem[i] = 8'(i * 13 + 1);
    repeat (2) @(posedge clk); rst_n = 1;
    c("core held in reset", core_rst_n, 0);
    wait (boot_done);
    @(negedge clk);
    c("core released", core_rst_n, 1);
    c("held during boot", held > 100, 1);
    c("cs released", cs_n, 1);
    for (int w = 0; w < BOOT / 4; w++)
      c("boot word", u_sram.mem[w], {8'((4*w+3)*13+1), 8'((4*w+2)*13+1), 8'((4*w+1)*13+1), 8'((4*w)*13+1)});
    // SRAM through the controller
    access(1, 32'h100, 4'hF, 32'hDEAD_BEEF, q, n); c("write cycles", n, 2);
    access(1, 32'h100, 4'b0010, 32'h0000_5500, q, n);
    access(0, 32'h100, 4'hF, 0, q, n); c("read", q, 32'hDEAD_55EF); c("read cycles", n, 2);
    access(0, 32'h1FFC, 4'hF, 0, q, n);
    access(1, 32'h1FFC, 4'hF, 32'h1234_5678, q, n);
    access(0, 32'h1FFC, 4'hF, 0, q, n); c("top word", q, 32'h1234_5678);
    // packets: SPI control register (device 1, register 3)
    access(1, 32'h8000_010C, 4'hF, 32'h0000_0300, q, n);
    access(0, 32'h8000_010C, 4'hF, 0, q, n); c("spi ctrl via packets", q, 32'h0000_0300);
    c("packet round trip cycles", n >= 3, 1);
    access(0, 32'h8000_0308, 4'hF, 0, q, n); c("absent device reads 0", q, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
