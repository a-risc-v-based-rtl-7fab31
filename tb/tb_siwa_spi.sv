// tb_siwa_spi: register-level test of the SPI master against a mode-0
// slave model here. Checks the bytes the slave receives, the bytes read
// back from the receive FIFO, chip-select control, the sclk period of
// 2*(d+1) clocks for two dividers, and the receive interrupt.
module tb_siwa_spi;
  import siwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel = 0, we = 0, sclk, cs_n, mosi, miso, irq;
  logic [3:0] regn = 0;
  logic [31:0] wdata = 0, rdata;
  siwa_spi dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  task automatic acc(logic w, logic [3:0] r, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); sel = 1; we = w; regn = r; wdata = d; #1 q = rdata;
    @(negedge clk); sel = 0; we = 0;
  endtask
  // slave: shifts in on rising edges, answers with ~received byte of the previous transfer
  logic [7:0] sl_in, sl_out = 8'hC5;
  logic [7:0] sl_got [$];
  int nb = 0, t_rise = 0, period = 0, cyc = 0;
  always @(posedge clk) cyc++;
  assign miso = sl_out[7];
  always @(posedge sclk) if (!cs_n) begin
    sl_in = {sl_in[6:0], mosi}; nb++;
    period = cyc - t_rise; t_rise = cyc;
  end
  always @(negedge sclk) if (!cs_n) begin
    if (nb % 8 == 0) begin sl_got.push_back(sl_in); sl_out = ~sl_in; end
    else sl_out = {sl_out[6:0], 1'b0};
  end
  task automatic wait_idle();
    logic [31:0] q;
    do acc(0, REG_STATUS, 0, q); while (q[3]);
  endtask
  initial begin
    logic [31:0] q;
    repeat (2) @(posedge clk); rst_n = 1;
    c("cs idle", cs_n, 1);
    acc(1, REG_CTRL, 32'h0000_0101, q);     // cs on, d = 1
    c("cs active", cs_n, 0);
    acc(1, REG_DATA, 8'h3A, q); acc(1, REG_DATA, 8'h81, q); acc(1, REG_DATA, 8'hF0, q);
    wait_idle();
    c("period d=1", period, 4);
    c("slave got 3", sl_got.size(), 3);
    if (sl_got.size() == 3) begin c("b0", sl_got[0], 8'h3A); c("b1", sl_got[1], 8'h81); c("b2", sl_got[2], 8'hF0); end
    c("irq", irq, 1);
    acc(0, REG_RXDATA, 0, q); c("rx0", q, 32'h8000_00C5);
    acc(0, REG_RXDATA, 0, q); c("rx1", q, 32'h8000_00C5);
    acc(0, REG_RXDATA, 0, q); c("rx2", q, 32'h8000_007E);
    acc(0, REG_RXDATA, 0, q); c("rx empty", q, 0);
    c("irq off", irq, 0);
    acc(1, REG_CTRL, 32'h0000_0401, q);     // d = 4
    acc(1, REG_DATA, 8'h5B, q);
    wait_idle();
    c("period d=4", period, 10);
    acc(0, REG_RXDATA, 0, q); c("rx3", q, 32'h8000_000F);
    acc(1, REG_CTRL, 0, q);
    c("cs released", cs_n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
