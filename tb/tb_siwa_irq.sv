// tb_siwa_irq: checks edge capture of each source, the enable mask, the
// write-1-to-clear pending register and the two-cycle synchroniser on the
// external pin and comparator inputs.
module tb_siwa_irq;
  import siwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NIRQ-1:0] src = '0;
  logic csr_we = 0, irq;
  logic [11:0] csr_addr = CSR_IRQ_PEND;
  logic [31:0] csr_wdata = 0, csr_rdata;
  siwa_irq dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk); csr_we = 0; csr_addr = CSR_IRQ_PEND;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // timer pulse: pending but masked
    src[IRQ_TIMER] = 1; @(negedge clk); src[IRQ_TIMER] = 0; @(negedge clk);
    c("timer pending", csr_rdata, 32'b00100); c("masked", irq, 0);
    wr(CSR_IRQ_EN, 32'b00100); #1;
    c("unmasked", irq, 1);
    csr_addr = CSR_IRQ_EN; #1; c("enable readback", csr_rdata, 32'b00100); csr_addr = CSR_IRQ_PEND;
    wr(CSR_IRQ_PEND, 32'b00100); #1;
    c("cleared", csr_rdata, 0); c("irq low", irq, 0);
    // a level that stays high sets pending once only
    src[IRQ_UART] = 1; repeat (3) @(negedge clk);
    c("uart pending", csr_rdata, 32'b00001);
    wr(CSR_IRQ_PEND, 32'b00001); repeat (3) @(negedge clk);
    c("no re-trigger on level", csr_rdata, 0);
    src[IRQ_UART] = 0;
    // external pin: two synchroniser stages before capture
    wr(CSR_IRQ_EN, 32'b11111);
    @(negedge clk); src[IRQ_EXT] = 1;
    @(negedge clk); c("ext not yet (1)", csr_rdata, 0);
    @(negedge clk); c("ext not yet (2)", csr_rdata, 0);
    @(negedge clk); c("ext captured", csr_rdata, 32'b01000); c("irq ext", irq, 1);
    src[IRQ_EXT] = 0; src[IRQ_COMP] = 1; repeat (4) @(negedge clk);
    c("comp + ext", csr_rdata, 32'b11000);
    wr(CSR_IRQ_PEND, 32'b01000); #1; c("clear one", csr_rdata, 32'b10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
