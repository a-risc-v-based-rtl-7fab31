// tb_siwa_gpio: CSR writes of output and direction, read-back, and the
// two-cycle synchronised input path (the value must not appear after
// one cycle, and must appear after two).
module tb_siwa_gpio;
  import siwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic csr_we = 0;
  logic [11:0] csr_addr = CSR_GPIO_IN;
  logic [31:0] csr_wdata = 0, csr_rdata;
  logic [7:0] gpio_i = 0, gpio_o, gpio_oe;
  siwa_gpio dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk); csr_we = 0;
    @(negedge clk);  // the latch opened in the high phase after the write edge
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    c("reset out", gpio_o, 0); c("reset oe", gpio_oe, 0);
    for (int k = 0; k < 20; k++) begin
      automatic logic [7:0] v = 8'($urandom), d = 8'($urandom), i = 8'($urandom);
      wr(CSR_GPIO_OUT, {24'hFFFFFF, v}); wr(CSR_GPIO_OE, d);
      c("out", gpio_o, v); c("oe", gpio_oe, d);
      csr_addr = CSR_GPIO_OUT; #1; c("out readback", csr_rdata, v);
      csr_addr = CSR_GPIO_OE;  #1; c("oe readback", csr_rdata, d);
      csr_addr = CSR_GPIO_IN; #1;
      begin
        automatic logic [31:0] prev = csr_rdata;
        gpio_i = i;
        @(negedge clk); c("in not yet after 1", csr_rdata, prev);
        @(negedge clk); c("in after 2", csr_rdata, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
