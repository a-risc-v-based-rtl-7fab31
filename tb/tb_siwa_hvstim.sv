// tb_siwa_hvstim: programs amplitude codes, trim and level-shifter port
// through the CSRs, checks the reset values and that the switch codes only
// appear while the source / sink is switched on. The CSRs are latches
// that take a write in the high phase after the write edge; that timing
// is checked too.
module tb_siwa_hvstim;
  import siwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic csr_we = 0;
  logic [11:0] csr_addr = 0;
  logic [31:0] csr_wdata = 0, csr_rdata;
  logic [7:0] src_code, snk_code;
  logic [5:0] snk_trim;
  logic [3:0] ls_out;
  siwa_hvstim dut (.*);
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
    c("trim reset", snk_trim, 32); c("src off", src_code, 0); c("ls reset", ls_out, 0);
    for (int k = 0; k < 10; k++) begin
      automatic logic [7:0] s = 8'($urandom), n = 8'($urandom);
      automatic logic [5:0] t = 6'($urandom);
      automatic logic [3:0] l = 4'($urandom);
      wr(CSR_HV_CTRL, 0);
      wr(CSR_HV_SRC, s); wr(CSR_HV_SNK, n); wr(CSR_HV_TRIM, t); wr(CSR_HV_LS, l);
      c("src gated", src_code, 0); c("snk gated", snk_code, 0);
      c("trim", snk_trim, t); c("ls", ls_out, l);
      csr_addr = CSR_HV_SRC; #1; c("src readback", csr_rdata, s);
      csr_addr = CSR_HV_SNK; #1; c("snk readback", csr_rdata, n);
      wr(CSR_HV_CTRL, 1); c("src on", src_code, s); c("snk still off", snk_code, 0);
      wr(CSR_HV_CTRL, 2); c("src off", src_code, 0); c("snk on", snk_code, n);
      // write timing: sampled at a rising edge, visible in the high phase
      // right after it, held after the write ends
      @(negedge clk); csr_we = 1; csr_addr = CSR_HV_LS; csr_wdata = 32'(~l);
      #1 c("ls before write edge", 32'(ls_out), 32'(l));
      @(posedge clk); #1 c("ls after write edge", 32'(ls_out), 32'(4'(~l))); csr_we = 0;
      csr_wdata = 0; repeat (2) @(posedge clk); #1 c("ls held", 32'(ls_out), 32'(4'(~l)));
      csr_addr = CSR_HV_CTRL; #1; c("ctrl readback", csr_rdata, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
