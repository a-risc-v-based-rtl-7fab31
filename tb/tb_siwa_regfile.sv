// tb_siwa_regfile: writes random values to random registers through the
// registered write port, as the core does, and compares both read ports
// with a reference array; x0 must stay zero. A write in one cycle must be
// readable in the next, and the latches must stay closed while clk is low.
module tb_siwa_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [4:0] waddr = 0, raddr1 = 0, raddr2 = 0;
  logic [31:0] wdata = 0, rdata1, rdata2;
  siwa_regfile dut (.*);
  logic [31:0] refm [32];
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 32; i++) refm[i] = 0;
    // fill every register
    for (int i = 0; i < 32; i++) begin
      @(posedge clk);
      we <= 1; waddr <= 5'(i); wdata <= $urandom;
      @(posedge clk);
      refm[i] = (i == 0) ? 0 : wdata;
      we <= 0;
    end
    repeat (2000) begin
      @(posedge clk);
      if ($urandom_range(1, 0)) begin
        we <= 1; waddr <= 5'($urandom); wdata <= $urandom;
      end else we <= 0;
      raddr1 <= 5'($urandom); raddr2 <= 5'($urandom);
      @(negedge clk);
      if (we && waddr != 0) refm[waddr] = wdata;
      #1;
      checks += 2;
      if (rdata1 !== refm[raddr1]) begin failures++; $display("FAIL r1 x%0d %h exp %h", raddr1, rdata1, refm[raddr1]); end
      if (rdata2 !== refm[raddr2]) begin failures++; $display("FAIL r2 x%0d %h exp %h", raddr2, rdata2, refm[raddr2]); end
    end
    // write-port activity in the low clock phase must not reach the latches
    repeat (100) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(31, 1)); wdata = $urandom;
      raddr1 = waddr; #2;
      checks++;
      if (rdata1 !== refm[raddr1]) begin failures++; $display("FAIL low-phase write x%0d", raddr1); end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
