// tb_siwa_timer: checks the tick period (cmp+1 cycles), count hold while
// disabled and the counter load.
module tb_siwa_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, cnt_we = 0, tick;
  logic [31:0] cmp = 9, cnt_wdata = 0, count;
  siwa_timer dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %0d exp %0d", w, g, e); end
  endtask
  int last = -1, cyc = 0, nt = 0, per = 0;
  always @(posedge clk) begin
    cyc++;
    if (tick) begin if (last >= 0) per = cyc - last; last = cyc; nt++; end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    nt = 0; last = -1;  // ignore anything seen before reset
    @(posedge clk); en <= 1;
    repeat (55) @(posedge clk);
    c("ticks", nt, 5); c("period", per, 10);
    cmp <= 3; repeat (20) @(posedge clk);
    c("period 4", per, 4);
    en <= 0; @(posedge clk); @(posedge clk);
    begin automatic logic [31:0] h = count; repeat (5) @(posedge clk); c("hold", count, h); end
    cnt_we <= 1; cnt_wdata <= 2; @(posedge clk); cnt_we <= 0; #1; c("load", count, 2);
    nt = 0; en <= 1; repeat (3) @(posedge clk); #1; c("tick after load", nt, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
