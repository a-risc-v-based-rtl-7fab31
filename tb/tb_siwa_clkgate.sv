// tb_siwa_clkgate: counts gated clock edges with the enable on and off,
// and checks that an enable change while clk is high cannot cut or create
// a pulse (the gated clock only ever shows whole clock pulses).
module tb_siwa_clkgate;
  logic clk = 0, en = 1, gclk;
  always #5 clk = ~clk;
  siwa_clkgate dut (.*);
  int checks = 0, failures = 0, ng = 0, short_pulse = 0;
  realtime t_rise;
  always @(posedge gclk) begin ng++; t_rise = $realtime; end
  always @(negedge gclk) if ($realtime - t_rise < 4.5) short_pulse++;
  task automatic c(string w, int g, int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d exp %0d", w, g, e); end
  endtask
  initial begin
    @(negedge clk); ng = 0; short_pulse = 0;  // ignore power-up state
    repeat (10) @(negedge clk);
    c("enabled edges", ng, 10);
    en = 0; ng = 0;
    repeat (10) @(negedge clk);
    c("disabled edges", ng, 0);
    // toggle enable in the high phase: no glitch
    @(posedge clk); #2 en = 1; #1 en = 0; #1 en = 1;
    repeat (3) @(negedge clk);
    @(posedge clk); #2 en = 0;
    repeat (3) @(negedge clk);
    c("no short pulses", short_pulse, 0);
    en = 1; ng = 0; repeat (4) @(negedge clk);
    c("re-enabled", ng, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
