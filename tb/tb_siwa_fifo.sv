// tb_siwa_fifo: random pushes and pops against a queue model; checks
// order, empty/full flags, count and that overflowing pushes are dropped.
module tb_siwa_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [7:0] din = 0, dout;
  logic [2:0] count;
  siwa_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.*);
  logic [7:0] q [$];
  int checks = 0, failures = 0, nfull = 0;
  task automatic c(string w, int g, int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d exp %0d", w, g, e); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      c("count", count, q.size());
      c("empty", empty, q.size() == 0);
      c("full", full, q.size() == 4);
      if (full) nfull++;
      if (!empty) c("head", dout, q[0]);
      push = $urandom_range(99, 0) < 55; pop = $urandom_range(99, 0) < 45; din = 8'($urandom);
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !full) q.push_back(din);
    end
    c("saw full", nfull > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
