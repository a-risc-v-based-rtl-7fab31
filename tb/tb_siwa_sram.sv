// tb_siwa_sram: random byte-enabled writes and reads over the whole 8 kB
// against a reference array; read data must appear one cycle after ce.
module tb_siwa_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ce = 0, we = 0;
  logic [3:0] be = 0;
  logic [10:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  siwa_sram dut (.*);
  logic [31:0] refm [2048];
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); ce = 1; we = 1; be = 4'hF; addr = 11'(i); wdata = $urandom; refm[i] = wdata;
    end
    repeat (6000) begin
      @(negedge clk);
      ce = 1; we = $urandom_range(1, 0); be = 4'($urandom); addr = 11'($urandom); wdata = $urandom;
      if (we) begin
        for (int b = 0; b < 4; b++) if (be[b]) refm[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        automatic logic [31:0] e = refm[addr];
        @(negedge clk); ce = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL addr %0d %h exp %h", addr, rdata, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
