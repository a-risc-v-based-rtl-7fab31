// tb_siwa_uart: register-level test of the UART at 10 clocks per bit.
// Transmit: bytes written to REG_DATA are decoded from tx by an independent
// receiver here, with the bit time measured; the FIFO-full status must show
// when five bytes are written at once. Receive: frames sent here must be
// read back from REG_RXDATA in order, raise irq, and a fifth unread byte
// must set the overflow flag.
module tb_siwa_uart;
  import siwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel = 0, we = 0, tx, rx = 1, irq;
  logic [3:0] regn = 0;
  logic [31:0] wdata = 0, rdata;
  siwa_uart dut (.*);
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  task automatic acc(logic w, logic [3:0] r, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); sel = 1; we = w; regn = r; wdata = d; #1 q = rdata;
    @(negedge clk); sel = 0; we = 0;
  endtask
  // independent receiver
  logic [7:0] got [$];
  int bit_time = 0;
  initial forever begin
    automatic logic [7:0] b;
    automatic int t0 = 0;
    @(negedge tx);
    // the first byte is 0x55: its start bit is one bit time long
    if (got.size() == 0) begin
      t0 = int'($time);
      @(posedge tx);
      bit_time = (int'($time) - t0) / 10;   // clock period is 10 time units
      repeat (4) @(posedge clk);
    end else repeat (15) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = tx; repeat (10) @(posedge clk); end
    c("stop bit", tx, 1);
    got.push_back(b);
  end
  task automatic send(logic [7:0] b);
    automatic logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (10) @(posedge clk); end
  endtask
  initial begin
    logic [31:0] q;
    logic [7:0] txb [5] = '{8'h55, 8'hA3, 8'h00, 8'hFF, 8'h3C};
    repeat (2) @(posedge clk); rst_n = 1;
    acc(1, REG_CTRL, 10, q);
    acc(0, REG_CTRL, 0, q); c("ctrl", q, 10);
    foreach (txb[i]) acc(1, REG_DATA, txb[i], q);
    acc(0, REG_STATUS, 0, q); c("tx full after 5 writes", q[0], 1);
    repeat (600) @(posedge clk);
    acc(0, REG_STATUS, 0, q); c("tx idle", q[3], 0); c("tx empty", q[1], 1);
    c("bytes sent", got.size(), 5);
    foreach (txb[i]) if (i < got.size()) c("tx byte", got[i], txb[i]);
    c("bit time", bit_time, 10);
    // receive
    c("no irq", irq, 0);
    send(8'h12); send(8'hE7);
    repeat (5) @(posedge clk);
    c("irq", irq, 1);
    acc(0, REG_RXDATA, 0, q); c("rx 1", q, 32'h8000_0012);
    acc(0, REG_RXDATA, 0, q); c("rx 2", q, 32'h8000_00E7);
    acc(0, REG_RXDATA, 0, q); c("rx empty", q, 0);
    c("irq cleared", irq, 0);
    for (int i = 0; i < 5; i++) send(8'(i + 1));
    repeat (5) @(posedge clk);
    acc(0, REG_STATUS, 0, q); c("overflow", q[4], 1);
    acc(0, REG_STATUS, 0, q); c("overflow cleared", q[4], 0);
    for (int i = 0; i < 4; i++) begin acc(0, REG_RXDATA, 0, q); c("rx fifo", q, 32'h8000_0000 | (i + 1)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
