// tb_siwa_pbus: drives request packets at the packet bus interface with
// register models of two devices here. Checks device selection, the
// register number/data passed on, response data and device field, error
// responses for absent devices, and that nothing moves while the response
// FIFO is full or the request FIFO empty.
module tb_siwa_pbus;
  import siwa_pkg::*;
  logic req_empty = 1, req_pop, rsp_full = 0, rsp_push;
  pkt_req_t req = '0;
  pkt_rsp_t rsp;
  logic uart_sel, spi_sel, reg_we;
  logic [3:0] reg_n;
  logic [31:0] reg_wdata, uart_rdata, spi_rdata;
  siwa_pbus dut (.*);
  assign uart_rdata = 32'hA000_0000 | reg_n;
  assign spi_rdata  = 32'hB000_0000 | reg_n;
  int checks = 0, failures = 0;
  task automatic c(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", w, g, e); end
  endtask
  initial begin
    #1 c("idle pop", req_pop, 0); c("idle sel", uart_sel | spi_sel, 0);
    for (int k = 0; k < 200; k++) begin
      automatic logic [1:0] dv = 2'($urandom);
      automatic logic wr = 1'($urandom);
      automatic logic [3:0] r = 4'($urandom);
      automatic logic [31:0] d = $urandom;
      req = '{dev: dv, wr: wr, regn: r, data: d};
      req_empty = 0; rsp_full = ($urandom_range(3, 0) == 0);
      #1;
      c("pop", req_pop, !rsp_full);
      c("push", rsp_push, !rsp_full);
      c("uart sel", uart_sel, !rsp_full && dv == 0);
      c("spi sel", spi_sel, !rsp_full && dv == 1);
      if (!rsp_full) begin
        c("we", reg_we, wr); c("regn", reg_n, r); c("wdata", reg_wdata, d);
        c("rsp dev", rsp.dev, dv);
        c("rsp err", rsp.err, dv > 1);
        c("rsp data", rsp.data, (wr || dv > 1) ? 0 : ((dv == 0 ? 32'hA000_0000 : 32'hB000_0000) | r));
      end
      req_empty = 1; #1;
      c("no pop when empty", req_pop, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
