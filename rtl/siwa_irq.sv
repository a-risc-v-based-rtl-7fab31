// siwa_irq: interruption handler of the Siwa SoC.
// Gathers the interrupt sources (UART receive, SPI receive, timer, external
// pin, analog comparator), makes each a pending bit and raises one request
// line to the core while any enabled source is pending. The two sources that
// come from outside the clock domain (external pin, comparator) pass through
// a two-flip-flop synchroniser. A pending bit is set on the rising edge of
// its source and cleared by writing a 1 to that bit of CSR_IRQ_PEND; the
// handler software reads CSR_IRQ_PEND to find the cause. CSR_IRQ_EN holds
// the per-source enables (all off after reset), so the programmer can
// disable UART and SPI interrupts while queued data waits in the FIFOs.
// Edge capture and the CSR layout are this design's choices.
module siwa_irq
  import siwa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIRQ-1:0] src,
  input  logic            csr_we,
  input  logic [11:0]     csr_addr,
  input  logic [31:0]     csr_wdata,
  output logic [31:0]     csr_rdata,
  output logic            irq
);
  logic [NIRQ-1:0] sync1, sync2, prev, pending, enable, s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1   <= '0;
      sync2   <= '0;
      prev    <= '0;
      pending <= '0;
      enable  <= '0;
    end else begin
      sync1 <= src;
      sync2 <= sync1;
      prev  <= s;
      if (csr_we && csr_addr == CSR_IRQ_EN) enable <= csr_wdata[NIRQ-1:0];
      if (csr_we && csr_addr == CSR_IRQ_PEND) pending <= (pending & ~csr_wdata[NIRQ-1:0]) | (s & ~prev);
      else pending <= pending | (s & ~prev);
    end
  end

  // internal sources are already synchronous; the pins are synchronised
  always_comb begin
    s = src;
    s[IRQ_EXT]  = sync2[IRQ_EXT];
    s[IRQ_COMP] = sync2[IRQ_COMP];
  end

  assign irq = |(pending & enable);

  always_comb begin
    unique case (csr_addr)
      CSR_IRQ_PEND: csr_rdata = {{(32-NIRQ){1'b0}}, pending};
      CSR_IRQ_EN:   csr_rdata = {{(32-NIRQ){1'b0}}, enable};
      default:      csr_rdata = '0;
    endcase
  end
endmodule
