// siwa_gpio: the 8 general-purpose I/O pins of Siwa, attached to the core
// through custom CSRs. CSR_GPIO_OUT holds the output values, CSR_GPIO_OE the
// per-pin output enables (all inputs after reset) and CSR_GPIO_IN reads the
// pins through a two-flip-flop synchroniser (two cycles of latency).
// OUT and OE are latches, like the original's CSRs: a write is captured by
// flip-flops at the rising edge and the latch is open while clk is high
// right after it, so the pins change just after the write edge (see
// siwa_hvstim for why the write port is registered). The synchroniser
// stays flip-flops. The block runs on a gatable clock; while it is off the
// outputs hold. Register layout, write timing and reset values are this
// design's choices.
module siwa_gpio
  import siwa_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         csr_we,
  input  logic [11:0]  csr_addr,
  input  logic [31:0]  csr_wdata,
  output logic [31:0]  csr_rdata,
  input  logic [W-1:0] gpio_i,
  output logic [W-1:0] gpio_o,
  output logic [W-1:0] gpio_oe
);
  logic [W-1:0] in_s1, in_s2;
  logic         wr_q, wa_q;   // registered write: any GPIO write, 1 = OE
  logic [W-1:0] wd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_s1   <= '0;
      in_s2   <= '0;
      wr_q    <= 1'b0;
      wa_q    <= 1'b0;
      wd_q    <= '0;
    end else begin
      in_s1 <= gpio_i;
      in_s2 <= in_s1;
      wr_q  <= csr_we && (csr_addr == CSR_GPIO_OUT || csr_addr == CSR_GPIO_OE);
      wa_q  <= csr_addr == CSR_GPIO_OE;
      wd_q  <= csr_wdata[W-1:0];
    end
  end

  // storage latches, open while clk is high during a registered write
  always_latch begin
    if (!rst_n) begin
      gpio_o  = '0;
      gpio_oe = '0;
    end else if (clk && wr_q) begin
      if (wa_q) gpio_oe = wd_q;
      else      gpio_o  = wd_q;
    end
  end

  always_comb begin
    unique case (csr_addr)
      CSR_GPIO_OUT: csr_rdata = 32'(gpio_o);
      CSR_GPIO_OE:  csr_rdata = 32'(gpio_oe);
      CSR_GPIO_IN:  csr_rdata = 32'(in_s2);
      default:      csr_rdata = '0;
    endcase
  end
endmodule
