// siwa_hvstim: high-voltage stimulation interface, the dedicated I/O
// channels through which the Siwa core programs the analog stimulators.
// Custom CSRs hold:
//   CSR_HV_SRC  [7:0] amplitude code of the upper (source) current source
//   CSR_HV_SNK  [7:0] amplitude code of the lower (sink) current source
//   CSR_HV_TRIM [5:0] 6-bit trim of the sink reference voltage
//   CSR_HV_LS   [3:0] the 4-bit HV port driven through level shifters
//   CSR_HV_CTRL [0] source on, [1] sink on
// Each bit of an amplitude code closes the switches of one binary-weighted
// stage (bit k gives 2^k x 100 uA); a stage only conducts while its source
// is switched on, so a pulse is started and stopped with CSR_HV_CTRL while
// the amplitude stays programmed. The trim reset value is mid-scale (32).
// The registers are latches, as the original's CSRs are: a CSR write is
// first captured by flip-flops at the rising edge (csr_we, csr_addr,
// csr_wdata are sampled there), and the addressed latch is open while clk
// is high right after that edge, so the new value appears in the same
// cycle a flip-flop would show it and is held through the low phase. Because the latch
// enable and data come only from flip-flops, decode glitches of the core's
// CSR bus cannot reach the latches. Reset loads the latches directly.
// Code widths and latch-based CSRs follow the original; CSR numbers, the
// on/off control, the write timing and reset values are this design's
// choices.
module siwa_hvstim
  import siwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        csr_we,
  input  logic [11:0] csr_addr,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  output logic [7:0]  src_code,
  output logic [7:0]  snk_code,
  output logic [5:0]  snk_trim,
  output logic [3:0]  ls_out
);
  logic [7:0] src_amp, snk_amp;
  logic       src_on, snk_on;

  // write port, registered on the rising edge
  logic        wr_q;
  logic [11:0] wa_q;
  logic [7:0]  wd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= 1'b0;
      wa_q <= '0;
      wd_q <= '0;
    end else begin
      wr_q <= csr_we;
      wa_q <= csr_addr;
      wd_q <= csr_wdata[7:0];
    end
  end

  // storage latches, open while clk is high during a registered write
  always_latch begin
    if (!rst_n) begin
      src_amp  = '0;
      snk_amp  = '0;
      snk_trim = 6'd32;
      ls_out   = '0;
      src_on   = 1'b0;
      snk_on   = 1'b0;
    end else if (clk && wr_q) begin
      unique case (wa_q)
        CSR_HV_SRC:  src_amp  = wd_q;
        CSR_HV_SNK:  snk_amp  = wd_q;
        CSR_HV_TRIM: snk_trim = wd_q[5:0];
        CSR_HV_LS:   ls_out   = wd_q[3:0];
        CSR_HV_CTRL: {snk_on, src_on} = wd_q[1:0];
        default: ;
      endcase
    end
  end

  assign src_code = src_on ? src_amp : 8'd0;
  assign snk_code = snk_on ? snk_amp : 8'd0;

  always_comb begin
    unique case (csr_addr)
      CSR_HV_SRC:  csr_rdata = {24'b0, src_amp};
      CSR_HV_SNK:  csr_rdata = {24'b0, snk_amp};
      CSR_HV_TRIM: csr_rdata = {26'b0, snk_trim};
      CSR_HV_LS:   csr_rdata = {28'b0, ls_out};
      CSR_HV_CTRL: csr_rdata = {30'b0, snk_on, src_on};
      default:     csr_rdata = '0;
    endcase
  end
endmodule
