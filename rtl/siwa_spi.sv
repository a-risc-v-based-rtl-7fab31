// siwa_spi: SPI master of the Siwa SoC (mode 0: clock idles low, data
// changes on the falling and is sampled on the rising edge, MSB first).
// It connects the external serial flash from which the system boots, and
// other SPI parts. Bytes written to REG_DATA wait in a transmit FIFO; each
// is shifted out while a byte is shifted in, and the received byte goes to
// a receive FIFO. Reading REG_RXDATA pops it (bit 31 = valid). REG_CTRL:
// [0] drive chip select active, [15:8] clock divider d, sclk period =
// 2*(d+1) clocks (reset d = 0, sclk = clk/2). REG_STATUS = {rx_overflow,
// busy, rx_avail, tx_empty, tx_full}. irq is high while received data is
// queued. Register port timing as in siwa_uart. Mode, register layout and
// FIFO depth are this design's choices.
module siwa_spi
  import siwa_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        we,
  input  logic [3:0]  regn,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso,
  output logic        irq
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;
  logic [7:0]  div, cnt;
  logic        cs;
  logic [7:0]  txf_dout, rxf_dout, sh, rx_sh;
  logic        txf_empty, txf_full, txf_pop, rxf_empty, rxf_full, rxf_push, rxf_pop;
  logic [CW-1:0] txf_cnt, rxf_cnt;
  logic        busy, ovf;
  logic [3:0]  bits;

  siwa_fifo #(.T(logic [7:0]), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .push(sel && we && regn == REG_DATA), .din(wdata[7:0]), .pop(txf_pop),
    .dout(txf_dout), .empty(txf_empty), .full(txf_full), .count(txf_cnt));
  siwa_fifo #(.T(logic [7:0]), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .push(rxf_push), .din(rx_sh), .pop(rxf_pop),
    .dout(rxf_dout), .empty(rxf_empty), .full(rxf_full), .count(rxf_cnt));

  assign rxf_pop = sel && !we && regn == REG_RXDATA;
  assign txf_pop = !busy && !txf_empty;
  assign cs_n    = !cs;
  assign mosi    = sh[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      cs       <= 1'b0;
      cnt      <= '0;
      sh       <= '0;
      rx_sh    <= '0;
      busy     <= 1'b0;
      bits     <= '0;
      sclk     <= 1'b0;
      ovf      <= 1'b0;
      rxf_push <= 1'b0;
    end else begin
      rxf_push <= 1'b0;
      if (sel && we && regn == REG_CTRL) begin
        cs  <= wdata[0];
        div <= wdata[15:8];
      end
      if (sel && !we && regn == REG_STATUS) ovf <= 1'b0;
      if (txf_pop) begin
        busy <= 1'b1;
        sh   <= txf_dout;
        bits <= 4'd8;
        cnt  <= div;
        sclk <= 1'b0;
      end else if (busy) begin
        if (cnt == 8'd0) begin
          cnt <= div;
          if (!sclk) begin            // rising edge: sample
            sclk  <= 1'b1;
            rx_sh <= {rx_sh[6:0], miso};
          end else begin              // falling edge: next bit
            sclk <= 1'b0;
            sh   <= {sh[6:0], 1'b0};
            bits <= bits - 4'd1;
            if (bits == 4'd1) begin
              busy <= 1'b0;
              if (rxf_full) ovf <= 1'b1;
              else rxf_push <= 1'b1;
            end
          end
        end else cnt <= cnt - 8'd1;
      end
    end
  end

  assign irq = !rxf_empty;

  always_comb begin
    unique case (regn)
      REG_RXDATA: rdata = rxf_empty ? 32'd0 : {1'b1, 23'b0, rxf_dout};
      REG_STATUS: rdata = {27'b0, ovf, busy || !txf_empty, !rxf_empty, txf_empty, txf_full};
      REG_CTRL:   rdata = {16'b0, div, 7'b0, cs};
      default:    rdata = '0;
    endcase
  end
endmodule
