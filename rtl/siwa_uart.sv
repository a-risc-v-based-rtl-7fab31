// siwa_uart: UART of the Siwa SoC (8 data bits, no parity, 1 stop bit),
// reached over the packet bus through a small register port.
// Bytes written to REG_DATA wait in a transmit FIFO; received bytes wait in
// a receive FIFO so that software busy with a critical task can serve them
// later. Reading REG_RXDATA pops one byte and returns it with bit 31 set, or
// 0 when the queue is empty. REG_STATUS = {rx_overflow, tx_busy, rx_avail,
// tx_empty, tx_full}. REG_CTRL[15:0] = clocks per bit (reset 174, about
// 115200 baud at 20 MHz). irq is high while received data is queued.
// The receiver synchronises rx, waits for a start bit and samples each bit
// in its middle. Register port: sel/we/regn/wdata act at the clock edge,
// rdata is combinational. Frame format, register layout and FIFO depth are
// this design's choices; the original states only a UART with queued data.
module siwa_uart
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
  output logic        tx,
  input  logic        rx,
  output logic        irq
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;
  logic [15:0] div;
  // transmit
  logic [7:0]  txf_dout;
  logic        txf_empty, txf_full, txf_pop;
  logic [CW-1:0] txf_cnt;
  logic        tx_busy;
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  // receive
  logic [7:0]  rxf_dout, rx_sh;
  logic        rxf_empty, rxf_full, rxf_push, rxf_pop;
  logic [CW-1:0] rxf_cnt;
  logic        rx_s1, rx_s2, rx_busy, rx_ovf;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;

  logic wr_data, rd_rx;
  assign wr_data = sel && we && regn == REG_DATA;
  assign rd_rx   = sel && !we && regn == REG_RXDATA;
  assign rxf_pop = rd_rx;

  siwa_fifo #(.T(logic [7:0]), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .push(wr_data), .din(wdata[7:0]), .pop(txf_pop),
    .dout(txf_dout), .empty(txf_empty), .full(txf_full), .count(txf_cnt));
  siwa_fifo #(.T(logic [7:0]), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .push(rxf_push), .din(rx_sh), .pop(rxf_pop),
    .dout(rxf_dout), .empty(rxf_empty), .full(rxf_full), .count(rxf_cnt));

  assign txf_pop = !tx_busy && !txf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= 16'd174;
      tx_busy <= 1'b0;
      tx_sh   <= '1;
      tx_bits <= '0;
      tx_cnt  <= '0;
    end else begin
      if (sel && we && regn == REG_CTRL) div <= (wdata[15:0] < 16'd2) ? 16'd2 : wdata[15:0];
      if (txf_pop) begin
        tx_busy <= 1'b1;
        tx_sh   <= {1'b1, txf_dout, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= div - 16'd1;
      end else if (tx_busy) begin
        if (tx_cnt == 16'd0) begin
          tx_cnt  <= div - 16'd1;
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 4'd1;
          if (tx_bits == 4'd1) tx_busy <= 1'b0;
        end else tx_cnt <= tx_cnt - 16'd1;
      end
    end
  end
  assign tx = tx_busy ? tx_sh[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1   <= 1'b1;
      rx_s2   <= 1'b1;
      rx_busy <= 1'b0;
      rx_bits <= '0;
      rx_cnt  <= '0;
      rx_sh   <= '0;
      rx_ovf  <= 1'b0;
      rxf_push <= 1'b0;
    end else begin
      rx_s1    <= rx;
      rx_s2    <= rx_s1;
      rxf_push <= 1'b0;
      if (sel && !we && regn == REG_STATUS) rx_ovf <= 1'b0;
      if (!rx_busy) begin
        if (!rx_s2) begin             // start bit: go to its middle
          rx_busy <= 1'b1;
          rx_bits <= 4'd9;
          rx_cnt  <= (div >> 1) - 16'd1;
        end
      end else if (rx_cnt == 16'd0) begin
        rx_cnt <= div - 16'd1;
        if (rx_bits == 4'd9) begin
          if (rx_s2) rx_busy <= 1'b0; // glitch, not a start bit
          rx_bits <= 4'd8;
        end else if (rx_bits == 4'd0) begin
          rx_busy <= 1'b0;            // stop bit
          if (rx_s2) begin
            if (rxf_full) rx_ovf <= 1'b1;
            else rxf_push <= 1'b1;
          end
        end else begin
          rx_sh   <= {rx_s2, rx_sh[7:1]};
          rx_bits <= rx_bits - 4'd1;
        end
      end else rx_cnt <= rx_cnt - 16'd1;
    end
  end

  assign irq = !rxf_empty;

  always_comb begin
    unique case (regn)
      REG_RXDATA: rdata = rxf_empty ? 32'd0 : {1'b1, 23'b0, rxf_dout};
      REG_STATUS: rdata = {27'b0, rx_ovf, tx_busy || !txf_empty, !rxf_empty, txf_empty, txf_full};
      REG_CTRL:   rdata = {16'b0, div};
      default:    rdata = '0;
    endcase
  end
endmodule
