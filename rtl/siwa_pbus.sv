// siwa_pbus: packet-based bus interface of Siwa.
// The memory/bus controller talks to the serial peripherals only through
// packets. This unit takes one request packet per cycle from the request
// FIFO when the response FIFO has room, performs the register access at the
// device named in the packet (UART or SPI) and pushes a response packet
// carrying the read data (0 for writes). Packets for a device that does not
// exist are answered with err set. Every request gets exactly one
// response, in order, so the controller can match them.
// Packet layout (siwa_pkg): request {dev, wr, regn, data},
// response {dev, err, data}. The layout is this design's choice.
module siwa_pbus
  import siwa_pkg::*;
(
  // request FIFO (head) and response FIFO (tail)
  input  logic        req_empty,
  input  pkt_req_t    req,
  output logic        req_pop,
  input  logic        rsp_full,
  output logic        rsp_push,
  output pkt_rsp_t    rsp,
  // device register ports
  output logic        uart_sel,
  output logic        spi_sel,
  output logic        reg_we,
  output logic [3:0]  reg_n,
  output logic [31:0] reg_wdata,
  input  logic [31:0] uart_rdata,
  input  logic [31:0] spi_rdata
);
  logic go;
  assign go        = !req_empty && !rsp_full;
  assign req_pop   = go;
  assign rsp_push  = go;
  assign uart_sel  = go && req.dev == 2'(DEV_UART);
  assign spi_sel   = go && req.dev == 2'(DEV_SPI);
  assign reg_we    = req.wr;
  assign reg_n     = req.regn;
  assign reg_wdata = req.data;

  always_comb begin
    rsp.dev = req.dev;
    rsp.err = 1'b0;
    unique case (req.dev)
      2'(DEV_UART): rsp.data = req.wr ? 32'd0 : uart_rdata;
      2'(DEV_SPI):  rsp.data = req.wr ? 32'd0 : spi_rdata;
      default: begin
        rsp.data = '0;
        rsp.err  = 1'b1;
      end
    endcase
  end
endmodule
