// siwa_mbc: memory and bus controller of Siwa.
// Sits between the core and everything it addresses. Core accesses below
// IO_BASE go to the SRAM: the word is presented at once and mem_ready comes
// in the next cycle with the read data (2 cycles per access). Accesses at
// IO_BASE and above become request packets {dev = addr[9:8], wr,
// regn = addr[5:2], data} pushed into the request FIFO towards the packet
// bus; the controller then waits for the matching response packet and ends
// the access with its data.
// Bootstrap: after reset the core is held in reset (core_rst_n low) while
// this controller copies BOOT_BYTES from an external SPI serial flash into
// SRAM from address 0, through the same packet path: it asserts chip select,
// sends the READ command 0x03 with a 24-bit address 0, then for each byte
// sends a dummy byte and polls the SPI receive register until the byte
// arrives; bytes are packed little-endian into words and written to SRAM.
// Then it releases chip select, raises boot_done and lets the core start at
// address 0. The boot protocol (command, address, packing) is this design's
// choice; the original states that the system boots from a serial flash on
// the SPI interface.
module siwa_mbc
  import siwa_pkg::*;
#(
  parameter int SRAM_BYTES   = 8192,
  parameter int BOOT_BYTES   = 8192,
  parameter logic [7:0] BOOT_SPI_DIV = 8'd0,
  localparam int AW = $clog2(SRAM_BYTES / 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  // core
  input  logic          core_req,
  input  logic          core_we,
  input  logic [3:0]    core_be,
  input  logic [31:0]   core_addr,
  input  logic [31:0]   core_wdata,
  output logic [31:0]   core_rdata,
  output logic          core_ready,
  output logic          core_rst_n,
  output logic          boot_done,
  // SRAM
  output logic          sram_ce,
  output logic          sram_we,
  output logic [3:0]    sram_be,
  output logic [AW-1:0] sram_addr,
  output logic [31:0]   sram_wdata,
  input  logic [31:0]   sram_rdata,
  // packet FIFOs
  output logic          req_push,
  output pkt_req_t      req_pkt,
  input  logic          req_full,
  output logic          rsp_pop,
  input  pkt_rsp_t      rsp_pkt,
  input  logic          rsp_empty
);
  typedef enum logic [3:0] {
    B_CS, B_CS_ACK, B_TX, B_TX_ACK, B_RX, B_RX_ACK, B_END, B_END_ACK,
    M_IDLE, M_SRAM, M_IO
  } state_e;
  state_e state;

  logic [31:0] nbytes;     // bytes exchanged so far, including the 4 of the command
  logic [31:0] word;
  logic [7:0]  txbyte;
  logic        is_io;

  assign is_io      = core_addr >= IO_BASE;
  assign core_rst_n = rst_n && boot_done;

  always_comb begin
    unique case (nbytes)
      32'd0:   txbyte = 8'h03;   // READ
      default: txbyte = 8'h00;   // address bytes, then dummy bytes
    endcase
  end

  always_comb begin
    sram_ce    = 1'b0;
    sram_we    = 1'b0;
    sram_be    = core_be;
    sram_addr  = core_addr[AW+1:2];
    sram_wdata = core_wdata;
    req_push   = 1'b0;
    req_pkt    = '{dev: core_addr[9:8], wr: core_we, regn: core_addr[5:2], data: core_wdata};
    rsp_pop    = 1'b0;
    core_ready = 1'b0;
    core_rdata = sram_rdata;
    unique case (state)
      B_CS: begin
        req_push = !req_full;
        req_pkt  = '{dev: 2'(DEV_SPI), wr: 1'b1, regn: REG_CTRL, data: {16'b0, BOOT_SPI_DIV, 8'h01}};
      end
      B_TX: begin
        req_push = !req_full;
        req_pkt  = '{dev: 2'(DEV_SPI), wr: 1'b1, regn: REG_DATA, data: {24'b0, txbyte}};
      end
      B_RX: begin
        req_push = !req_full;
        req_pkt  = '{dev: 2'(DEV_SPI), wr: 1'b0, regn: REG_RXDATA, data: '0};
      end
      B_END: begin
        req_push = !req_full;
        req_pkt  = '{dev: 2'(DEV_SPI), wr: 1'b1, regn: REG_CTRL, data: {16'b0, BOOT_SPI_DIV, 8'h00}};
      end
      B_CS_ACK, B_TX_ACK, B_END_ACK: rsp_pop = !rsp_empty;
      B_RX_ACK: begin
        rsp_pop = !rsp_empty;
        // the fourth data byte completes a word
        if (!rsp_empty && rsp_pkt.data[31] && nbytes >= 32'd4 && nbytes[1:0] == 2'd3) begin
          sram_ce    = 1'b1;
          sram_we    = 1'b1;
          sram_be    = 4'b1111;
          sram_addr  = AW'((nbytes - 32'd4) >> 2);
          sram_wdata = {rsp_pkt.data[7:0], word[31:8]};
        end
      end
      M_IDLE: if (core_req) begin
        if (is_io) req_push = !req_full;
        else       sram_ce  = 1'b1;
        sram_we = core_we;
      end
      M_SRAM: core_ready = 1'b1;
      M_IO: begin
        rsp_pop    = !rsp_empty;
        core_ready = !rsp_empty;
        core_rdata = rsp_pkt.data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= (BOOT_BYTES > 0) ? B_CS : M_IDLE;
      boot_done <= (BOOT_BYTES == 0);
      nbytes    <= '0;
      word      <= '0;
    end else begin
      unique case (state)
        B_CS:      if (!req_full) state <= B_CS_ACK;
        B_CS_ACK:  if (!rsp_empty) state <= B_TX;
        B_TX:      if (!req_full) state <= B_TX_ACK;
        B_TX_ACK:  if (!rsp_empty) state <= B_RX;
        B_RX:      if (!req_full) state <= B_RX_ACK;
        B_RX_ACK:  if (!rsp_empty) begin
          if (rsp_pkt.data[31]) begin
            word   <= {rsp_pkt.data[7:0], word[31:8]};
            nbytes <= nbytes + 32'd1;
            state  <= (nbytes + 32'd1 == 32'(BOOT_BYTES + 4)) ? B_END : B_TX;
          end else state <= B_RX;          // byte not there yet: poll again
        end
        B_END:     if (!req_full) state <= B_END_ACK;
        B_END_ACK: if (!rsp_empty) begin
          state     <= M_IDLE;
          boot_done <= 1'b1;
        end
        M_IDLE: if (core_req) begin
          if (!is_io) state <= M_SRAM;
          else if (!req_full) state <= M_IO;
        end
        M_SRAM: state <= M_IDLE;
        M_IO:   if (!rsp_empty) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
