// siwa_chip: the implantable stimulator test chip at system level.
// Joins the Siwa microcontroller (siwa_soc, synthesizable) with behavioural
// models of the analog stimulus section it controls: the 8-bit HV current
// source and current sink (the sink with its 6-bit reference trim), whose
// currents add at the HV output pad, and the 4-bit HV port built from level
// shifters. vh1 is the current-source supply (3.3-15 V) and vh2 the
// level-shifter supply (0-15 V); currents are in amperes, voltages in volts.
// i_net = i_source - i_sink is the net current into the tissue, which must
// average to zero over a balanced bipolar pulse. The bandpass amplifier,
// references, current measurement path and pads are not modelled; the
// comparator interrupt (comp_irq) is a plain input.
module siwa_chip
  import siwa_pkg::*;
#(
  parameter int SRAM_BYTES = 8192,
  parameter int BOOT_BYTES = 8192
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           uart_rx,
  output logic           uart_tx,
  output logic           spi_sclk,
  output logic           spi_cs_n,
  output logic           spi_mosi,
  input  logic           spi_miso,
  input  logic [7:0]     gpio_i,
  output logic [7:0]     gpio_o,
  output logic [7:0]     gpio_oe,
  input  logic           ext_irq,
  input  logic           comp_irq,
  input  real            vh2,
  output real            hv_port [4],
  output real            i_source,
  output real            i_sink,
  output real            i_net,
  output logic           boot_done,
  output logic           instr_done,
  output logic [NCG-1:0] cg_en
);
  logic [7:0] src_code, snk_code;
  logic [5:0] snk_trim;
  logic [3:0] ls_out;

  siwa_soc #(.SRAM_BYTES(SRAM_BYTES), .BOOT_BYTES(BOOT_BYTES)) u_soc (
    .clk, .rst_n, .uart_rx, .uart_tx, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .gpio_i, .gpio_o, .gpio_oe, .ext_irq, .comp_irq,
    .src_code, .snk_code, .snk_trim, .ls_out, .boot_done, .instr_done, .cg_en
  );

  siwa_current_source u_isrc (.code(src_code), .i_out(i_source));
  siwa_current_sink   u_isnk (.code(snk_code), .trim(snk_trim), .i_out(i_sink));
  siwa_level_shifter #(.N(4)) u_ls (.in(ls_out), .vh(vh2), .out(hv_port));

  assign i_net = i_source - i_sink;
endmodule
