// spi_flash_model: behavioural model of an SPI serial NOR flash for the
// testbenches (mode 0). Understands only the READ command (0x03) followed by
// a 24-bit address; it then streams bytes from mem[] starting at that
// address, MSB first, changing miso after each falling sclk edge, for as
// long as cs_n stays low. reads counts bytes delivered.
module spi_flash_model #(
  parameter int BYTES = 8192
) (
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  mem [BYTES];
  int unsigned nrise;
  logic [31:0] cmd;
  int unsigned reads = 0;

  initial miso = 1'b0;
  always @(negedge cs_n) begin
    nrise = 0;
    cmd   = '0;
  end
  always @(posedge sclk) if (!cs_n) begin
    if (nrise < 32) cmd = {cmd[30:0], mosi};
    nrise++;
  end
  always @(negedge sclk) if (!cs_n && nrise >= 32 && cmd[31:24] == 8'h03) begin
    int unsigned idx, bitn;
    idx  = 32'(cmd[23:0]) + (nrise - 32) / 8;
    bitn = 7 - (nrise - 32) % 8;
    miso = (idx < BYTES) ? mem[idx][bitn] : 1'b0;
    if (bitn == 7) reads++;
  end
endmodule
