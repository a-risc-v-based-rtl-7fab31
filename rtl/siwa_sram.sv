// siwa_sram: the 8 kB on-chip SRAM of Siwa, modelled as a synchronous
// single-port memory array of 32-bit words with byte write enables.
// A read returns data on rdata in the cycle after ce (registered output);
// a write with be updates the selected bytes at the clock edge. In silicon
// this is a foundry SRAM macro on its own power domain; this array has the
// same function and latency (one cycle, this design's assumption).
module siwa_sram #(
  parameter int BYTES = 8192,
  localparam int WORDS = BYTES / 4,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
