// siwa_regfile: latch-based 32 x 32-bit register file of the Siwa core.
// Each register is a level-sensitive latch rather than a flip-flop, which
// saves area and energy. Write address, data and enable come from registers
// in the core (they change only at the rising clock edge); the addressed
// latch is transparent while clk is high and closes at the falling edge, so
// the value written in cycle n is readable from cycle n+1 on. Reads are
// combinational on two ports. x0 always reads zero and is never stored.
// Timing rule for the user: we/waddr/wdata must be stable for the whole
// high phase of the clock (i.e. driven from flip-flops clocked on clk).
module siwa_regfile #(
  parameter int NREGS = 32
) (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata2
);
  logic [31:0] regs [1:NREGS-1];

  for (genvar i = 1; i < NREGS; i++) begin : g_reg
    always_latch begin
      if (clk && we && waddr == 5'(i)) regs[i] = wdata;
    end
  end

  assign rdata1 = (raddr1 == 5'd0) ? 32'd0 : regs[raddr1];
  assign rdata2 = (raddr2 == 5'd0) ? 32'd0 : regs[raddr2];
endmodule
