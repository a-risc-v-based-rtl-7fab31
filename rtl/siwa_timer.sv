// siwa_timer: programmable interval timer inside the Siwa core.
// A 32-bit counter advances once per clock while enabled. When it reaches
// the compare value it emits a one-cycle tick (routed to the interrupt
// handler) and restarts from zero, giving a period of cmp+1 cycles. A count already
// above a newly written compare value restarts at once.
// Writing cnt_we loads the counter. Disabling holds the count.
// The auto-reload behaviour and widths are this design's choice.
module siwa_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] cmp,
  input  logic        cnt_we,
  input  logic [31:0] cnt_wdata,
  output logic [31:0] count,
  output logic        tick
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (cnt_we) count <= cnt_wdata;
      else if (en) begin
        if (count >= cmp) begin
          count <= '0;
          tick  <= 1'b1;
        end else count <= count + 32'd1;
      end
    end
  end
endmodule
