// siwa_level_shifter: behavioural model (not synthesizable logic) of the HV
// level-shifter port of the stimulator: N channels that translate 1.8 V core
// logic levels to 0 V / vh, with vh anywhere from 0 V up to the 18 V
// gate-source limit of the HV transistors. The silicon cell is a
// cross-coupled HV-PMOS latch with HV-NMOS pull-downs and extra NMOS
// devices in parallel with the PMOS so that it also works when vh is below
// the core supply. This model keeps only its function: out[i] = in[i] ? vh
// : 0 V, after a propagation delay of T_PD time units. A supply outside 0..VH_MAX
// is reported as an error.
module siwa_level_shifter #(
  parameter int  N       = 4,
  parameter real VH_MAX  = 18.0,
  parameter int  T_PD    = 5
) (
  input  logic [N-1:0] in,
  input  real          vh,
  output real          out [N]
);
  for (genvar i = 0; i < N; i++) begin : g_ch
    always @(in[i] or vh) begin
      if (vh < 0.0 || vh > VH_MAX) $error("level shifter supply %f V out of range", vh);
      out[i] <= #(T_PD) (in[i] ? vh : 0.0);
    end
  end
endmodule
