// siwa_current_source: behavioural model (not synthesizable logic) of the
// 8-bit programmable HV current source (the upper source, PMOS pass
// devices). It is built like the sink: eight binary-weighted stages of
// vref / R_k with R_k = R0 / 2^k, switched by code[k] through HV switches
// driven by level shifters. Its reference is not adjustable. GAIN_ERR
// models the mismatch against the sink that the sink trim is meant to
// remove (0 by default). Output: i_out in amperes.
module siwa_current_source #(
  parameter real VREF     = 0.200,
  parameter real R0_OHM   = 2048.0,
  parameter real GAIN_ERR = 0.0
) (
  input  logic [7:0] code,
  output real        i_out
);
  always_comb begin
    i_out = 0.0;
    for (int k = 0; k < 8; k++)
      if (code[k]) i_out = i_out + (1.0 + GAIN_ERR) * VREF / (R0_OHM / real'(1 << k));
  end
endmodule
