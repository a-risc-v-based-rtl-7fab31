// siwa_current_sink: behavioural model (not synthesizable logic) of the
// 8-bit programmable HV current sink. The circuit has eight parallel stages;
// stage k is an HV pass transistor whose OTA forces the reference voltage
// vref across a resistor R_k = R0 / 2^k (R0 = 2.048 kOhm, R7 = 16 Ohm),
// so the stage sinks vref / R_k when its switches are closed by code[k].
// The total is code * vref / R0: steps of about 100 uA up to about 25.5 mA.
// vref (nominally 200 mV) is trimmed by a 6-bit resistive divider so that
// the sink can be matched to the source; this model takes
// vref = VREF_NOM * (1 + (trim - 32) * TRIM_STEP), mid-scale trim giving
// the nominal value. The trim law and step are this model's assumption.
// Output: i_out in amperes, updated at once when code or trim change.
module siwa_current_sink #(
  parameter real VREF_NOM  = 0.200,
  parameter real R0_OHM    = 2048.0,
  parameter real TRIM_STEP = 0.0025
) (
  input  logic [7:0] code,
  input  logic [5:0] trim,
  output real        i_out
);
  real vref;
  always_comb begin
    vref  = VREF_NOM * (1.0 + (real'(trim) - 32.0) * TRIM_STEP);
    i_out = 0.0;
    for (int k = 0; k < 8; k++)
      if (code[k]) i_out = i_out + vref / (R0_OHM / real'(1 << k));
  end
endmodule
