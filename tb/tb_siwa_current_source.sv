// tb_siwa_current_source: sweeps all 256 codes and checks code * Vref / R0,
// then shows that with a 1.5 % gain error on the source, choosing the sink
// trim code that minimises the difference brings the mismatch below 1 %.
module tb_siwa_current_source;
  logic [7:0] code = 0;
  real i_out, i_err, i_snk;
  logic [5:0] trim;
  siwa_current_source dut (.*);
  siwa_current_source #(.GAIN_ERR(0.015)) dut_err (.code, .i_out(i_err));
  siwa_current_sink snk (.code, .trim, .i_out(i_snk));
  int checks = 0, failures = 0;
  task automatic cr(string w, real g, real e);
    checks++;
    if ((g - e > 0 ? g - e : e - g) > 1e-6 * (e > 0 ? e : -e) + 1e-12) begin failures++; $display("FAIL %s: %g exp %g", w, g, e); end
  endtask
  initial begin
    real best;
    int bt;
    for (int k = 0; k < 256; k++) begin code = 8'(k); #1; cr("step", i_out, k * 0.2 / 2048.0); end
    code = 8'd200; trim = 32; #1;
    checks++; if ((i_err - i_snk) / i_err < 0.01) begin failures++; $display("FAIL mismatch should start above 1 %%"); end
    best = 1.0; bt = 0;
    for (int t = 0; t < 64; t++) begin
      trim = 6'(t); #1;
      if ((i_err - i_snk > 0 ? i_err - i_snk : i_snk - i_err) < best) begin best = (i_err - i_snk > 0 ? i_err - i_snk : i_snk - i_err); bt = t; end
    end
    checks++; if (best / i_err >= 0.01) begin failures++; $display("FAIL trimmed mismatch %g", best / i_err); end
    checks++; if (bt != 38) begin failures++; $display("FAIL best trim %0d", bt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
