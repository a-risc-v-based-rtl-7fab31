// tb_siwa_current_sink: sweeps all 256 codes (as in a staircase test of the
// real sink) and checks code * Vref / R0 with R0 = 2048 Ohm, the 25.5 mA
// order full scale, monotonic steps, and the effect of the 6-bit trim.
module tb_siwa_current_sink;
  logic [7:0] code = 0;
  logic [5:0] trim = 32;
  real i_out;
  siwa_current_sink dut (.*);
  int checks = 0, failures = 0;
  task automatic cr(string w, real g, real e);
    checks++;
    if ((g - e > 0 ? g - e : e - g) > 1e-6 * (e > 0 ? e : -e) + 1e-12) begin failures++; $display("FAIL %s: %g exp %g", w, g, e); end
  endtask
  initial begin
    real prev = -1.0;
    for (int k = 0; k < 256; k++) begin
      code = 8'(k); #1;
      cr("step", i_out, k * 0.2 / 2048.0);
      checks++; if (!(i_out > prev)) begin failures++; $display("FAIL not monotonic at %0d", k); end
      prev = i_out;
    end
    cr("full scale", i_out, 255 * 0.2 / 2048.0);
    code = 8'd100;
    trim = 0;  #1; cr("trim min", i_out, 100 * 0.2 / 2048.0 * (1.0 - 32 * 0.0025));
    trim = 63; #1; cr("trim max", i_out, 100 * 0.2 / 2048.0 * (1.0 + 31 * 0.0025));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
