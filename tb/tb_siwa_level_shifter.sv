// tb_siwa_level_shifter: each channel must follow its logic input at the
// HV supply level after the propagation delay, for supplies from 0.1 V to
// 16 V (the range measured on the real cell), and follow supply changes.
module tb_siwa_level_shifter;
  logic [3:0] in = 0;
  real vh = 16.0, out [4];
  siwa_level_shifter dut (.*);
  int checks = 0, failures = 0;
  task automatic cr(string w, real g, real e);
    checks++;
    if ((g - e > 0 ? g - e : e - g) > 1e-9) begin failures++; $display("FAIL %s: %g exp %g", w, g, e); end
  endtask
  initial begin
    real sup [3] = '{16.0, 1.0, 0.1};
    #10;
    foreach (sup[s]) begin
      vh = sup[s];
      for (int v = 0; v < 16; v++) begin
        real old [4];
        for (int i = 0; i < 4; i++) old[i] = out[i];
        in = 4'(v);
        #2;
        for (int i = 0; i < 4; i++) cr($sformatf("ch%0d held during delay", i), out[i], old[i]);
        #10;
        for (int i = 0; i < 4; i++) cr($sformatf("ch%0d", i), out[i], in[i] ? vh : 0.0);
      end
    end
    in = 4'b0101; #10; vh = 5.0; #10;
    cr("supply follow", out[2], 5.0);
    in = 4'b0000; #2; cr("held during delay", out[2], 5.0); #10; cr("low", out[2], 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
