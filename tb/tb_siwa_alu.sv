// tb_siwa_alu: checks every ALU operation on directed corner values and
// random operands against a reference model written here.
module tb_siwa_alu;
  import siwa_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  siwa_alu dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic signed [31:0] sx = x;
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_SLL: return x << z[4:0];
      ALU_SLT: return (sx < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_XOR: return x ^ z;
      ALU_SRL: return x >> z[4:0];
      ALU_SRA: begin
        logic [31:0] r = x >> z[4:0];
        if (x[31]) for (int i = 0; i < 32; i++) if (i >= 32 - int'(z[4:0])) r[i] = 1'b1;
        return r;
      end
      ALU_OR: return x | z;
      ALU_AND: return x & z;
      ALU_PASSB: return z;
      default: return 0;
    endcase
  endfunction

  task automatic t(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z; #1;
    checks++;
    if (y !== ref_alu(o, x, z)) begin
      failures++;
      $display("FAIL op %s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, ref_alu(o, x, z));
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{0, 1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      foreach (corner[i]) foreach (corner[j]) t(alu_op_e'(o), corner[i], corner[j]);
      repeat (200) t(alu_op_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
