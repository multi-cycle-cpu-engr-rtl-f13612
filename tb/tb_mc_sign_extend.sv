// tb_mc_sign_extend - self-checking test of the immediate sign extender.
//
// Drives every one of the 65536 16-bit immediates and compares the 32-bit
// output with the value computed by signed integer conversion in the
// testbench. Combinational: each value is checked 1 ns after it is applied.
module tb_mc_sign_extend;
  logic [15:0] imm;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  mc_sign_extend #(.IN_W(16), .XLEN(32)) dut (.imm, .ext);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int exp;
      imm = 16'(i);
      exp = (i >= 32768) ? i - 65536 : i;
      #1;
      checks++;
      if (ext !== 32'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL imm=%h ext=%h exp=%h", imm, ext, 32'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
