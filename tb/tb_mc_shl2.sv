// tb_mc_shl2 - self-checking test of the shift-left-by-two unit.
//
// Applies random words and branch-offset style values and checks that the
// output is the input times four modulo 2^32. Combinational: each value is
// checked 1 ns after it is applied.
module tb_mc_shl2;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  mc_shl2 #(.XLEN(32)) dut (.d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d = (i < 20) ? 32'(i - 10) : $urandom;
      #1;
      checks++;
      if (q !== d * 32'd4) begin
        failures++;
        $display("FAIL d=%h q=%h", d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
