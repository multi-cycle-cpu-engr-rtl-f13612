// tb_mc_mux - self-checking test of the N-input multiplexer.
//
// Instantiates a 2-input and a 4-input copy (the two sizes the CPU uses),
// drives random inputs and every select value and checks that the output
// equals the selected input. Combinational: checked 1 ns after each change.
module tb_mc_mux;
  logic [1:0][31:0] d2;
  logic [3:0][31:0] d4;
  logic             s2;
  logic [1:0]       s4;
  logic [31:0]      y2, y4;
  int checks = 0, failures = 0;

  mc_mux #(.W(32), .N(2)) dut2 (.d(d2), .sel(s2), .y(y2));
  mc_mux #(.W(32), .N(4)) dut4 (.d(d4), .sel(s4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 2; k++) d2[k] = $urandom;
      for (int k = 0; k < 4; k++) d4[k] = $urandom;
      for (int s = 0; s < 4; s++) begin
        s2 = 1'(s); s4 = 2'(s);
        #1;
        checks += 2;
        if (y2 !== d2[s % 2]) begin failures++; $display("FAIL N=2 sel=%0d", s2); end
        if (y4 !== d4[s])     begin failures++; $display("FAIL N=4 sel=%0d", s4); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
