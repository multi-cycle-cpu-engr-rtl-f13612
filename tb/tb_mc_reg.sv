// tb_mc_reg - self-checking test of the enabled register.
//
// Clocks random data with a random enable and occasional reset and compares
// the output after every rising edge with a model register kept in the
// testbench: reset clears, enable loads, otherwise the value holds.
module tb_mc_reg;
  logic        clk = 0, rst, en;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  mc_reg #(.W(32)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = '0;
    @(posedge clk); #1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 19) == 0);
      en  = $urandom_range(0, 1);
      d   = $urandom;
      @(posedge clk); #1;
      if (rst)     model = '0;
      else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d rst=%b en=%b q=%h exp=%h", i, rst, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
