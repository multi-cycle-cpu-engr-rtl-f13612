// tb_mc_regfile - self-checking test of the register file.
//
// Writes every register, then runs random writes and simultaneous reads on
// both read ports against a model array in the testbench. Checks the
// combinational reads, that a write lands at the clock edge and not before,
// and that register 0 reads as zero whatever is written to it.
module tb_mc_regfile;
  logic        clk = 0, wr_en;
  logic [4:0]  aa, ab, aw;
  logic [31:0] dw, da, db;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mc_regfile #(.XLEN(32), .NREGS(32)) dut (.clk, .aa, .ab, .aw, .dw, .wr_en, .da, .db);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks += 2;
    if (da !== model[aa]) begin failures++; $display("FAIL da r%0d=%h exp %h", aa, da, model[aa]); end
    if (db !== model[ab]) begin failures++; $display("FAIL db r%0d=%h exp %h", ab, db, model[ab]); end
  endtask

  initial begin
    wr_en = 0; aa = 0; ab = 0; aw = 0; dw = 0;
    @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      aw = 5'(r); dw = $urandom; wr_en = 1;
      model[r] = (r == 0) ? '0 : dw;
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      aa = 5'($urandom); ab = 5'($urandom);
      aw = 5'($urandom); dw = $urandom; wr_en = 1'($urandom);
      if (i % 50 == 0) begin aw = 0; wr_en = 1; end
      check_reads();                       // before the edge: old contents
      @(negedge clk);
      if (wr_en && aw != 0) model[aw] = dw;
      wr_en = 0;
      aa = aw;
      check_reads();                       // after the edge: new contents
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
