// tb_mc_alu - self-checking test of the ALU.
//
// Applies random and corner-case operands under each ALUOp (add, sub, and
// R-type with the add and sub function codes) and compares the result and
// the Zero flag with values computed in the testbench. Combinational block:
// each vector is checked 1 ns after it is applied.
module tb_mc_alu;
  import mc_pkg::*;

  logic [31:0] a, b, y;
  aluop_e      op;
  logic [5:0]  funct;
  logic        zero;
  int checks = 0, failures = 0;

  mc_alu #(.XLEN(32)) dut (.a, .b, .op, .funct, .y, .zero);

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (y !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h op=%0d funct=%h y=%h zero=%b exp=%h", what, a, b, op, funct, y, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = $urandom; b = $urandom; funct = 6'($urandom);
      if (i % 10 == 0) b = a;                  // force Zero cases
      if (i % 17 == 0) begin a = 32'hFFFF_FFFF; b = 32'd1; end
      op = ALUOP_ADD;   #1 check(a + b, "add");
      op = ALUOP_SUB;   #1 check(a - b, "sub");
      op = ALUOP_FUNCT; funct = 6'h20; #1 check(a + b, "funct add");
      funct = 6'h22;    #1 check(a - b, "funct sub");
    end
    // PC + 4 and a negative branch offset
    a = 32'h0000_0040; b = 32'd4; op = ALUOP_ADD; #1 check(32'h44, "pc+4");
    b = 32'hFFFF_FFF0; #1 check(32'h30, "pc-16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
