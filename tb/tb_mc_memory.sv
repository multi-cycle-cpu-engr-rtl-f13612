// tb_mc_memory - self-checking test of the shared memory.
//
// Fills all 256 words through the write port, then performs random reads and
// writes against a model array in the testbench. Checks that a read returns
// the word in the same cycle the address is presented (combinational read),
// that a write is visible right after its clock edge, that a read with
// wr_en low does not disturb the contents, and that the two byte-offset bits
// of the address are ignored.
module tb_mc_memory;
  localparam int WORDS = 256;
  logic        clk = 0, wr_en;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mc_memory #(.XLEN(32), .WORDS(WORDS)) dut (.clk, .wr_en, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int w, input logic [1:0] off);
    addr = 32'(w * 4) | 32'(off); wr_en = 0;
    #1;
    checks++;
    if (dout !== model[w]) begin
      failures++;
      $display("FAIL read word %0d off %0d: %h exp %h", w, off, dout, model[w]);
    end
  endtask

  initial begin
    wr_en = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      addr = 32'(w * 4); din = $urandom; wr_en = 1; model[w] = din;
      @(negedge clk);
    end
    wr_en = 0;
    for (int w = 0; w < WORDS; w++) check_read(w, 2'($urandom));
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int w;
      w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1) != 0) begin
        addr = 32'(w * 4); din = $urandom; wr_en = 1;
        @(negedge clk);
        model[w] = din;
        wr_en = 0;
        check_read(w, 2'b00);
      end else begin
        check_read(w, 2'($urandom));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
