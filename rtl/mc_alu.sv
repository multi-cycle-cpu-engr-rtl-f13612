// mc_alu - the one ALU of the multi-cycle CPU.
//
// The same adder computes PC + 4 (cycle 1), the branch target PC + offset
// (cycle 2), load/store addresses A + SE(imm16) and R-type results, and
// subtracts A - B for BEQ, whose Zero flag decides the branch. `op` selects
// add, subtract, or (R-type) the operation named by the function field:
// funct 0x22 subtracts, any other function adds. Purely combinational.
// Reusing one ALU for the PC arithmetic and add/sub/Zero follow the original
// design; the op encoding and the function-code mapping are this design's.
// There is no overflow detection.
module mc_alu
  import mc_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  aluop_e          op,
  input  logic [5:0]      funct,
  output logic [XLEN-1:0] y,
  output logic            zero
);

  logic sub;

  always_comb begin
    unique case (op)
      ALUOP_ADD:   sub = 1'b0;
      ALUOP_SUB:   sub = 1'b1;
      ALUOP_FUNCT: sub = (funct == FUNCT_SUB);
      default:     sub = 1'b0;
    endcase
    y    = sub ? (a - b) : (a + b);
    zero = (y == '0);
  end

endmodule
