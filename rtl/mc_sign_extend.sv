// mc_sign_extend - sign-extends the 16-bit immediate of an instruction.
//
// Copies bit IN_W-1 of `imm` into the upper OUT_W-IN_W bits of `ext`, so a
// negative offset stays negative at full width. Combinational. The block and
// its use (SE(imm16) for load/store addresses and the branch offset) are the
// original design's.
module mc_sign_extend #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned XLEN = 32
) (
  input  logic [IN_W-1:0] imm,
  output logic [XLEN-1:0] ext
);

  assign ext = {{(XLEN - IN_W){imm[IN_W-1]}}, imm};

endmodule
