// mc_shl2 - the "<<2" unit: multiplies a word offset by four.
//
// Turns the sign-extended branch offset (counted in instructions) into a byte
// offset for the branch target PC + (SE(imm16) << 2). Combinational; the two
// bits shifted out at the top are dropped. The unit is the original design's.
module mc_shl2 #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] d,
  output logic [XLEN-1:0] q
);

  assign q = {d[XLEN-3:0], 2'b00};

endmodule
