// mc_regfile - general-purpose register file with two read ports and one write port.
//
// Read ports Aa->Da and Ab->Db are combinational; the write port stores Dw in
// register Aw at the rising clock edge when WrEn is high. In the CPU, Aa is
// Rs and Ab is Rt (cycle 2 copies Da/Db into A and B); Aw is Rt or Rd and Dw
// is MDR or ALUOut. The port set is the original design's. Register 0 always
// reads as zero and ignores writes, as in MIPS; that and the register count
// (32, from the 5-bit register fields) are this design's choices. Registers
// are not reset.
module mc_regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] aa,
  input  logic [$clog2(NREGS)-1:0] ab,
  input  logic [$clog2(NREGS)-1:0] aw,
  input  logic [XLEN-1:0]          dw,
  input  logic                     wr_en,
  output logic [XLEN-1:0]          da,
  output logic [XLEN-1:0]          db
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wr_en && aw != '0) regs[aw] <= dw;
  end

  assign da = (aa == '0) ? '0 : regs[aa];
  assign db = (ab == '0) ? '0 : regs[ab];

endmodule
