// mc_memory - the single memory shared by instructions and data.
//
// One port: the word at byte address `addr` is read combinationally on
// `dout`, and `din` is written into that word at the rising clock edge when
// `wr_en` is high. The CPU uses it for instruction fetch (address = PC) and for
// load/store (address = ALUOut); a read therefore completes inside the cycle
// that presents the address, and a write takes effect at the end of it.
// Addresses are byte addresses of XLEN-bit words: the two low bits are
// ignored and the word index wraps modulo WORDS. Sharing one memory is the
// original design's; the size (256 words), the read/write timing and the
// wrap-around are this design's choices. Contents are not reset.
module mc_memory #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned WORDS = 256
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] din,
  output logic [XLEN-1:0] dout
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   idx;

  // Word index: drop the byte offset, keep as many bits as the array needs
  always_comb idx = AW'((addr >> 2) % WORDS);

  always_ff @(posedge clk) begin
    if (wr_en) mem[idx] <= din;
  end

  assign dout = mem[idx];

endmodule
