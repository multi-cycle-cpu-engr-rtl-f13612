// mc_reg - clocked register with write enable and synchronous reset.
//
// Stores `d` at the rising clock edge when `en` is high; `rst` (active high,
// synchronous) clears it to zero and wins over `en`. The CPU builds PC and IR
// from it with their write enables PC_WE and IR_WE, and MDR, A, B and ALUOut
// with `en` tied high: these registers are what splits the single-cycle
// datapath into short cycles. The registers are the original design's; the
// reset is this design's choice.
module mc_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
