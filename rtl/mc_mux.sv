// mc_mux - N-input multiplexer.
//
// Drives `y` with input `d[sel]`; a select beyond N-1 gives input 0.
// Combinational. The CPU uses it for every selector of the datapath: MemIn
// (memory address), Dst (write register), RegIn (write data), ALUSrcA,
// ALUSrcB (four inputs) and PCSrc. The multiplexers are the original design's.
module mc_mux #(
  parameter int unsigned W  = 32,
  parameter int unsigned N  = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0]                 d,
  input  logic [SW-1:0]                       sel,
  output logic [W-1:0]                        y
);

  always_comb begin
    y = d[0];
    for (int i = 1; i < N; i++) begin
      if (sel == SW'(i)) y = d[i];
    end
  end

endmodule
