// mc_cpu - multi-cycle CPU for a MIPS subset: add/sub, lw, sw, beq.
//
// Instead of one long clock cycle per instruction, each instruction takes
// several short cycles, and hardware is reused across them: one memory holds
// both instructions and data, and one ALU does both the instruction's
// arithmetic and the PC arithmetic. The control FSM (mc_control) steps the
// datapath (mc_datapath) through 3 cycles for beq, 4 for add/sub and sw and
// 5 for lw.
//
// Interface: `clk`, synchronous active-high `rst`. While `rst` is high the
// CPU is held (PC = 0, FSM in IF) and the memory port belongs to the load
// port: `load_addr` addresses it, `load_we` writes `load_data`, and
// `mem_rdata` shows the addressed word, so a program can be placed in memory
// and results read back. When `rst` falls the CPU fetches from address 0.
// `pc` and `state` (0 IF, 1 Decode, 2 Branch, 3 R1, 4 SW1, 5 LW1, 6 R2,
// 7 SW2, 8 LW2, 9 LW3) are for observation.
// The CPU itself is the original design; the load port, the reset and the
// memory size (MEM_WORDS = 256 words) are this design's additions.
module mc_cpu
  import mc_pkg::*;
#(
  parameter int unsigned XLEN      = 32,
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load_we,
  input  logic [XLEN-1:0] load_addr,
  input  logic [XLEN-1:0] load_data,
  output logic [XLEN-1:0] mem_rdata,
  output logic [XLEN-1:0] pc,
  output logic [3:0]      state
);

  ctrl_t           ctrl;
  state_e          st;
  logic [5:0]      opcode;
  logic            zero;
  logic [XLEN-1:0] cpu_addr, cpu_wdata;
  logic [XLEN-1:0] mem_addr, mem_din;
  logic            mem_we;

  mc_control u_ctrl (
    .clk, .rst, .opcode, .zero, .ctrl, .state(st)
  );

  mc_datapath #(.XLEN(XLEN)) u_dp (
    .clk, .rst, .ctrl, .opcode, .zero,
    .mem_addr(cpu_addr), .mem_wdata(cpu_wdata), .mem_rdata, .pc
  );

  // The load port owns the memory while the CPU is held in reset
  always_comb begin
    if (rst) begin
      mem_addr = load_addr;
      mem_din  = load_data;
      mem_we   = load_we;
    end else begin
      mem_addr = cpu_addr;
      mem_din  = cpu_wdata;
      mem_we   = ctrl.mem_we;
    end
  end

  mc_memory #(.XLEN(XLEN), .WORDS(MEM_WORDS)) u_mem (
    .clk, .wr_en(mem_we), .addr(mem_addr), .din(mem_din), .dout(mem_rdata)
  );

  assign state = st;

endmodule
