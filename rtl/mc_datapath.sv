// mc_datapath - datapath of the multi-cycle CPU.
//
// The single-cycle datapath cut into cycles by registers: PC, IR (instruction
// register), MDR (memory data register), A and B (register-file outputs) and
// ALUOut (ALU result). One ALU serves the instruction arithmetic and the PC
// arithmetic; the memory (outside this module, shared by instructions and
// data) is addressed by PC or ALUOut through the MemIn mux and is written with
// B. Multiplexers, all steered by the control word `ctrl`:
//   MemIn   memory address   0 PC,        1 ALUOut
//   Dst     write register   0 Rt[20:16], 1 Rd[15:11]
//   RegIn   write data       0 MDR,       1 ALUOut
//   ALUSrcA ALU input a      0 A,         1 PC
//   ALUSrcB ALU input b      0 SE(imm16)<<2, 1 SE(imm16), 2 B, 3 the constant 4
//   PCSrc   next PC          0 ALU output, 1 ALUOut
// Timing: all registers load at the rising edge; PC and IR only when PC_WE
// and IR_WE are high, MDR, A, B and ALUOut every cycle (each is read only in
// the cycle after it was written). `opcode` and `zero` go back to the control.
// The structure, the register set and the mux inputs are the original
// design's; the select encodings follow the order of its control table, and
// the synchronous reset of PC and IR to 0 is this design's choice.
module mc_datapath
  import mc_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  ctrl_t           ctrl,
  output logic [5:0]      opcode,
  output logic            zero,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  output logic [XLEN-1:0] pc
);

  logic [XLEN-1:0] ir, mdr, a_q, b_q, alu_out;
  logic [XLEN-1:0] pc_next, rf_da, rf_db, rf_dw;
  logic [XLEN-1:0] imm_se, imm_sh, alu_a, alu_b, alu_y;
  logic [4:0]      rs, rt, rd, rf_aw;

  assign opcode = ir[31:26];
  assign rs     = ir[25:21];
  assign rt     = ir[20:16];
  assign rd     = ir[15:11];

  // State registers
  mc_reg #(.W(XLEN)) u_pc     (.clk, .rst, .en(ctrl.pc_we), .d(pc_next),   .q(pc));
  mc_reg #(.W(XLEN)) u_ir     (.clk, .rst, .en(ctrl.ir_we), .d(mem_rdata), .q(ir));
  mc_reg #(.W(XLEN)) u_mdr    (.clk, .rst, .en(1'b1),       .d(mem_rdata), .q(mdr));
  mc_reg #(.W(XLEN)) u_a      (.clk, .rst, .en(1'b1),       .d(rf_da),     .q(a_q));
  mc_reg #(.W(XLEN)) u_b      (.clk, .rst, .en(1'b1),       .d(rf_db),     .q(b_q));
  mc_reg #(.W(XLEN)) u_aluout (.clk, .rst, .en(1'b1),       .d(alu_y),     .q(alu_out));

  // Memory address and write data
  mc_mux #(.W(XLEN), .N(2)) u_memin (.d({alu_out, pc}), .sel(ctrl.mem_in), .y(mem_addr));
  assign mem_wdata = b_q;

  // Register file and its write-side muxes
  mc_mux #(.W(5),    .N(2)) u_dst   (.d({rd, rt}),       .sel(ctrl.dst),    .y(rf_aw));
  mc_mux #(.W(XLEN), .N(2)) u_regin (.d({alu_out, mdr}), .sel(ctrl.reg_in), .y(rf_dw));

  mc_regfile #(.XLEN(XLEN), .NREGS(32)) u_rf (
    .clk, .aa(rs), .ab(rt), .aw(rf_aw), .dw(rf_dw), .wr_en(ctrl.reg_we),
    .da(rf_da), .db(rf_db)
  );

  // Immediate path
  mc_sign_extend #(.IN_W(16), .XLEN(XLEN)) u_se  (.imm(ir[15:0]), .ext(imm_se));
  mc_shl2        #(.XLEN(XLEN))            u_shl (.d(imm_se), .q(imm_sh));

  // ALU and its operand muxes
  mc_mux #(.W(XLEN), .N(2)) u_srca (.d({pc, a_q}), .sel(ctrl.alu_src_a), .y(alu_a));
  mc_mux #(.W(XLEN), .N(4)) u_srcb (.d({XLEN'(4), b_q, imm_se, imm_sh}),
                                    .sel(ctrl.alu_src_b), .y(alu_b));

  mc_alu #(.XLEN(XLEN)) u_alu (
    .a(alu_a), .b(alu_b), .op(ctrl.alu_op), .funct(ir[5:0]), .y(alu_y), .zero
  );

  // Next PC
  mc_mux #(.W(XLEN), .N(2)) u_pcsrc (.d({alu_out, alu_y}), .sel(ctrl.pc_src), .y(pc_next));

endmodule
