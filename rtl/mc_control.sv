// mc_control - control FSM of the multi-cycle CPU.
//
// A Moore machine with ten states. Every instruction starts with IF
// (IR = Mem[PC]; PC = PC + 4) and Decode (A = Reg[Rs]; B = Reg[Rt];
// ALUOut = PC + (SE(imm16) << 2)); Decode then branches on the opcode:
//   BEQ (4)    -> Branch                 3 cycles
//   R-type (0) -> R1 -> R2               4 cycles
//   SW (43)    -> SW1 -> SW2             4 cycles
//   LW (35)    -> LW1 -> LW2 -> LW3      5 cycles
// and the last state of each sequence returns to IF. `ctrl` is a function of
// the state only, except PC_WE in Branch, which is the ALU Zero flag of the
// A - B being computed in that cycle. `state` shows the current state.
// States, transitions, opcodes and the per-state register transfers are the
// original design's. This design's choices: synchronous active-high reset to
// IF; an unknown opcode returns from Decode to IF (the instruction is
// skipped); fields that do not matter in a state are driven to 0. Two
// assertions guard the schedule: the state is always legal and no cycle
// writes more than one of IR, memory and register file.
module mc_control
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic       zero,
  output ctrl_t      ctrl,
  output state_e     state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IF;
    else     state <= next;
  end

  // Next state
  always_comb begin
    next = S_IF;
    unique case (state)
      S_IF:     next = S_DECODE;
      S_DECODE: begin
        case (opcode)
          OP_BEQ:   next = S_BRANCH;
          OP_RTYPE: next = S_R1;
          OP_SW:    next = S_SW1;
          OP_LW:    next = S_LW1;
          default:  next = S_IF;
        endcase
      end
      S_R1:     next = S_R2;
      S_SW1:    next = S_SW2;
      S_LW1:    next = S_LW2;
      S_LW2:    next = S_LW3;
      S_BRANCH, S_R2, S_SW2, S_LW3: next = S_IF;
      default:  next = S_IF;
    endcase
  end

  // Control word of the current state
  always_comb begin
    ctrl = '{pc_we: 1'b0, mem_we: 1'b0, reg_we: 1'b0, ir_we: 1'b0,
             alu_src_a: SRCA_A, alu_src_b: SRCB_SHL2, alu_op: ALUOP_ADD,
             dst: DST_RT, mem_in: MEMIN_PC, reg_in: REGIN_MDR, pc_src: PCSRC_ALU};
    unique case (state)
      S_IF: begin                       // IR = Mem[PC]; PC = PC + 4
        ctrl.ir_we     = 1'b1;
        ctrl.mem_in    = MEMIN_PC;
        ctrl.pc_we     = 1'b1;
        ctrl.alu_src_a = SRCA_PC;
        ctrl.alu_src_b = SRCB_FOUR;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.pc_src    = PCSRC_ALU;
      end
      S_DECODE: begin                   // ALUOut = PC + (SE(imm16) << 2)
        ctrl.alu_src_a = SRCA_PC;
        ctrl.alu_src_b = SRCB_SHL2;
        ctrl.alu_op    = ALUOP_ADD;
      end
      S_BRANCH: begin                   // Zero = (A - B); if (Zero) PC = ALUOut
        ctrl.alu_src_a = SRCA_A;
        ctrl.alu_src_b = SRCB_B;
        ctrl.alu_op    = ALUOP_SUB;
        ctrl.pc_src    = PCSRC_ALUOUT;
        ctrl.pc_we     = zero;
      end
      S_R1: begin                       // ALUOut = A op B
        ctrl.alu_src_a = SRCA_A;
        ctrl.alu_src_b = SRCB_B;
        ctrl.alu_op    = ALUOP_FUNCT;
      end
      S_R2: begin                       // Reg[Rd] = ALUOut
        ctrl.reg_we = 1'b1;
        ctrl.dst    = DST_RD;
        ctrl.reg_in = REGIN_ALUOUT;
      end
      S_SW1, S_LW1: begin               // ALUOut = A + SE(imm16)
        ctrl.alu_src_a = SRCA_A;
        ctrl.alu_src_b = SRCB_SE;
        ctrl.alu_op    = ALUOP_ADD;
      end
      S_SW2: begin                      // Mem[ALUOut] = B
        ctrl.mem_we = 1'b1;
        ctrl.mem_in = MEMIN_ALUOUT;
      end
      S_LW2: begin                      // MDR = Mem[ALUOut]
        ctrl.mem_in = MEMIN_ALUOUT;
      end
      S_LW3: begin                      // Reg[Rt] = MDR
        ctrl.reg_we = 1'b1;
        ctrl.dst    = DST_RT;
        ctrl.reg_in = REGIN_MDR;
      end
      default: ;
    endcase
  end

  // Rules of the schedule: the state register holds one of the ten states,
  // and each cycle commits at most one of the three writes (IR, memory,
  // register file), since memory and register file are used once per cycle.
  a_legal_state: assert property (@(posedge clk) disable iff (rst) state <= S_LW3);
  a_one_write:   assert property (@(posedge clk) disable iff (rst)
                                  $countones({ctrl.ir_we, ctrl.mem_we, ctrl.reg_we}) <= 1);

endmodule
