// tb_mc_control - self-checking test of the control FSM.
//
// For each opcode (BEQ with Zero 0 and 1, R-type, SW, LW and an unknown
// opcode) it releases the FSM into IF and follows it back to IF, checking:
// the state sequence, the number of cycles per instruction (3 for beq, 4 for
// add/sub and sw, 5 for lw), and, in every cycle, the fields of the control
// word that the register transfer of that cycle needs. The expected values
// are written out independently here from the per-cycle register transfers.
module tb_mc_control;
  import mc_pkg::*;

  logic       clk = 0, rst, zero;
  logic [5:0] opcode;
  ctrl_t      ctrl;
  state_e     state;
  int checks = 0, failures = 0;

  mc_control dut (.clk, .rst, .opcode, .zero, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL state %s: %s = %b, expected %b", state.name(), what, got, exp);
    end
  endtask

  task automatic expect_val(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL state %s: %s = %0d, expected %0d", state.name(), what, got, exp);
    end
  endtask

  // Check the control word in the current state
  task automatic check_ctrl();
    case (state)
      S_IF: begin   // IR = Mem[PC]; PC = PC + 4
        expect_bit(ctrl.ir_we, 1, "IR_WE"); expect_bit(ctrl.pc_we, 1, "PC_WE");
        expect_bit(ctrl.mem_we, 0, "Mem_WE"); expect_bit(ctrl.reg_we, 0, "Reg_WE");
        expect_val(ctrl.mem_in, 0, "MemIn=PC"); expect_val(ctrl.alu_src_a, 1, "SrcA=PC");
        expect_val(ctrl.alu_src_b, 3, "SrcB=4"); expect_val(ctrl.alu_op, 0, "ALUOp=add");
        expect_val(ctrl.pc_src, 0, "PCSrc=ALU");
      end
      S_DECODE: begin   // ALUOut = PC + SE(imm)<<2
        expect_bit(ctrl.ir_we, 0, "IR_WE"); expect_bit(ctrl.pc_we, 0, "PC_WE");
        expect_bit(ctrl.mem_we, 0, "Mem_WE"); expect_bit(ctrl.reg_we, 0, "Reg_WE");
        expect_val(ctrl.alu_src_a, 1, "SrcA=PC"); expect_val(ctrl.alu_src_b, 0, "SrcB=<<2");
        expect_val(ctrl.alu_op, 0, "ALUOp=add");
      end
      S_BRANCH: begin   // if (A-B == 0) PC = ALUOut
        expect_bit(ctrl.pc_we, zero, "PC_WE=Zero"); expect_bit(ctrl.ir_we, 0, "IR_WE");
        expect_bit(ctrl.mem_we, 0, "Mem_WE"); expect_bit(ctrl.reg_we, 0, "Reg_WE");
        expect_val(ctrl.alu_src_a, 0, "SrcA=A"); expect_val(ctrl.alu_src_b, 2, "SrcB=B");
        expect_val(ctrl.alu_op, 1, "ALUOp=sub"); expect_val(ctrl.pc_src, 1, "PCSrc=ALUOut");
      end
      S_R1: begin   // ALUOut = A op B
        expect_bit(ctrl.pc_we, 0, "PC_WE"); expect_bit(ctrl.ir_we, 0, "IR_WE");
        expect_bit(ctrl.mem_we, 0, "Mem_WE"); expect_bit(ctrl.reg_we, 0, "Reg_WE");
        expect_val(ctrl.alu_src_a, 0, "SrcA=A"); expect_val(ctrl.alu_src_b, 2, "SrcB=B");
        expect_val(ctrl.alu_op, 2, "ALUOp=funct");
      end
      S_R2: begin   // Reg[Rd] = ALUOut
        expect_bit(ctrl.reg_we, 1, "Reg_WE"); expect_bit(ctrl.pc_we, 0, "PC_WE");
        expect_bit(ctrl.ir_we, 0, "IR_WE"); expect_bit(ctrl.mem_we, 0, "Mem_WE");
        expect_val(ctrl.dst, 1, "Dst=Rd"); expect_val(ctrl.reg_in, 1, "RegIn=ALUOut");
      end
      S_SW1, S_LW1: begin   // ALUOut = A + SE(imm)
        expect_bit(ctrl.pc_we, 0, "PC_WE"); expect_bit(ctrl.ir_we, 0, "IR_WE");
        expect_bit(ctrl.mem_we, 0, "Mem_WE"); expect_bit(ctrl.reg_we, 0, "Reg_WE");
        expect_val(ctrl.alu_src_a, 0, "SrcA=A"); expect_val(ctrl.alu_src_b, 1, "SrcB=SE");
        expect_val(ctrl.alu_op, 0, "ALUOp=add");
      end
      S_SW2: begin   // Mem[ALUOut] = B
        expect_bit(ctrl.mem_we, 1, "Mem_WE"); expect_val(ctrl.mem_in, 1, "MemIn=ALUOut");
        expect_bit(ctrl.pc_we, 0, "PC_WE"); expect_bit(ctrl.ir_we, 0, "IR_WE");
        expect_bit(ctrl.reg_we, 0, "Reg_WE");
      end
      S_LW2: begin   // MDR = Mem[ALUOut]
        expect_val(ctrl.mem_in, 1, "MemIn=ALUOut"); expect_bit(ctrl.mem_we, 0, "Mem_WE");
        expect_bit(ctrl.pc_we, 0, "PC_WE"); expect_bit(ctrl.ir_we, 0, "IR_WE");
        expect_bit(ctrl.reg_we, 0, "Reg_WE");
      end
      S_LW3: begin   // Reg[Rt] = MDR
        expect_bit(ctrl.reg_we, 1, "Reg_WE"); expect_val(ctrl.dst, 0, "Dst=Rt");
        expect_val(ctrl.reg_in, 0, "RegIn=MDR"); expect_bit(ctrl.mem_we, 0, "Mem_WE");
        expect_bit(ctrl.pc_we, 0, "PC_WE"); expect_bit(ctrl.ir_we, 0, "IR_WE");
      end
      default: begin
        checks++; failures++;
        $display("FAIL illegal state %0d", state);
      end
    endcase
  endtask

  // Run one instruction from IF back to IF and compare the state path
  task automatic run_instr(input logic [5:0] op, input logic z, input state_e path[$]);
    int n;
    opcode = op; zero = z;
    n = 0;
    expect_val(state, S_IF, "start state");
    do begin
      if (n < path.size()) expect_val(state, path[n], $sformatf("state #%0d", n));
      #1 check_ctrl();
      @(posedge clk); #1;
      n++;
    end while (state != S_IF && n < 10);
    expect_val(n, path.size(), $sformatf("cycles for opcode %0d", op));
  endtask

  initial begin
    rst = 1; opcode = 0; zero = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    run_instr(6'd4,  1'b1, '{S_IF, S_DECODE, S_BRANCH});
    run_instr(6'd4,  1'b0, '{S_IF, S_DECODE, S_BRANCH});
    run_instr(6'd0,  1'b0, '{S_IF, S_DECODE, S_R1, S_R2});
    run_instr(6'd43, 1'b0, '{S_IF, S_DECODE, S_SW1, S_SW2});
    run_instr(6'd35, 1'b0, '{S_IF, S_DECODE, S_LW1, S_LW2, S_LW3});
    run_instr(6'd8,  1'b0, '{S_IF, S_DECODE});
    run_instr(6'd35, 1'b1, '{S_IF, S_DECODE, S_LW1, S_LW2, S_LW3});
    // reset in the middle of an instruction returns to IF
    opcode = 6'd35;
    @(posedge clk); @(posedge clk); #1;
    rst = 1; @(posedge clk); #1; rst = 0;
    expect_val(state, S_IF, "state after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
