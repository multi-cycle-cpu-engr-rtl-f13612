// tb_mc_datapath - self-checking test of the multi-cycle datapath.
//
// The testbench plays the control FSM: it drives the control word of each
// cycle of add, sub, lw, sw and beq (taken and not taken, negative offset)
// by hand, and models the shared memory as an array with combinational read
// and clocked write. It checks, through the datapath's ports only, the
// register transfers of every cycle: PC + 4 after fetch, the branch target
// PC + (SE(imm16) << 2) in ALUOut after decode (seen on the memory address
// with MemIn = ALUOut), A op B and A + SE(imm16) in ALUOut, the store data B,
// the Zero flag, and register write-back (read back through B of a later
// store). Expected values are computed in the testbench.
module tb_mc_datapath;
  import mc_pkg::*;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [5:0]  opcode;
  logic        zero;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;

  mc_datapath #(.XLEN(32)) dut (.clk, .rst, .ctrl, .opcode, .zero, .mem_addr, .mem_wdata, .mem_rdata, .pc);

  // Behavioural shared memory (64 words)
  assign mem_rdata = mem[mem_addr[7:2]];
  always @(posedge clk) if (ctrl.mem_we) mem[mem_addr[7:2]] <= mem_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] f);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, f};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic expect32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic ctrl_t idle();
    return '{pc_we: 0, mem_we: 0, reg_we: 0, ir_we: 0, alu_src_a: SRCA_A, alu_src_b: SRCB_SHL2,
             alu_op: ALUOP_ADD, dst: DST_RT, mem_in: MEMIN_PC, reg_in: REGIN_MDR, pc_src: PCSRC_ALU};
  endfunction

  // Cycle 1 and 2, common to every instruction; checks PC + 4 and the branch target
  task automatic fetch_decode(output logic [31:0] instr);
    logic [31:0] pc0;
    pc0 = pc;
    ctrl = idle();
    ctrl.ir_we = 1; ctrl.pc_we = 1; ctrl.mem_in = MEMIN_PC;
    ctrl.alu_src_a = SRCA_PC; ctrl.alu_src_b = SRCB_FOUR; ctrl.alu_op = ALUOP_ADD; ctrl.pc_src = PCSRC_ALU;
    #1 expect32(mem_addr, pc0, "fetch address = PC");
    instr = mem_rdata;
    @(posedge clk); #1;
    expect32(pc, pc0 + 4, "PC + 4");
    expect32({26'd0, opcode}, {26'd0, instr[31:26]}, "opcode from IR");
    ctrl = idle();
    ctrl.alu_src_a = SRCA_PC; ctrl.alu_src_b = SRCB_SHL2; ctrl.alu_op = ALUOP_ADD;
    @(posedge clk); #1;
    ctrl = idle(); ctrl.mem_in = MEMIN_ALUOUT;
    #1 expect32(mem_addr, pc0 + 4 + ({{16{instr[15]}}, instr[15:0]} << 2), "ALUOut = branch target");
  endtask

  // Executes one instruction the way the control FSM would
  task automatic step(input logic [31:0] rf [32]);
    logic [31:0] instr, a, b, se, target, pcp4;
    fetch_decode(instr);
    a = rf[instr[25:21]]; b = rf[instr[20:16]];
    se = {{16{instr[15]}}, instr[15:0]};
    pcp4 = pc;
    target = pcp4 + (se << 2);
    case (instr[31:26])
      6'd0: begin
        ctrl = idle(); ctrl.alu_src_a = SRCA_A; ctrl.alu_src_b = SRCB_B; ctrl.alu_op = ALUOP_FUNCT;
        @(posedge clk); #1;
        ctrl = idle(); ctrl.mem_in = MEMIN_ALUOUT;
        #1 expect32(mem_addr, (instr[5:0] == 6'h22) ? a - b : a + b, "ALUOut = A op B");
        ctrl.reg_we = 1; ctrl.dst = DST_RD; ctrl.reg_in = REGIN_ALUOUT;
        @(posedge clk); #1;
      end
      6'd43, 6'd35: begin
        ctrl = idle(); ctrl.alu_src_a = SRCA_A; ctrl.alu_src_b = SRCB_SE; ctrl.alu_op = ALUOP_ADD;
        @(posedge clk); #1;
        ctrl = idle(); ctrl.mem_in = MEMIN_ALUOUT;
        #1 expect32(mem_addr, a + se, "ALUOut = A + SE(imm16)");
        if (instr[31:26] == 6'd43) begin
          expect32(mem_wdata, b, "store data = B");
          ctrl.mem_we = 1;
          @(posedge clk); #1;
        end else begin
          @(posedge clk); #1;         // MDR = Mem[ALUOut]
          ctrl = idle(); ctrl.reg_we = 1; ctrl.dst = DST_RT; ctrl.reg_in = REGIN_MDR;
          @(posedge clk); #1;
        end
      end
      6'd4: begin
        ctrl = idle(); ctrl.alu_src_a = SRCA_A; ctrl.alu_src_b = SRCB_B; ctrl.alu_op = ALUOP_SUB;
        ctrl.pc_src = PCSRC_ALUOUT;
        #1;
        checks++;
        if (zero !== (a == b)) begin failures++; $display("FAIL Zero = %b for A=%h B=%h", zero, a, b); end
        ctrl.pc_we = zero;
        @(posedge clk); #1;
        expect32(pc, (a == b) ? target : pcp4, "PC after beq");
      end
      default: ;
    endcase
    ctrl = idle();
  endtask

  logic [31:0] rf [32];

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = '0;
    // program (word addresses) and data at word 48..
    mem[0]  = itype(6'd35, 0, 1, 192);          // lw  r1, 192(r0)    r1 = 100
    mem[1]  = itype(6'd35, 0, 2, 196);          // lw  r2, 196(r0)    r2 = 30
    mem[2]  = rtype(1, 2, 3, 6'h20);            // add r3, r1, r2     130
    mem[3]  = rtype(1, 2, 4, 6'h22);            // sub r4, r1, r2     70
    mem[4]  = itype(6'd43, 0, 3, 200);          // sw  r3, 200(r0)
    mem[5]  = itype(6'd43, 0, 4, 204);          // sw  r4, 204(r0)
    mem[6]  = itype(6'd4, 1, 2, 5);             // beq r1, r2, +5     not taken
    mem[7]  = itype(6'd4, 3, 3, 2);             // beq r3, r3, +2     taken -> word 10
    mem[10] = itype(6'd35, 0, 5, 200);          // lw  r5, 200(r0)    r5 = 130 (stored value)
    mem[11] = itype(6'd43, 4, 5, -4);           // sw  r5, -4(r4)     address 66 -> word 16
    mem[12] = itype(6'd4, 0, 0, -13);           // beq r0, r0, -13    taken -> word 0
    mem[48] = 100; mem[49] = 30;
    ctrl = idle();
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    expect32(pc, 0, "PC after reset");
    for (int i = 0; i < 32; i++) rf[i] = 'x;
    rf[0] = 0;
    step(rf); rf[1] = 100;
    step(rf); rf[2] = 30;
    step(rf); rf[3] = 130;
    step(rf); rf[4] = 70;
    step(rf); expect32(mem[50], 130, "mem[200] after sw");
    step(rf); expect32(mem[51], 70, "mem[204] after sw");
    step(rf);                       // beq not taken
    step(rf);                       // beq taken
    step(rf); rf[5] = 130;
    step(rf); expect32(mem[16], 130, "mem[64] after sw with negative offset");
    step(rf);                       // beq backwards
    expect32(pc, 0, "PC after backwards branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
