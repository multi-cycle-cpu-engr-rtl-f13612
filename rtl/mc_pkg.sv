// mc_pkg - types and constants shared by the multi-cycle CPU.
//
// Holds the instruction opcodes the machine decodes, the
// encodings of the control FSM states and of every multiplexer select, and
// the control word (ctrl_t) that the FSM hands to the datapath each cycle.
// Opcodes LW=35, SW=43, BEQ=4 and R-type=0 and the order of the mux inputs
// follow the original design; the state numbering follows its hand-drawn
// state diagram. The R-type function codes (add 0x20, sub 0x22) are the
// standard MIPS values and are this design's choice.
package mc_pkg;

  // Instruction opcodes, IR[31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'd0,
    OP_BEQ   = 6'd4,
    OP_LW    = 6'd35,
    OP_SW    = 6'd43
  } opcode_e;

  // R-type function codes, IR[5:0]
  localparam logic [5:0] FUNCT_ADD = 6'h20;
  localparam logic [5:0] FUNCT_SUB = 6'h22;

  // Control FSM states (numbered as in the state diagram)
  typedef enum logic [3:0] {
    S_IF     = 4'd0,  // IR = Mem[PC]; PC = PC + 4
    S_DECODE = 4'd1,  // A = Reg[Rs]; B = Reg[Rt]; ALUOut = PC + (SE(imm16) << 2)
    S_BRANCH = 4'd2,  // Zero = (A - B); if (Zero) PC = ALUOut
    S_R1     = 4'd3,  // ALUOut = A op B
    S_SW1    = 4'd4,  // ALUOut = A + SE(imm16)
    S_LW1    = 4'd5,  // ALUOut = A + SE(imm16)
    S_R2     = 4'd6,  // Reg[Rd] = ALUOut
    S_SW2    = 4'd7,  // Mem[ALUOut] = B
    S_LW2    = 4'd8,  // MDR = Mem[ALUOut]
    S_LW3    = 4'd9   // Reg[Rt] = MDR
  } state_e;

  // ALU operation requested by the control
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'd0,
    ALUOP_SUB   = 2'd1,
    ALUOP_FUNCT = 2'd2   // R-type: the function field decides
  } aluop_e;

  // Multiplexer selects; input order as in the control table
  typedef enum logic       {SRCA_A = 1'b0, SRCA_PC = 1'b1} srca_e;
  typedef enum logic [1:0] {SRCB_SHL2 = 2'd0, SRCB_SE = 2'd1, SRCB_B = 2'd2, SRCB_FOUR = 2'd3} srcb_e;
  typedef enum logic       {DST_RT = 1'b0, DST_RD = 1'b1} dst_e;
  typedef enum logic       {MEMIN_PC = 1'b0, MEMIN_ALUOUT = 1'b1} memin_e;
  typedef enum logic       {REGIN_MDR = 1'b0, REGIN_ALUOUT = 1'b1} regin_e;
  typedef enum logic       {PCSRC_ALU = 1'b0, PCSRC_ALUOUT = 1'b1} pcsrc_e;

  // One cycle's control word
  typedef struct packed {
    logic   pc_we;
    logic   mem_we;
    logic   reg_we;
    logic   ir_we;
    srca_e  alu_src_a;
    srcb_e  alu_src_b;
    aluop_e alu_op;
    dst_e   dst;
    memin_e mem_in;
    regin_e reg_in;
    pcsrc_e pc_src;
  } ctrl_t;

endpackage
