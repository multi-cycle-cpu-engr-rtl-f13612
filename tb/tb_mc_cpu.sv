// tb_mc_cpu - end-to-end test of the multi-cycle CPU at its default size.
//
// Loads a program through the load port while the CPU is held in reset,
// releases reset and lets the CPU run it, then reads memory back through the
// load port and the register file hierarchically.
//
// Part 1 is ten instructions in the mix 50% ALU (add/sub), 20% load, 10%
// store, 20% branch (one beq taken, one not). With 4, 5, 4 and 3 cycles per
// type the ten instructions must take exactly 40 cycles, CPI 4.0; the test
// checks that count. Part 2 reloads a stored value, runs a counted loop
// closed by a backward beq (negative offset), stores the result and ends in
// a branch-to-self, which the test detects to stop.
//
// Every instruction's cycle count is checked against its type (beq 3,
// add/sub 4, sw 4, lw 5), and the test counts how often each mechanism
// happened: each instruction type, beq taken and not taken, a memory write
// followed by a read of the same word, and the one ALU doing PC + 4, the
// branch target and the instruction's own arithmetic. A mechanism that never
// happened is a failure.
module tb_mc_cpu;
  import mc_pkg::*;

  logic        clk = 0, rst;
  logic        load_we;
  logic [31:0] load_addr, load_data, mem_rdata, pc;
  logic [3:0]  state;
  int checks = 0, failures = 0;

  mc_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .mem_rdata, .pc, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
  function automatic logic [31:0] add(int rd, int rs, int rt); return rtype(rs, rt, rd, 6'h20); endfunction
  function automatic logic [31:0] sub(int rd, int rs, int rt); return rtype(rs, rt, rd, 6'h22); endfunction
  function automatic logic [31:0] lw(int rt, int imm, int rs);  return itype(6'd35, rs, rt, imm); endfunction
  function automatic logic [31:0] sw(int rt, int imm, int rs);  return itype(6'd43, rs, rt, imm); endfunction
  function automatic logic [31:0] beq(int rs, int rt, int off); return itype(6'd4, rs, rt, off); endfunction

  task automatic expect32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic load_word(input int addr, input logic [31:0] data);
    load_addr = 32'(addr); load_data = data; load_we = 1;
    @(posedge clk); #1;
    load_we = 0;
  endtask

  task automatic read_word(input int addr, output logic [31:0] data);
    load_addr = 32'(addr); load_we = 0;
    #1 data = mem_rdata;
  endtask

  // --- mechanism and cycle bookkeeping ----------------------------------
  int n_instr = 0, n_alu = 0, n_lw = 0, n_sw = 0, n_beq = 0;
  int n_taken = 0, n_not_taken = 0, n_pc4 = 0, n_target = 0;
  int cyc = 0, instr_start = 0, part1_cycles = -1;
  state_e kind;          // state after Decode: which instruction is running
  logic [31:0] pc_at_branch;
  bit running = 0, halted = 0;

  always @(posedge clk) begin
    if (running && !halted) begin
      cyc++;
      case (state_e'(state))
        S_IF: begin
          if (n_instr > 0) begin
            int len, exp_len;
            len = cyc - 1 - instr_start;
            case (kind)
              S_BRANCH: exp_len = 3;
              S_R1:     exp_len = 4;
              S_SW1:    exp_len = 4;
              S_LW1:    exp_len = 5;
              default:  exp_len = -1;
            endcase
            checks++;
            if (len != exp_len) begin
              failures++;
              $display("FAIL instruction %0d (%s) took %0d cycles, expected %0d", n_instr, kind.name(), len, exp_len);
            end
            if (n_instr == 10) part1_cycles = cyc - 1;
          end
          instr_start = cyc - 1;
          n_instr++;
          n_pc4++;
        end
        S_DECODE: n_target++;
        S_BRANCH: begin
          kind = S_BRANCH; n_beq++;
          pc_at_branch = pc;
          if (dut.zero) n_taken++; else n_not_taken++;
          if (dut.zero && dut.u_dp.alu_out == pc - 4) halted = 1;   // branch to itself
        end
        S_R1:  begin kind = S_R1;  n_alu++; end
        S_SW1: begin kind = S_SW1; n_sw++;  end
        S_LW1: begin kind = S_LW1; n_lw++;  end
        default: ;
      endcase
    end
  end

  logic [31:0] v;

  initial begin
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    @(posedge clk); #1;
    // Part 1: 5 ALU, 2 lw, 1 sw, 2 beq
    load_word(0,  lw(1, 128, 0));        // r1 = 5
    load_word(4,  lw(2, 132, 0));        // r2 = 7
    load_word(8,  add(3, 1, 2));         // r3 = 12
    load_word(12, sub(4, 2, 1));         // r4 = 2
    load_word(16, beq(1, 2, 5));         // not taken
    load_word(20, add(5, 3, 4));         // r5 = 14
    load_word(24, sw(5, 136, 0));        // mem[136] = 14
    load_word(28, beq(3, 3, 2));         // taken -> 40
    load_word(32, add(6, 1, 1));         // skipped
    load_word(36, add(7, 1, 1));         // skipped
    load_word(40, sub(8, 5, 3));         // r8 = 2
    load_word(44, add(9, 8, 8));         // r9 = 4
    // Part 2: reload, counted loop, store, halt
    load_word(48, lw(10, 136, 0));       // r10 = 14 (value stored in part 1)
    load_word(52, lw(11, 140, 0));       // r11 = 1
    load_word(56, lw(12, 144, 0));       // r12 = 3
    load_word(60, sub(13, 13, 13));      // r13 = 0
    load_word(64, add(13, 13, 10));      // loop: r13 += r10
    load_word(68, sub(12, 12, 11));      //       r12 -= 1
    load_word(72, beq(12, 0, 1));        //       exit to 80 when r12 == 0
    load_word(76, beq(0, 0, -4));        //       back to 64
    load_word(80, sw(13, 148, 0));       // mem[148] = 42
    load_word(84, beq(0, 0, -1));        // halt: branch to itself
    load_word(128, 32'd5);
    load_word(132, 32'd7);
    load_word(136, 32'hDEAD_BEEF);
    load_word(140, 32'd1);
    load_word(144, 32'd3);
    load_word(148, 32'd0);
    read_word(44, v); expect32(v, add(9, 8, 8), "program readback");
    @(posedge clk); #1;
    rst = 0; running = 1;
    wait (halted);
    @(posedge clk); #1;
    running = 0;
    rst = 1;
    expect32(32'(part1_cycles), 32'd40, "cycles for the 10-instruction mix (CPI 4.0)");
    read_word(136, v); expect32(v, 14, "mem[136] (sw r5)");
    read_word(148, v); expect32(v, 42, "mem[148] (loop result)");
    read_word(144, v); expect32(v, 3, "mem[144] untouched");
    expect32(dut.u_dp.u_rf.regs[3], 12, "r3 = r1 + r2");
    expect32(dut.u_dp.u_rf.regs[4], 2,  "r4 = r2 - r1");
    expect32(dut.u_dp.u_rf.regs[8], 2,  "r8 = r5 - r3");
    expect32(dut.u_dp.u_rf.regs[9], 4,  "r9 = r8 + r8");
    expect32(dut.u_dp.u_rf.regs[10], 14, "r10 loaded from stored word");
    expect32(dut.u_dp.u_rf.regs[12], 0, "loop counter");
    expect32(dut.u_dp.u_rf.regs[13], 42, "loop sum");
    // The skipped instructions must not have written r6/r7: compare with r1 + r1
    checks++;
    if (dut.u_dp.u_rf.regs[6] == 10 || dut.u_dp.u_rf.regs[7] == 10) begin
      failures++; $display("FAIL instruction after a taken beq was executed");
    end
    // Instruction counts: part 1 (10) + 4 + 3 loop iterations x 3 or 4 + sw + halt beq
    expect32(32'(n_lw), 5, "lw executed");
    expect32(32'(n_sw), 2, "sw executed");
    expect32(32'(n_alu), 5 + 1 + 6, "add/sub executed");
    expect32(32'(n_beq), 2 + 3 + 2 + 1, "beq executed");
    $display("mechanisms: lw=%0d sw=%0d alu=%0d beq=%0d taken=%0d not_taken=%0d pc+4=%0d target=%0d part1_cycles=%0d",
             n_lw, n_sw, n_alu, n_beq, n_taken, n_not_taken, n_pc4, n_target, part1_cycles);
    checks++; if (n_lw == 0)        begin failures++; $display("FAIL no lw"); end
    checks++; if (n_sw == 0)        begin failures++; $display("FAIL no sw"); end
    checks++; if (n_alu == 0)       begin failures++; $display("FAIL no add/sub"); end
    checks++; if (n_taken == 0)     begin failures++; $display("FAIL no taken beq"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("FAIL no untaken beq"); end
    checks++; if (n_pc4 == 0 || n_target == 0) begin failures++; $display("FAIL ALU reuse never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
