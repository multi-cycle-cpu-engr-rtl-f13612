// tb_mc_cpu_random - random programs on the multi-cycle CPU against an
// instruction-level reference model.
//
// For each of 30 programs the testbench generates about 60 random instructions
// of the supported subset (add, sub, lw, sw, beq with forward offsets),
// preceded by loads that give registers 1..7 known values and followed by a
// branch-to-self. It loads program and data through the load port, runs the
// CPU until it reaches the final branch, and compares with a model that
// executes the same program one instruction at a time: registers 1..7, the
// 64-word data area, and the total cycle count, which must equal the sum of
// 3 (beq), 4 (add/sub, sw) and 5 (lw) cycles over the executed instructions.
// Program words 0..99, data words 128..191; memory has its default size.
module tb_mc_cpu_random;
  import mc_pkg::*;

  localparam int NPROG = 30, NBODY = 60, DATA_W0 = 128, NDATA = 64;

  logic        clk = 0, rst;
  logic        load_we;
  logic [31:0] load_addr, load_data, mem_rdata, pc;
  logic [3:0]  state;
  int checks = 0, failures = 0;

  mc_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .mem_rdata, .pc, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  logic [31:0] prog [256];
  logic [31:0] mreg [32];
  logic [31:0] mmem [256];
  int          plen, exp_cycles, n_taken, n_not_taken;

  task automatic gen_program();
    int n = 0;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    for (int r = 1; r < 8; r++) prog[n++] = itype(6'd35, 0, r, (DATA_W0 + r) * 4);
    for (int i = 0; i < NBODY; i++) begin
      int kind = $urandom_range(0, 9);
      int rs = $urandom_range(0, 7), rt = $urandom_range(0, 7), rd = $urandom_range(0, 7);
      if (kind < 5)
        prog[n] = {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, ($urandom_range(0, 1) != 0) ? FUNCT_SUB : FUNCT_ADD};
      else if (kind < 7)
        prog[n] = itype(6'd35, 0, rd, (DATA_W0 + $urandom_range(0, NDATA - 1)) * 4);
      else if (kind < 8)
        prog[n] = itype(6'd43, 0, rt, (DATA_W0 + $urandom_range(0, NDATA - 1)) * 4);
      else
        prog[n] = itype(6'd4, rs, ($urandom_range(0, 2) == 0) ? rs : rt, $urandom_range(0, 3));
      n++;
    end
    // halt: branch-to-self, four copies so that no forward branch can jump past it
    for (int k = 0; k < 4; k++) prog[n++] = itype(6'd4, 0, 0, -1);
    plen = n;
    for (int w = 0; w < NDATA; w++) prog[DATA_W0 + w] = $urandom;
  endtask

  // Instruction-level reference: runs until the branch-to-self
  task automatic run_model();
    int p = 0, steps = 0;
    for (int i = 0; i < 256; i++) mmem[i] = prog[i];
    for (int i = 0; i < 32; i++) mreg[i] = '0;
    exp_cycles = 0; n_taken = 0; n_not_taken = 0;
    forever begin
      logic [31:0] ins, a, b, se;
      ins = mmem[p];
      a = mreg[ins[25:21]]; b = mreg[ins[20:16]];
      se = {{16{ins[15]}}, ins[15:0]};
      if (ins == itype(6'd4, 0, 0, -1)) break;
      case (ins[31:26])
        6'd0:  begin exp_cycles += 4; if (ins[15:11] != 0) mreg[ins[15:11]] = (ins[5:0] == FUNCT_SUB) ? a - b : a + b; p++; end
        6'd35: begin exp_cycles += 5; if (ins[20:16] != 0) mreg[ins[20:16]] = mmem[(a + se) >> 2]; p++; end
        6'd43: begin exp_cycles += 4; mmem[(a + se) >> 2] = b; p++; end
        6'd4:  begin exp_cycles += 3; if (a == b) begin p += 1 + int'(signed'(se)); n_taken++; end else begin p++; n_not_taken++; end end
        default: begin exp_cycles += 2; p++; end
      endcase
      steps++;
      if (steps > 1000) break;
    end
  endtask

  int total_taken = 0, total_not_taken = 0, total_instr = 0;

  initial begin
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int t = 0; t < NPROG; t++) begin
      int cycles;
      gen_program();
      run_model();
      total_taken += n_taken; total_not_taken += n_not_taken;
      rst = 1;
      @(posedge clk); #1;
      for (int w = 0; w < 256; w++) begin
        load_addr = 32'(w * 4); load_data = prog[w]; load_we = 1;
        @(posedge clk); #1;
      end
      load_we = 0;
      rst = 0;
      cycles = 0;
      // run until the halt branch is in its Branch state
      while (!(state_e'(state) == S_BRANCH && dut.u_dp.ir == itype(6'd4, 0, 0, -1))) begin
        @(posedge clk); #1;
        cycles++;
        if (cycles > 5000) break;
      end
      // cycles counts up to the start of the halt beq's third cycle: subtract its IF and Decode
      checks++;
      if (cycles - 2 != exp_cycles) begin
        failures++;
        $display("FAIL program %0d: %0d cycles, model %0d", t, cycles - 2, exp_cycles);
      end
      rst = 1;
      for (int r = 1; r < 8; r++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[r] !== mreg[r]) begin
          failures++;
          $display("FAIL program %0d: r%0d = %h, model %h", t, r, dut.u_dp.u_rf.regs[r], mreg[r]);
        end
      end
      for (int w = DATA_W0; w < DATA_W0 + NDATA; w++) begin
        load_addr = 32'(w * 4);
        #1;
        checks++;
        if (mem_rdata !== mmem[w]) begin
          failures++;
          $display("FAIL program %0d: mem word %0d = %h, model %h", t, w, mem_rdata, mmem[w]);
        end
      end
    end
    $display("branches taken %0d, not taken %0d", total_taken, total_not_taken);
    checks++;
    if (total_taken == 0 || total_not_taken == 0) begin
      failures++; $display("FAIL branch outcomes not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
