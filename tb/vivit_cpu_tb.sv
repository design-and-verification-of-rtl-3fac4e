// vivit_cpu_tb: end-to-end test of the processor at its default sizes.
//
// A test program is assembled into the instruction memory while reset is
// held. It exercises: independent ALU bundles (dual dispatch and dual
// commit), dependency chains, bursts of multiplications, divisions and loads
// (priority-multiplexer overflow buffer and execute freeze), a long chain of
// dependent divisions (issue queue full), stores followed by loads of the
// same word (disambiguation stall), byte and half-word accesses, conditional
// branches first and second in a bundle, taken and not taken, a branch
// waiting for its operand, JAL/JALR calls and returns, a loop over an array,
// a floating-point section (conversions, a dependent FADD/FSUB/FMUL/FDIV/
// FSQRT chain, FSW/FLW, compares, a branch on an FLT result) and an illegal
// instruction. The program ends in a jump to itself.
//
// Every commit of the processor is checked, in order, against the reference
// instruction-set model (PC, destination register and value, store address,
// data and size, exception). At the end the array written in memory is
// compared too. Each mechanism above is counted and a failure is counted
// for one that never happened. The time to commit a block of 32 independent
// ALU instructions is checked against the dual-issue rate (at most 16
// cycles plus 4 of slack), and the throughput of the whole run is reported.
`timescale 1ns/1ps
module vivit_cpu_tb;
  import vivit_pkg::*;
  import rv_asm::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    prog_we = 0, dmem_we = 0;
  logic [31:0]             prog_addr = 0, dmem_waddr = 0;
  word_t                   prog_data = 0, dmem_wdata = 0;
  logic [1:0]              commit_valid;
  logic [PC_LEN-1:0]       commit_pc [2];
  rf_commit_t              commit_rf [2];
  mem_commit_t             commit_mem [2];
  logic [1:0]              exc_valid;
  logic [EXC_CODE_LEN-1:0] exc_code [2];
  logic [PC_LEN-1:0]       exc_pc [2];
  logic ev_jump, ev_jump_wait, ev_split_bundle, ev_issue_full, ev_ld_stall,
        ev_operand_stall, ev_freeze, ev_overflow;

  vivit_cpu dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  logic [31:0] final_pc, blk_lo, blk_hi;
  rv_iss iss;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  function automatic logic [31:0] here(); return 32'(prog.size() * 4); endfunction

  // ------------------------------------------------------------------
  task automatic build();
    logic [31:0] p, loop_pc, fn_pc, call_pc;
    // constants
    emit(LUI(1, 32'h12345));   emit(ADDI(1, 1, 32'h678));
    emit(ADDI(2, 0, 100));      emit(ADDI(3, 0, -7));
    emit(ADDI(4, 0, 13));       emit(ADDI(5, 0, 0));
    emit(LUI(10, 32'h00001));   // x10 = 0x1000 data base
    emit(AUIPC(11, 1));
    // independent ALU block: 32 instructions, commits 2 per cycle
    blk_lo = here();
    for (int k = 0; k < 16; k++) begin
      emit(ADDI(12 + (k % 4), 2, k));
      emit(XOR_(16 + (k % 4), 1, 3));
    end
    blk_hi = here() - 4;
    // dependency chain
    emit(ADD(6, 2, 3)); emit(ADD(7, 6, 6)); emit(SUB(8, 7, 2)); emit(SLT(9, 3, 8));
    emit(SRA(9, 1, 4)); emit(SLLI(9, 9, 3)); emit(SRAI(9, 3, 1)); emit(ANDI(9, 1, 255));
    // burst: multiplies, loads and ALU pairs finishing together
    emit(SW(1, 10, 0)); emit(SW(2, 10, 4)); emit(SW(3, 10, 8)); emit(SW(4, 10, 12));
    emit(MUL(20, 1, 2)); emit(MUL(21, 3, 4));
    emit(LW(22, 10, 16)); emit(LW(23, 10, 20));
    emit(MULH(24, 1, 3)); emit(DIV(25, 1, 3));
    emit(LW(26, 10, 24)); emit(LW(27, 10, 28));
    for (int k = 0; k < 8; k++) begin
      emit(ADDI(28, 2, k)); emit(ADDI(29, 4, k));
    end
    emit(DIV(25, 2, 0)); emit(REMU(24, 3, 4)); emit(DIV(25, 32'h0, 3));
    // store then load of the same word: disambiguation
    emit(SW(1, 10, 32)); emit(LW(13, 10, 32));
    emit(SB(3, 10, 37)); emit(LB(14, 10, 37)); emit(SH(1, 10, 42)); emit(LHU(15, 10, 42));
    emit(LW(16, 10, 40)); emit(ADD(17, 16, 15));
    // dependent division chain: fills the issue queue
    emit(ADDI(18, 0, -1)); emit(LUI(19, 32'h7ffff));
    for (int k = 0; k < 24; k++) emit(DIV(19, 19, 18));
    emit(ADDI(5, 5, 1));
    // branch first in bundle (aligned to an 8-byte boundary), not taken
    if (prog.size() % 2 != 0) emit(ADDI(0, 0, 0));
    emit(BEQ(2, 3, 8)); emit(ADDI(5, 5, 2));
    // branch second in bundle, taken over one instruction
    emit(ADDI(5, 5, 4)); emit(BNE(2, 3, 8)); emit(ADDI(5, 5, 64));
    emit(ADDI(5, 5, 8));
    // branch waiting for an operand produced by a multiply just before
    emit(MUL(6, 2, 4)); emit(BLT(6, 2, 8)); emit(ADDI(5, 5, 16));
    emit(ADDI(5, 5, 32));
    // call and return through JAL/JALR
    call_pc = here();
    emit(JAL(1, 0));            // patched below
    emit(ADDI(7, 5, 1));
    emit(JAL(0, 12));           // skip over the function
    fn_pc = here();
    emit(ADDI(8, 8, 3)); emit(JALR(0, 1, 0));
    prog[call_pc / 4] = JAL(1, int'(fn_pc) - int'(call_pc));
    // loop: a[i] = a[i-1] * 3 + i, 12 iterations, then a sum
    emit(ADDI(12, 0, 1)); emit(ADDI(13, 0, 12)); emit(ADDI(14, 10, 64));
    emit(SW(12, 14, 0)); emit(ADDI(15, 0, 1));
    loop_pc = here();
    emit(LW(16, 14, 0)); emit(ADDI(17, 0, 3)); emit(MUL(16, 16, 17)); emit(ADD(16, 16, 15));
    emit(SW(16, 14, 4)); emit(ADDI(14, 14, 4)); emit(ADDI(15, 15, 1));
    emit(BNE(15, 13, int'(loop_pc) - int'(here())));
    emit(BGEU(0, 15, 8)); emit(ADDI(20, 15, 100));
    // floating point: conversions, arithmetic chain, FSW/FLW, compares, and a
    // branch on a compare result still in the FPU
    emit(ADDI(12, 0, 7)); emit(FCVT_S_W(1, 12));
    emit(LUI(13, 32'h3fc00)); emit(FMV_W_X(2, 13));
    emit(FMUL_S(3, 1, 2)); emit(FADD_S(4, 3, 1)); emit(FSUB_S(5, 4, 2));
    emit(FMIN_S(6, 5, 3)); emit(FMAX_S(7, 5, 3));
    emit(FSW(7, 10, 200)); emit(FLW(8, 10, 200)); emit(FMUL_S(9, 8, 8));
    emit(FSGNJN_S(10, 9, 9)); emit(FLT_S(22, 10, 1)); emit(FCVT_W_S(23, 9));
    emit(FEQ_S(24, 8, 7)); emit(FMV_X_W(25, 10)); emit(FCLASS_S(26, 10));
    emit(BNE(22, 0, 8)); emit(ADDI(5, 5, 1));
    emit(FADD_S(11, 6, 7)); emit(FDIV_S(12, 11, 2)); emit(FSQRT_S(13, 12));
    emit(FCVT_W_S(27, 13));
    emit(ECALL());             // unsupported: reported as an exception
    emit(ADD(21, 20, 15));
    final_pc = here();
    emit(JAL(0, 0));
  endtask

  // ------------------------------------------------------------------
  int cyc = 0, ncommit = 0, ndual = 0, nexc = 0;
  int c_jump = 0, c_wait = 0, c_split = 0, c_full = 0, c_ld = 0, c_op = 0,
      c_frz = 0, c_ovf = 0;
  int blk_first = -1, blk_last = -1, nfp = 0;
  bit done = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    c_jump  += ev_jump;
    c_wait  += ev_jump_wait;
    c_split += ev_split_bundle;
    c_full  += ev_issue_full;
    c_ld    += ev_ld_stall;
    c_op    += ev_operand_stall;
    c_frz   += ev_freeze;
    c_ovf   += ev_overflow;
    if (commit_valid == 2'b11) ndual++;
    for (int s = 0; s < 2; s++) begin
      if (commit_valid[s] && !done) begin
        iss_out_t e;
        e = iss.step();
        ncommit++;
        chk(commit_pc[s] == e.pc, $sformatf("pc %h expected %h", commit_pc[s], e.pc));
        chk(exc_valid[s] == e.exc, $sformatf("exception flag at pc %h", e.pc));
        chk(commit_rf[s].valid == e.wr_rd, $sformatf("rf write flag at pc %h", e.pc));
        if (e.wr_rd)
          chk(commit_rf[s].addr == regaddr_t'(e.rd) && commit_rf[s].value == e.value,
              $sformatf("pc %h x%0d=%h expected x%0d=%h", e.pc, commit_rf[s].addr,
                        commit_rf[s].value, e.rd, e.value));
        chk(commit_mem[s].valid == e.store, $sformatf("store flag at pc %h", e.pc));
        if (e.store)
          chk(commit_mem[s].addr == e.addr && commit_mem[s].st_amt == 2'(e.amt) &&
              ((commit_mem[s].value ^ e.data) & ((e.amt == 0) ? 32'hff :
                                                 (e.amt == 1) ? 32'hffff : '1)) == 0,
              $sformatf("store at pc %h", e.pc));
        if (exc_valid[s]) nexc++;
        if (e.wr_rd && e.rd >= 32) nfp++;
        if (e.pc >= blk_lo && e.pc <= blk_hi) begin
          if (blk_first < 0) blk_first = cyc;
          blk_last = cyc;
        end
        if (commit_pc[s] == final_pc) done = 1;
      end
    end
  end

  initial begin
    iss = new();
    build();
    foreach (prog[k]) iss.imem[k] = prog[k];
    repeat (2) @(posedge clk);
    foreach (prog[k]) begin
      prog_we <= 1; prog_addr <= 32'(k * 4); prog_data <= prog[k];
      @(posedge clk);
    end
    prog_we <= 0;
    // data area starts at zero, as in the reference model
    for (int k = 0; k < 128; k++) begin
      dmem_we <= 1; dmem_waddr <= 32'h1000 + 32'(4 * k); dmem_wdata <= '0;
      @(posedge clk);
    end
    dmem_we <= 0;
    @(posedge clk);
    rst_n <= 1;
    wait (done);
    repeat (2) @(posedge clk);
    // array in memory against the reference model
    for (int k = 0; k < 14; k++) begin
      logic [31:0] a;
      a = 32'h1040 + 32'(4 * k);
      chk(dut.u_dmem.mem[a[17:2]] == iss.rdw(a), $sformatf("memory word %h", a));
    end
    chk(blk_last - blk_first + 1 <= 20,
        $sformatf("32 independent ALU instructions committed in %0d cycles", blk_last - blk_first + 1));
    chk(nexc == 1, "one exception reported");
    chk(c_jump  > 0, "jumps resolved");
    chk(c_wait  > 0, "jump waited for an operand");
    chk(c_split > 0, "jump second in bundle");
    chk(c_full  > 0, "issue queue full");
    chk(c_ld    > 0, "load held by disambiguation");
    chk(c_op    > 0, "operand wait");
    chk(c_frz   > 0, "execute freeze");
    chk(c_ovf   > 0, "priority buffer used");
    chk(ndual   > 0, "dual commits");
    chk(nfp     == 13, "floating-point register writes");
    $display("commits=%0d cycles=%0d dual=%0d fp_writes=%0d jumps=%0d jump_waits=%0d split=%0d iq_full=%0d ld_stall=%0d op_wait=%0d freeze=%0d overflow=%0d ALU-block=%0d cycles",
             ncommit, cyc, ndual, nfp, c_jump, c_wait, c_split, c_full, c_ld, c_op, c_frz, c_ovf,
             blk_last - blk_first + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, commits=%0d", ncommit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
