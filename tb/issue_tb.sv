// issue_tb: the Issue stage (issue queue, renaming, operand selection,
// dispatch, load/store disambiguation) in its real surroundings: Decode,
// Execute, ROB, commit routers, register file and data memory, with the
// testbench in place of Fetch.
//
// Random straight-line programs use only seven integer and eight
// floating-point registers, so nearly every instruction depends on a recent
// one, and mix ALU operations, multiplications, divisions, floating-point
// arithmetic (division and square root included), compares, conversions and moves in both directions, and
// byte/half/word and FLW/FSW loads and stores on a
// 128-byte area, so loads often follow stores to the same word. The
// testbench offers one or two instructions per cycle, with random bubbles,
// whenever Decode is ready. Every commit is compared in order with the
// reference instruction-set model, and at the end the memory area is
// compared too. The operand wait, the disambiguation stall and a full issue
// queue must each have happened.
`timescale 1ns/1ps
module issue_tb;
  import vivit_pkg::*;
  import rv_asm::*;
  localparam int N = 2500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t f_ins0 = 0, f_ins1 = 0;
  logic [PC_LEN-1:0] f_pc0 = 0, f_pc1 = 0, d_npc0, d_npc1, d_pc0, d_pc1;
  logic f_v0 = 0, f_v1 = 0, decode_ready, branch_taken, issue_ready;
  decoded_ins_t d_ins0, d_ins1;
  logic [REG_IND_LEN-1:0] j_addr [2];
  word_t j_data [2];
  logic j_bbusy [2];
  logic dmem_we = 0;
  logic [31:0] dmem_waddr = 0;
  word_t dmem_wdata = 0;
  logic ld_stall, op_stall;

  decode u_decode (
    .clk, .rst_n, .fetched_ins_0(f_ins0), .fetched_ins_1(f_ins1),
    .fetched_pc_0(f_pc0), .fetched_pc_1(f_pc1), .fetched_valid_0(f_v0),
    .fetched_valid_1(f_v1), .decode_ready, .branch_taken,
    .next_pc_0(d_npc0), .next_pc_1(d_npc1),
    .to_rf_op1_addr(j_addr[0]), .to_rf_op2_addr(j_addr[1]),
    .from_rf_op1(j_data[0]), .from_rf_op2(j_data[1]),
    .from_rf_op1_busy(j_bbusy[0]), .from_rf_op2_busy(j_bbusy[1]),
    .issue_ready, .decoded_ins_0(d_ins0), .decoded_ins_1(d_ins1),
    .decoded_pc_0(d_pc0), .decoded_pc_1(d_pc1));

  robid_t               rob_head, rob_tail;
  logic [ROB_IND_LEN:0] rob_count;
  logic [1:0]           reserve_valid;
  rob_reserve_t         reserve [2];
  robid_t               rob_rd_id [4];
  logic                 rob_rd_ready [4];
  word_t                rob_rd_value [4];
  regaddr_t             ren_rd_addr [4];
  robid_t               ren_rd_robid [4];
  logic                 ren_rd_bbusy [4];
  logic [1:0]           do_ren_valid, en_ren_valid;
  regaddr_t             do_ren_addr [2], en_ren_addr [2];
  robid_t               do_ren_robid [2];
  regaddr_t             op_rd_addr [4];
  word_t                op_rd_data [4];
  logic                 op_rd_busy [4];
  logic                 exe_ready, ovf;
  logic [3:0]           fu_room;
  exe_ins_t             x_ins0, x_ins1;
  mem_commit_t          to_mem [2];
  rf_commit_t           to_rf [2];
  fu_res_t              cor [2];
  rob_commit_t          rcommit [2];
  logic [MEM_IND_LEN-1:0] dm_raddr;
  word_t                dm_rdata;
  logic [1:0]           exc_valid;
  logic [EXC_CODE_LEN-1:0] exc_code [2];
  logic [PC_LEN-1:0]    exc_pc [2];

  issue dut (
    .clk, .rst_n, .decoded_ins_0(d_ins0), .decoded_ins_1(d_ins1),
    .decoded_pc_0(d_pc0), .decoded_pc_1(d_pc1), .issue_ready,
    .rob_head, .rob_tail, .rob_count, .reserve_valid, .reserve_rob_entries(reserve),
    .rob_rd_id, .rob_rd_ready, .rob_rd_value,
    .ren_rd_addr, .ren_rd_robid, .ren_rd_bbusy,
    .do_ren_valid, .do_ren_addr, .do_ren_robid,
    .op_rd_addr, .op_rd_data, .op_rd_busy, .en_ren_valid, .en_ren_addr,
    .exe_ready, .exe_fu_room(fu_room), .to_exe_ins_0(x_ins0), .to_exe_ins_1(x_ins1),
    .mem_commit(to_mem), .ld_disamb_stall(ld_stall), .operand_stall(op_stall));
  execute u_exe (
    .clk, .rst_n, .to_exe_ins_0(x_ins0), .to_exe_ins_1(x_ins1), .ready(exe_ready),
    .fu_room, .dmem_raddr(dm_raddr), .dmem_rdata(dm_rdata), .commit_on_rob(cor),
    .overflow_used(ovf));
  rob u_rob (
    .clk, .rst_n, .reserve_valid, .reserve_rob_entries(reserve), .commit_on_rob(cor),
    .rd_id(rob_rd_id), .rd_ready(rob_rd_ready), .rd_value(rob_rd_value),
    .head(rob_head), .tail(rob_tail), .count(rob_count), .commit(rcommit));
  for (genvar g = 0; g < 2; g++) begin : g_router
    commit_router u_cr (
      .commit(rcommit[g]), .to_rf_commit(to_rf[g]), .to_mem_commit(to_mem[g]),
      .exc_valid(exc_valid[g]), .exc_code(exc_code[g]), .exc_pc(exc_pc[g]));
  end
  regfile u_rf (
    .clk, .rst_n, .commit(to_rf), .do_ren_valid, .do_ren_addr, .do_ren_robid,
    .en_ren_valid, .en_ren_addr, .ren_rd_addr, .ren_rd_robid, .ren_rd_bbusy,
    .op_rd_addr, .op_rd_data, .op_rd_busy, .j_addr, .j_data, .j_bbusy);
  dmem #(.DEPTH(1024)) u_dmem (
    .clk, .raddr(dm_raddr), .rdata(dm_rdata), .wr(to_mem),
    .tb_we(dmem_we), .tb_addr(dmem_waddr), .tb_data(dmem_wdata));

  int checks = 0, failures = 0, ncommit = 0, c_ld = 0, c_op = 0, c_full = 0;
  logic [31:0] prog [N];
  rv_iss iss;

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  function automatic logic [31:0] rnd_ins();
    int rd, a, b, off;
    rd = $urandom_range(1, 7); a = $urandom_range(0, 7); b = $urandom_range(0, 7);
    off = 32'h100 + $urandom_range(0, 127);
    case ($urandom_range(0, 21))
      0: return ADD(rd, a, b);
      1: return SUB(rd, a, b);
      2: return XOR_(rd, a, b);
      3: return SLT(rd, a, b);
      4, 5: return ADDI(rd, a, $urandom_range(0, 4095) - 2048);
      6: return SRAI(rd, a, $urandom_range(0, 31));
      7: return MUL(rd, a, b);
      8: return MULH(rd, a, b);
      9: return ($urandom_range(0, 1) == 1) ? DIV(rd, a, b) : REMU(rd, a, b);
      10: return LW(rd, 0, off & ~3);
      11: return ($urandom_range(0, 1) == 1) ? LB(rd, 0, off) : LHU(rd, 0, off & ~1);
      12, 13: return SW(b, 0, off & ~3);
      14: return ($urandom_range(0, 1) == 1) ? SB(b, 0, off) : SH(b, 0, off & ~1);
      16: return ($urandom_range(0, 1) == 1) ? FCVT_S_W(rd, a) : FMV_W_X(rd, a);
      17: case ($urandom_range(0, 3))
            0: return FADD_S(rd, a, b);
            1: return FSUB_S(rd, a, b);
            2: return FMUL_S(rd, a, b);
            default: case ($urandom_range(0, 3))
                0: return FMIN_S(rd, a, b);
                1: return FDIV_S(rd, a, b);
                2: return FSQRT_S(rd, a);
                default: return FSGNJN_S(rd, a, b);
              endcase
          endcase
      18: case ($urandom_range(0, 3))
            0: return FLT_S(rd, a, b);
            1: return FCVT_W_S(rd, a);
            2: return FMV_X_W(rd, a);
            default: return FCLASS_S(rd, a);
          endcase
      19: return FLW(($urandom_range(0, 1) == 1) ? 0 : rd, 0, off & ~3);
      20: return FSW(b, 0, off & ~3);
      default: return ($urandom_range(0, 30) == 0) ? ECALL() : LUI(rd, $urandom);
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    c_ld += ld_stall; c_op += op_stall; c_full += !issue_ready;
    for (int s = 0; s < 2; s++) if (rcommit[s].valid) begin
      iss_out_t e;
      e = iss.step();
      ncommit++;
      chk(rcommit[s].e.ins_pc == e.pc, $sformatf("pc %h expected %h", rcommit[s].e.ins_pc, e.pc));
      chk(exc_valid[s] == e.exc, "exception");
      chk(to_rf[s].valid == e.wr_rd && (!e.wr_rd || (to_rf[s].addr == regaddr_t'(e.rd) &&
          to_rf[s].value == e.value)),
          $sformatf("pc %h x%0d=%h expected %h", e.pc, e.rd, to_rf[s].value, e.value));
      chk(to_mem[s].valid == e.store && (!e.store || (to_mem[s].addr == e.addr &&
          to_mem[s].st_amt == 2'(e.amt))), $sformatf("store at pc %h", e.pc));
    end
  end

  initial begin
    int k;
    iss = new();
    foreach (prog[i]) prog[i] = rnd_ins();
    foreach (prog[i]) iss.imem[i] = prog[i];
    for (int w = 0; w < 64; w++) begin
      @(negedge clk); dmem_we = 1; dmem_waddr = 32'h100 + 32'(4 * w); dmem_wdata = 0;
    end
    @(negedge clk); dmem_we = 0;
    rst_n = 1;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      // what Decode took at the last edge is gone
      if (f_v0 && decode_ready_q) begin f_v0 = 0; f_v1 = 0; end
      if (!f_v0 && $urandom_range(0, 5) != 0) begin
        f_ins0 = prog[k]; f_pc0 = 32'(4 * k); f_v0 = 1; k++;
        if (k < N && $urandom_range(0, 3) != 0) begin
          f_ins1 = prog[k]; f_pc1 = 32'(4 * k); f_v1 = 1; k++;
        end else f_v1 = 0;
      end
    end
    // withdraw the last bundle once Decode has taken it
    do @(negedge clk); while (!decode_ready_q);
    f_v0 = 0; f_v1 = 0;
    wait (ncommit >= N);
    repeat (3) @(posedge clk);
    for (int w = 0; w < 32; w++) begin
      logic [31:0] a;
      a = 32'h100 + 32'(4 * w);
      chk(u_dmem.mem[a[11:2]] == iss.rdw(a), $sformatf("memory word %h", a));
    end
    chk(c_ld > 0 && c_op > 0 && c_full > 0, "disambiguation stall, operand wait, queue full");
    $display("commits=%0d ld_stall=%0d op_wait=%0d full=%0d", ncommit, c_ld, c_op, c_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic decode_ready_q = 0;
  always @(posedge clk) decode_ready_q <= decode_ready;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, commits=%0d", ncommit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
