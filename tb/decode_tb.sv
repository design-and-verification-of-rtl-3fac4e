// decode_tb: instruction decoding and jump logic.
//
// Part 1: random bundles of two non-jump instructions of every RV32IM class,
// of the supported RV32F instructions (FLW, FSW and each OP-FP group, with
// their integer/float operand and destination flags) plus illegal ones
// (SYSTEM, fused multiply-add, a bad rounding mode, bad funct7) are decoded and
// the registered decoded_ins fields compared with the values the testbench
// builds the instruction from; a bundle offered while issue_ready is low must
// leave the output unchanged.
// Part 2: jumps. JAL, JALR and conditional branches with random operands:
// branch_taken exactly on the second cycle when the operands are free, with
// the target computed from the testbench's own condition; a register file
// B_BUSY on a used operand delays it until released (and a busy unused
// operand does not); a producer of the operand held in the stage's own
// output register (Issue not ready) delays it; the link write of JAL/JALR is
// emitted as an ALU add of pc + 4, a branch emits nothing.
`timescale 1ns/1ps
module decode_tb;
  import vivit_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t fetched_ins_0 = 0, fetched_ins_1 = 0, from_rf_op1 = 0, from_rf_op2 = 0;
  logic [PC_LEN-1:0] fetched_pc_0 = 0, fetched_pc_1 = 0, next_pc_0, next_pc_1,
                     decoded_pc_0, decoded_pc_1;
  logic fetched_valid_0 = 0, fetched_valid_1 = 0, decode_ready, branch_taken;
  logic from_rf_op1_busy = 0, from_rf_op2_busy = 0, issue_ready = 1;
  logic [REG_IND_LEN-1:0] to_rf_op1_addr, to_rf_op2_addr;
  decoded_ins_t decoded_ins_0, decoded_ins_1;
  decode dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  // ---------------- part 1: expected decoding ----------------
  function automatic void gen(logic [31:0] pc, output word_t ins, output decoded_ins_t e);
    int rd, rs1, rs2, cls, imm;
    logic [2:0] f3;
    logic [4:0] ctl_of [8];
    ctl_of = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    rd = $urandom_range(0, 31); rs1 = $urandom_range(0, 31); rs2 = $urandom_range(0, 31);
    imm = $urandom_range(0, 4095) - 2048;
    f3 = 3'($urandom);
    cls = $urandom_range(0, 11);
    e = '0;
    e.valid = 1; e.which_fu = FU_ALU; e.ctl_fu = ALU_ADD; e.dest_addr = 5'(rd);
    e.has_dest = (rd != 0);
    case (cls)
      0: begin ins = LUI(rd, imm); e.imm = {20'(imm), 12'b0}; e.op2_i_notr = 1; end
      1: begin ins = AUIPC(rd, imm); e.imm = pc + {20'(imm), 12'b0}; e.op2_i_notr = 1; end
      2: begin
        if (f3 == 1 || f3 == 5) f3 = 0;
        ins = i_t(imm, rs1, f3, rd, 7'b0010011);
        e.ctl_fu = ctl_of[f3]; e.op1_addr = 5'(rs1); e.imm = 32'(imm); e.op2_i_notr = 1;
      end
      3: begin
        bit sra;
        sra = (f3[0] && $urandom_range(0, 1) == 1);
        f3 = f3[0] ? 3'd5 : 3'd1;
        ins = i_t(sra ? 32'h400 + rs2 : rs2, rs1, f3, rd, 7'b0010011);
        e.ctl_fu = sra ? ALU_SRA : ctl_of[f3]; e.op1_addr = 5'(rs1); e.imm = 32'(rs2);
        e.op2_i_notr = 1;
      end
      4: begin
        bit alt;
        alt = (f3 == 0 || f3 == 5) && $urandom_range(0, 1) == 1;
        ins = r_t(alt ? 7'h20 : 7'h00, rs2, rs1, f3, rd, 7'b0110011);
        e.ctl_fu = alt ? ((f3 == 0) ? ALU_SUB : ALU_SRA) : ctl_of[f3];
        e.op1_addr = 5'(rs1); e.op2_addr = 5'(rs2);
      end
      5: begin
        ins = r_t(7'h01, rs2, rs1, f3, rd, 7'b0110011);
        e.which_fu = FU_MULDIV; e.ctl_fu = {2'b0, f3}; e.op1_addr = 5'(rs1); e.op2_addr = 5'(rs2);
      end
      6: begin
        if (f3 == 3 || f3 > 5) f3 = 2;
        ins = i_t(imm, rs1, f3, rd, 7'b0000011);
        e.which_fu = FU_LSU; e.ctl_fu = {2'b0, f3}; e.op1_addr = 5'(rs1); e.imm = 32'(imm);
        e.op2_i_notr = 1; e.is_load = 1;
      end
      7: begin
        f3 = 3'($urandom_range(0, 2));
        ins = s_t(imm, rs2, rs1, f3);
        e.which_fu = FU_LSU; e.ctl_fu = {2'b01, f3}; e.op1_addr = 5'(rs1); e.op2_addr = 5'(rs2);
        e.imm = 32'(imm); e.is_store = 1; e.st_amt = st_amt_t'(f3[1:0]); e.dest_addr = 0;
        e.has_dest = 0;
      end
      8: begin
        e.which_fu = FU_LSU; e.op1_addr = 5'(rs1); e.imm = 32'(imm); e.ctl_fu = LS_LW;
        if ($urandom_range(0, 1) == 1) begin
          ins = FLW(rd, rs1, imm);
          e.op2_i_notr = 1; e.is_load = 1; e.dest_f_noti = 1; e.has_dest = 1;
        end else begin
          ins = FSW(rs2, rs1, imm);
          e.ctl_fu = LS_SW; e.op2_addr = 5'(rs2); e.op2_f_noti = 1; e.is_store = 1;
          e.st_amt = 2; e.dest_addr = 0; e.has_dest = 0;
        end
      end
      9: begin
        int k;
        logic [2:0] rm;
        rm = ($urandom_range(0, 1) == 1) ? 3'd7 : 3'd0;
        k = $urandom_range(0, 12);
        e.which_fu = FU_FPU; e.op1_addr = 5'(rs1); e.op2_addr = 5'(rs2);
        e.op1_f_noti = 1; e.op2_f_noti = 1; e.dest_f_noti = 1; e.has_dest = 1;
        case (k)
          0, 1, 2: begin
            ins = fp_t(7'(k * 4), rs2, rs1, rm, rd); e.ctl_fu = 5'(FP_ADD + k);
          end
          3: begin
            f3 = 3'($urandom_range(0, 2));
            ins = fp_t(7'h10, rs2, rs1, f3, rd); e.ctl_fu = 5'(FP_SGNJ + f3);
          end
          4: begin
            f3 = 3'($urandom_range(0, 1));
            ins = fp_t(7'h14, rs2, rs1, f3, rd); e.ctl_fu = f3[0] ? FP_MAX : FP_MIN;
          end
          5: begin
            f3 = 3'($urandom_range(0, 2));
            ins = fp_t(7'h50, rs2, rs1, f3, rd);
            e.ctl_fu = (f3 == 0) ? FP_LE : (f3 == 1) ? FP_LT : FP_EQ;
            e.dest_f_noti = 0; e.has_dest = (rd != 0);
          end
          6: begin
            f3 = 3'($urandom_range(0, 1));
            ins = fp_t(7'h60, 32'(f3), rs1, 3'd1, rd);
            e.ctl_fu = f3[0] ? FP_CVT_WU : FP_CVT_W;
            e.dest_f_noti = 0; e.has_dest = (rd != 0); e.op2_i_notr = 1; e.imm = 0;
          end
          7: begin
            f3 = 3'($urandom_range(0, 1));
            ins = fp_t(7'h68, 32'(f3), rs1, rm, rd);
            e.ctl_fu = f3[0] ? FP_CVT_SWU : FP_CVT_SW;
            e.op1_f_noti = 0; e.op2_i_notr = 1; e.imm = 0;
          end
          8: begin
            f3 = 3'($urandom_range(0, 1));
            ins = fp_t(7'h70, 0, rs1, f3, rd);
            e.ctl_fu = f3[0] ? FP_CLASS : FP_MV;
            e.dest_f_noti = 0; e.has_dest = (rd != 0); e.op2_i_notr = 1; e.imm = 0;
          end
          11: begin
            ins = fp_t(7'h0c, rs2, rs1, rm, rd); e.ctl_fu = FP_DIV;
          end
          12: begin
            ins = fp_t(7'h2c, 0, rs1, rm, rd); e.ctl_fu = FP_SQRT;
            e.op2_i_notr = 1; e.imm = 0;
          end
          default: begin
            ins = FMV_W_X(rd, rs1);
            e.ctl_fu = FP_MV; e.op1_f_noti = 0; e.op2_i_notr = 1; e.imm = 0;
          end
        endcase
      end
      default: begin
        case ($urandom_range(0, 4))
          0: ins = ECALL();
          1: ins = {5'(rs2), 2'b00, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b1000011};  // FMADD
          2: ins = fp_t(7'h00, rs2, rs1, 3'd1, rd);                // FADD toward zero
          3: ins = fp_t(7'h60, 0, rs1, 3'd0, rd);                  // FCVT.W.S nearest
          default: ins = r_t(7'h40, rs2, rs1, f3, rd, 7'b0110011);
        endcase
        e = '0; e.valid = 1; e.which_fu = FU_ALU; e.ctl_fu = ALU_ADD; e.op2_i_notr = 1;
        e.exc = 1; e.exc_code = EXC_ILLEGAL;
      end
    endcase
  endfunction

  function automatic bit same(decoded_ins_t d, decoded_ins_t e);
    if (d.valid != e.valid || d.exc != e.exc || d.which_fu != e.which_fu ||
        d.ctl_fu != e.ctl_fu || d.is_load != e.is_load || d.is_store != e.is_store ||
        d.has_dest != e.has_dest || d.op2_i_notr != e.op2_i_notr) return 0;
    if (e.exc) return d.exc_code == e.exc_code;
    if (e.has_dest && (d.dest_addr != e.dest_addr || d.dest_f_noti != e.dest_f_noti)) return 0;
    if (d.op1_f_noti != e.op1_f_noti) return 0;
    if (!e.op2_i_notr && d.op2_f_noti != e.op2_f_noti) return 0;
    if (e.op1_addr != 0 && d.op1_addr != e.op1_addr) return 0;
    if (!e.op2_i_notr && d.op2_addr != e.op2_addr) return 0;
    if (e.is_store && (d.op2_addr != e.op2_addr || d.st_amt != e.st_amt)) return 0;
    if (e.op2_i_notr && d.imm != e.imm) return 0;
    return 1;
  endfunction

  // ---------------- part 2: jumps ----------------
  // offers a jump alone and returns the cycle (1 = first) of branch_taken
  task automatic jump(word_t ins, logic [31:0] pc, int hold1, int hold2,
                      output int cyc, output logic [31:0] tgt);
    @(negedge clk);
    fetched_ins_0 = ins; fetched_pc_0 = pc; fetched_valid_0 = 1; fetched_valid_1 = 0;
    cyc = 0;
    for (int c = 1; c < 20; c++) begin
      from_rf_op1_busy = (c <= hold1); from_rf_op2_busy = (c <= hold2);
      #1;
      if (branch_taken) begin
        cyc = c; tgt = next_pc_0;
        chk(next_pc_1 == next_pc_0 + 4 && decode_ready, "next_pc_1 / ready with branch_taken");
        break;
      end
      chk(!decode_ready, "jump held");
      @(negedge clk);
    end
    @(negedge clk);
    fetched_valid_0 = 0; from_rf_op1_busy = 0; from_rf_op2_busy = 0;
  endtask

  initial begin
    word_t i0, i1;
    decoded_ins_t e0, e1, keep0;
    int cyc;
    logic [31:0] tgt, pc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      pc = {$urandom_range(0, 32'h3fff), 2'b0};
      gen(pc, i0, e0); gen(pc + 4, i1, e1);
      fetched_ins_0 = i0; fetched_ins_1 = i1; fetched_pc_0 = pc; fetched_pc_1 = pc + 4;
      fetched_valid_0 = 1; fetched_valid_1 = 1;
      issue_ready = ($urandom_range(0, 4) != 0);
      keep0 = decoded_ins_0;
      #1 chk(decode_ready == issue_ready && !branch_taken, "ready follows issue_ready");
      @(posedge clk); #1;
      if (issue_ready)
        chk(same(decoded_ins_0, e0) && same(decoded_ins_1, e1) && decoded_pc_0 == pc &&
            decoded_pc_1 == pc + 4, $sformatf("decode %h / %h", i0, i1));
      else chk(decoded_ins_0 == keep0, "output held when Issue not ready");
    end
    issue_ready = 1;
    @(negedge clk); fetched_valid_0 = 0; fetched_valid_1 = 0;
    @(negedge clk);
    for (int n = 0; n < 150; n++) begin
      int k, rs1, rs2, rd, off;
      logic [2:0] f3;
      logic c;
      word_t a, b, ins;
      logic [31:0] exp;
      int h1, h2;
      k = $urandom_range(0, 2);
      rs1 = $urandom_range(1, 31); rs2 = $urandom_range(1, 31); rd = $urandom_range(0, 31);
      a = ($urandom_range(0, 3) == 0) ? 32'h5 : $urandom;
      b = ($urandom_range(0, 1) == 0) ? a : ($urandom_range(0, 3) == 0) ? 32'h5 : $urandom;
      from_rf_op1 = a; from_rf_op2 = b;
      pc = {$urandom_range(0, 32'h3fff), 2'b0};
      h1 = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 4) : 0;
      h2 = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 4) : 0;
      off = 2 * ($urandom_range(0, 4095) - 2048);
      case (k)
        0: begin ins = JAL(rd, 2 * off); exp = pc + 32'(2 * off); h1 = 0; h2 = 0; end
        1: begin ins = JALR(rd, rs1, off / 2); exp = (a + 32'(off / 2)) & ~32'd1; end
        default: begin
          f3 = 3'($urandom); if (f3 == 2 || f3 == 3) f3 = 0;
          case (f3)
            0: c = (a == b);   1: c = (a != b);
            4: c = ($signed(a) < $signed(b)); 5: c = ($signed(a) >= $signed(b));
            6: c = (a < b);    default: c = (a >= b);
          endcase
          ins = b_t(off, rs2, rs1, f3);
          exp = c ? pc + 32'(off) : pc + 4;
        end
      endcase
      jump(ins, pc, h1, h2, cyc, tgt);
      if (k == 1) h2 = 0;     // JALR does not read rs2: its busy flag is ignored
      chk(cyc == ((h1 > 1 || h2 > 1) ? (h1 > h2 ? h1 : h2) + 1 : 2),
          $sformatf("jump %h resolved in cycle %0d (busy %0d/%0d)", ins, cyc, h1, h2));
      chk(tgt == exp, $sformatf("jump %h target %h expected %h", ins, tgt, exp));
      #1;
      if (k < 2)
        chk(decoded_ins_0.valid && decoded_ins_0.which_fu == FU_ALU && decoded_ins_0.imm == pc + 4 &&
            decoded_ins_0.dest_addr == 5'(rd) && decoded_ins_0.has_dest == (rd != 0) &&
            !decoded_ins_1.valid, "link write");
      else chk(!decoded_ins_0.valid && !decoded_ins_1.valid, "branch leaves nothing");
    end
    // a producer held in the output register delays the jump
    @(negedge clk);
    fetched_ins_0 = ADDI(7, 0, 1); fetched_pc_0 = 32'h100; fetched_valid_0 = 1;
    fetched_valid_1 = 0;
    @(negedge clk);
    issue_ready = 0;
    fetched_ins_0 = BEQ(7, 0, 16); fetched_pc_0 = 32'h104;
    from_rf_op1 = 0; from_rf_op2 = 0;
    #1 chk(!branch_taken, "no resolve in the sync cycle");
    @(negedge clk);
    issue_ready = 1;
    #1 chk(!branch_taken, "no resolve while the producer is in the output register");
    @(negedge clk);
    #1 chk(branch_taken && next_pc_0 == 32'h114, "resolved once the producer left");
    @(negedge clk);
    fetched_valid_0 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
