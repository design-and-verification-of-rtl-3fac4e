// decode: Instruction Decode and jump logic (third front-end stage).
//
// Decode logic: each of the two fetched instructions is turned into a
// decoded_ins record (FU selector, FU control code, operand and destination
// addresses with their integer/float flag, sign-extended immediate, load/store
// flags, store byte amount, exception flag and code), registered on
// decoded_ins_0/1 with its PC. Supported: RV32I, RV32M and the part of RV32F
// the FPU executes (FLW, FSW, FADD/FSUB/FMUL/FDIV, FSQRT, FMIN/FMAX, sign
// injection, compares, FCVT between word and single, FMV, FCLASS). LUI,
// AUIPC, JAL and JALR become ALU additions x0 + constant, the constant
// (U immediate, pc + U immediate or the link address pc + 4) being computed
// here. FENCE is
// a no-op; SYSTEM, fused multiply-add, a rounding mode other than
// nearest-even (or dynamic, which means the same here, there being no fcsr)
// for arithmetic and toward-zero for FCVT.W[U].S, and unknown opcodes are
// marked with the illegal-instruction exception and go down the pipeline as no-ops.
//
// Jump logic: the pre-decode guarantees that a jump arrives alone in slot 0.
// It is held there (decode_ready low) for one synchronisation cycle and then
// for as long as a source register is still being produced: the register
// file's B_BUSY flag for the operand read on to_rf_op1/2_addr, or an
// instruction still waiting in this stage's own output register. When the
// operands are there, the target is computed (JAL: pc + imm, JALR:
// (rs1 + imm) & ~1, branch: pc + imm if the condition holds, pc + 4 if not),
// branch_taken is pulsed with next_pc_0/1 (target, target + 4), the jump is
// consumed and, for JAL/JALR, the link write is sent to Issue. Conditional
// branches leave nothing for the rest of the pipeline. A jump therefore costs
// at least two cycles of front-end bubble.
//
// The output register advances only when issue_ready is high (Issue takes
// it); otherwise both it and the fetched inputs are held.
//
// Follows the document: decoded_ins layout, resolution of all jumps here,
// operand request to the register file through combinational ports, the
// minimum one-cycle synchronisation. This design's own choices: the check of
// the own output register, the encoding of LUI/AUIPC/JAL/JALR as ALU adds,
// exceptions as no-ops.
module decode
  import vivit_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // from Fetch
  input  word_t                  fetched_ins_0,
  input  word_t                  fetched_ins_1,
  input  logic [PC_LEN-1:0]      fetched_pc_0,
  input  logic [PC_LEN-1:0]      fetched_pc_1,
  input  logic                   fetched_valid_0,
  input  logic                   fetched_valid_1,
  output logic                   decode_ready,
  // jump resolution towards memory and Fetch
  output logic                   branch_taken,
  output logic [PC_LEN-1:0]      next_pc_0,
  output logic [PC_LEN-1:0]      next_pc_1,
  // register file read ports of the jump logic
  output logic [REG_IND_LEN-1:0] to_rf_op1_addr,
  output logic [REG_IND_LEN-1:0] to_rf_op2_addr,
  input  word_t                  from_rf_op1,
  input  word_t                  from_rf_op2,
  input  logic                   from_rf_op1_busy,
  input  logic                   from_rf_op2_busy,
  // towards Issue
  input  logic                   issue_ready,
  output decoded_ins_t           decoded_ins_0,
  output decoded_ins_t           decoded_ins_1,
  output logic [PC_LEN-1:0]      decoded_pc_0,
  output logic [PC_LEN-1:0]      decoded_pc_1
);
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_LOADFP = 7'b0000111;
  localparam logic [6:0] OP_STFP   = 7'b0100111;
  localparam logic [6:0] OP_FP     = 7'b1010011;

  function automatic word_t imm_i(word_t i); return {{20{i[31]}}, i[31:20]}; endfunction
  function automatic word_t imm_s(word_t i); return {{20{i[31]}}, i[31:25], i[11:7]}; endfunction
  function automatic word_t imm_b(word_t i);
    return {{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0};
  endfunction
  function automatic word_t imm_u(word_t i); return {i[31:12], 12'b0}; endfunction
  function automatic word_t imm_j(word_t i);
    return {{11{i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0};
  endfunction

  // ALU add of x0 and a constant into rd
  function automatic decoded_ins_t const_to_rd(word_t i, word_t c);
    decoded_ins_t d;
    d            = '0;
    d.which_fu   = FU_ALU;
    d.ctl_fu     = ALU_ADD;
    d.imm        = c;
    d.op2_i_notr = 1'b1;
    d.dest_addr  = i[11:7];
    d.has_dest   = (i[11:7] != 5'd0);
    d.valid      = 1'b1;
    return d;
  endfunction

  function automatic decoded_ins_t decode_one(word_t i, logic [PC_LEN-1:0] pc);
    decoded_ins_t d;
    logic [2:0] f3;
    logic [6:0] f7;
    logic       illegal;
    f3      = i[14:12];
    f7      = i[31:25];
    illegal = 1'b0;
    d           = '0;
    d.which_fu  = FU_ALU;
    d.ctl_fu    = ALU_ADD;
    d.op1_addr  = i[19:15];
    d.op2_addr  = i[24:20];
    d.dest_addr = i[11:7];
    d.valid     = 1'b1;
    unique case (i[6:0])
      OP_LUI:   d = const_to_rd(i, imm_u(i));
      OP_AUIPC: d = const_to_rd(i, pc + imm_u(i));
      OP_JAL, OP_JALR: d = const_to_rd(i, pc + 32'd4);
      OP_LOAD: begin
        d.which_fu   = FU_LSU;
        d.ctl_fu     = {2'b00, f3};
        d.imm        = imm_i(i);
        d.op2_addr   = '0;
        d.op2_i_notr = 1'b1;
        d.is_load    = 1'b1;
        d.has_dest   = (i[11:7] != 5'd0);
        illegal      = (f3 == 3'd3) || (f3 > 3'd5);
      end
      OP_STORE: begin
        d.which_fu  = FU_LSU;
        d.ctl_fu    = {2'b01, f3};
        d.imm       = imm_s(i);
        d.dest_addr = '0;
        d.is_store  = 1'b1;
        d.st_amt    = f3[1:0];
        illegal     = (f3 > 3'd2);
      end
      OP_IMM: begin
        d.imm        = (f3 == 3'b001 || f3 == 3'b101) ? {27'b0, i[24:20]} : imm_i(i);
        d.op2_addr   = '0;
        d.op2_i_notr = 1'b1;
        d.has_dest   = (i[11:7] != 5'd0);
        unique case (f3)
          3'b000: d.ctl_fu = ALU_ADD;
          3'b010: d.ctl_fu = ALU_SLT;
          3'b011: d.ctl_fu = ALU_SLTU;
          3'b100: d.ctl_fu = ALU_XOR;
          3'b110: d.ctl_fu = ALU_OR;
          3'b111: d.ctl_fu = ALU_AND;
          3'b001: begin d.ctl_fu = ALU_SLL; illegal = (f7 != 7'b0); end
          default: begin
            d.ctl_fu = f7[5] ? ALU_SRA : ALU_SRL;
            illegal  = (f7 != 7'b0) && (f7 != 7'b0100000);
          end
        endcase
      end
      OP_REG: begin
        d.has_dest = (i[11:7] != 5'd0);
        if (f7 == 7'b0000001) begin
          d.which_fu = FU_MULDIV;
          d.ctl_fu   = {2'b00, f3};
        end else begin
          illegal = (f7 != 7'b0) && !(f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101));
          unique case (f3)
            3'b000: d.ctl_fu = f7[5] ? ALU_SUB : ALU_ADD;
            3'b001: d.ctl_fu = ALU_SLL;
            3'b010: d.ctl_fu = ALU_SLT;
            3'b011: d.ctl_fu = ALU_SLTU;
            3'b100: d.ctl_fu = ALU_XOR;
            3'b101: d.ctl_fu = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110: d.ctl_fu = ALU_OR;
            default: d.ctl_fu = ALU_AND;
          endcase
        end
      end
      OP_LOADFP: begin                   // FLW
        d.which_fu    = FU_LSU;
        d.ctl_fu      = LS_LW;
        d.imm         = imm_i(i);
        d.op2_addr    = '0;
        d.op2_i_notr  = 1'b1;
        d.is_load     = 1'b1;
        d.dest_f_noti = 1'b1;
        d.has_dest    = 1'b1;
        illegal       = (f3 != 3'b010);
      end
      OP_STFP: begin                     // FSW
        d.which_fu   = FU_LSU;
        d.ctl_fu     = LS_SW;
        d.imm        = imm_s(i);
        d.op2_f_noti = 1'b1;
        d.dest_addr  = '0;
        d.is_store   = 1'b1;
        d.st_amt     = 2'd2;
        illegal      = (f3 != 3'b010);
      end
      OP_FP: begin
        logic rm_ok, unary, int_src, int_dst;
        rm_ok   = (f3 == 3'b000) || (f3 == 3'b111);      // nearest even, or dynamic
        unary   = 1'b0;
        int_src = 1'b0;
        int_dst = 1'b0;
        d.which_fu = FU_FPU;
        unique case (f7)
          7'b0000000: begin d.ctl_fu = FP_ADD; illegal = !rm_ok; end
          7'b0000100: begin d.ctl_fu = FP_SUB; illegal = !rm_ok; end
          7'b0001000: begin d.ctl_fu = FP_MUL; illegal = !rm_ok; end
          7'b0001100: begin d.ctl_fu = FP_DIV; illegal = !rm_ok; end
          7'b0101100: begin
            d.ctl_fu = FP_SQRT;
            unary    = 1'b1;
            illegal  = (i[24:20] != '0) || !rm_ok;
          end
          7'b0010000: begin
            d.ctl_fu = (f3 == 3'b000) ? FP_SGNJ : (f3 == 3'b001) ? FP_SGNJN : FP_SGNJX;
            illegal  = (f3 > 3'b010);
          end
          7'b0010100: begin
            d.ctl_fu = f3[0] ? FP_MAX : FP_MIN;
            illegal  = (f3 > 3'b001);
          end
          7'b1010000: begin
            d.ctl_fu = (f3 == 3'b000) ? FP_LE : (f3 == 3'b001) ? FP_LT : FP_EQ;
            int_dst  = 1'b1;
            illegal  = (f3 > 3'b010);
          end
          7'b1100000: begin
            d.ctl_fu = i[20] ? FP_CVT_WU : FP_CVT_W;
            unary    = 1'b1;
            int_dst  = 1'b1;
            illegal  = (i[24:21] != '0) || (f3 != 3'b001);  // round toward zero only
          end
          7'b1101000: begin
            d.ctl_fu = i[20] ? FP_CVT_SWU : FP_CVT_SW;
            unary    = 1'b1;
            int_src  = 1'b1;
            illegal  = (i[24:21] != '0) || !rm_ok;
          end
          7'b1110000: begin
            d.ctl_fu = f3[0] ? FP_CLASS : FP_MV;
            unary    = 1'b1;
            int_dst  = 1'b1;
            illegal  = (i[24:20] != '0) || (f3 > 3'b001);
          end
          7'b1111000: begin
            d.ctl_fu = FP_MV;
            unary    = 1'b1;
            int_src  = 1'b1;
            illegal  = (i[24:20] != '0) || (f3 != 3'b000);
          end
          default: illegal = 1'b1;     // fused multiply-add and the rest
        endcase
        d.op1_f_noti  = !int_src;
        d.op2_f_noti  = !unary;
        d.dest_f_noti = !int_dst;
        d.has_dest    = int_dst ? (i[11:7] != 5'd0) : 1'b1;
        if (unary) begin
          d.op2_addr   = '0;
          d.op2_i_notr = 1'b1;
        end
      end
      OP_FENCE: begin
        d.op1_addr   = '0;
        d.op2_i_notr = 1'b1;
        d.dest_addr  = '0;
      end
      default: illegal = 1'b1;
    endcase
    if (illegal) begin
      d          = '0;
      d.which_fu = FU_ALU;
      d.ctl_fu   = ALU_ADD;
      d.op2_i_notr = 1'b1;
      d.exc      = 1'b1;
      d.exc_code = EXC_ILLEGAL;
      d.valid    = 1'b1;
    end
    return d;
  endfunction

  // ---------------- jump logic ----------------
  word_t      ji;
  logic [6:0] jop;
  logic       is_j, need1, need2, hz1, hz2, wait_ops, resolve, cond;
  logic       jsync_q;
  word_t      a, b;

  assign ji   = fetched_ins_0;
  assign jop  = ji[6:0];
  assign is_j = fetched_valid_0 &&
                (jop == OP_JAL || jop == OP_JALR || jop == OP_BRANCH);
  assign need1 = (jop == OP_JALR) || (jop == OP_BRANCH);
  assign need2 = (jop == OP_BRANCH);
  assign to_rf_op1_addr = ji[19:15];
  assign to_rf_op2_addr = ji[24:20];
  assign a = from_rf_op1;
  assign b = from_rf_op2;

  function automatic logic pending(decoded_ins_t d, logic [REG_IND_LEN-1:0] r);
    return d.valid && d.has_dest && !d.dest_f_noti && (d.dest_addr == r);
  endfunction

  assign hz1 = pending(decoded_ins_0, ji[19:15]) || pending(decoded_ins_1, ji[19:15]);
  assign hz2 = pending(decoded_ins_0, ji[24:20]) || pending(decoded_ins_1, ji[24:20]);
  assign wait_ops = (need1 && (from_rf_op1_busy || hz1)) ||
                    (need2 && (from_rf_op2_busy || hz2));

  always_comb begin
    unique case (ji[14:12])
      3'b000:  cond = (a == b);
      3'b001:  cond = (a != b);
      3'b100:  cond = ($signed(a) <  $signed(b));
      3'b101:  cond = ($signed(a) >= $signed(b));
      3'b110:  cond = (a <  b);
      default: cond = (a >= b);          // 3'b111 (and unused codes)
    endcase
  end

  always_comb begin
    unique case (jop)
      OP_JAL:  next_pc_0 = fetched_pc_0 + imm_j(ji);
      OP_JALR: next_pc_0 = (a + imm_i(ji)) & ~32'd1;
      default: next_pc_0 = cond ? fetched_pc_0 + imm_b(ji) : fetched_pc_0 + 32'd4;
    endcase
    next_pc_1 = next_pc_0 + 32'd4;
  end

  assign resolve      = is_j && jsync_q && !wait_ops && issue_ready;
  assign branch_taken = resolve;
  assign decode_ready = issue_ready && (!is_j || resolve);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jsync_q       <= 1'b0;
      decoded_ins_0 <= '0;
      decoded_ins_1 <= '0;
      decoded_pc_0  <= '0;
      decoded_pc_1  <= '0;
    end else begin
      jsync_q <= is_j && !resolve;
      if (issue_ready) begin
        decoded_pc_0 <= fetched_pc_0;
        decoded_pc_1 <= fetched_pc_1;
        if (is_j) begin
          decoded_ins_0 <= '0;
          if (resolve && jop != OP_BRANCH)
            decoded_ins_0 <= decode_one(ji, fetched_pc_0);
          decoded_ins_1 <= '0;
        end else begin
          decoded_ins_0 <= fetched_valid_0 ? decode_one(fetched_ins_0, fetched_pc_0) : '0;
          decoded_ins_1 <= fetched_valid_1 ? decode_one(fetched_ins_1, fetched_pc_1) : '0;
        end
      end
    end
  end

endmodule
