// rv_asm: RV32IM and RV32F instruction encoders, a single-precision
// reference and a reference instruction-set model used by the processor
// testbenches.
//
// The encoders build 32-bit instruction words from register numbers and
// immediates (R, I, S, B, U and J formats). fp_ref computes one FPU
// operation (codes as in vivit_pkg) with the same conventions as the unit:
// round to nearest even, subnormals as zero, canonical NaN. rv_iss.step
// executes instructions on a simple architectural state (32 integer and 32
// float registers, a word-indexed memory, the PC) up to the next one the
// processor commits and reports what it wrote, so a testbench can compare
// the processor's commits against it one instruction at a time.
package rv_asm;

  function automatic logic [31:0] r_t(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3,
                                      int rd, logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, logic [2:0] f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1, logic [2:0] f3);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), f3, m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(int off, int rs2, int rs1, logic [2:0] f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), f3, m[4:1], m[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] ADD (int rd, int a, int b); return r_t(7'h00, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return r_t(7'h20, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR_(int rd, int a, int b); return r_t(7'h00, b, a, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int a, int b); return r_t(7'h00, b, a, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (int rd, int a, int b); return r_t(7'h20, b, a, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MUL (int rd, int a, int b); return r_t(7'h01, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MULH(int rd, int a, int b); return r_t(7'h01, b, a, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] DIV (int rd, int a, int b); return r_t(7'h01, b, a, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] REMU(int rd, int a, int b); return r_t(7'h01, b, a, 3'd7, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int imm); return i_t(imm, a, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int a, int sh);  return i_t(sh, a, 3'd1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int a, int sh);  return i_t(sh | 32'h400, a, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int a, int imm); return i_t(imm, a, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW (int rd, int a, int imm); return i_t(imm, a, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LB (int rd, int a, int imm); return i_t(imm, a, 3'd0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(int rd, int a, int imm); return i_t(imm, a, 3'd5, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW (int rs2, int a, int imm); return s_t(imm, rs2, a, 3'd2); endfunction
  function automatic logic [31:0] SH (int rs2, int a, int imm); return s_t(imm, rs2, a, 3'd1); endfunction
  function automatic logic [31:0] SB (int rs2, int a, int imm); return s_t(imm, rs2, a, 3'd0); endfunction
  function automatic logic [31:0] BEQ(int a, int b, int off); return b_t(off, b, a, 3'd0); endfunction
  function automatic logic [31:0] BNE(int a, int b, int off); return b_t(off, b, a, 3'd1); endfunction
  function automatic logic [31:0] BLT(int a, int b, int off); return b_t(off, b, a, 3'd4); endfunction
  function automatic logic [31:0] BGEU(int a, int b, int off); return b_t(off, b, a, 3'd7); endfunction
  function automatic logic [31:0] LUI(int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] JAL(int rd, int off);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(int rd, int a, int imm); return i_t(imm, a, 3'd0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] ECALL(); return 32'h0000_0073; endfunction

  // RV32F (rounding mode field: 000 = nearest even, 001 = toward zero)
  function automatic logic [31:0] fp_t(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3, int rd);
    return r_t(f7, rs2, rs1, f3, rd, 7'b1010011);
  endfunction
  function automatic logic [31:0] FLW(int rd, int a, int imm); return i_t(imm, a, 3'd2, rd, 7'b0000111); endfunction
  function automatic logic [31:0] FSW(int rs2, int a, int imm);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(a), 3'd2, m[4:0], 7'b0100111};
  endfunction
  function automatic logic [31:0] FADD_S(int rd, int a, int b); return fp_t(7'h00, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FSUB_S(int rd, int a, int b); return fp_t(7'h04, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FMUL_S(int rd, int a, int b); return fp_t(7'h08, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FDIV_S(int rd, int a, int b); return fp_t(7'h0c, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FSQRT_S(int rd, int a);   return fp_t(7'h2c, 0, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FSGNJN_S(int rd, int a, int b); return fp_t(7'h10, b, a, 3'd1, rd); endfunction
  function automatic logic [31:0] FMIN_S(int rd, int a, int b); return fp_t(7'h14, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FMAX_S(int rd, int a, int b); return fp_t(7'h14, b, a, 3'd1, rd); endfunction
  function automatic logic [31:0] FLT_S(int rd, int a, int b); return fp_t(7'h50, b, a, 3'd1, rd); endfunction
  function automatic logic [31:0] FEQ_S(int rd, int a, int b); return fp_t(7'h50, b, a, 3'd2, rd); endfunction
  function automatic logic [31:0] FCVT_W_S(int rd, int a);  return fp_t(7'h60, 0, a, 3'd1, rd); endfunction
  function automatic logic [31:0] FCVT_S_W(int rd, int a);  return fp_t(7'h68, 0, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FMV_X_W(int rd, int a);   return fp_t(7'h70, 0, a, 3'd0, rd); endfunction
  function automatic logic [31:0] FCLASS_S(int rd, int a);  return fp_t(7'h70, 0, a, 3'd1, rd); endfunction
  function automatic logic [31:0] FMV_W_X(int rd, int a);   return fp_t(7'h78, 0, a, 3'd0, rd); endfunction

  // ---------------- single-precision reference ----------------
  // Values are widened to double precision, where sums and products of two
  // binary32 numbers are exact (or off only far below the binary32 rounding
  // point), and rounded back to nearest even by hand. Subnormals count as
  // zero, NaN results are the canonical quiet NaN.
  localparam logic [31:0] QNAN = 32'h7fc0_0000;
  function automatic logic f_nan(logic [31:0] x); return x[30:23] == 8'hff && x[22:0] != 0; endfunction
  function automatic real f2r(logic [31:0] x);
    logic [10:0] e;
    if (x[30:23] == 0) return 0.0;          // signs of zeros are handled by the callers
    e = (x[30:23] == 8'hff) ? 11'h7ff : 11'(int'(x[30:23]) - 127 + 1023);
    return $bitstoreal({x[31], e, x[22:0], 29'b0});
  endfunction
  function automatic logic [31:0] r2f(real d);
    logic [63:0] b;
    int          e;
    logic [24:0] m;
    logic        g, st;
    b = $realtobits(d);
    if (b[62:52] == 11'h7ff) return (b[51:0] != 0) ? QNAN : {b[63], 8'hff, 23'b0};
    if (b[62:52] == 0) return {b[63], 31'b0};
    e  = int'(b[62:52]) - 1023 + 127;
    m  = {2'b01, b[51:29]};
    g  = b[28];
    st = (b[27:0] != 0);
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {b[63], 8'hff, 23'b0};
    if (e <= 0) return {b[63], 31'b0};
    return {b[63], 8'(e), m[22:0]};
  endfunction
  // op: 0 add 1 sub 2 mul 3 min 4 max 5 sgnj 6 sgnjn 7 sgnjx 8 eq 9 lt 10 le
  //     11 cvt.w.s 12 cvt.wu.s 13 cvt.s.w 14 cvt.s.wu 15 move 16 class
  function automatic logic [31:0] fp_ref(int op, logic [31:0] a, logic [31:0] b);
    real x, y;
    x = f2r(a); y = f2r(b);
    case (op)
      0, 1, 2: begin
        logic sb;
        if (f_nan(a) || f_nan(b)) return QNAN;
        sb = (op == 1) ? !b[31] : b[31];
        // signed zeros are settled here, not left to the host arithmetic
        if (op == 2 && (x == 0.0 || y == 0.0) && a[30:23] != 8'hff && b[30:23] != 8'hff)
          return {a[31] ^ b[31], 31'b0};
        if (op != 2 && a[30:23] == 8'hff && b[30:23] == 8'hff) return (a[31] == sb) ? a : QNAN;
        if (op != 2 && a[30:23] == 8'hff) return a;
        if (op != 2 && b[30:23] == 8'hff) return {sb, b[30:0]};
        if (op != 2 && x == 0.0 && y == 0.0) return {a[31] & sb, 31'b0};
        if (op != 2 && x == 0.0) return {sb, b[30:0]};
        if (op != 2 && y == 0.0) return a;
        if (op != 2 && x == (op == 1 ? y : -y)) return 32'h0;
        return r2f(op == 0 ? x + y : op == 1 ? x - y : x * y);
      end
      3, 4: begin
        if (f_nan(a) && f_nan(b)) return QNAN;
        if (f_nan(a)) return b;
        if (f_nan(b)) return a;
        if (x == y) return ((op == 3) == a[31]) ? a : b;
        return ((op == 3) == (x < y)) ? a : b;
      end
      5: return {b[31], a[30:0]};
      6: return {~b[31], a[30:0]};
      7: return {a[31] ^ b[31], a[30:0]};
      8, 9, 10: begin
        if (f_nan(a) || f_nan(b)) return 0;
        return {31'b0, op == 8 ? x == y : op == 9 ? x < y : x <= y};
      end
      11: begin
        if (f_nan(a) || x >= 2147483648.0) return 32'h7fff_ffff;
        if (x <= -2147483649.0) return 32'h8000_0000;
        return $rtoi(x);
      end
      12: begin
        if (f_nan(a) || x >= 4294967296.0) return 32'hffff_ffff;
        if (x < 1.0) return 0;
        if (x >= 2147483648.0) return $rtoi(x - 4294967296.0);
        return $rtoi(x);
      end
      13: return r2f(real'($signed(a)));
      14: return r2f(real'({32'b0, a}));
      15: return a;
      17: begin
        if (f_nan(a) || f_nan(b)) return QNAN;
        if ((a[30:23] == 8'hff && b[30:23] == 8'hff) || (x == 0.0 && y == 0.0)) return QNAN;
        if (a[30:23] == 8'hff || y == 0.0) return {a[31] ^ b[31], 8'hff, 23'b0};
        if (x == 0.0 || b[30:23] == 8'hff) return {a[31] ^ b[31], 31'b0};
        return r2f(x / y);
      end
      18: begin
        if (f_nan(a)) return QNAN;
        if (x == 0.0) return {a[31], 31'b0};
        if (a[31]) return QNAN;
        if (a[30:23] == 8'hff) return a;
        return r2f($sqrt(x));
      end
      default: begin
        logic [31:0] c;
        c = 0;
        if (f_nan(a)) c[a[22] ? 9 : 8] = 1;
        else if (a[30:23] == 8'hff) c[a[31] ? 0 : 7] = 1;
        else if (a[30:0] == 0) c[a[31] ? 3 : 4] = 1;
        else if (a[30:23] == 0) c[a[31] ? 2 : 5] = 1;
        else c[a[31] ? 1 : 6] = 1;
        return c;
      end
    endcase
  endfunction

  // ---------------- reference model ----------------
  typedef struct {
    logic [31:0] pc;
    logic        wr_rd;     // writes a register other than x0
    int          rd;        // register address {float, index}: f-registers are 32..63
    logic [31:0] value;
    logic        store;
    logic [31:0] addr;
    logic [31:0] data;
    int          amt;       // 0: byte, 1: half, 2: word
    logic        exc;
  } iss_out_t;

  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] f [32];
    logic [31:0] m [int];   // word index -> word
    logic [31:0] pc;
    logic [31:0] imem [int];

    function new();
      foreach (x[i]) x[i] = 0;
      foreach (f[i]) f[i] = 0;
      pc = 0;
    endfunction

    function logic [31:0] rdw(logic [31:0] a);
      int k;
      k = int'(a[17:2]);
      return m.exists(k) ? m[k] : 32'h0;
    endfunction

    // executes instructions until one that the processor commits (anything
    // but a conditional branch) and returns its effect
    function iss_out_t step();
      iss_out_t o;
      logic [31:0] i, a, b, immi, imms, immb, r, w;
      logic [6:0] op;
      logic [2:0] f3;
      logic signed [63:0] p;
      forever begin
        i  = imem.exists(int'(pc[31:2])) ? imem[int'(pc[31:2])] : 32'h0;
        op = i[6:0];
        f3 = i[14:12];
        a  = x[i[19:15]];
        b  = x[i[24:20]];
        immi = {{20{i[31]}}, i[31:20]};
        imms = {{20{i[31]}}, i[31:25], i[11:7]};
        immb = {{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0};
        o = '{pc: pc, wr_rd: 0, rd: int'(i[11:7]), value: 0, store: 0, addr: 0,
              data: 0, amt: 0, exc: 0};
        if (op == 7'b1100011) begin
          logic c;
          case (f3)
            3'd0: c = (a == b);
            3'd1: c = (a != b);
            3'd4: c = ($signed(a) < $signed(b));
            3'd5: c = ($signed(a) >= $signed(b));
            3'd6: c = (a < b);
            default: c = (a >= b);
          endcase
          pc = c ? pc + immb : pc + 4;
          continue;
        end
        r = 0;
        o.wr_rd = (i[11:7] != 0);
        case (op)
          7'b0110111: r = {i[31:12], 12'b0};
          7'b0010111: r = pc + {i[31:12], 12'b0};
          7'b1101111: r = pc + 4;
          7'b1100111: r = pc + 4;
          7'b0010011: case (f3)
              3'd0: r = a + immi;
              3'd1: r = a << i[24:20];
              3'd2: r = {31'b0, $signed(a) < $signed(immi)};
              3'd3: r = {31'b0, a < immi};
              3'd4: r = a ^ immi;
              3'd5: r = i[30] ? 32'($signed(a) >>> i[24:20]) : a >> i[24:20];
              3'd6: r = a | immi;
              default: r = a & immi;
            endcase
          7'b0110011:
            if (i[25]) begin
              case (f3)
                3'd0: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); r = p[31:0]; end
                3'd1: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); r = p[63:32]; end
                3'd2: begin p = $signed({{32{a[31]}}, a}) * $signed({32'b0, b}); r = p[63:32]; end
                3'd3: begin p = $signed({32'b0, a}) * $signed({32'b0, b}); r = p[63:32]; end
                3'd4: r = (b == 0) ? 32'hffff_ffff : (a == 32'h8000_0000 && b == 32'hffff_ffff) ? a :
                          32'($signed(a) / $signed(b));
                3'd5: r = (b == 0) ? 32'hffff_ffff : a / b;
                3'd6: r = (b == 0) ? a : (a == 32'h8000_0000 && b == 32'hffff_ffff) ? 0 :
                          32'($signed(a) % $signed(b));
                default: r = (b == 0) ? a : a % b;
              endcase
            end else begin
              case (f3)
                3'd0: r = i[30] ? a - b : a + b;
                3'd1: r = a << b[4:0];
                3'd2: r = {31'b0, $signed(a) < $signed(b)};
                3'd3: r = {31'b0, a < b};
                3'd4: r = a ^ b;
                3'd5: r = i[30] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
                3'd6: r = a | b;
                default: r = a & b;
              endcase
            end
          7'b0000011: begin
            logic [31:0] ad;
            ad = a + immi;
            w  = rdw(ad) >> (8 * ad[1:0]);
            case (f3)
              3'd0: r = {{24{w[7]}}, w[7:0]};
              3'd1: r = {{16{w[15]}}, w[15:0]};
              3'd4: r = {24'b0, w[7:0]};
              3'd5: r = {16'b0, w[15:0]};
              default: r = w;
            endcase
          end
          7'b0100011: begin
            logic [31:0] ad, old, mask;
            ad = a + imms;
            o.wr_rd = 0;
            o.store = 1;
            o.addr  = ad;
            o.data  = b;
            o.amt   = int'(f3);
            mask = (f3 == 0) ? 32'hff : (f3 == 1) ? 32'hffff : 32'hffff_ffff;
            old  = rdw(ad);
            m[int'(ad[17:2])] = (old & ~(mask << (8 * ad[1:0]))) | ((b & mask) << (8 * ad[1:0]));
          end
          7'b0001111: o.wr_rd = 0;
          7'b0000111: begin                                  // FLW
            o.rd    = 32 + o.rd;
            o.wr_rd = (f3 == 2);
            o.exc   = (f3 != 2);
            r       = rdw(a + immi);
          end
          7'b0100111: begin                                  // FSW
            logic [31:0] ad;
            ad = a + imms;
            o.wr_rd = 0;
            if (f3 != 2) o.exc = 1;
            else begin
              o.store = 1;
              o.addr  = ad;
              o.data  = f[i[24:20]];
              o.amt   = 2;
              m[int'(ad[17:2])] = f[i[24:20]];
            end
          end
          7'b1010011: begin
            logic [31:0] fa, fb;
            logic [6:0]  f7;
            int          fop;
            logic        int_dst;
            f7  = i[31:25];
            fa  = f[i[19:15]];
            fb  = f[i[24:20]];
            fop = -1;
            int_dst = 0;
            case (f7)
              7'h00: if (f3 == 0 || f3 == 7) fop = 0;
              7'h04: if (f3 == 0 || f3 == 7) fop = 1;
              7'h08: if (f3 == 0 || f3 == 7) fop = 2;
              7'h0c: if (f3 == 0 || f3 == 7) fop = 17;
              7'h2c: if ((f3 == 0 || f3 == 7) && i[24:20] == 0) fop = 18;
              7'h10: if (f3 <= 2) fop = 5 + int'(f3);
              7'h14: if (f3 <= 1) fop = 3 + int'(f3);
              7'h50: if (f3 <= 2) begin fop = (f3 == 0) ? 10 : (f3 == 1) ? 9 : 8; int_dst = 1; end
              7'h60: if (f3 == 1 && i[24:21] == 0) begin fop = 11 + int'(i[20]); int_dst = 1; end
              7'h68: if ((f3 == 0 || f3 == 7) && i[24:21] == 0) begin fop = 13 + int'(i[20]); fa = a; end
              7'h70: if (f3 <= 1 && i[24:20] == 0) begin fop = f3[0] ? 16 : 15; int_dst = 1; end
              7'h78: if (f3 == 0 && i[24:20] == 0) begin fop = 15; fa = a; end
              default: ;
            endcase
            if (fop < 0) begin o.wr_rd = 0; o.exc = 1; end
            else begin
              r = fp_ref(fop, fa, fb);
              if (!int_dst) begin o.rd = 32 + o.rd; o.wr_rd = 1; end
            end
          end
          default: begin o.wr_rd = 0; o.exc = 1; end
        endcase
        if (op == 7'b1101111)
          pc = pc + {{11{i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0};
        else if (op == 7'b1100111)
          pc = (a + immi) & ~32'd1;
        else
          pc = pc + 4;
        o.value = r;
        if (o.wr_rd && o.rd >= 32) f[o.rd - 32] = r;
        else if (o.wr_rd) x[i[11:7]] = r;
        return o;
      end
    endfunction
  endclass

endpackage
