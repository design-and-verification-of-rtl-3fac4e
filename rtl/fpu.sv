// fpu: pipelined single-precision floating-point unit (RV32F subset).
//
// Executes FADD.S, FSUB.S, FMUL.S, FMIN.S, FMAX.S, FSGNJ[N|X].S, FEQ.S,
// FLT.S, FLE.S, FCVT.W[U].S, FCVT.S.W[U], FMV.X.W / FMV.W.X, FCLASS.S,
// FDIV.S and FSQRT.S on IEEE-754 binary32 values. ins.op1 / ins.op2 carry the source registers'
// bits (integer or floating-point, as Decode chose); the result leaves on res
// LATENCY cycles after the instruction is taken, one instruction per cycle,
// through a chain of registers like the MULDIV unit. With en low the whole
// chain holds.
//
// Arithmetic: operands are unpacked with the hidden bit, aligned with three
// extra bits (guard, round, sticky), added, subtracted or multiplied,
// normalised (leading-zero count) and rounded to nearest, ties to even.
// Division divides the significands with 26 quotient bits after the leading
// one and a sticky bit from the remainder; square root takes a bit-by-bit
// integer root of the significand scaled by an even power of two. Both are
// combinational and ride the same register chain as everything else.
// NaN results are the canonical quiet NaN; inf - inf and 0 * inf give NaN.
// Comparisons and FMIN/FMAX follow IEEE-754 / RISC-V (-0 < +0 for min/max,
// NaN operands ignored by min/max, compares with NaN are false). FCVT.W[U].S
// rounds toward zero and saturates (NaN gives the largest value); FCVT.S.W[U]
// rounds to nearest even.
//
// Follows the document: an FPU among the functional units, 5-cycle latency
// in the evaluated configuration. This design's own choices, the document
// giving no detail of the unit: the operation set (no fused multiply-add),
// round-to-nearest-even only for arithmetic and round toward zero for
// float-to-integer conversion, subnormal inputs and results taken
// as zero, and no accrued exception flags (there is no fcsr).
module fpu
  import vivit_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  exe_ins_t ins,        // taken when ins.valid and en
  output fu_res_t  res
);
  typedef logic [31:0] f32_t;

  function automatic logic is_nan(f32_t x);
    return (x[30:23] == 8'hff) && (x[22:0] != '0);
  endfunction
  function automatic logic is_inf(f32_t x);
    return (x[30:23] == 8'hff) && (x[22:0] == '0);
  endfunction
  function automatic logic is_zero(f32_t x);     // zero or subnormal
    return x[30:23] == 8'h00;
  endfunction

  function automatic logic [5:0] clz32(logic [31:0] v);
    logic [5:0] n;
    logic       found;
    n = 6'd32;
    found = 1'b0;
    for (int i = 31; i >= 0; i--) begin
      if (v[i] && !found) begin
        n = 6'(31 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  // mant: bit 26 hidden one, 25:3 fraction, 2:0 guard / round / sticky
  function automatic f32_t round_pack(logic s, logic signed [10:0] e, logic [26:0] mant);
    logic [24:0] m;
    logic        up;
    logic signed [10:0] ex;
    up = mant[2] && ((mant[1:0] != '0) || mant[3]);
    m  = {1'b0, mant[26:3]} + 25'(up);
    ex = e;
    if (m[24]) begin
      m  = m >> 1;
      ex = ex + 11'sd1;
    end
    if (ex >= 11'sd255) return {s, 8'hff, 23'b0};
    if (ex <= 11'sd0)   return {s, 31'b0};
    return {s, ex[7:0], m[22:0]};
  endfunction

  function automatic f32_t fadd(f32_t a, f32_t b);
    logic               sl, ss;
    logic [7:0]         el, es, d;
    logic [23:0]        ml, ms;
    logic [26:0]        xl, xs, mask;
    logic [27:0]        sum;
    logic [26:0]        diff, mant;
    logic [5:0]         lz;
    if (is_nan(a) || is_nan(b)) return FP_QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : FP_QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'b0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      sl = a[31]; el = a[30:23]; ml = {1'b1, a[22:0]};
      ss = b[31]; es = b[30:23]; ms = {1'b1, b[22:0]};
    end else begin
      sl = b[31]; el = b[30:23]; ml = {1'b1, b[22:0]};
      ss = a[31]; es = a[30:23]; ms = {1'b1, a[22:0]};
    end
    d  = el - es;
    xl = {ml, 3'b0};
    if (d >= 8'd27) begin
      xs = {26'b0, 1'b1};                  // only the sticky bit survives
    end else begin
      mask = (27'd1 << d) - 27'd1;
      xs   = ({ms, 3'b0} >> d) | {26'b0, (({ms, 3'b0} & mask) != '0)};
    end
    if (sl == ss) begin
      sum = {1'b0, xl} + {1'b0, xs};
      if (sum[27]) return round_pack(sl, 11'($signed({3'b0, el})) + 11'sd1,
                                     {sum[27:2], sum[1] | sum[0]});
      return round_pack(sl, 11'($signed({3'b0, el})), sum[26:0]);
    end
    diff = xl - xs;
    if (diff == '0) return 32'h0;
    lz   = clz32({diff, 5'b0});
    mant = diff << lz;
    return round_pack(sl, 11'($signed({3'b0, el})) - 11'($signed({5'b0, lz})), mant);
  endfunction

  function automatic f32_t fmul(f32_t a, f32_t b);
    logic               s;
    logic [47:0]        p;
    logic signed [10:0] e;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return FP_QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return FP_QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hff, 23'b0};
    if (is_zero(a) || is_zero(b)) return {s, 31'b0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'($signed({3'b0, a[30:23]})) + 11'($signed({3'b0, b[30:23]})) - 11'sd127;
    if (p[47]) return round_pack(s, e + 11'sd1, {p[47:22], p[21:0] != '0});
    return round_pack(s, e, {p[46:21], p[20:0] != '0});
  endfunction

  function automatic f32_t daz(f32_t x);            // subnormal to signed zero
    return is_zero(x) ? {x[31], 31'b0} : x;
  endfunction

  // quotient of the significands with 26 bits below the leading one and a
  // sticky bit from the remainder
  function automatic f32_t fdiv(f32_t a, f32_t b);
    logic               s;
    logic [49:0]        num, q, rem;
    logic signed [10:0] e;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return FP_QNAN;
    if ((is_inf(a) && is_inf(b)) || (is_zero(a) && is_zero(b))) return FP_QNAN;
    if (is_inf(a) || is_zero(b)) return {s, 8'hff, 23'b0};
    if (is_zero(a) || is_inf(b)) return {s, 31'b0};
    num = {1'b1, a[22:0], 26'b0};
    q   = num / {26'b0, 1'b1, b[22:0]};
    rem = num % {26'b0, 1'b1, b[22:0]};
    e   = 11'($signed({3'b0, a[30:23]})) - 11'($signed({3'b0, b[30:23]})) + 11'sd127;
    if (q[26]) return round_pack(s, e, {q[26:1], q[0] | (rem != '0)});
    return round_pack(s, e - 11'sd1, {q[25:0], rem != '0});
  endfunction

  // bit-by-bit integer square root of a 54-bit value, with the remainder
  function automatic logic [26:0] isqrt(logic [53:0] n, output logic inexact);
    logic [53:0] rem, trial;
    logic [26:0] r;
    rem = n;
    r   = '0;
    for (int i = 26; i >= 0; i--) begin
      trial = ({27'b0, r} << (i + 1)) + (54'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        r[i] = 1'b1;
      end
    end
    inexact = (rem != '0);
    return r;
  endfunction

  function automatic f32_t fsqrt(f32_t a);
    logic signed [9:0] eu;
    logic [53:0]       n;
    logic [26:0]       r;
    logic              inexact;
    if (is_nan(a)) return FP_QNAN;
    if (is_zero(a)) return {a[31], 31'b0};
    if (a[31]) return FP_QNAN;
    if (is_inf(a)) return a;
    eu = 10'($signed({2'b0, a[30:23]})) - 10'sd127;
    n  = eu[0] ? {29'b0, 1'b1, a[22:0], 1'b0} << 29 : {30'b0, 1'b1, a[22:0]} << 29;
    r  = isqrt(n, inexact);
    return round_pack(1'b0, 11'(eu >>> 1) + 11'sd127, {r[26:1], r[0] | inexact});
  endfunction

  function automatic logic flt(f32_t a_in, f32_t b_in);      // a < b, no NaN
    f32_t a, b;
    a = daz(a_in);
    b = daz(b_in);
    if (a[30:0] == '0 && b[30:0] == '0) return 1'b0;
    if (a[31] != b[31]) return a[31];
    return a[31] ? (a[30:0] > b[30:0]) : (a[30:0] < b[30:0]);
  endfunction

  function automatic logic feq(f32_t a_in, f32_t b_in);
    f32_t a, b;
    a = daz(a_in);
    b = daz(b_in);
    if (is_nan(a) || is_nan(b)) return 1'b0;
    return (a == b) || (a[30:0] == '0 && b[30:0] == '0);
  endfunction

  function automatic f32_t fminmax(f32_t a, f32_t b, logic want_max);
    logic a_first;
    if (is_nan(a) && is_nan(b)) return FP_QNAN;
    if (is_nan(a)) return b;
    if (is_nan(b)) return a;
    if (is_zero(a) && is_zero(b)) a_first = a[31];          // -0 below +0
    else a_first = flt(a, b);
    return (a_first ^ want_max) ? a : b;
  endfunction

  function automatic word_t fcvt_w(f32_t a, logic uns);
    logic signed [9:0] e;
    logic [55:0]       m;
    logic [31:0]       mag;
    if (is_nan(a)) return uns ? 32'hffff_ffff : 32'h7fff_ffff;
    e = 10'($signed({2'b0, a[30:23]})) - 10'sd127;
    if (is_zero(a) || e < 0) return '0;
    if (uns) begin
      if (a[31]) return '0;
      if (e > 10'sd31) return 32'hffff_ffff;
    end else begin
      if (e > 10'sd30) return a[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    end
    m   = {32'b0, 1'b1, a[22:0]} << e;
    mag = m[54:23];
    return (!uns && a[31]) ? -mag : mag;
  endfunction

  function automatic f32_t fcvt_s(word_t a, logic uns);
    logic        s;
    logic [31:0] mag, norm;
    logic [5:0]  lz;
    if (a == '0) return '0;
    s    = !uns && a[31];
    mag  = s ? -a : a;
    lz   = clz32(mag);
    norm = mag << lz;
    return round_pack(s, 11'sd158 - 11'($signed({5'b0, lz})), {norm[31:6], norm[5:0] != '0});
  endfunction

  function automatic word_t fclass(f32_t a);
    word_t c;
    c = '0;
    if (is_nan(a))               c[a[22] ? 9 : 8] = 1'b1;
    else if (is_inf(a))          c[a[31] ? 0 : 7] = 1'b1;
    else if (a[30:0] == '0)      c[a[31] ? 3 : 4] = 1'b1;
    else if (a[30:23] == 8'h00)  c[a[31] ? 2 : 5] = 1'b1;
    else                         c[a[31] ? 1 : 6] = 1'b1;
    return c;
  endfunction

  word_t a, b, r;
  assign a = ins.op1;
  assign b = ins.op2;

  always_comb begin
    unique case (ins.ctl_fu)
      FP_ADD:     r = fadd(a, b);
      FP_SUB:     r = fadd(a, {~b[31], b[30:0]});
      FP_MUL:     r = fmul(a, b);
      FP_MIN:     r = fminmax(a, b, 1'b0);
      FP_MAX:     r = fminmax(a, b, 1'b1);
      FP_SGNJ:    r = {b[31], a[30:0]};
      FP_SGNJN:   r = {~b[31], a[30:0]};
      FP_SGNJX:   r = {a[31] ^ b[31], a[30:0]};
      FP_EQ:      r = {31'b0, feq(a, b)};
      FP_LT:      r = {31'b0, !is_nan(a) && !is_nan(b) && flt(a, b)};
      FP_LE:      r = {31'b0, !is_nan(a) && !is_nan(b) && (flt(a, b) || feq(a, b))};
      FP_CVT_W:   r = fcvt_w(a, 1'b0);
      FP_CVT_WU:  r = fcvt_w(a, 1'b1);
      FP_CVT_SW:  r = fcvt_s(a, 1'b0);
      FP_CVT_SWU: r = fcvt_s(a, 1'b1);
      FP_CLASS:   r = fclass(a);
      FP_DIV:     r = fdiv(a, b);
      FP_SQRT:    r = fsqrt(a);
      default:    r = a;                   // FP_MV
    endcase
  end

  fu_res_t pipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= '0;
    end else if (en) begin
      pipe[0] <= '{valid: ins.valid, rob_id: ins.dest_rob_id, value: r, mem_dest: '0};
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign res = pipe[LATENCY-1];
endmodule
