// fpu_tb: random single-precision operations, one per cycle, with the en
// input occasionally low. Operands are mostly normal numbers of moderate
// size, with nearby pairs (cancellation), very large and very small ones
// (overflow to infinity, underflow to zero), zeros of both signs, infinities
// and NaNs mixed in, and plain integers for the int-to-float conversions.
// Each result must appear exactly LATENCY (5) enabled cycles after its
// instruction, with the ROBid and the value of the reference model in
// rv_asm, which computes in double precision and rounds to nearest even.
`timescale 1ns/1ps
module fpu_tb;
  import vivit_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  exe_ins_t ins;
  fu_res_t  res;
  fpu dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  word_t exp_v [int];
  int    exp_t [int];
  int    per_op [17];
  logic [31:0] dbg_a [64], dbg_b [64];
  int dbg_op [64];

  function automatic logic [31:0] rnd_f(logic [31:0] near);
    case ($urandom_range(0, 19))
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return {1'($urandom), 8'hff, 23'b0};
      3: return {1'($urandom), 8'hff, 1'b1, 22'($urandom)};
      4: return {1'($urandom), 8'($urandom_range(230, 254)), 23'($urandom)};
      5: return {1'($urandom), 8'($urandom_range(1, 25)), 23'($urandom)};
      6, 7: return {near[31:8], 8'($urandom)};                  // close to the other operand
      8: return near;
      9: return {1'($urandom), 8'($urandom_range(150, 160)), 23'($urandom)};  // near 2^31
      default: return {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
    endcase
  endfunction

  always @(posedge clk) if (rst_n && en) begin
    cyc++;
    if (res.valid) begin
      checks++;
      if (!exp_v.exists(int'(res.rob_id)) || res.value != exp_v[int'(res.rob_id)] ||
          cyc - exp_t[int'(res.rob_id)] != 5) begin
        failures++;
        if (failures < 15)
          $display("FAIL op %0d a=%h b=%h value %h expected %h", dbg_op[res.rob_id], dbg_a[res.rob_id], dbg_b[res.rob_id], res.value, exp_v[int'(res.rob_id)]);
      end
      exp_v.delete(int'(res.rob_id));
    end
  end

  initial begin
    int op;
    ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      if (!en) begin n--; continue; end
      op = $urandom_range(0, 18);
      per_op[op]++;
      ins.valid = 1;
      ins.ctl_fu = 5'(op);
      ins.op1 = (op == 13 || op == 14) ? (($urandom_range(0, 1) == 1) ? $urandom : 32'($urandom_range(0, 5000)) - 2500)
                                       : rnd_f($urandom);
      ins.op2 = rnd_f(ins.op1);
      if ($urandom_range(0, 3) == 0) ins.op1 = rnd_f(ins.op2);
      ins.dest_rob_id = robid_t'(n);
      exp_v[n % 64] = fp_ref(op, ins.op1, ins.op2);
      exp_t[n % 64] = cyc + 1;
      dbg_op[n % 64] = op; dbg_a[n % 64] = ins.op1; dbg_b[n % 64] = ins.op2;
    end
    @(negedge clk); ins.valid = 0; en = 1;
    repeat (10) @(posedge clk);
    checks++; if (exp_v.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_v.size()); end
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
