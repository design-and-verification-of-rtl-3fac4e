// muldiv_tb: random RV32M operations, including division by zero and
// signed overflow, issued one per cycle; each result must appear exactly
// LATENCY (5) cycles after its instruction with the right value and ROBid.
`timescale 1ns/1ps
module muldiv_tb;
  import vivit_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  exe_ins_t ins;
  fu_res_t  res;
  muldiv dut (.*);
  int checks = 0, failures = 0;
  word_t exp_v [int];
  int    exp_t [int];
  int    cyc = 0;

  function automatic word_t ref_md(logic [2:0] c, word_t a, word_t b);
    logic signed [63:0] p;
    case (c)
      0: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); return p[31:0]; end
      1: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); return p[63:32]; end
      2: begin p = $signed({{32{a[31]}}, a}) * $signed({32'b0, b}); return p[63:32]; end
      3: begin p = $signed({32'b0, a}) * $signed({32'b0, b}); return p[63:32]; end
      4: return (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : word_t'($signed(a) / $signed(b));
      5: return (b == 0) ? '1 : a / b;
      6: return (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? 0 : word_t'($signed(a) % $signed(b));
      default: return (b == 0) ? a : a % b;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (res.valid) begin
      checks++;
      if (!exp_v.exists(int'(res.rob_id)) || res.value != exp_v[int'(res.rob_id)] ||
          cyc - exp_t[int'(res.rob_id)] != 5) begin
        failures++;
        $display("FAIL id %0d value %h", res.rob_id, res.value);
      end
      exp_v.delete(int'(res.rob_id));
    end
  end

  initial begin
    ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ins.valid = 1;
      ins.ctl_fu = 5'($urandom_range(0, 7));
      ins.op1 = (n % 11 == 0) ? 32'h8000_0000 : $urandom;
      ins.op2 = (n % 5 == 0) ? 0 : (n % 11 == 0) ? '1 : (n % 2) ? $urandom : 32'($urandom_range(1, 99));
      ins.dest_rob_id = robid_t'(n);
      exp_v[n % 64] = ref_md(ins.ctl_fu[2:0], ins.op1, ins.op2);
      exp_t[n % 64] = cyc + 1;
    end
    @(negedge clk); ins.valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (exp_v.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_v.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
