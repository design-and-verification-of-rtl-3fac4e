// alu_tb: random operations on the ALU, checked against a reference
// computation, with the one-cycle latency checked on every instruction.
`timescale 1ns/1ps
module alu_tb;
  import vivit_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  exe_ins_t ins;
  fu_res_t  res;
  alu dut (.*);
  int checks = 0, failures = 0;

  function automatic word_t ref_alu(logic [4:0] c, word_t a, word_t b);
    case (c)
      ALU_ADD: return a + b;   ALU_SUB: return a - b;
      ALU_SLL: return a << b[4:0];
      ALU_SLT: return ($signed(a) < $signed(b)) ? 1 : 0;
      ALU_SLTU: return (a < b) ? 1 : 0;
      ALU_XOR: return a ^ b;   ALU_SRL: return a >> b[4:0];
      ALU_SRA: return word_t'($signed(a) >>> b[4:0]);
      ALU_OR: return a | b;    ALU_AND: return a & b;
      ALU_NOT: return ~a;      ALU_NAND: return ~(a & b);
      ALU_NOR: return ~(a | b);
      default: return ~(a ^ b);
    endcase
  endfunction

  initial begin
    ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      word_t e;
      @(negedge clk);
      ins = '0;
      ins.valid = 1;
      ins.ctl_fu = 5'($urandom_range(0, 13));
      ins.op1 = $urandom; ins.op2 = (n % 3 == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      if (n % 7 == 0) ins.op1 = 32'h8000_0000;
      ins.dest_rob_id = robid_t'(n);
      e = ref_alu(ins.ctl_fu, ins.op1, ins.op2);
      @(negedge clk);
      checks++;
      if (!(res.valid && res.rob_id == robid_t'(n) && res.value == e)) begin
        failures++;
        $display("FAIL op %0d a=%h b=%h got %h expected %h", ins.ctl_fu, ins.op1, ins.op2, res.value, e);
      end
      ins.valid = 0;
    end
    // held while en is low
    @(negedge clk); ins.valid = 1; ins.ctl_fu = ALU_ADD; ins.op1 = 5; ins.op2 = 6;
    @(negedge clk); en = 0; ins.op1 = 100;
    @(negedge clk); checks++; if (res.value != 11) failures++;
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
