// lsu_tb: loads of every size and sign from a small memory model, and
// stores, one per cycle; each result must appear exactly three cycles after
// its instruction. Loads return the extended lane, stores return the data
// with the byte address in mem_dest.
`timescale 1ns/1ps
module lsu_tb;
  import vivit_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  exe_ins_t ins;
  fu_res_t  res;
  logic [MEM_IND_LEN-1:0] dmem_raddr;
  word_t dmem_rdata;
  lsu dut (.*);
  word_t mem [256];
  assign dmem_rdata = mem[dmem_raddr[9:2]];
  int checks = 0, failures = 0, cyc = 0;
  word_t exp_v [int];
  logic [31:0] exp_a [int];
  int exp_t [int];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (res.valid) begin
      int id;
      id = int'(res.rob_id);
      checks++;
      if (!exp_v.exists(id) || res.value != exp_v[id] || cyc - exp_t[id] != 3 ||
          res.mem_dest != exp_a[id]) begin
        failures++;
        $display("FAIL id %0d value %h", id, res.value);
      end
      exp_v.delete(id);
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = $urandom;
    ins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [2:0] f3;
      logic st;
      word_t w, sh;
      logic [31:0] a;
      @(negedge clk);
      st = (n % 4 == 3);
      f3 = st ? 3'($urandom_range(0, 2)) : 3'(n % 6 == 3 ? 2 : n % 6);
      ins.valid = 1;
      ins.ctl_fu = {1'b0, st, f3};
      ins.op1 = 32'($urandom_range(0, 200)) * 4;
      a = ins.op1 + 32'($urandom_range(0, 3)) * ((f3[1:0] == 0) ? 1 : (f3[1:0] == 1) ? 2 : 0);
      ins.imm = a - ins.op1;
      ins.op2 = $urandom;
      ins.dest_rob_id = robid_t'(n);
      w  = mem[a[9:2]];
      sh = w >> (8 * a[1:0]);
      if (st) exp_v[n % 64] = ins.op2;
      else case (f3)
        0: exp_v[n % 64] = {{24{sh[7]}}, sh[7:0]};
        1: exp_v[n % 64] = {{16{sh[15]}}, sh[15:0]};
        4: exp_v[n % 64] = {24'b0, sh[7:0]};
        5: exp_v[n % 64] = {16'b0, sh[15:0]};
        default: exp_v[n % 64] = w;
      endcase
      exp_a[n % 64] = a;
      exp_t[n % 64] = cyc + 1;
    end
    @(negedge clk); ins.valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (exp_v.size() != 0) failures++;
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
