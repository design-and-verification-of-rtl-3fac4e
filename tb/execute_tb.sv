// execute_tb: the Execute stage with its two ALUs, MULDIV, LSU, FPU, input
// queues and priority multiplexer.
//
// The testbench plays the Issue stage: while ready is high it dispatches up
// to two random instructions per cycle, sending MULDIV, LSU and FPU work
// only when fu_room allows it and biased towards those units so that results
// pile up and the stage freezes. Every instruction carries a distinct ROB id
// (at most 60 in flight). The data memory is a read-only array. Each result
// leaving on commit_on_rob must belong to an instruction in flight and carry
// the value computed by the testbench (ALU, RV32M and single-precision
// arithmetic from the shared reference, sign or zero extended loads, store
// data and address). At the end every instruction must have come back, and
// the freeze and the overflow buffer must have been used.
`timescale 1ns/1ps
module execute_tb;
  import vivit_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  exe_ins_t to_exe_ins_0, to_exe_ins_1;
  logic ready, overflow_used;
  logic [3:0] fu_room;
  logic [MEM_IND_LEN-1:0] dmem_raddr;
  word_t dmem_rdata;
  fu_res_t commit_on_rob [2];
  execute dut (.*);

  int checks = 0, failures = 0, sent = 0, back = 0, n_frz = 0, n_ovf = 0;
  word_t mem [256];
  assign dmem_rdata = mem[dmem_raddr[9:2]];
  bit    busy [64];
  word_t exp_v [64];
  word_t exp_a [64];
  bit    is_ls [64];

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  function automatic word_t alu_ref(logic [4:0] c, word_t a, word_t b);
    case (c)
      ALU_ADD: return a + b;   ALU_SUB: return a - b;   ALU_SLL: return a << b[4:0];
      ALU_SLT: return {31'b0, $signed(a) < $signed(b)};  ALU_SLTU: return {31'b0, a < b};
      ALU_XOR: return a ^ b;   ALU_SRL: return a >> b[4:0];
      ALU_SRA: return word_t'($signed(a) >>> b[4:0]);
      ALU_OR: return a | b;    ALU_AND: return a & b;   ALU_NOT: return ~a;
      ALU_NAND: return ~(a & b); ALU_NOR: return ~(a | b); default: return ~(a ^ b);
    endcase
  endfunction
  function automatic word_t md_ref(logic [2:0] f, word_t a, word_t b);
    logic signed [63:0] p;
    case (f)
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

  function automatic int free_id();
    int n;
    n = 0;
    foreach (busy[i]) n += busy[i];
    if (n >= 60) return -1;
    for (int t = 0; t < 64; t++) begin
      int i;
      i = (sent + t) % 64;
      if (!busy[i]) return i;
    end
    return -1;
  endfunction

  function automatic exe_ins_t make(int slot, logic [3:0] room);
    exe_ins_t x;
    int id, r;
    x = '0;
    id = free_id();
    if (id < 0 || $urandom_range(0, 4) == 0) return x;
    r = $urandom_range(0, 11);
    x.which_fu = (r < 3) ? FU_ALU : (r < 6) ? FU_MULDIV : (r < 10) ? FU_LSU : FU_FPU;
    if (!room[x.which_fu]) return x;
    x.valid = 1; x.dest_rob_id = robid_t'(id);
    x.op1 = ($urandom_range(0, 5) == 0) ? 32'h8000_0000 : $urandom;
    x.op2 = ($urandom_range(0, 5) == 0) ? (($urandom_range(0, 1) == 1) ? '1 : '0) : $urandom;
    is_ls[id] = 0;
    case (x.which_fu)
      FU_ALU: begin
        x.ctl_fu = 5'($urandom_range(0, 13));
        exp_v[id] = alu_ref(x.ctl_fu, x.op1, x.op2);
      end
      FU_MULDIV: begin
        x.ctl_fu = 5'($urandom_range(0, 7));
        exp_v[id] = md_ref(x.ctl_fu[2:0], x.op1, x.op2);
      end
      FU_FPU: begin
        x.ctl_fu = 5'($urandom_range(0, 18));
        exp_v[id] = fp_ref(int'(x.ctl_fu), x.op1, x.op2);
      end
      default: begin
        logic [2:0] f;
        logic [31:0] ad;
        word_t w;
        logic st;
        st = $urandom_range(0, 1);
        f = st ? 3'($urandom_range(0, 2)) : 3'(int'($urandom_range(0, 4)) + ($urandom_range(0, 4) > 2 ? 1 : 0));
        if (!st && f == 3) f = 2;
        x.ctl_fu = {1'b0, st, f};
        x.imm = 32'($urandom_range(0, 64)) - 32;
        ad = {22'b0, $urandom_range(16, 230), 2'b0} + (f[1:0] == 0 ? $urandom_range(0, 3) :
                                                     f[1:0] == 1 ? 2 * $urandom_range(0, 1) : 0);
        x.op1 = ad - x.imm;
        w = mem[ad[9:2]] >> (8 * ad[1:0]);
        is_ls[id] = 1; exp_a[id] = ad;
        if (st) exp_v[id] = x.op2;
        else case (f)
          0: exp_v[id] = {{24{w[7]}}, w[7:0]};   1: exp_v[id] = {{16{w[15]}}, w[15:0]};
          4: exp_v[id] = {24'b0, w[7:0]};        5: exp_v[id] = {16'b0, w[15:0]};
          default: exp_v[id] = w;
        endcase
      end
    endcase
    busy[id] = 1; sent++;
    return x;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_frz += !ready;
    n_ovf += overflow_used;
    for (int p = 0; p < 2; p++) if (commit_on_rob[p].valid) begin
      int id;
      id = int'(commit_on_rob[p].rob_id);
      chk(busy[id], $sformatf("result for ROB id %0d not in flight", id));
      chk(commit_on_rob[p].value == exp_v[id],
          $sformatf("id %0d value %h expected %h", id, commit_on_rob[p].value, exp_v[id]));
      if (is_ls[id]) chk(commit_on_rob[p].mem_dest == exp_a[id], "LSU address");
      busy[id] = 0; back++;
    end
  end

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    foreach (busy[i]) busy[i] = 0;
    to_exe_ins_0 = '0; to_exe_ins_1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      to_exe_ins_0 = '0; to_exe_ins_1 = '0;
      if (ready) begin
        to_exe_ins_0 = make(0, fu_room);
        to_exe_ins_1 = make(1, fu_room);
      end
    end
    @(negedge clk); to_exe_ins_0 = '0; to_exe_ins_1 = '0;
    repeat (60) @(negedge clk);
    chk(back == sent, $sformatf("%0d results for %0d instructions", back, sent));
    chk(n_frz > 0 && n_ovf > 0, "freeze and overflow buffer used");
    $display("sent=%0d freeze=%0d overflow=%0d", sent, n_frz, n_ovf);
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
