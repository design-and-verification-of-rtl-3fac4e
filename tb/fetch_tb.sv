// fetch_tb: fetch stage together with the instruction memory.
//
// The memory holds a random program in which about one instruction in five
// is a jump. The testbench plays the Decode stage: it takes the fetched
// bundle whenever its random decode_ready is high, and some cycles after it
// has taken a jump it answers with branch_taken, redirecting to the
// instruction after the jump, so the expected stream is the program in
// order. Checked for every instruction taken: PC and word follow the
// program, a jump is always alone in slot 0, a non-jump sent alone in slot 0
// is followed by a jump (the split bundle), and nothing is sent between a
// jump and its branch_taken.
`timescale 1ns/1ps
module fetch_tb;
  import vivit_pkg::*;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0;
  logic [PC_LEN-1:0] prog_addr = 0;
  word_t prog_data = 0;
  word_t im_i0, im_i1, fetched_ins_0, fetched_ins_1;
  logic [PC_LEN-1:0] im_p0, im_p1, nx0, nx1, fetched_pc_0, fetched_pc_1;
  logic [PC_LEN-1:0] dec_pc0 = 0, dec_pc1 = 0;
  logic im_v, stall_mem, decode_ready = 0, branch_taken = 0;
  logic fetched_valid_0, fetched_valid_1, stall_fetch, split_bundle;

  imem #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .fetch_next_pc_0(nx0), .fetch_next_pc_1(nx1), .stall_mem, .branch_taken,
    .decode_next_pc_0(dec_pc0), .decode_next_pc_1(dec_pc1),
    .ins_0_to_fetch(im_i0), .ins_1_to_fetch(im_i1), .pc_0_to_fetch(im_p0),
    .pc_1_to_fetch(im_p1), .bundle_valid(im_v));
  fetch dut (
    .clk, .rst_n, .ins_0_from_mem(im_i0), .ins_1_from_mem(im_i1),
    .pc_0_from_mem(im_p0), .pc_1_from_mem(im_p1), .mem_valid(im_v), .stall_mem,
    .fetch_next_pc_0(nx0), .fetch_next_pc_1(nx1), .decode_ready, .branch_taken,
    .fetched_ins_0, .fetched_ins_1, .fetched_pc_0, .fetched_pc_1,
    .fetched_valid_0, .fetched_valid_1, .stall_fetch, .split_bundle);

  int checks = 0, failures = 0, n_taken = 0, n_jumps = 0, n_split = 0, n_pairs = 0;
  word_t img [DEPTH];
  logic [31:0] exp_pc = 0;
  bit jump_pending = 0, expect_jump = 0;
  int wait_left = 0;

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  function automatic bit is_j(word_t w);
    return w[6:0] inside {7'b1101111, 7'b1100111, 7'b1100011};
  endfunction
  task automatic take(word_t w, logic [31:0] pc, bit slot1);
    chk(!jump_pending, "instruction sent while a jump is unresolved");
    chk(pc == exp_pc && w == img[pc[11:2]], $sformatf("pc %h expected %h", pc, exp_pc));
    if (expect_jump) chk(is_j(w) && !slot1, "split bundle not followed by its jump");
    expect_jump = 0;
    if (is_j(w)) begin
      chk(!slot1, "jump in slot 1");
      jump_pending = 1; wait_left = $urandom_range(0, 3); n_jumps++;
    end
    exp_pc = pc + 4;
    n_taken++;
  endtask

  // Decode side: sample what is taken at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (branch_taken) jump_pending <= 0;
    if (decode_ready && fetched_valid_0) begin
      take(fetched_ins_0, fetched_pc_0, 0);
      if (fetched_valid_1) begin take(fetched_ins_1, fetched_pc_1, 1); n_pairs++; end
      else if (!is_j(fetched_ins_0)) begin expect_jump = 1; n_split++; end
    end
  end

  always @(negedge clk) if (rst_n) begin
    decode_ready = ($urandom_range(0, 3) != 0);
    branch_taken = 0;
    if (jump_pending) begin
      if (wait_left == 0) begin
        branch_taken = 1; dec_pc0 = exp_pc; dec_pc1 = exp_pc + 4;
      end else wait_left--;
    end
  end

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      img[k] = ($urandom_range(0, 4) == 0) ? {$urandom_range(0, 32'h1ffffff), 7'b1100011}
                                          : {$urandom_range(0, 32'h1ffffff), 7'b0110011};
      @(negedge clk); prog_we = 1; prog_addr = 32'(4 * k); prog_data = img[k];
    end
    @(negedge clk); prog_we = 0;
    rst_n = 1;
    wait (exp_pc >= 32'(4 * (DEPTH - 4)));
    chk(n_jumps > 50 && n_split > 10 && n_pairs > 50, "all cases seen");
    $display("taken=%0d jumps=%0d split=%0d pairs=%0d", n_taken, n_jumps, n_split, n_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
