// regfile_tb: directed checks of the renaming extension (RENAMING, BUSY,
// B_BUSY set by renaming and dispatch, cleared only by the commit whose
// ROBid matches, a set winning over a same-cycle clear), register 0, the
// separate floating-point bank, port priority on the same register, and
// random commits checked through all read ports against a model.
`timescale 1ns/1ps
module regfile_tb;
  import vivit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rf_commit_t commit [2];
  logic [1:0] do_ren_valid, en_ren_valid;
  regaddr_t do_ren_addr [2], en_ren_addr [2], ren_rd_addr [4], op_rd_addr [4];
  robid_t do_ren_robid [2], ren_rd_robid [4];
  logic ren_rd_bbusy [4], op_rd_busy [4], j_bbusy [2];
  word_t op_rd_data [4], j_data [2];
  logic [REG_IND_LEN-1:0] j_addr [2];
  regfile dut (.*);
  int checks = 0, failures = 0;
  word_t model [64];
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    commit[0] = '0; commit[1] = '0; do_ren_valid = 0; en_ren_valid = 0;
  endtask
  task automatic look(regaddr_t a);
    ren_rd_addr[0] = a; op_rd_addr[0] = a; j_addr[0] = a[4:0]; #1;
  endtask
  initial begin
    idle();
    for (int k = 0; k < 4; k++) begin ren_rd_addr[k] = 0; op_rd_addr[k] = 0; end
    j_addr[0] = 0; j_addr[1] = 0; do_ren_addr[0] = 0; do_ren_addr[1] = 0;
    en_ren_addr[0] = 0; en_ren_addr[1] = 0; do_ren_robid[0] = 0; do_ren_robid[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // rename x5 -> 3, dispatch it
    @(negedge clk); do_ren_valid = 2'b01; do_ren_addr[0] = 5; do_ren_robid[0] = 3;
    @(negedge clk); idle(); look(5);
    chk(ren_rd_robid[0] == 3 && ren_rd_bbusy[0] && !op_rd_busy[0] && j_bbusy[0], "renamed x5");
    en_ren_valid = 2'b01; en_ren_addr[0] = 5;
    @(negedge clk); idle(); look(5);
    chk(op_rd_busy[0], "busy x5");
    // rename again x5 -> 9; commit of 3 must not clear
    do_ren_valid = 2'b10; do_ren_addr[1] = 5; do_ren_robid[1] = 9;
    @(negedge clk); idle();
    commit[0] = '{valid: 1, addr: 5, value: 32'h1111, rob_id: 3};
    @(negedge clk); idle(); look(5);
    chk(op_rd_data[0] == 32'h1111 && j_data[0] == 32'h1111, "x5 data");
    chk(op_rd_busy[0] && ren_rd_bbusy[0] && ren_rd_robid[0] == 9, "x5 still renamed");
    commit[1] = '{valid: 1, addr: 5, value: 32'h2222, rob_id: 9};
    @(negedge clk); idle(); look(5);
    chk(!op_rd_busy[0] && !ren_rd_bbusy[0] && op_rd_data[0] == 32'h2222, "x5 released");
    // same cycle: commit clears and a new renaming sets -> set wins
    do_ren_valid = 2'b01; do_ren_addr[0] = 7; do_ren_robid[0] = 12;
    @(negedge clk); idle();
    commit[0] = '{valid: 1, addr: 7, value: 32'h77, rob_id: 12};
    do_ren_valid = 2'b01; do_ren_addr[0] = 7; do_ren_robid[0] = 20;
    @(negedge clk); idle(); look(7);
    chk(ren_rd_bbusy[0] && ren_rd_robid[0] == 20 && op_rd_data[0] == 32'h77, "set wins");
    // x0 stays zero and is never renamed
    commit[0] = '{valid: 1, addr: 0, value: 32'hdead, rob_id: 1};
    do_ren_valid = 2'b01; do_ren_addr[0] = 0;
    @(negedge clk); idle(); look(0);
    chk(op_rd_data[0] == 0 && !ren_rd_bbusy[0], "x0");
    // float bank and port priority
    commit[0] = '{valid: 1, addr: 6'd37, value: 32'h3f80_0000, rob_id: 1};
    commit[1] = '{valid: 1, addr: 6'd4, value: 32'h44, rob_id: 2};
    @(negedge clk); idle();
    commit[0] = '{valid: 1, addr: 6'd8, value: 32'h1, rob_id: 2};
    commit[1] = '{valid: 1, addr: 6'd8, value: 32'h2, rob_id: 2};
    @(negedge clk); idle();
    look(37); chk(op_rd_data[0] == 32'h3f80_0000, "f5");
    look(5);  chk(op_rd_data[0] == 32'h2222, "x5 not f5");
    look(8);  chk(op_rd_data[0] == 32'h2, "port 1 last");
    // random commits
    for (int i = 0; i < 64; i++) begin op_rd_addr[0] = regaddr_t'(i); #1 model[i] = op_rd_data[0]; end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        op_rd_addr[k] = regaddr_t'($urandom);
      end
      #1;
      for (int k = 0; k < 4; k++) chk(op_rd_data[k] == model[op_rd_addr[k]], "random read");
      for (int p = 0; p < 2; p++) begin
        commit[p] = '{valid: $urandom_range(0, 1), addr: regaddr_t'($urandom), value: $urandom, rob_id: 0};
        if (commit[p].valid && commit[p].addr != 0) model[commit[p].addr] = commit[p].value;
      end
    end
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
