// rob_tb: reserves entries two at a time, writes their results back in a
// random order (up to two per cycle), and checks that instructions leave
// the head strictly in program order, at most two per cycle, with their PC,
// destination and value; that two ready head entries leave together; that
// the read ports return written results; and that count tracks occupancy.
`timescale 1ns/1ps
module rob_tb;
  import vivit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] reserve_valid;
  rob_reserve_t reserve_rob_entries [2];
  fu_res_t commit_on_rob [2];
  robid_t rd_id [4];
  logic rd_ready [4];
  word_t rd_value [4];
  robid_t head, tail;
  logic [ROB_IND_LEN:0] count;
  rob_commit_t commit [2];
  rob dut (.*);
  int checks = 0, failures = 0, next_commit = 0, nres = 0, ndual = 0;
  int unwritten [$];
  int last_id;

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    reserve_valid = 0; commit_on_rob[0] = '0; commit_on_rob[1] = '0;
    reserve_rob_entries[0] = '0; reserve_rob_entries[1] = '0;
    for (int k = 0; k < 4; k++) rd_id[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      // check the commits of this cycle (combinational outputs)
      for (int s = 0; s < 2; s++) if (commit[s].valid) begin
        chk(commit[s].rob_id == robid_t'(next_commit), "order");
        chk(commit[s].e.ins_pc == 32'(next_commit * 4), "pc");
        chk(commit[s].e.res_value == 32'(next_commit * 7 + 1), "value");
        chk(commit[s].e.res_addr == regaddr_t'(next_commit % 32), "dest");
        next_commit++;
      end
      if (commit[0].valid && count >= 2 && dut.rob_q[head + 1'b1].res_ready) begin
        chk(commit[1].valid, "dual commit");
        ndual++;
      end
      chk(!commit[1].valid || commit[0].valid, "slot order");
      // reservations
      reserve_valid = 0;
      if (n < 700 && count <= ROB_DEPTH - 2 && $urandom_range(0, 3) != 0) begin
        for (int p = 0; p < 2; p++) begin
          reserve_valid[p] = 1;
          reserve_rob_entries[p] = '0;
          reserve_rob_entries[p].ins_pc = 32'(nres * 4);
          reserve_rob_entries[p].res_addr = regaddr_t'(nres % 32);
          reserve_rob_entries[p].has_dest = 1;
          unwritten.push_back(nres);
          nres++;
        end
      end
      // results, random order
      commit_on_rob[0] = '0; commit_on_rob[1] = '0;
      for (int p = 0; p < 2; p++) begin
        if (unwritten.size() > 2 && $urandom_range(0, 2) != 0) begin
          int k, id;
          k = $urandom_range(0, unwritten.size() - 3);
          id = unwritten[k];
          unwritten.delete(k);
          commit_on_rob[p] = '{valid: 1, rob_id: robid_t'(id), value: 32'(id * 7 + 1), mem_dest: 0};
        end
      end
      // read port: the oldest unwritten must read not ready
      if (unwritten.size() > 0) begin
        rd_id[0] = robid_t'(unwritten[0]);
        #1 chk(!rd_ready[0], "read port not ready");
      end
    end
    // drain the rest
    while (unwritten.size() > 0) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) if (commit[s].valid) begin
        chk(commit[s].rob_id == robid_t'(next_commit), "order");
        next_commit++;
      end
      commit_on_rob[1] = '0;
      commit_on_rob[0] = '{valid: 1, rob_id: robid_t'(unwritten[0]), value: 32'(unwritten[0] * 7 + 1), mem_dest: 0};
      rd_id[1] = robid_t'(unwritten[0]);
      last_id = unwritten[0];
      unwritten.delete(0);
      reserve_valid = 0;
      @(posedge clk); #1 chk(rd_ready[1] && rd_value[1] == 32'(last_id * 7 + 1), "read port value");
      commit_on_rob[0] = '0;
    end
    commit_on_rob[0] = '0;
    repeat (4) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) if (commit[s].valid) next_commit++;
    end
    chk(next_commit == nres, $sformatf("all committed %0d of %0d", next_commit, nres));
    chk(count == 0, "empty at end");
    chk(ndual > 0, "dual commits seen");
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
