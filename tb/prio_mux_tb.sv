// prio_mux_tb: random results from four units, some cycles with many at
// once. Checks that every result reaches the ROB side exactly once with its
// value, at most two per cycle, that the LSU result goes out in its own
// cycle whenever the buffer is empty, that units are only consumed while
// freeze is low (the bench holds them otherwise), and that both the
// overflow buffer and freeze were exercised.
`timescale 1ns/1ps
module prio_mux_tb;
  import vivit_pkg::*;
  localparam int NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fu_res_t fu_res [NF];
  fu_res_t commit_on_rob [2];
  logic freeze, overflow_used;
  prio_mux #(.NUM_FU(NF), .BUF_DEPTH(8)) dut (.*);
  logic frz_now = 0;
  int checks = 0, failures = 0, nfrz = 0, novf = 0, sent = 0, got = 0;
  word_t pend [int];

  initial begin
    for (int f = 0; f < NF; f++) fu_res[f] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic frz_prev;
      @(negedge clk);
      frz_prev = (n == 0) ? 1'b0 : frz_now;
      // the previous inputs were consumed at the last edge unless frozen
      if (!frz_prev) begin
        for (int f = 0; f < NF; f++) begin
          fu_res[f] = '0;
          if (n < 500 && $urandom_range(0, 99) < ((n / 50) % 2 ? 85 : 30)) begin
            fu_res[f].valid  = 1;
            fu_res[f].rob_id = robid_t'(sent);
            fu_res[f].value  = 32'(sent) | 32'h5a0000;
            pend[sent] = fu_res[f].value;
            sent++;
          end
        end
      end
      #1;
      frz_now = freeze;
      // outputs written to the ROB at the coming edge
      for (int s = 0; s < 2; s++) if (commit_on_rob[s].valid) begin
        int id;
        id = int'(commit_on_rob[s].value[15:0]);
        checks++;
        if (!pend.exists(id) || commit_on_rob[s].rob_id != robid_t'(id)) begin
          failures++; $display("FAIL unexpected result %0d", id);
        end else pend.delete(id);
        got++;
      end
      if (!freeze && fu_res[0].valid && dut.cnt == 0) begin
        checks++;
        if (!(commit_on_rob[0].valid && commit_on_rob[0].value == fu_res[0].value)) begin
          failures++; $display("FAIL LSU not first");
        end
      end
      nfrz += freeze;
      novf += overflow_used;
    end
    checks++; if (pend.size() != 0) begin failures++; $display("FAIL %0d lost", pend.size()); end
    checks++; if (nfrz == 0) begin failures++; $display("FAIL never froze"); end
    checks++; if (novf == 0) begin failures++; $display("FAIL buffer unused"); end
    $display("sent=%0d got=%0d freeze=%0d", sent, got, nfrz);
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
