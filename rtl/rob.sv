// rob: reorder buffer - keeps program order for the out-of-order completing
// functional units and commits up to two instructions per cycle.
//
// A circular buffer of ROB_DEPTH entries (PC, result ready flag and value,
// destination register, store flag, byte amount, memory address, exception
// flag and code), indexed by ROBid. Three kinds of traffic:
//   * reservation: the Issue stage's fill-queue writes up to two new entries
//     at the tail (reserve_valid/reserve_rob_entries), result not ready;
//   * commit on ROB: up to two results per cycle from the priority
//     multiplexer (commit_on_rob_0/1) are written to the cell named by their
//     ROBid, setting res_ready;
//   * commit from ROB: when the head cell's result is ready it leaves on
//     commit_0, and if the next cell is ready too it leaves on commit_1 in
//     the same cycle; the head then advances. These outputs are
//     combinational and are taken by the commit routers at the clock edge.
// Four combinational read ports (rd_id -> rd_ready, rd_value) let the Issue
// stage's double-read-operands logic fetch results not yet committed.
// head, tail and count are exported for reservation and age checks.
//
// Follows the document: entry fields, two writes and two in-order commits per
// cycle, combinational read network for the Issue stage. This design's own
// choice: the commit outputs are combinational (the document registers them)
// so that a result leaves the ROB in the same edge in which it is written to
// the register file.
module rob
  import vivit_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           reserve_valid,
  input  rob_reserve_t         reserve_rob_entries [2],
  input  fu_res_t              commit_on_rob [2],
  input  robid_t               rd_id    [4],
  output logic                 rd_ready [4],
  output word_t                rd_value [4],
  output robid_t               head,
  output robid_t               tail,
  output logic [ROB_IND_LEN:0] count,
  output rob_commit_t          commit [2]
);
  rob_entry_t rob_q [ROB_DEPTH];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rd_ready[k] = rob_q[rd_id[k]].res_ready;
      rd_value[k] = rob_q[rd_id[k]].res_value;
    end
  end

  robid_t h1;
  logic   c0, c1;
  assign h1 = head + 1'b1;
  assign c0 = (count >= 1) && rob_q[head].res_ready;
  assign c1 = c0 && (count >= 2) && rob_q[h1].res_ready;

  always_comb begin
    commit[0] = '{valid: c0, rob_id: head, e: rob_q[head]};
    commit[1] = '{valid: c1, rob_id: h1,   e: rob_q[h1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < ROB_DEPTH; i++) rob_q[i] <= '0;
    end else begin
      robid_t t;
      t = tail;
      for (int p = 0; p < 2; p++) begin
        if (reserve_valid[p]) begin
          rob_q[t].ins_pc    <= reserve_rob_entries[p].ins_pc;
          rob_q[t].res_ready <= 1'b0;
          rob_q[t].res_value <= '0;
          rob_q[t].res_addr  <= reserve_rob_entries[p].res_addr;
          rob_q[t].has_dest  <= reserve_rob_entries[p].has_dest;
          rob_q[t].is_store  <= reserve_rob_entries[p].is_store;
          rob_q[t].store_amt <= reserve_rob_entries[p].store_amt;
          rob_q[t].mem_dest  <= '0;
          rob_q[t].exc       <= reserve_rob_entries[p].exc;
          rob_q[t].exc_code  <= reserve_rob_entries[p].exc_code;
          t = t + 1'b1;
        end
      end
      for (int p = 0; p < 2; p++) begin
        if (commit_on_rob[p].valid) begin
          rob_q[commit_on_rob[p].rob_id].res_ready <= 1'b1;
          rob_q[commit_on_rob[p].rob_id].res_value <= commit_on_rob[p].value;
          rob_q[commit_on_rob[p].rob_id].mem_dest  <= commit_on_rob[p].mem_dest;
        end
      end
      if (c0) rob_q[head].res_ready <= 1'b0;
      if (c1) rob_q[h1].res_ready   <= 1'b0;
      tail  <= t;
      head  <= head + robid_t'(c0) + robid_t'(c1);
      count <= count + (ROB_IND_LEN+1)'(reserve_valid[0]) + (ROB_IND_LEN+1)'(reserve_valid[1])
                     - (ROB_IND_LEN+1)'(c0) - (ROB_IND_LEN+1)'(c1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (ROB_IND_LEN+1)'(ROB_DEPTH));
endmodule
