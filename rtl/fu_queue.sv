// fu_queue: small input queue in front of a single functional unit.
//
// Both instructions of a dispatched bundle may target the same unit, which
// accepts one per cycle, so each such unit has a FIFO that can take two
// instructions per cycle (push_0 first, then push_1) and hands out one per
// cycle (head, popped when pop is high). room is high when two more fit;
// the Issue stage dispatches to the unit only then. head.valid is low when
// the queue is empty.
//
// Follows the document's per-unit queue filled by both bundle positions;
// the depth is this design's own choice.
module fu_queue
  import vivit_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  exe_ins_t push_0,
  input  exe_ins_t push_1,
  input  logic     pop,
  output exe_ins_t head,
  output logic     room
);
  localparam int unsigned PW = $clog2(DEPTH);
  exe_ins_t      q [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [PW:0]   cnt;
  logic          do_pop;

  assign do_pop = pop && (cnt != 0);
  assign room   = (cnt + 2) <= (PW+1)'(DEPTH);
  always_comb begin
    head = q[rd];
    head.valid = (cnt != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (push_0.valid) q[wr] <= push_0;
      if (push_1.valid) q[PW'(wr + PW'(push_0.valid))] <= push_1;
      wr  <= PW'(wr + PW'(push_0.valid) + PW'(push_1.valid));
      rd  <= PW'(rd + PW'(do_pop));
      cnt <= cnt + (PW+1)'(push_0.valid) + (PW+1)'(push_1.valid) - (PW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= (PW+1)'(DEPTH));
endmodule
