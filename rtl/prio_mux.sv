// prio_mux: priority multiplexer between the functional units and the ROB.
//
// Up to NUM_FU units can finish in the same cycle, the ROB takes two results
// per cycle (commit_on_rob_0/1). The two written each cycle are the first two
// valid ones in this order: the LSU (input 0), then the oldest results held
// in the overflow buffer, then the other units in input order. Results that
// finish and are not chosen enter the overflow buffer (BUF_DEPTH entries, in
// arrival order) and are written in later cycles. When the buffer has fewer
// than NUM_FU free entries, freeze goes high: the units hold their outputs
// and the Issue stage stops dispatching until the buffer drains, so no
// result is ever lost. A unit's result counts as taken only in a cycle with
// freeze low.
//
// Follows the document: two writes per cycle, the LSU first, the buffer
// ahead of the other units. This design's own choices: the buffer depth and
// the freeze back-pressure.
module prio_mux
  import vivit_pkg::*;
#(
  parameter int unsigned NUM_FU    = 5,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fu_res_t fu_res [NUM_FU],     // [0] is the LSU
  output fu_res_t commit_on_rob [2],
  output logic    freeze,
  output logic    overflow_used        // a result went to the buffer
);
  localparam int unsigned PW = $clog2(BUF_DEPTH);
  localparam int unsigned NC = NUM_FU + 2;

  fu_res_t       buf_q [BUF_DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;

  assign freeze = ((PW+1)'(BUF_DEPTH) - cnt) < (PW+1)'(NUM_FU);

  fu_res_t cand [NC];
  logic    from_fu [NC];
  logic    picked  [NC];
  int unsigned npop, npush;
  fu_res_t push_v [NUM_FU];

  always_comb begin
    int unsigned n;
    // candidate order: LSU, buffer[head], buffer[head+1], other units
    cand[0]    = fu_res[0];
    cand[0].valid = fu_res[0].valid && !freeze;
    from_fu[0] = 1'b1;
    for (int b = 0; b < 2; b++) begin
      cand[1+b]       = buf_q[PW'(head + PW'(b))];
      cand[1+b].valid = (cnt > (PW+1)'(b));
      from_fu[1+b]    = 1'b0;
    end
    for (int f = 1; f < NUM_FU; f++) begin
      cand[2+f]       = fu_res[f];
      cand[2+f].valid = fu_res[f].valid && !freeze;
      from_fu[2+f]    = 1'b1;
    end
    commit_on_rob[0] = '0;
    commit_on_rob[1] = '0;
    n = 0;
    for (int c = 0; c < NC; c++) begin
      picked[c] = 1'b0;
      if (cand[c].valid && n < 2) begin
        picked[c] = 1'b1;
        commit_on_rob[n[0]] = cand[c];
        n++;
      end
    end
    npop = 0;
    for (int c = 1; c < 3; c++) if (picked[c]) npop++;
    npush = 0;
    for (int f = 0; f < NUM_FU; f++) push_v[f] = '0;
    for (int c = 0; c < NC; c++) begin
      if (from_fu[c] && cand[c].valid && !picked[c]) begin
        push_v[npush] = cand[c];
        npush++;
      end
    end
  end

  assign overflow_used = (npush != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int i = 0; i < BUF_DEPTH; i++) buf_q[i] <= '0;
    end else begin
      for (int f = 0; f < NUM_FU; f++)
        if (f < npush) buf_q[PW'(tail + PW'(f))] <= push_v[f];
      tail <= PW'(tail + PW'(npush));
      head <= PW'(head + PW'(npop));
      cnt  <= cnt + (PW+1)'(npush) - (PW+1)'(npop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= (PW+1)'(BUF_DEPTH));
endmodule
