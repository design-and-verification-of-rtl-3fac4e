// fetch: Instruction Fetch with pre-decode (second front-end stage).
//
// Takes the two-instruction bundle offered by the instruction memory and
// forms the bundle handed to Decode, registered on fetched_ins_0/1 with
// their PCs and per-slot valid flags. The pre-decode looks at the opcodes:
//   * first instruction is a jump (JAL, JALR or conditional branch): it is
//     sent alone in slot 0 and the second instruction is flushed;
//   * second instruction is a jump: the first is sent alone, the jump is kept
//     in an internal register and sent alone in slot 0 one cycle later;
//   * no jump: both are sent.
// After sending a jump the stage raises stall_mem (memory output held) and
// stops sending (stall_fetch) until the Decode jump logic reports the jump
// resolved with branch_taken, which also redirects the memory; the next
// bundle is then taken in the following cycle. The waiting time therefore
// stretches by itself when the jump waits for an operand. The stage advances
// only when decode_ready says Decode takes the current output; otherwise it
// holds its output and stalls the memory. fetch_next_pc_0/1 give the memory
// the sequential successor (bundle PC + 8, + 12).
//
// Follows the document: the three pre-decode cases, the stored jump, the two
// stall flags. This design's own choice: the synchronisation period is closed
// by the Decode handshake (branch_taken) rather than by a cycle counter.
module fetch
  import vivit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bundle from the instruction memory
  input  word_t             ins_0_from_mem,
  input  word_t             ins_1_from_mem,
  input  logic [PC_LEN-1:0] pc_0_from_mem,
  input  logic [PC_LEN-1:0] pc_1_from_mem,
  input  logic              mem_valid,
  output logic              stall_mem,
  output logic [PC_LEN-1:0] fetch_next_pc_0,
  output logic [PC_LEN-1:0] fetch_next_pc_1,
  // Decode handshake
  input  logic              decode_ready,   // Decode takes the current output
  input  logic              branch_taken,   // jump resolved by Decode
  // bundle towards Decode
  output word_t             fetched_ins_0,
  output word_t             fetched_ins_1,
  output logic [PC_LEN-1:0] fetched_pc_0,
  output logic [PC_LEN-1:0] fetched_pc_1,
  output logic              fetched_valid_0,
  output logic              fetched_valid_1,
  output logic              stall_fetch,
  output logic              split_bundle    // a stored jump is pending
);
  typedef enum logic [1:0] {S_RUN, S_STORED, S_WAIT} state_t;
  state_t state_q, state_d;

  word_t             stored_ins_q;
  logic [PC_LEN-1:0] stored_pc_q;

  function automatic logic is_jump(word_t ins);
    return (ins[6:0] == 7'b1101111) || (ins[6:0] == 7'b1100111) ||
           (ins[6:0] == 7'b1100011);
  endfunction

  logic j0, j1;
  assign j0 = is_jump(ins_0_from_mem);
  assign j1 = is_jump(ins_1_from_mem);

  assign fetch_next_pc_0 = pc_0_from_mem + 32'd8;
  assign fetch_next_pc_1 = pc_0_from_mem + 32'd12;
  assign stall_fetch     = (state_q != S_RUN);
  assign split_bundle    = (state_q == S_STORED);

  // load controls for the output registers
  logic              load;
  logic              ld_v0, ld_v1;
  word_t             ld_i0, ld_i1;
  logic [PC_LEN-1:0] ld_p0, ld_p1;

  always_comb begin
    state_d   = state_q;
    stall_mem = 1'b1;
    load      = decode_ready;
    ld_v0     = 1'b0;
    ld_v1     = 1'b0;
    ld_i0     = ins_0_from_mem;
    ld_i1     = ins_1_from_mem;
    ld_p0     = pc_0_from_mem;
    ld_p1     = pc_1_from_mem;
    unique case (state_q)
      S_RUN: begin
        if (decode_ready && mem_valid) begin
          ld_v0 = 1'b1;
          if (j0) begin
            state_d = S_WAIT;            // jump alone, second flushed
          end else if (j1) begin
            state_d = S_STORED;          // first alone, keep the jump
          end else begin
            ld_v1     = 1'b1;            // plain bundle
            stall_mem = 1'b0;
          end
        end
      end
      S_STORED: begin
        if (decode_ready) begin
          ld_v0   = 1'b1;
          ld_i0   = stored_ins_q;
          ld_p0   = stored_pc_q;
          state_d = S_WAIT;
        end
      end
      default: begin                     // S_WAIT
        if (branch_taken) state_d = S_RUN;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= S_RUN;
      stored_ins_q    <= '0;
      stored_pc_q     <= '0;
      fetched_ins_0   <= '0;
      fetched_ins_1   <= '0;
      fetched_pc_0    <= '0;
      fetched_pc_1    <= '0;
      fetched_valid_0 <= 1'b0;
      fetched_valid_1 <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_RUN && decode_ready && mem_valid && !j0 && j1) begin
        stored_ins_q <= ins_1_from_mem;
        stored_pc_q  <= pc_1_from_mem;
      end
      if (load) begin
        fetched_ins_0   <= ld_i0;
        fetched_ins_1   <= ld_i1;
        fetched_pc_0    <= ld_p0;
        fetched_pc_1    <= ld_p1;
        fetched_valid_0 <= ld_v0;
        fetched_valid_1 <= ld_v1;
      end
    end
  end

  // a jump never leaves in slot 1
  assert property (@(posedge clk) disable iff (!rst_n)
                   fetched_valid_1 |-> !is_jump(fetched_ins_0) && !is_jump(fetched_ins_1));

endmodule
