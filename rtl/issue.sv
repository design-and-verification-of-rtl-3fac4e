// issue: Issue stage - issue queue, fill-queue logic and double read operands.
//
// Fill queue: each cycle in which issue_ready is high, the valid decoded
// instructions of the bundle are written in order into the ISSUE_DEPTH-entry
// FIFO issue queue. Each receives the next free ROB cell as its dest_rob_id
// (slot 1 one cell after slot 0), the ROB cell is reserved with the PC,
// destination, store flag and byte amount (reserve_*), and the operands'
// renamings are read from the extended register file: the RENAMING field and
// the B_BUSY flag, the latter telling whether a producer was still in flight.
// When slot 1 reads a register written by slot 0 it takes slot 0's ROBid
// instead, since the register file only sees slot 0's renaming a cycle
// later. The destination of every register-writing instruction is then
// renamed in the register file (do_ren_*): RENAMING <= ROBid, B_BUSY set.
// issue_ready requires room for two instructions in the queue and in the ROB.
//
// Double read operands (combinational): the two oldest queue entries are
// examined. An operand whose producer is still in flight (its ROBid lies
// between the ROB head and the instruction's own ROBid) and whose register is
// BUSY is taken from the ROB if the result is there, otherwise the
// instruction waits; any other operand is read from the register file. The
// immediate replaces operand 2 where the instruction has one. Dispatch is in
// order: entry 1 only goes with entry 0. A store writes the word address it
// targets, with its ROBid, into a cell of the DISAMB_LEN-cell disambiguation
// buffer; a load whose word address matches a cell (or the store dispatched
// beside it) waits. The cell is emptied when that store commits to memory.
// An instruction also needs its functional unit to have room (exe_fu_room)
// and the Execute stage not to be frozen (exe_ready). Dispatching a
// register-writing instruction sets its register's BUSY flag (en_ren_*).
// The dispatched instructions leave combinationally on to_exe_ins_0/1.
//
// Follows the document: the queue fields, the fill-queue steps, the bundle
// renaming correction, the RF-then-ROB operand search, BUSY set at dispatch,
// the disambiguation buffer with stores registering and loads waiting. This
// design's own choices: the ROB-age test of an operand's producer, word
// granularity of the disambiguation compare, cells freed by ROBid rather
// than by address, the buffer size and stalling a store when it is full.
module issue
  import vivit_pkg::*;
#(
  parameter int unsigned DEPTH = ISSUE_DEPTH,
  parameter int unsigned DISAMB = DISAMB_LEN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from Decode
  input  decoded_ins_t           decoded_ins_0,
  input  decoded_ins_t           decoded_ins_1,
  input  logic [PC_LEN-1:0]      decoded_pc_0,
  input  logic [PC_LEN-1:0]      decoded_pc_1,
  output logic                   issue_ready,
  // ROB reservation and state
  input  robid_t                 rob_head,
  input  robid_t                 rob_tail,
  input  logic [ROB_IND_LEN:0]   rob_count,
  output logic [1:0]             reserve_valid,
  output rob_reserve_t           reserve_rob_entries [2],
  // ROB operand read
  output robid_t                 rob_rd_id    [4],
  input  logic                   rob_rd_ready [4],
  input  word_t                  rob_rd_value [4],
  // register file: renaming lookup at fill
  output regaddr_t               ren_rd_addr  [4],
  input  robid_t                 ren_rd_robid [4],
  input  logic                   ren_rd_bbusy [4],
  // register file: renaming of destinations at fill
  output logic [1:0]             do_ren_valid,
  output regaddr_t               do_ren_addr  [2],
  output robid_t                 do_ren_robid [2],
  // register file: operand read at dispatch
  output regaddr_t               op_rd_addr   [4],
  input  word_t                  op_rd_data   [4],
  input  logic                   op_rd_busy   [4],
  // register file: BUSY set at dispatch
  output logic [1:0]             en_ren_valid,
  output regaddr_t               en_ren_addr  [2],
  // Execute stage
  input  logic                   exe_ready,
  input  logic [3:0]             exe_fu_room,
  output exe_ins_t               to_exe_ins_0,
  output exe_ins_t               to_exe_ins_1,
  // store commits empty disambiguation cells
  input  mem_commit_t            mem_commit [2],
  // events, for performance counters
  output logic                   ld_disamb_stall,
  output logic                   operand_stall
);
  localparam int unsigned PW = $clog2(DEPTH);

  iq_entry_t               iq [DEPTH];
  logic [PW-1:0]           rd_ptr, wr_ptr;
  logic [PW:0]             count;

  logic                    db_valid [DISAMB];
  logic [MEM_IND_LEN-3:0]  db_addr  [DISAMB];
  robid_t                  db_robid [DISAMB];

  // ---------------- fill queue ----------------
  logic   fv0, fv1;
  robid_t id0, id1;
  iq_entry_t ne0, ne1;
  logic [ROB_IND_LEN:0] rob_free;

  assign rob_free    = (ROB_IND_LEN+1)'(ROB_DEPTH) - rob_count;
  assign issue_ready = (count <= (PW+1)'(DEPTH - 2)) && (rob_free >= 2);
  assign fv0 = issue_ready && decoded_ins_0.valid;
  assign fv1 = issue_ready && decoded_ins_1.valid;
  assign id0 = rob_tail;
  assign id1 = rob_tail + robid_t'(fv0);

  assign ren_rd_addr[0] = {decoded_ins_0.op1_f_noti, decoded_ins_0.op1_addr};
  assign ren_rd_addr[1] = {decoded_ins_0.op2_f_noti, decoded_ins_0.op2_addr};
  assign ren_rd_addr[2] = {decoded_ins_1.op1_f_noti, decoded_ins_1.op1_addr};
  assign ren_rd_addr[3] = {decoded_ins_1.op2_f_noti, decoded_ins_1.op2_addr};

  function automatic iq_entry_t mk_entry(decoded_ins_t d, robid_t id,
                                         robid_t r1, logic b1, robid_t r2, logic b2);
    iq_entry_t e;
    e.which_fu      = d.which_fu;
    e.ctl_fu        = d.ctl_fu;
    e.op1_addr      = {d.op1_f_noti, d.op1_addr};
    e.op1_ren_valid = b1;
    e.op1_renamed   = r1;
    e.op2_addr      = {d.op2_f_noti, d.op2_addr};
    e.op2_ren_valid = b2;
    e.op2_renamed   = r2;
    e.imm           = d.imm;
    e.op2_i_notr    = d.op2_i_notr;
    e.dest_addr     = {d.dest_f_noti, d.dest_addr};
    e.has_dest      = d.has_dest;
    e.dest_rob_id   = id;
    e.is_store      = d.is_store;
    e.is_load       = d.is_load;
    e.st_amt        = d.st_amt;
    e.exc           = d.exc;
    e.valid         = 1'b1;
    return e;
  endfunction

  logic s1_op1_from0, s1_op2_from0;
  assign s1_op1_from0 = fv0 && decoded_ins_0.has_dest && (ren_rd_addr[2] ==
                        {decoded_ins_0.dest_f_noti, decoded_ins_0.dest_addr});
  assign s1_op2_from0 = fv0 && decoded_ins_0.has_dest && (ren_rd_addr[3] ==
                        {decoded_ins_0.dest_f_noti, decoded_ins_0.dest_addr});

  always_comb begin
    ne0 = mk_entry(decoded_ins_0, id0, ren_rd_robid[0], ren_rd_bbusy[0],
                   ren_rd_robid[1], ren_rd_bbusy[1]);
    ne1 = mk_entry(decoded_ins_1, id1,
                   s1_op1_from0 ? id0 : ren_rd_robid[2], s1_op1_from0 | ren_rd_bbusy[2],
                   s1_op2_from0 ? id0 : ren_rd_robid[3], s1_op2_from0 | ren_rd_bbusy[3]);
  end

  function automatic rob_reserve_t mk_res(decoded_ins_t d, logic [PC_LEN-1:0] pc);
    rob_reserve_t r;
    r.ins_pc    = pc;
    r.res_addr  = {d.dest_f_noti, d.dest_addr};
    r.has_dest  = d.has_dest;
    r.is_store  = d.is_store;
    r.store_amt = d.st_amt;
    r.exc       = d.exc;
    r.exc_code  = d.exc_code;
    return r;
  endfunction

  always_comb begin
    reserve_valid          = {fv1, fv0};
    reserve_rob_entries[0] = mk_res(decoded_ins_0, decoded_pc_0);
    reserve_rob_entries[1] = mk_res(decoded_ins_1, decoded_pc_1);
    do_ren_valid    = {fv1 && decoded_ins_1.has_dest, fv0 && decoded_ins_0.has_dest};
    do_ren_addr[0]  = ne0.dest_addr;
    do_ren_addr[1]  = ne1.dest_addr;
    do_ren_robid[0] = id0;
    do_ren_robid[1] = id1;
  end

  // ---------------- double read operands ----------------
  iq_entry_t e0, e1;
  logic      ev0, ev1;
  assign e0  = iq[rd_ptr];
  assign e1  = iq[PW'(rd_ptr + 1'b1)];
  assign ev0 = (count >= 1);
  assign ev1 = (count >= 2);

  assign op_rd_addr[0] = e0.op1_addr;
  assign op_rd_addr[1] = e0.op2_addr;
  assign op_rd_addr[2] = e1.op1_addr;
  assign op_rd_addr[3] = e1.op2_addr;
  assign rob_rd_id[0]  = e0.op1_renamed;
  assign rob_rd_id[1]  = e0.op2_renamed;
  assign rob_rd_id[2]  = e1.op1_renamed;
  assign rob_rd_id[3]  = e1.op2_renamed;

  // producer r still in the ROB and older than the instruction me
  function automatic logic in_flight(robid_t r, robid_t me);
    return robid_t'(r - rob_head) < robid_t'(me - rob_head);
  endfunction

  logic  opr_ok [4];
  word_t opr_val [4];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      iq_entry_t e;
      logic      rv;
      robid_t    rn;
      logic      rf_ok;
      e  = (k < 2) ? e0 : e1;
      rv = (k % 2 == 0) ? e.op1_ren_valid : e.op2_ren_valid;
      rn = (k % 2 == 0) ? e.op1_renamed   : e.op2_renamed;
      // Slot 1 may not read the register file for a register that slot 0,
      // dispatched in the same cycle, is about to mark BUSY.
      rf_ok = !op_rd_busy[k] &&
              !(k >= 2 && e0.has_dest && op_rd_addr[k] == e0.dest_addr);
      if (rf_ok || !(rv && in_flight(rn, e.dest_rob_id))) begin
        opr_ok[k]  = 1'b1;
        opr_val[k] = op_rd_data[k];
      end else begin
        opr_ok[k]  = rob_rd_ready[k];
        opr_val[k] = rob_rd_value[k];
      end
    end
  end

  logic                   rdy0, rdy1, fu0, fu1, ldc0, ldc1, sto0, sto1, disp0, disp1;
  logic [MEM_IND_LEN-1:0] ma0, ma1;
  int unsigned            db_free;

  assign rdy0 = opr_ok[0] && (e0.op2_i_notr || opr_ok[1]);
  assign rdy1 = opr_ok[2] && (e1.op2_i_notr || opr_ok[3]);
  assign ma0  = opr_val[0] + e0.imm;
  assign ma1  = opr_val[2] + e1.imm;
  assign fu0  = exe_fu_room[e0.which_fu];
  assign fu1  = exe_fu_room[e1.which_fu];

  always_comb begin
    db_free = 0;
    ldc0    = 1'b0;
    ldc1    = 1'b0;
    for (int i = 0; i < DISAMB; i++) begin
      if (!db_valid[i]) db_free++;
      if (db_valid[i] && db_addr[i] == ma0[MEM_IND_LEN-1:2]) ldc0 = e0.is_load;
      if (db_valid[i] && db_addr[i] == ma1[MEM_IND_LEN-1:2]) ldc1 = e1.is_load;
    end
    if (e0.is_store && e1.is_load && ma0[MEM_IND_LEN-1:2] == ma1[MEM_IND_LEN-1:2]) ldc1 = 1'b1;
  end

  assign sto0  = !e0.is_store || (db_free >= 1);
  assign sto1  = !e1.is_store || (db_free >= (e0.is_store ? 2 : 1));
  assign disp0 = ev0 && exe_ready && rdy0 && fu0 && !ldc0 && sto0;
  assign disp1 = disp0 && ev1 && rdy1 && fu1 && !ldc1 && sto1;

  assign ld_disamb_stall = ev0 && e0.is_load && ldc0 && rdy0;
  assign operand_stall   = ev0 && !rdy0;

  function automatic exe_ins_t mk_exe(iq_entry_t e, logic v, word_t a, word_t b);
    exe_ins_t x;
    x.valid       = v;
    x.which_fu    = e.which_fu;
    x.ctl_fu      = e.ctl_fu;
    x.op1         = a;
    x.op2         = e.op2_i_notr ? e.imm : b;
    x.imm         = e.imm;
    x.dest_rob_id = e.dest_rob_id;
    return x;
  endfunction

  assign to_exe_ins_0 = mk_exe(e0, disp0, opr_val[0], opr_val[1]);
  assign to_exe_ins_1 = mk_exe(e1, disp1, opr_val[2], opr_val[3]);

  assign en_ren_valid   = {disp1 && e1.has_dest, disp0 && e0.has_dest};
  assign en_ren_addr[0] = e0.dest_addr;
  assign en_ren_addr[1] = e1.dest_addr;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) iq[i] <= '0;
    end else begin
      if (fv0) iq[wr_ptr] <= ne0;
      if (fv1) iq[PW'(wr_ptr + PW'(fv0))] <= ne1;
      wr_ptr <= PW'(wr_ptr + PW'(fv0) + PW'(fv1));
      rd_ptr <= PW'(rd_ptr + PW'(disp0) + PW'(disp1));
      count  <= count + (PW+1)'(fv0) + (PW+1)'(fv1) - (PW+1)'(disp0) - (PW+1)'(disp1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DISAMB; i++) begin
        db_valid[i] <= 1'b0;
        db_addr[i]  <= '0;
        db_robid[i] <= '0;
      end
    end else begin
      logic a0, a1;
      a0 = disp0 && e0.is_store;
      a1 = disp1 && e1.is_store;
      for (int i = 0; i < DISAMB; i++) begin
        if (db_valid[i]) begin
          for (int p = 0; p < 2; p++)
            if (mem_commit[p].valid && mem_commit[p].rob_id == db_robid[i]) db_valid[i] <= 1'b0;
        end else if (a0) begin
          db_valid[i] <= 1'b1;
          db_addr[i]  <= ma0[MEM_IND_LEN-1:2];
          db_robid[i] <= e0.dest_rob_id;
          a0 = 1'b0;
        end else if (a1) begin
          db_valid[i] <= 1'b1;
          db_addr[i]  <= ma1[MEM_IND_LEN-1:2];
          db_robid[i] <= e1.dest_rob_id;
          a1 = 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));

endmodule
