// vivit_cpu: dual-issue superscalar RV32IM processor with a subset of RV32F.
//
// Seven stages: instruction memory with pre-fetch (imem), fetch with
// pre-decode (fetch), decode with jump resolution (decode), issue with
// renaming, issue queue and operand read (issue), execute with two ALUs, a
// MULDIV, an LSU and an FPU (execute), reorder buffer (rob) with two commit
// routers, and the extended register file (regfile); the data memory (dmem) is
// written at commit. Bundles of two instructions move through the front end,
// are dispatched in order, two per cycle at most, complete out of order and
// commit in order, two per cycle at most. Jumps are resolved in Decode
// without prediction: the front end stops behind each jump until its target
// is known.
//
// Interface: prog_* writes the instruction memory (byte address, one word per
// cycle) and dmem_we/dmem_waddr/dmem_wdata preload data words, both meant
// for use while rst_n is low. Each cycle the two commit slots are reported
// (commit_valid, commit_pc, the register write commit_rf and the store
// commit_mem); an instruction with an exception is reported on exc_*
// instead of being written. The ev_* outputs pulse on the pipeline events
// a performance counter would count. Execution starts at address 0 after
// reset.
module vivit_cpu
  import vivit_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    prog_we,
  input  logic [PC_LEN-1:0]       prog_addr,
  input  word_t                   prog_data,
  input  logic                    dmem_we,
  input  logic [MEM_IND_LEN-1:0]  dmem_waddr,
  input  word_t                   dmem_wdata,
  output logic [1:0]              commit_valid,
  output logic [PC_LEN-1:0]       commit_pc   [2],
  output rf_commit_t              commit_rf   [2],
  output mem_commit_t             commit_mem  [2],
  output logic [1:0]              exc_valid,
  output logic [EXC_CODE_LEN-1:0] exc_code    [2],
  output logic [PC_LEN-1:0]       exc_pc      [2],
  output logic                    ev_jump,          // a jump resolved
  output logic                    ev_jump_wait,     // a jump waits for an operand
  output logic                    ev_split_bundle,  // jump second in its bundle
  output logic                    ev_issue_full,    // fill queue stalled
  output logic                    ev_ld_stall,      // load held by disambiguation
  output logic                    ev_operand_stall, // head waits for an operand
  output logic                    ev_freeze,        // execute stage frozen
  output logic                    ev_overflow       // a result was buffered
);
  // front end
  word_t             m_ins0, m_ins1;
  logic [PC_LEN-1:0] m_pc0, m_pc1, f_npc0, f_npc1, d_npc0, d_npc1;
  logic              m_valid, stall_mem, branch_taken, stall_fetch;
  word_t             f_ins0, f_ins1;
  logic [PC_LEN-1:0] f_pc0, f_pc1;
  logic              f_v0, f_v1, decode_ready, issue_ready;
  decoded_ins_t      d_ins0, d_ins1;
  logic [PC_LEN-1:0] d_pc0, d_pc1;
  logic [REG_IND_LEN-1:0] j_addr [2];
  word_t             j_data [2];
  logic              j_bbusy [2];

  imem u_imem (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .fetch_next_pc_0(f_npc0), .fetch_next_pc_1(f_npc1), .stall_mem,
    .branch_taken, .decode_next_pc_0(d_npc0), .decode_next_pc_1(d_npc1),
    .ins_0_to_fetch(m_ins0), .ins_1_to_fetch(m_ins1),
    .pc_0_to_fetch(m_pc0), .pc_1_to_fetch(m_pc1), .bundle_valid(m_valid));

  fetch u_fetch (
    .clk, .rst_n, .ins_0_from_mem(m_ins0), .ins_1_from_mem(m_ins1),
    .pc_0_from_mem(m_pc0), .pc_1_from_mem(m_pc1), .mem_valid(m_valid), .stall_mem,
    .fetch_next_pc_0(f_npc0), .fetch_next_pc_1(f_npc1), .decode_ready, .branch_taken,
    .fetched_ins_0(f_ins0), .fetched_ins_1(f_ins1), .fetched_pc_0(f_pc0),
    .fetched_pc_1(f_pc1), .fetched_valid_0(f_v0), .fetched_valid_1(f_v1), .stall_fetch,
    .split_bundle(ev_split_bundle));

  decode u_decode (
    .clk, .rst_n, .fetched_ins_0(f_ins0), .fetched_ins_1(f_ins1),
    .fetched_pc_0(f_pc0), .fetched_pc_1(f_pc1), .fetched_valid_0(f_v0),
    .fetched_valid_1(f_v1), .decode_ready, .branch_taken,
    .next_pc_0(d_npc0), .next_pc_1(d_npc1),
    .to_rf_op1_addr(j_addr[0]), .to_rf_op2_addr(j_addr[1]),
    .from_rf_op1(j_data[0]), .from_rf_op2(j_data[1]),
    .from_rf_op1_busy(j_bbusy[0]), .from_rf_op2_busy(j_bbusy[1]),
    .issue_ready, .decoded_ins_0(d_ins0), .decoded_ins_1(d_ins1),
    .decoded_pc_0(d_pc0), .decoded_pc_1(d_pc1));

  // issue, ROB, register file
  robid_t               rob_head, rob_tail;
  logic [ROB_IND_LEN:0] rob_count;
  logic [1:0]           reserve_valid;
  rob_reserve_t         reserve [2];
  robid_t               rob_rd_id [4];
  logic                 rob_rd_ready [4];
  word_t                rob_rd_value [4];
  regaddr_t             ren_rd_addr [4];
  robid_t               ren_rd_robid [4];
  logic                 ren_rd_bbusy [4];
  logic [1:0]           do_ren_valid, en_ren_valid;
  regaddr_t             do_ren_addr [2], en_ren_addr [2];
  robid_t               do_ren_robid [2];
  regaddr_t             op_rd_addr [4];
  word_t                op_rd_data [4];
  logic                 op_rd_busy [4];
  logic                 exe_ready;
  logic [3:0]           fu_room;
  exe_ins_t             x_ins0, x_ins1;
  mem_commit_t          to_mem [2];
  rf_commit_t           to_rf [2];
  fu_res_t              cor [2];
  rob_commit_t          rcommit [2];
  logic [MEM_IND_LEN-1:0] dm_raddr;
  word_t                dm_rdata;

  issue u_issue (
    .clk, .rst_n, .decoded_ins_0(d_ins0), .decoded_ins_1(d_ins1),
    .decoded_pc_0(d_pc0), .decoded_pc_1(d_pc1), .issue_ready,
    .rob_head, .rob_tail, .rob_count, .reserve_valid, .reserve_rob_entries(reserve),
    .rob_rd_id, .rob_rd_ready, .rob_rd_value,
    .ren_rd_addr, .ren_rd_robid, .ren_rd_bbusy,
    .do_ren_valid, .do_ren_addr, .do_ren_robid,
    .op_rd_addr, .op_rd_data, .op_rd_busy, .en_ren_valid, .en_ren_addr,
    .exe_ready, .exe_fu_room(fu_room), .to_exe_ins_0(x_ins0), .to_exe_ins_1(x_ins1),
    .mem_commit(to_mem), .ld_disamb_stall(ev_ld_stall), .operand_stall(ev_operand_stall));

  execute u_exe (
    .clk, .rst_n, .to_exe_ins_0(x_ins0), .to_exe_ins_1(x_ins1), .ready(exe_ready),
    .fu_room, .dmem_raddr(dm_raddr), .dmem_rdata(dm_rdata), .commit_on_rob(cor),
    .overflow_used(ev_overflow));

  rob u_rob (
    .clk, .rst_n, .reserve_valid, .reserve_rob_entries(reserve), .commit_on_rob(cor),
    .rd_id(rob_rd_id), .rd_ready(rob_rd_ready), .rd_value(rob_rd_value),
    .head(rob_head), .tail(rob_tail), .count(rob_count), .commit(rcommit));

  for (genvar g = 0; g < 2; g++) begin : g_router
    commit_router u_cr (
      .commit(rcommit[g]), .to_rf_commit(to_rf[g]), .to_mem_commit(to_mem[g]),
      .exc_valid(exc_valid[g]), .exc_code(exc_code[g]), .exc_pc(exc_pc[g]));
    assign commit_valid[g] = rcommit[g].valid;
    assign commit_pc[g]    = rcommit[g].e.ins_pc;
    assign commit_rf[g]    = to_rf[g];
    assign commit_mem[g]   = to_mem[g];
  end

  regfile u_rf (
    .clk, .rst_n, .commit(to_rf), .do_ren_valid, .do_ren_addr, .do_ren_robid,
    .en_ren_valid, .en_ren_addr, .ren_rd_addr, .ren_rd_robid, .ren_rd_bbusy,
    .op_rd_addr, .op_rd_data, .op_rd_busy, .j_addr, .j_data, .j_bbusy);

  dmem u_dmem (
    .clk, .raddr(dm_raddr), .rdata(dm_rdata), .wr(to_mem),
    .tb_we(dmem_we), .tb_addr(dmem_waddr), .tb_data(dmem_wdata));

  // event outputs
  assign ev_jump         = branch_taken;
  assign ev_jump_wait    = f_v0 && !decode_ready && issue_ready && stall_fetch;
  assign ev_issue_full   = !issue_ready;
  assign ev_freeze       = !exe_ready;
endmodule
