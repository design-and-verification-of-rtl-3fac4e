// execute: Execute stage - functional units, their input queues and the
// priority multiplexer towards the ROB.
//
// The units are those of the evaluated configuration: two single-cycle ALUs,
// one MULDIV (MULDIV_LAT cycles, pipelined), one LSU (3 cycles, pipelined)
// and one FPU (FPU_LAT cycles, pipelined). A dispatched instruction goes to
// the unit its which_fu names: an ALU instruction in bundle position k to
// ALU k, a MULDIV, LSU or FPU instruction into that unit's input queue
// (both bundle positions may fill the same queue in one cycle). Each queue
// feeds its unit one instruction per cycle. Finished results pass through prio_mux, which writes two per cycle
// into the ROB (commit_on_rob_0/1) and buffers the rest; while its buffer is
// nearly full the whole stage freezes (ready low). fu_room tells the Issue
// stage, per FU type, whether two more instructions fit.
//
// Follows the document: unit mix and latencies, per-unit queues, priority
// multiplexing with the LSU first. This design's own choices: fixed mapping
// of bundle positions onto the two ALUs, queue depth, freeze.
module execute
  import vivit_pkg::*;
#(
  parameter int unsigned MULDIV_LAT = 5,
  parameter int unsigned FPU_LAT    = 5,
  parameter int unsigned QDEPTH     = 4,
  parameter int unsigned BUF_DEPTH  = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  exe_ins_t               to_exe_ins_0,
  input  exe_ins_t               to_exe_ins_1,
  output logic                   ready,
  output logic [3:0]             fu_room,
  output logic [MEM_IND_LEN-1:0] dmem_raddr,
  input  word_t                  dmem_rdata,
  output fu_res_t                commit_on_rob [2],
  output logic                   overflow_used
);
  logic en, freeze;
  assign en    = !freeze;
  assign ready = en;

  function automatic exe_ins_t sel(exe_ins_t i, fu_t f);
    exe_ins_t o;
    o       = i;
    o.valid = i.valid && (i.which_fu == f);
    return o;
  endfunction

  exe_ins_t md_head, ls_head, fp_head;
  logic     md_room, ls_room, fp_room;
  fu_res_t  res [5];

  fu_queue #(.DEPTH(QDEPTH)) u_md_q (
    .clk, .rst_n, .push_0(sel(to_exe_ins_0, FU_MULDIV)), .push_1(sel(to_exe_ins_1, FU_MULDIV)),
    .pop(en), .head(md_head), .room(md_room));
  fu_queue #(.DEPTH(QDEPTH)) u_ls_q (
    .clk, .rst_n, .push_0(sel(to_exe_ins_0, FU_LSU)), .push_1(sel(to_exe_ins_1, FU_LSU)),
    .pop(en), .head(ls_head), .room(ls_room));
  fu_queue #(.DEPTH(QDEPTH)) u_fp_q (
    .clk, .rst_n, .push_0(sel(to_exe_ins_0, FU_FPU)), .push_1(sel(to_exe_ins_1, FU_FPU)),
    .pop(en), .head(fp_head), .room(fp_room));

  lsu u_lsu (.clk, .rst_n, .en, .ins(ls_head), .dmem_raddr, .dmem_rdata, .res(res[0]));
  alu u_alu0 (.clk, .rst_n, .en, .ins(sel(to_exe_ins_0, FU_ALU)), .res(res[1]));
  alu u_alu1 (.clk, .rst_n, .en, .ins(sel(to_exe_ins_1, FU_ALU)), .res(res[2]));
  muldiv #(.LATENCY(MULDIV_LAT)) u_md (.clk, .rst_n, .en, .ins(md_head), .res(res[3]));
  fpu #(.LATENCY(FPU_LAT)) u_fpu (.clk, .rst_n, .en, .ins(fp_head), .res(res[4]));

  prio_mux #(.NUM_FU(5), .BUF_DEPTH(BUF_DEPTH)) u_pm (
    .clk, .rst_n, .fu_res(res), .commit_on_rob, .freeze, .overflow_used);

  always_comb begin
    fu_room            = '0;
    fu_room[FU_ALU]    = 1'b1;
    fu_room[FU_MULDIV] = md_room;
    fu_room[FU_LSU]    = ls_room;
    fu_room[FU_FPU]    = fp_room;
  end
endmodule
