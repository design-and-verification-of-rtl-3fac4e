// lsu: pipelined load/store unit, three cycles.
//
// Stage 1 registers the byte address (base + offset) and the operation.
// Stage 2 reads the addressed word from the data memory (combinational read
// port dmem_raddr/dmem_rdata) and registers it. Stage 3 extracts and extends
// the byte, half-word or word for LB, LH, LW, LBU, LHU and registers the
// result. A store (SB, SH, SW) does not touch the memory here: its result is
// the data to store, and mem_dest carries the address, so that the ROB
// writes memory only at commit. Results leave with their destination ROBid
// three cycles after acceptance; with en low the pipeline holds.
//
// Follows the document: the operations and the 3-cycle latency of the
// evaluated configuration, stores written to memory at commit. This design's
// own choices: the stage split, aligned accesses only (the low address bits
// select the lanes inside one word).
module lsu
  import vivit_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  exe_ins_t               ins,
  output logic [MEM_IND_LEN-1:0] dmem_raddr,
  input  word_t                  dmem_rdata,
  output fu_res_t                res
);
  typedef struct packed {
    logic                   valid;
    logic [CTL_FU_LEN-1:0]  ctl;
    robid_t                 rob_id;
    logic [MEM_IND_LEN-1:0] addr;
    word_t                  data;
  } ls_stage_t;

  ls_stage_t s1, s2;
  assign dmem_raddr = s1.addr;

  function automatic word_t extract(logic [CTL_FU_LEN-1:0] ctl, logic [1:0] off, word_t w);
    word_t sh;
    sh = w >> {off, 3'b000};
    unique case (ctl)
      LS_LB:   return {{24{sh[7]}}, sh[7:0]};
      LS_LBU:  return {24'b0, sh[7:0]};
      LS_LH:   return {{16{sh[15]}}, sh[15:0]};
      LS_LHU:  return {16'b0, sh[15:0]};
      default: return w;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= '0;
      s2  <= '0;
      res <= '0;
    end else if (en) begin
      s1.valid  <= ins.valid;
      s1.ctl    <= ins.ctl_fu;
      s1.rob_id <= ins.dest_rob_id;
      s1.addr   <= ins.op1 + ins.imm;
      s1.data   <= ins.op2;
      s2        <= s1;
      if (!s1.ctl[3]) s2.data <= dmem_rdata;
      res.valid    <= s2.valid;
      res.rob_id   <= s2.rob_id;
      res.mem_dest <= s2.addr;
      res.value    <= s2.ctl[3] ? s2.data : extract(s2.ctl, s2.addr[1:0], s2.data);
    end
  end
endmodule
