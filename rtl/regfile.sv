// regfile: extended register file - 32 integer and 32 floating-point
// registers, each with its renaming extension.
//
// Every entry holds DATA, RENAMING (ROBid of the youngest issued instruction
// that writes the register), BUSY and B_BUSY. Addresses are {f_noti, index};
// integer register 0 always reads zero and is never written or renamed.
//   * commit (to_rf_commit_0/1): DATA is written; if the committing ROBid
//     equals RENAMING, no younger writer exists and BUSY and B_BUSY are
//     cleared. Slot 1 is younger and wins on the same register.
//   * do_renaming (fill queue): RENAMING <= ROBid and B_BUSY set. B_BUSY lets
//     the Decode jump logic wait for a register still being produced.
//   * enable_renaming (dispatch): BUSY set.
// A set in the same cycle wins over a clear. Combinational read ports serve
// the fill queue (RENAMING, B_BUSY), the double read operands of the Issue
// stage (DATA, BUSY) and the Decode jump logic (DATA, B_BUSY); all see the
// state before the current clock edge.
//
// Follows the document: the extension fields, the commit and renaming
// routines, combinational request networks. This design's own choice: the
// floating-point bank sits beside the integer one in the same array.
module regfile
  import vivit_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  rf_commit_t             commit       [2],
  input  logic [1:0]             do_ren_valid,
  input  regaddr_t               do_ren_addr  [2],
  input  robid_t                 do_ren_robid [2],
  input  logic [1:0]             en_ren_valid,
  input  regaddr_t               en_ren_addr  [2],
  input  regaddr_t               ren_rd_addr  [4],
  output robid_t                 ren_rd_robid [4],
  output logic                   ren_rd_bbusy [4],
  input  regaddr_t               op_rd_addr   [4],
  output word_t                  op_rd_data   [4],
  output logic                   op_rd_busy   [4],
  input  logic [REG_IND_LEN-1:0] j_addr       [2],
  output word_t                  j_data       [2],
  output logic                   j_bbusy      [2]
);
  localparam int unsigned NREG = 2 ** (REG_IND_LEN + 1);

  word_t  data   [NREG];
  robid_t ren    [NREG];
  logic   busy   [NREG];
  logic   b_busy [NREG];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ren_rd_robid[k] = ren[ren_rd_addr[k]];
      ren_rd_bbusy[k] = b_busy[ren_rd_addr[k]];
      op_rd_data[k]   = data[op_rd_addr[k]];
      op_rd_busy[k]   = busy[op_rd_addr[k]];
    end
    for (int k = 0; k < 2; k++) begin
      j_data[k]  = data[{1'b0, j_addr[k]}];
      j_bbusy[k] = b_busy[{1'b0, j_addr[k]}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) begin
        data[i]   <= '0;
        ren[i]    <= '0;
        busy[i]   <= 1'b0;
        b_busy[i] <= 1'b0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (commit[p].valid && commit[p].addr != '0) begin
          data[commit[p].addr] <= commit[p].value;
          if (ren[commit[p].addr] == commit[p].rob_id) begin
            busy[commit[p].addr]   <= 1'b0;
            b_busy[commit[p].addr] <= 1'b0;
          end
        end
      end
      for (int p = 0; p < 2; p++) begin
        if (do_ren_valid[p] && do_ren_addr[p] != '0) begin
          ren[do_ren_addr[p]]    <= do_ren_robid[p];
          b_busy[do_ren_addr[p]] <= 1'b1;
        end
        if (en_ren_valid[p] && en_ren_addr[p] != '0) busy[en_ren_addr[p]] <= 1'b1;
      end
    end
  end
endmodule
