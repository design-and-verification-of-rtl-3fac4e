// dmem: data memory, byte addressed, DEPTH words of 32 bits.
//
// One combinational read port (raddr -> rdata, the whole aligned word) for
// the LSU, and two write ports for the stores committed by the ROB in the
// same cycle (slot 1 is younger and is applied after slot 0). A write stores
// 1, 2 or 4 bytes (st_amt = 0, 1, 2) of the low end of value at the byte
// address, inside one aligned word. A third write port (tb_*) writes whole
// words, used to preload data. Addresses wrap modulo the size. Contents are
// not reset.
//
// Follows the document: byte-granular store amounts, 2^16 words in the
// evaluated configuration. This design's own choices: aligned accesses only,
// the preload port.
module dmem
  import vivit_pkg::*;
#(
  parameter int unsigned DEPTH = DATA_MEM_DEPTH
) (
  input  logic                   clk,
  input  logic [MEM_IND_LEN-1:0] raddr,
  output word_t                  rdata,
  input  mem_commit_t            wr [2],
  input  logic                   tb_we,
  input  logic [MEM_IND_LEN-1:0] tb_addr,
  input  word_t                  tb_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  word_t mem [DEPTH];

  assign rdata = mem[raddr[AW+1:2]];

  // byte enables and lane-aligned data of each write port
  logic [3:0] be [2];
  word_t      wd [2];
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      wd[p] = wr[p].value << {wr[p].addr[1:0], 3'b000};
      unique case (wr[p].st_amt)
        2'd0:    be[p] = 4'b0001 << wr[p].addr[1:0];
        2'd1:    be[p] = wr[p].addr[1] ? 4'b1100 : 4'b0011;
        default: be[p] = 4'b1111;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (tb_we) mem[tb_addr[AW+1:2]] <= tb_data;
    for (int p = 0; p < 2; p++) begin
      if (wr[p].valid) begin
        for (int b = 0; b < 4; b++)
          if (be[p][b]) mem[wr[p].addr[AW+1:2]][b*8 +: 8] <= wd[p][b*8 +: 8];
      end
    end
  end
endmodule
