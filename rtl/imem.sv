// imem: instruction memory with the pre-fetch stage (first front-end stage).
//
// A word-wide RAM of INS_MEM_DEPTH entries, read twice per cycle so that a
// bundle of two consecutive instructions (at pc and pc+4) is presented to the
// Fetch stage. The read is registered: the bundle chosen in one cycle appears
// on ins_0/1_to_fetch in the next, together with its two PCs and a valid flag.
// The address of the next bundle comes from one of two PC pairs: the pair
// supplied by Fetch (fetch_next_pc_0/1, the sequential successor) or the pair
// computed by the jump logic of Decode (decode_next_pc_0/1), which wins when
// branch_taken is asserted. While stall_mem is high and no jump is resolved
// the outputs are held, so Fetch sees a steady bundle during its
// synchronisation period. Reset clears the outputs and starts at RESET_PC.
// A second port (prog_*) writes the memory, used to load a program.
//
// Follows the document: the two PC pairs and their selection, the bundle of
// two, the parametric depth. This design's own choices: registered read with
// a held output instead of the document's comparison of consecutive jump
// bundles, and the program-load port. Addresses wrap modulo the depth.
module imem
  import vivit_pkg::*;
#(
  parameter int unsigned DEPTH    = INS_MEM_DEPTH,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load port
  input  logic              prog_we,
  input  logic [PC_LEN-1:0] prog_addr,      // byte address
  input  word_t             prog_data,
  // sequential PC pair from Fetch
  input  logic [PC_LEN-1:0] fetch_next_pc_0,
  input  logic [PC_LEN-1:0] fetch_next_pc_1,
  input  logic              stall_mem,
  // redirect PC pair from the Decode jump logic
  input  logic              branch_taken,
  input  logic [PC_LEN-1:0] decode_next_pc_0,
  input  logic [PC_LEN-1:0] decode_next_pc_1,
  // bundle towards Fetch
  output word_t             ins_0_to_fetch,
  output word_t             ins_1_to_fetch,
  output logic [PC_LEN-1:0] pc_0_to_fetch,
  output logic [PC_LEN-1:0] pc_1_to_fetch,
  output logic              bundle_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [PC_LEN-1:0] rd_pc_0, rd_pc_1;
  logic              rd_en;

  always_comb begin
    rd_en   = branch_taken || !stall_mem;
    rd_pc_0 = branch_taken ? decode_next_pc_0 : fetch_next_pc_0;
    rd_pc_1 = branch_taken ? decode_next_pc_1 : fetch_next_pc_1;
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_data;
  end

  // first bundle after reset is read at RESET_PC
  logic started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ins_0_to_fetch <= '0;
      ins_1_to_fetch <= '0;
      pc_0_to_fetch  <= '0;
      pc_1_to_fetch  <= '0;
      bundle_valid   <= 1'b0;
      started        <= 1'b0;
    end else if (!started) begin
      started        <= 1'b1;
      ins_0_to_fetch <= mem[RESET_PC[AW+1:2]];
      ins_1_to_fetch <= mem[AW'(RESET_PC[AW+1:2] + 1'b1)];
      pc_0_to_fetch  <= RESET_PC;
      pc_1_to_fetch  <= RESET_PC + 32'd4;
      bundle_valid   <= 1'b1;
    end else if (rd_en) begin
      ins_0_to_fetch <= mem[rd_pc_0[AW+1:2]];
      ins_1_to_fetch <= mem[rd_pc_1[AW+1:2]];
      pc_0_to_fetch  <= rd_pc_0;
      pc_1_to_fetch  <= rd_pc_1;
      bundle_valid   <= 1'b1;
    end
  end

endmodule
