// alu: single-cycle integer arithmetic-logic unit of the Execute stage.
//
// Performs, on two 32-bit operands, addition, subtraction, shifts (logical
// left/right, arithmetic right, by the low five bits of operand 2), signed
// and unsigned set-less-than, and the bitwise AND, OR, XOR, NOT (of operand
// 1), NAND, NOR and XNOR, chosen by the FU control code. The result is
// registered together with the destination ROBid: an instruction accepted
// in one cycle shows res_valid in the next. With en low (Execute stage
// frozen) the output register holds its value.
//
// Follows the document: operation list and single-cycle latency. The
// control-code values are this design's own; the decoder never produces
// NOT/NAND/NOR/XNOR since RV32I has no such instructions.
module alu
  import vivit_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  exe_ins_t ins,        // taken when ins.valid and en
  output fu_res_t  res
);
  word_t a, b, r;
  assign a = ins.op1;
  assign b = ins.op2;

  always_comb begin
    unique case (ins.ctl_fu)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a - b;
      ALU_SLL:  r = a << b[4:0];
      ALU_SLT:  r = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_XOR:  r = a ^ b;
      ALU_SRL:  r = a >> b[4:0];
      ALU_SRA:  r = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:   r = a | b;
      ALU_AND:  r = a & b;
      ALU_NOT:  r = ~a;
      ALU_NAND: r = ~(a & b);
      ALU_NOR:  r = ~(a | b);
      ALU_XNOR: r = ~(a ^ b);
      default:  r = a + b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res <= '0;
    else if (en) begin
      res.valid    <= ins.valid;
      res.rob_id   <= ins.dest_rob_id;
      res.value    <= r;
      res.mem_dest <= '0;
    end
  end
endmodule
