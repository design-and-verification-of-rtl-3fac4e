// muldiv: pipelined RV32M multiply / divide / remainder unit.
//
// Computes MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM and REMU with the RISC-V
// rules for division by zero (quotient all ones, remainder = dividend) and
// signed overflow (-2^31 / -1 = -2^31, remainder 0). The result enters a
// LATENCY-deep chain of registers together with its destination ROBid, so a
// new instruction can be accepted every cycle and each result appears
// LATENCY cycles after acceptance. With en low the whole chain holds.
//
// Follows the document: the operations and the 5-cycle pipelined latency of
// the evaluated configuration; pipelines are modelled, as in the document,
// by a buffer that carries each result forward. The arithmetic is done in
// the first stage; splitting it over the stages is left to synthesis
// retiming.
module muldiv
  import vivit_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  exe_ins_t ins,
  output fu_res_t  res
);
  word_t a, b, r;
  logic signed [65:0] prod;
  assign a = ins.op1;
  assign b = ins.op2;

  always_comb begin
    logic signed [32:0] sa, sb;
    sa = {a[31], a};
    sb = {b[31], b};
    prod = '0;
    r    = '0;
    unique case (ins.ctl_fu)
      MD_MUL, MD_MULH: begin prod = sa * sb; end
      MD_MULHSU:       begin prod = sa * $signed({1'b0, b}); end
      MD_MULHU:        begin prod = $signed({1'b0, a}) * $signed({1'b0, b}); end
      default: ;
    endcase
    unique case (ins.ctl_fu)
      MD_MUL:                       r = prod[31:0];
      MD_MULH, MD_MULHSU, MD_MULHU: r = prod[63:32];
      MD_DIV:
        if (b == '0)                              r = '1;
        else if (a == 32'h8000_0000 && b == '1)   r = a;
        else                                      r = word_t'($signed(a) / $signed(b));
      MD_DIVU: r = (b == '0) ? '1 : a / b;
      MD_REM:
        if (b == '0)                              r = a;
        else if (a == 32'h8000_0000 && b == '1)   r = '0;
        else                                      r = word_t'($signed(a) % $signed(b));
      default: r = (b == '0) ? a : a % b;    // MD_REMU
    endcase
  end

  fu_res_t pipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= '0;
    end else if (en) begin
      pipe[0] <= '{valid: ins.valid, rob_id: ins.dest_rob_id, value: r, mem_dest: '0};
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign res = pipe[LATENCY-1];
endmodule
