// vivit_pkg: sizes, encodings and record types shared by the stages of the
// dual-issue superscalar RV32IM core and its single-precision FPU.
//
// The record layouts follow the three tables that define the pipeline's
// state: the decoded instruction (decode -> issue), the issue queue entry
// and the reorder buffer entry. Field widths are derived from the sizing
// parameters below. Register addresses carry a separate "floating-point,
// not integer" bit next to the 5-bit index, so the register file is
// addressed with REG_IND_LEN+1 bits (32 integer + 32 float registers).
// Default sizes are those of the evaluated configuration: 16-entry issue
// queue, 64-entry ROB, 2^10-word instruction memory, 2^16-word data memory.
// The FU selector, FU control codes and exception codes are this design's
// own encodings.
package vivit_pkg;

  localparam int unsigned ARCH_LEN       = 32;
  localparam int unsigned PC_LEN         = 32;
  localparam int unsigned REG_IND_LEN    = 5;
  localparam int unsigned ROB_DEPTH      = 64;
  localparam int unsigned ROB_IND_LEN    = $clog2(ROB_DEPTH);
  localparam int unsigned ISSUE_DEPTH    = 16;
  localparam int unsigned INS_MEM_DEPTH  = 1024;
  localparam int unsigned DATA_MEM_DEPTH = 65536;
  localparam int unsigned MEM_IND_LEN    = 32;   // byte address
  localparam int unsigned EXC_CODE_LEN   = 4;
  localparam int unsigned CTL_FU_LEN     = 5;
  localparam int unsigned WHICH_FU_LEN   = 2;
  localparam int unsigned DISAMB_LEN     = 8;    // disambiguation buffer cells

  typedef logic [ARCH_LEN-1:0]    word_t;
  typedef logic [ROB_IND_LEN-1:0] robid_t;
  // {f_noti, index}: bit 5 set selects the floating-point bank
  typedef logic [REG_IND_LEN:0]   regaddr_t;

  // functional-unit types selected by which_fu
  typedef enum logic [WHICH_FU_LEN-1:0] {
    FU_ALU    = 2'd0,
    FU_MULDIV = 2'd1,
    FU_LSU    = 2'd2,
    FU_FPU    = 2'd3
  } fu_t;

  // ALU operations (ctl_fu when which_fu = FU_ALU)
  localparam logic [CTL_FU_LEN-1:0] ALU_ADD  = 5'd0;
  localparam logic [CTL_FU_LEN-1:0] ALU_SUB  = 5'd1;
  localparam logic [CTL_FU_LEN-1:0] ALU_SLL  = 5'd2;
  localparam logic [CTL_FU_LEN-1:0] ALU_SLT  = 5'd3;
  localparam logic [CTL_FU_LEN-1:0] ALU_SLTU = 5'd4;
  localparam logic [CTL_FU_LEN-1:0] ALU_XOR  = 5'd5;
  localparam logic [CTL_FU_LEN-1:0] ALU_SRL  = 5'd6;
  localparam logic [CTL_FU_LEN-1:0] ALU_SRA  = 5'd7;
  localparam logic [CTL_FU_LEN-1:0] ALU_OR   = 5'd8;
  localparam logic [CTL_FU_LEN-1:0] ALU_AND  = 5'd9;
  localparam logic [CTL_FU_LEN-1:0] ALU_NOT  = 5'd10;
  localparam logic [CTL_FU_LEN-1:0] ALU_NAND = 5'd11;
  localparam logic [CTL_FU_LEN-1:0] ALU_NOR  = 5'd12;
  localparam logic [CTL_FU_LEN-1:0] ALU_XNOR = 5'd13;

  // MULDIV operations: funct3 of the RV32M encoding
  localparam logic [CTL_FU_LEN-1:0] MD_MUL    = 5'd0;
  localparam logic [CTL_FU_LEN-1:0] MD_MULH   = 5'd1;
  localparam logic [CTL_FU_LEN-1:0] MD_MULHSU = 5'd2;
  localparam logic [CTL_FU_LEN-1:0] MD_MULHU  = 5'd3;
  localparam logic [CTL_FU_LEN-1:0] MD_DIV    = 5'd4;
  localparam logic [CTL_FU_LEN-1:0] MD_DIVU   = 5'd5;
  localparam logic [CTL_FU_LEN-1:0] MD_REM    = 5'd6;
  localparam logic [CTL_FU_LEN-1:0] MD_REMU   = 5'd7;

  // FPU operations (single precision)
  localparam logic [CTL_FU_LEN-1:0] FP_ADD    = 5'd0;
  localparam logic [CTL_FU_LEN-1:0] FP_SUB    = 5'd1;
  localparam logic [CTL_FU_LEN-1:0] FP_MUL    = 5'd2;
  localparam logic [CTL_FU_LEN-1:0] FP_MIN    = 5'd3;
  localparam logic [CTL_FU_LEN-1:0] FP_MAX    = 5'd4;
  localparam logic [CTL_FU_LEN-1:0] FP_SGNJ   = 5'd5;
  localparam logic [CTL_FU_LEN-1:0] FP_SGNJN  = 5'd6;
  localparam logic [CTL_FU_LEN-1:0] FP_SGNJX  = 5'd7;
  localparam logic [CTL_FU_LEN-1:0] FP_EQ     = 5'd8;
  localparam logic [CTL_FU_LEN-1:0] FP_LT     = 5'd9;
  localparam logic [CTL_FU_LEN-1:0] FP_LE     = 5'd10;
  localparam logic [CTL_FU_LEN-1:0] FP_CVT_W  = 5'd11;   // float -> int32, toward zero
  localparam logic [CTL_FU_LEN-1:0] FP_CVT_WU = 5'd12;   // float -> uint32, toward zero
  localparam logic [CTL_FU_LEN-1:0] FP_CVT_SW = 5'd13;   // int32 -> float
  localparam logic [CTL_FU_LEN-1:0] FP_CVT_SWU= 5'd14;   // uint32 -> float
  localparam logic [CTL_FU_LEN-1:0] FP_MV     = 5'd15;   // bit move either way
  localparam logic [CTL_FU_LEN-1:0] FP_CLASS  = 5'd16;
  localparam logic [CTL_FU_LEN-1:0] FP_DIV    = 5'd17;
  localparam logic [CTL_FU_LEN-1:0] FP_SQRT   = 5'd18;
  localparam logic [31:0]           FP_QNAN   = 32'h7fc0_0000;

  // LSU operations: {is_store, funct3}
  localparam logic [CTL_FU_LEN-1:0] LS_LB  = 5'd0;
  localparam logic [CTL_FU_LEN-1:0] LS_LH  = 5'd1;
  localparam logic [CTL_FU_LEN-1:0] LS_LW  = 5'd2;
  localparam logic [CTL_FU_LEN-1:0] LS_LBU = 5'd4;
  localparam logic [CTL_FU_LEN-1:0] LS_LHU = 5'd5;
  localparam logic [CTL_FU_LEN-1:0] LS_SB  = 5'd8;
  localparam logic [CTL_FU_LEN-1:0] LS_SH  = 5'd9;
  localparam logic [CTL_FU_LEN-1:0] LS_SW  = 5'd10;

  // exception codes (RISC-V mcause numbering)
  localparam logic [EXC_CODE_LEN-1:0] EXC_ILLEGAL = 4'd2;

  // store amount encoding: 0 = 1 byte, 1 = 2 bytes, 2 = 4 bytes
  typedef logic [1:0] st_amt_t;

  // Decoded instruction (decode -> issue)
  typedef struct packed {
    fu_t                     which_fu;
    logic [CTL_FU_LEN-1:0]   ctl_fu;
    logic [REG_IND_LEN-1:0]  op1_addr;
    logic                    op1_f_noti;
    logic [REG_IND_LEN-1:0]  op2_addr;
    logic                    op2_f_noti;
    word_t                   imm;
    logic                    op2_i_notr;
    logic [REG_IND_LEN-1:0]  dest_addr;
    logic                    dest_f_noti;
    logic                    has_dest;     // writes a register (rd != x0)
    logic                    is_store;
    logic                    is_load;
    st_amt_t                 st_amt;
    logic                    exc;
    logic [EXC_CODE_LEN-1:0] exc_code;
    logic                    valid;
  } decoded_ins_t;

  // Issue queue entry
  typedef struct packed {
    fu_t                     which_fu;
    logic [CTL_FU_LEN-1:0]   ctl_fu;
    regaddr_t                op1_addr;
    logic                    op1_ren_valid; // a producer was in flight at fill
    robid_t                  op1_renamed;
    regaddr_t                op2_addr;
    logic                    op2_ren_valid;
    robid_t                  op2_renamed;
    word_t                   imm;
    logic                    op2_i_notr;
    regaddr_t                dest_addr;
    logic                    has_dest;
    robid_t                  dest_rob_id;
    logic                    is_store;
    logic                    is_load;
    st_amt_t                 st_amt;
    logic                    exc;
    logic                    valid;
  } iq_entry_t;

  // ROB reservation written by the fill-queue logic
  typedef struct packed {
    logic [PC_LEN-1:0]       ins_pc;
    regaddr_t                res_addr;
    logic                    has_dest;
    logic                    is_store;
    st_amt_t                 store_amt;
    logic                    exc;
    logic [EXC_CODE_LEN-1:0] exc_code;
  } rob_reserve_t;

  // Reorder buffer entry
  typedef struct packed {
    logic [PC_LEN-1:0]       ins_pc;
    logic                    res_ready;
    word_t                   res_value;
    regaddr_t                res_addr;
    logic                    has_dest;
    logic                    is_store;
    st_amt_t                 store_amt;
    logic [MEM_IND_LEN-1:0]  mem_dest;
    logic                    exc;
    logic [EXC_CODE_LEN-1:0] exc_code;
  } rob_entry_t;

  // Instruction dispatched to the Execute stage
  typedef struct packed {
    logic                    valid;
    fu_t                     which_fu;
    logic [CTL_FU_LEN-1:0]   ctl_fu;
    word_t                   op1;
    word_t                   op2;      // register value or immediate
    word_t                   imm;      // address offset for the LSU
    robid_t                  dest_rob_id;
  } exe_ins_t;

  // Result of a functional unit / a commit on the ROB
  typedef struct packed {
    logic                    valid;
    robid_t                  rob_id;
    word_t                   value;
    logic [MEM_IND_LEN-1:0]  mem_dest;
  } fu_res_t;

  // Instruction leaving the ROB head
  typedef struct packed {
    logic                    valid;
    robid_t                  rob_id;
    rob_entry_t              e;
  } rob_commit_t;

  // Commit towards the register file
  typedef struct packed {
    logic                    valid;
    regaddr_t                addr;
    word_t                   value;
    robid_t                  rob_id;
  } rf_commit_t;

  // Commit towards the data memory
  typedef struct packed {
    logic                    valid;
    logic [MEM_IND_LEN-1:0]  addr;
    word_t                   value;
    st_amt_t                 st_amt;
    robid_t                  rob_id;
  } mem_commit_t;

endpackage
