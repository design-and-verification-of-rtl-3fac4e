// commit_router: sends one instruction leaving the ROB to its destination.
//
// A committing entry that is not a store becomes a register-file write
// (to_rf_commit: register, value and ROBid, the ROBid being used by the
// register file to undo the renaming); a store becomes a data-memory write
// (to_mem_commit: byte address, data, byte amount and ROBid, the ROBid being
// used to empty the store's disambiguation cell). An entry flagged with an
// exception writes neither: it is reported on exc_valid/exc_code/exc_pc.
// Purely combinational; two routers serve the two commit slots.
//
// Follows the document's routing on the is_store flag; withholding excepting
// instructions and the exception report are this design's own choice.
module commit_router
  import vivit_pkg::*;
(
  input  rob_commit_t             commit,
  output rf_commit_t              to_rf_commit,
  output mem_commit_t             to_mem_commit,
  output logic                    exc_valid,
  output logic [EXC_CODE_LEN-1:0] exc_code,
  output logic [PC_LEN-1:0]       exc_pc
);
  always_comb begin
    to_rf_commit.valid   = commit.valid && !commit.e.exc && !commit.e.is_store &&
                           commit.e.has_dest;
    to_rf_commit.addr    = commit.e.res_addr;
    to_rf_commit.value   = commit.e.res_value;
    to_rf_commit.rob_id  = commit.rob_id;
    to_mem_commit.valid  = commit.valid && !commit.e.exc && commit.e.is_store;
    to_mem_commit.addr   = commit.e.mem_dest;
    to_mem_commit.value  = commit.e.res_value;
    to_mem_commit.st_amt = commit.e.store_amt;
    to_mem_commit.rob_id = commit.rob_id;
    exc_valid            = commit.valid && commit.e.exc;
    exc_code             = commit.e.exc_code;
    exc_pc               = commit.e.ins_pc;
  end
endmodule
