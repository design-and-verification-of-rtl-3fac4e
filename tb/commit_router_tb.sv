// commit_router_tb: random ROB head entries; checks that a store goes to the
// memory port only, a register-writing instruction to the register-file port
// only, an instruction without destination nowhere, and an instruction with
// an exception to the exception report only, each with its fields.
`timescale 1ns/1ps
module commit_router_tb;
  import vivit_pkg::*;
  rob_commit_t commit;
  rf_commit_t to_rf_commit;
  mem_commit_t to_mem_commit;
  logic exc_valid;
  logic [EXC_CODE_LEN-1:0] exc_code;
  logic [PC_LEN-1:0] exc_pc;
  commit_router dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    for (int n = 0; n < 300; n++) begin
      commit = '0;
      commit.valid = ($urandom_range(0, 7) != 0);
      commit.rob_id = robid_t'($urandom);
      commit.e.ins_pc = $urandom;
      commit.e.res_value = $urandom;
      commit.e.res_addr = regaddr_t'($urandom);
      commit.e.has_dest = $urandom_range(0, 3) != 0;
      commit.e.is_store = $urandom_range(0, 2) == 0;
      if (commit.e.is_store) commit.e.has_dest = 0;
      commit.e.store_amt = 2'($urandom_range(0, 2));
      commit.e.mem_dest = $urandom;
      commit.e.exc = $urandom_range(0, 9) == 0;
      commit.e.exc_code = 4'($urandom);
      #1;
      chk(to_rf_commit.valid == (commit.valid && !commit.e.exc && !commit.e.is_store && commit.e.has_dest), "rf valid");
      chk(to_mem_commit.valid == (commit.valid && !commit.e.exc && commit.e.is_store), "mem valid");
      chk(exc_valid == (commit.valid && commit.e.exc), "exc valid");
      if (to_rf_commit.valid)
        chk(to_rf_commit.addr == commit.e.res_addr && to_rf_commit.value == commit.e.res_value &&
            to_rf_commit.rob_id == commit.rob_id, "rf fields");
      if (to_mem_commit.valid)
        chk(to_mem_commit.addr == commit.e.mem_dest && to_mem_commit.value == commit.e.res_value &&
            to_mem_commit.st_amt == commit.e.store_amt && to_mem_commit.rob_id == commit.rob_id, "mem fields");
      if (exc_valid) chk(exc_code == commit.e.exc_code && exc_pc == commit.e.ins_pc, "exc fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
