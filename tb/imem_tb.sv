// imem_tb: instruction memory. The memory is loaded through the program
// port, then driven for many cycles with random stall, redirect and
// sequential addresses. Every cycle the registered bundle is compared with a
// model: after reset the reset-PC bundle, afterwards the redirect pair when
// branch_taken, the sequential pair when not stalled, the old bundle held
// when stalled.
`timescale 1ns/1ps
module imem_tb;
  import vivit_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, stall_mem = 0, branch_taken = 0;
  logic [PC_LEN-1:0] prog_addr = 0, fetch_next_pc_0 = 0, fetch_next_pc_1 = 0,
                     decode_next_pc_0 = 0, decode_next_pc_1 = 0;
  word_t prog_data = 0;
  word_t ins_0_to_fetch, ins_1_to_fetch;
  logic [PC_LEN-1:0] pc_0_to_fetch, pc_1_to_fetch;
  logic bundle_valid;
  imem #(.DEPTH(DEPTH), .RESET_PC(32'h40)) dut (.*);
  int checks = 0, failures = 0;
  word_t img [DEPTH];
  logic [31:0] e_pc0, e_pc1;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] rnd_pc();
    return {22'b0, 8'($urandom), 2'b0};
  endfunction
  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      img[k] = $urandom;
      @(negedge clk); prog_we = 1; prog_addr = 32'(4 * k); prog_data = img[k];
    end
    @(negedge clk); prog_we = 0;
    chk(!bundle_valid, "no bundle in reset");
    rst_n = 1;
    @(negedge clk);
    chk(bundle_valid && pc_0_to_fetch == 32'h40 && pc_1_to_fetch == 32'h44 &&
        ins_0_to_fetch == img[16] && ins_1_to_fetch == img[17], "reset bundle");
    e_pc0 = 32'h40; e_pc1 = 32'h44;
    for (int n = 0; n < 1000; n++) begin
      stall_mem        = ($urandom_range(0, 3) == 0);
      branch_taken     = ($urandom_range(0, 4) == 0);
      fetch_next_pc_0  = rnd_pc(); fetch_next_pc_1 = rnd_pc();
      decode_next_pc_0 = rnd_pc(); decode_next_pc_1 = rnd_pc();
      if (branch_taken) begin e_pc0 = decode_next_pc_0; e_pc1 = decode_next_pc_1; end
      else if (!stall_mem) begin e_pc0 = fetch_next_pc_0; e_pc1 = fetch_next_pc_1; end
      @(negedge clk);
      chk(bundle_valid && pc_0_to_fetch == e_pc0 && pc_1_to_fetch == e_pc1,
          $sformatf("pc pair %h %h expected %h %h", pc_0_to_fetch, pc_1_to_fetch, e_pc0, e_pc1));
      chk(ins_0_to_fetch == img[e_pc0[9:2]] && ins_1_to_fetch == img[e_pc1[9:2]], "words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
