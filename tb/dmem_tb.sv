// dmem_tb: random byte, half-word and word stores on both write ports,
// including the same word on both ports in one cycle (port 1 applied last),
// checked through the read port against a byte-array model.
`timescale 1ns/1ps
module dmem_tb;
  import vivit_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [MEM_IND_LEN-1:0] raddr, tb_addr;
  word_t rdata, tb_data;
  mem_commit_t wr [2];
  logic tb_we;
  dmem #(.DEPTH(256)) dut (.*);
  logic [7:0] model [1024];
  int checks = 0, failures = 0;
  initial begin
    wr[0] = '0; wr[1] = '0; tb_we = 0; raddr = 0; tb_addr = 0; tb_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); tb_we = 1; tb_addr = 32'(i * 4); tb_data = 32'(i * 32'h01010101);
      for (int b = 0; b < 4; b++) model[i * 4 + b] = 8'(i);
    end
    @(negedge clk); tb_we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        logic [1:0] amt;
        logic [31:0] a;
        amt = 2'($urandom_range(0, 2));
        a = 32'($urandom_range(0, 63)) * 4 + ((amt == 0) ? 32'($urandom_range(0, 3)) :
                                              (amt == 1) ? 32'($urandom_range(0, 1) * 2) : 0);
        if (p == 1 && n % 5 == 0) begin a = wr[0].addr; amt = wr[0].st_amt; end
        wr[p] = '{valid: $urandom_range(0, 3) != 0, addr: a, value: $urandom, st_amt: amt, rob_id: 0};
      end
      // the read shows every write of earlier cycles
      raddr = 32'($urandom_range(0, 255)) * 4;
      #1;
      checks++;
      if (rdata != {model[raddr + 3], model[raddr + 2], model[raddr + 1], model[raddr]}) begin
        failures++; $display("FAIL read %h", raddr);
      end
      for (int p = 0; p < 2; p++) if (wr[p].valid)
        for (int b = 0; b < (wr[p].st_amt == 0 ? 1 : wr[p].st_amt == 1 ? 2 : 4); b++)
          model[int'(wr[p].addr[9:0]) + b] = wr[p].value[8 * b +: 8];
    end
    @(negedge clk); wr[0].valid = 0; wr[1].valid = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 32'(i * 4); #1;
      checks++;
      if (rdata != {model[i * 4 + 3], model[i * 4 + 2], model[i * 4 + 1], model[i * 4]}) begin
        failures++; $display("FAIL word %0d", i);
      end
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
