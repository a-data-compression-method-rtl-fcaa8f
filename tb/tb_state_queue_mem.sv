// tb_state_queue_mem: writes random words, reads them back and checks the one-cycle
// read latency and that a read in the same cycle as a write to the same
// address returns the old word.
`timescale 1ns/1ps
module tb_state_queue_mem;
  import aft_pkg::*;
  localparam int unsigned ORDER = 6;
  logic clk = 0, rd_en = 0, we = 0;
  logic [ORDER-1:0] rd_addr = '0, wr_addr = '0;
  queue_t rd_data, wr_data = '0;
  logic [10-1:0] model [2**ORDER];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  state_queue_mem #(.ORDER(ORDER)) dut (.*);
  initial begin
    for (int a = 0; a < 2**ORDER; a++) begin
      @(negedge clk);
      we = 1; wr_addr = ORDER'(a); wr_data = 10'($urandom); model[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [10-1:0] expect_v;
      @(negedge clk);
      rd_en = 1; rd_addr = ORDER'($urandom);
      we = 1'($urandom); wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : ORDER'($urandom);
      wr_data = 10'($urandom);
      expect_v = model[rd_addr];
      if (we) model[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 0; we = 0;
      checks++;
      if (rd_data !== expect_v) begin failures++; $display("FAIL read %0d: %h vs %h", i, rd_data, expect_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
