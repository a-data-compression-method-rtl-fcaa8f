// tb_context_reg: shifts random bits into the context register (with
// random enable and clear) and compares every cycle with a model register.
`timescale 1ns/1ps
module tb_context_reg;
  localparam int unsigned ORDER = 10;
  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0, bit_in = 0;
  logic [ORDER-1:0] state, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  context_reg #(.ORDER(ORDER)) dut (.*);
  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (state !== model) begin failures++; $display("FAIL cycle %0d: %h vs %h", i, state, model); end
      shift_en = ($urandom_range(0, 3) != 0);
      bit_in   = 1'($urandom);
      clear    = ($urandom_range(0, 199) == 0);
      if (clear) model = '0;
      else if (shift_en) model = {model[ORDER-2:0], bit_in};
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
