// tb_activity_eval: all 1024 queue values; sa and ra are recounted by
// walking the queue as a list of bits.
`timescale 1ns/1ps
module tb_activity_eval;
  import aft_pkg::*;
  queue_t hist;
  logic [3:0] sa, ra;
  int checks = 0, failures = 0;
  activity_eval dut (.*);
  initial begin
    for (int v = 0; v < 1024; v++) begin
      int esa, era;
      bit b [10];
      hist = queue_t'(v);
      for (int i = 0; i < 10; i++) b[i] = bit'((v >> i) & 1);
      esa = 0;
      for (int i = 1; i < 10; i++) if (b[i] != b[i-1]) esa++;
      era = 1;
      while (era < 10 && b[era] == b[0]) era++;
      #1;
      checks += 2;
      if (int'(sa) != esa) begin failures++; $display("FAIL sa %b: %0d vs %0d", hist, sa, esa); end
      if (int'(ra) != era) begin failures++; $display("FAIL ra %b: %0d vs %0d", hist, ra, era); end
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
