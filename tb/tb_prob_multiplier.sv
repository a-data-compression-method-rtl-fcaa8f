// tb_prob_multiplier: random and corner operands against floor(a*p/256),
// and the property that both sub-intervals are non-empty for a normalised a.
`timescale 1ns/1ps
module tb_prob_multiplier;
  import aft_pkg::*;
  localparam int unsigned W = 16;
  logic [W-1:0] a, a0;
  prob_t p;
  int checks = 0, failures = 0;
  prob_multiplier #(.W(W)) dut (.*);
  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint e;
      a = (i < 4) ? ((i % 2) ? 16'hFFFF : 16'h8000) : W'($urandom);
      p = (i < 4) ? ((i < 2) ? 8'd1 : 8'd255) : P_W'($urandom);
      #1;
      e = (longint'(a) * longint'(p)) / 256;
      checks++;
      if (longint'(a0) != e) begin failures++; $display("FAIL %0d*%0d: %0d vs %0d", a, p, a0, e); end
      if (a[W-1] && p != 0) begin
        checks++;
        if (a0 == 0 || a0 >= a) begin failures++; $display("FAIL empty sub-interval a=%0d p=%0d", a, p); end
      end
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
