// tb_ost_rom: every entry of the ten offset tables against the update
// rule evaluated in real arithmetic: p' = (p*N + sigma)/(N + sigma) after a
// 0 and p*N/(N + sigma) after a 1 (p in [0,1], N = 192), mapped to the
// nearest Prb entry. Also checks that every updated pointer stays inside
// the table, that a 0 never lowers and a 1 never raises the pointer, and
// that bigger steps never move less. The offsets printed in the source
// (indices 0, 61, 127) are listed next to the table's for comparison.
`timescale 1ns/1ps
module tb_ost_rom;
  import aft_pkg::*;
  prb_idx_t idx;
  logic bit_in;
  step_sel_t step_sel;
  ost_t ost;
  int checks = 0, failures = 0;
  ost_rom dut (.*);

  function automatic real prb_real(int i);
    return real'(prb_value(i)) / 256.0;
  endfunction
  function automatic int ref_ost(int sel, bit b, int i);
    real n, s, p, pn, best_e, e;
    int best;
    n = 192.0; s = real'(step_value(sel)); p = prb_real(i);
    pn = b ? p * n / (n + s) : (p * n + s) / (n + s);
    best = 0; best_e = 10.0;
    for (int j = 0; j < 128; j++) begin
      e = prb_real(j) - pn; if (e < 0) e = -e;
      if (e < best_e - 1e-12) begin best_e = e; best = j; end
    end
    return best - i;
  endfunction

  initial begin
    int prev [2];
    for (int sel = 0; sel < 5; sel++) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 128; i++) begin
          idx = prb_idx_t'(i); bit_in = b[0]; step_sel = step_sel_t'(sel); #1;
          checks++;
          if (int'(ost) != ref_ost(sel, b[0], i)) begin
            failures++; $display("FAIL sel %0d bit %0d idx %0d: %0d vs %0d", sel, b, i, ost, ref_ost(sel, b[0], i));
          end
          checks++;
          if (i + int'(ost) < 0 || i + int'(ost) > 127 || (b == 0 && ost < 0) || (b == 1 && ost > 0)) begin
            failures++; $display("FAIL range/sign sel %0d bit %0d idx %0d: %0d", sel, b, i, ost);
          end
          if (sel > 0) begin
            step_sel = step_sel_t'(sel - 1); #1;
            checks++;
            if ((b == 0 && ost > ost_t'(ref_ost(sel, 0, i))) || (b == 1 && ost < ost_t'(ref_ost(sel, 1, i)))) begin
              failures++; $display("FAIL step order sel %0d bit %0d idx %0d", sel, b, i);
            end
          end
        end
      idx = 0;   bit_in = 0; step_sel = step_sel_t'(sel); #1; prev[0] = int'(ost);
      idx = 61;  #1; prev[1] = int'(ost);
      $display("sigma %2d: Ost0[0]=%0d Ost0[61]=%0d", step_value(sel), prev[0], prev[1]);
      idx = 61;  bit_in = 1; #1; prev[0] = int'(ost);
      idx = 127; #1; prev[1] = int'(ost);
      $display("          Ost1[61]=%0d Ost1[127]=%0d", prev[0], prev[1]);
    end
    $display("printed: s8 8,1,-1,-8  s24 18,3,-4,-18  s32 24,3,-5,-24  s40 28,3,-6,-28  s64 30,4,-8,-30");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
