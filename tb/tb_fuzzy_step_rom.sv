// tb_fuzzy_step_rom: all 100 (sa, ra) pairs against an independent
// real-arithmetic max-min inference. The membership functions are written
// as breakpoint lists (trapezoids) taken from the membership plots; the
// output is defuzzified by centre of gravity over integer sigma 0..60 and
// split at 15, 25, 40, 51. Also checks the corners of the rule base: no
// switching and a long run give the biggest step, many switches and no
// repetition the smallest.
`timescale 1ns/1ps
module tb_fuzzy_step_rom;
  import aft_pkg::*;
  logic [3:0] sa, ra;
  step_sel_t step_sel;
  int checks = 0, failures = 0;
  fuzzy_step_rom dut (.*);

  // trapezoid with corners a <= b <= c <= d
  function automatic real trap(real x, real a, real b, real c, real d);
    if (x < a || x > d) return 0.0;
    if (x >= b && x <= c) return 1.0;
    if (x < b) return (x - a) / (b - a);
    return (d - x) / (d - c);
  endfunction
  function automatic real m_sa(int t, real x);
    case (t)
      0: return trap(x, -1, 0, 1, 2);
      1: return trap(x, 0, 2, 2, 4);
      2: return trap(x, 2, 4, 4, 6);
      3: return trap(x, 4, 6, 6, 8);
      default: return trap(x, 6, 8, 9, 10);
    endcase
  endfunction
  function automatic real m_ra(int t, real x);
    case (t)
      0: return trap(x, 0, 1, 2, 4);
      1: return trap(x, 2, 4, 4, 6);
      2: return trap(x, 4, 6, 6, 8);
      3: return trap(x, 6, 8, 8, 10);
      default: return trap(x, 8, 9, 10, 11);
    endcase
  endfunction
  function automatic real m_out(int t, real x);
    case (t)
      0: return trap(x, -1, 0, 10, 20);
      1: return trap(x, 10, 20, 20, 30);
      2: return trap(x, 20, 30, 30, 40);
      3: return trap(x, 30, 40, 40, 50);
      default: return trap(x, 40, 50, 60, 61);
    endcase
  endfunction
  // rows ra S..B, columns sa S..B; 0=S .. 4=B
  int rules [5][5] = '{'{4, 3, 2, 0, 0}, '{4, 3, 2, 1, 0}, '{4, 3, 2, 1, 1},
                       '{4, 3, 3, 2, 2}, '{4, 4, 4, 3, 2}};

  function automatic int ref_step(int s, int r);
    real w [5];
    real num, den, agg, m, cog;
    for (int o = 0; o < 5; o++) w[o] = 0.0;
    for (int rt = 0; rt < 5; rt++)
      for (int st = 0; st < 5; st++) begin
        real f;
        f = (m_sa(st, s) < m_ra(rt, r)) ? m_sa(st, s) : m_ra(rt, r);
        if (f > w[rules[rt][st]]) w[rules[rt][st]] = f;
      end
    num = 0; den = 0;
    for (int x = 0; x <= 60; x++) begin
      agg = 0;
      for (int o = 0; o < 5; o++) begin
        m = (m_out(o, x) < w[o]) ? m_out(o, x) : w[o];
        if (m > agg) agg = m;
      end
      num += x * agg; den += agg;
    end
    cog = num / den;
    if (cog >= 51.0 - 1e-9) return 4;
    if (cog >= 40.0 - 1e-9) return 3;
    if (cog >= 25.0 - 1e-9) return 2;
    if (cog >= 15.0 - 1e-9) return 1;
    return 0;
  endfunction

  initial begin
    for (int r = 1; r <= 10; r++) begin
      string line;
      line = "";
      for (int s = 0; s <= 9; s++) begin
        sa = 4'(s); ra = 4'(r); #1;
        line = {line, $sformatf(" %0d", step_value(step_sel))};
        checks++;
        if (int'(step_sel) != ref_step(s, r)) begin
          failures++; $display("FAIL sa=%0d ra=%0d: %0d vs %0d", s, r, step_sel, ref_step(s, r));
        end
      end
      $display("ra=%2d: sigma for sa=0..9:%s", r, line);
    end
    sa = 0; ra = 10; #1; checks++; if (step_sel != 4) begin failures++; $display("FAIL corner sa=0 ra=10"); end
    sa = 9; ra = 1;  #1; checks++; if (step_sel != 0) begin failures++; $display("FAIL corner sa=9 ra=1"); end
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
