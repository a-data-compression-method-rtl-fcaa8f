// tb_prb_rom: checks the printed table entries (1, 107, 110, 114, 255 at
// indices 0, 60, 61, 62, 127), strict monotonicity, and every other entry
// against linear interpolation between those points computed in real
// arithmetic and rounded to nearest.
`timescale 1ns/1ps
module tb_prb_rom;
  import aft_pkg::*;
  prb_idx_t idx;
  prob_t p0, prev;
  int checks = 0, failures = 0;
  prb_rom dut (.*);
  function automatic int interp(int i);
    real v;
    if (i <= 60)      v = 1.0 + 106.0 * i / 60.0;
    else if (i == 61) v = 110.0;
    else              v = 114.0 + 141.0 * (i - 62) / 65.0;
    return int'($floor(v + 0.5));
  endfunction
  initial begin
    int pr_i [5] = '{0, 60, 61, 62, 127};
    int pr_v [5] = '{1, 107, 110, 114, 255};
    for (int k = 0; k < 5; k++) begin
      idx = prb_idx_t'(pr_i[k]); #1;
      checks++;
      if (int'(p0) != pr_v[k]) begin failures++; $display("FAIL Prb[%0d]=%0d, printed %0d", pr_i[k], p0, pr_v[k]); end
    end
    for (int i = 0; i < 128; i++) begin
      idx = prb_idx_t'(i); #1;
      checks++;
      if (int'(p0) - interp(i) > 1 || interp(i) - int'(p0) > 1) begin
        failures++; $display("FAIL Prb[%0d]=%0d, interpolation %0d", i, p0, interp(i));
      end
      if (i > 0) begin
        checks++;
        if (p0 <= prev) begin failures++; $display("FAIL not increasing at %0d", i); end
      end
      prev = p0;
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
