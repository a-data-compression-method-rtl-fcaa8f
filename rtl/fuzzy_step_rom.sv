// fuzzy_step_rom: fuzzy selection of the probability-tuning step.
//
// The switching activity sa (0..9) and repeating activity ra (1..10) of a
// state's queue index a 10x10 table whose entry is the step to use
// (0..4 for sigma 8, 24, 32, 40, 64). The table is the result of max-min
// fuzzy inference computed at elaboration (aft_pkg::fuzzy_step_index), so
// the hardware inference is a single combinational look-up.
//
// Follows the source design: inference by table look-up, the membership
// functions of sa, ra and sigma, the 25-rule base and the boundary between
// steps 32 and 40 at sigma = 40. Own choice: centre of gravity
// defuzzification and the other boundaries at 15, 25 and 51 (51 stays below
// 52.2, the largest centroid, so that step 64 can be chosen). Inputs
// outside the ranges are clamped.
module fuzzy_step_rom
  import aft_pkg::*;
(
  input  logic [3:0] sa,
  input  logic [3:0] ra,
  output step_sel_t  step_sel
);
  typedef step_sel_t fz_tab_t [100];   // [sa*10 + ra-1]

  function automatic fz_tab_t build_fz();
    fz_tab_t t;
    for (int unsigned s = 0; s < 10; s++)
      for (int unsigned r = 0; r < 10; r++)
        t[s*10+r] = step_sel_t'(fuzzy_step_index(s, r + 1));
    return t;
  endfunction

  localparam fz_tab_t FZ = build_fz();

  logic [3:0] sa_c, ra_c;

  always_comb begin
    sa_c = (sa > 4'd9) ? 4'd9 : sa;
    ra_c = (ra < 4'd1) ? 4'd0 : (ra > 4'd10) ? 4'd9 : ra - 4'd1;
    step_sel = FZ[int'(sa_c)*10 + int'(ra_c)];
  end
endmodule
