// prb_rom: the probability table Prb of the modeler.
//
// 128 entries of p(0|s) in 1/256 units, strictly increasing from 1/256 to
// 255/256. A state's pointer Adr[s] selects one entry, which is the
// probability handed to the coder. The read is combinational (a ROM of
// constants built at elaboration by aft_pkg::prb_value).
//
// Follows the source design: 128 entries, the printed values Prb[0]=1,
// Prb[60]=107, Prb[61]=110, Prb[62]=114, Prb[127]=255. Own choice: the
// other entries are linear interpolation between those points (the full
// table came from coding statistics that are not available).
module prb_rom
  import aft_pkg::*;
(
  input  prb_idx_t idx,   // Adr[s]
  output prob_t    p0     // p(0|s) * 256
);
  typedef prob_t prb_tab_t [PRB_ENTRIES];

  function automatic prb_tab_t build_prb();
    prb_tab_t t;
    for (int unsigned i = 0; i < PRB_ENTRIES; i++) t[i] = prob_t'(prb_value(i));
    return t;
  endfunction

  localparam prb_tab_t PRB = build_prb();

  assign p0 = PRB[idx];
endmodule
