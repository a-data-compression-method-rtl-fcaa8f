// ost_rom: the five pairs of offset tables Ost0/Ost1 and their muxes.
//
// For every tuning step sigma in {8, 24, 32, 40, 64} there is a table Ost0
// (used after coding a 0) and Ost1 (after a 1), each with one signed offset
// per Prb index. All ten are read at the same index Adr[s]; a 2:1 mux per
// step picks Ost0 or Ost1 by the coded bit, and a 5:1 mux picks the step
// chosen by the fuzzy selector. Adding the result to Adr[s] gives the
// pointer of p_{n+1}(0|s). Combinational read.
//
// Follows the source design: table organisation and muxing, the five
// steps, offsets built from the update rule of the probability with the
// tuning step. Own choice: the count cN in that rule is the constant
// aft_pkg::OST_NORM (192), so an offset depends only on the index; each
// offset points to the Prb entry nearest to the updated probability, so
// every sum Adr[s] + offset stays within 0..127.
module ost_rom
  import aft_pkg::*;
(
  input  prb_idx_t  idx,       // Adr[s]
  input  logic      bit_in,    // bit just coded under s
  input  step_sel_t step_sel,  // 0..4 -> sigma 8, 24, 32, 40, 64
  output ost_t      ost        // offset to add to Adr[s]
);
  typedef ost_t ost_tab_t [N_STEPS*PRB_ENTRIES];   // [step*128 + index]

  function automatic ost_tab_t build_ost(input bit b);
    ost_tab_t t;
    for (int unsigned s = 0; s < N_STEPS; s++)
      for (int unsigned i = 0; i < PRB_ENTRIES; i++)
        t[s*PRB_ENTRIES+i] = ost_t'(ost_value(s, b, i));
    return t;
  endfunction

  localparam ost_tab_t OST0 = build_ost(1'b0);
  localparam ost_tab_t OST1 = build_ost(1'b1);

  ost_t per_step [N_STEPS];

  always_comb begin
    for (int s = 0; s < N_STEPS; s++)
      per_step[s] = bit_in ? OST1[s*PRB_ENTRIES+int'(idx)] : OST0[s*PRB_ENTRIES+int'(idx)];
    ost = (step_sel < 3'(N_STEPS)) ? per_step[step_sel] : per_step[N_STEPS-1];
  end
endmodule
