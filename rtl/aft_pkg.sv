// aft_pkg: shared sizes, types and table-generating functions of the
// adaptive fuzzy-tuning (AFT) binary arithmetic codec.
//
// The modeler works only with small look-up tables: a probability table
// (Prb, 128 values of p(0|s) in 1/256 units), ten offset tables (Ost0/Ost1
// for each of the five tuning steps 8, 24, 32, 40, 64) and a fuzzy
// step-selection table indexed by switching and repeating activity. The
// functions below compute those tables at elaboration time, so the ROM
// modules hold them as constants.
//
// What follows the source design: 128 Prb entries of 8 bits; the printed
// entries Prb[0]=1, Prb[60]=107, Prb[61]=110, Prb[62]=114, Prb[127]=255; the
// five steps; the offset-table construction from the update rule
//   p' = (c0/sigma + 1)/(cN/sigma + 1)  (bit 0),  p' = (c0/sigma)/(cN/sigma + 1)  (bit 1);
// the membership functions and the 5x5 rule base of the fuzzy selector.
// Own choices: the Prb entries between the printed ones are linear
// interpolation; cN is taken as the constant OST_NORM so that each offset
// depends only on the current table index; the fuzzy output is defuzzified
// by centre of gravity over integer sigma 0..60 and split into the five
// steps at 15, 25, 40 and 51 (see fuzzy_step_index).
package aft_pkg;

  localparam int unsigned PRB_ENTRIES = 128;
  localparam int unsigned PRB_IDX_W   = 7;
  localparam int unsigned P_W         = 8;     // p(0|s) in 1/256 units
  localparam int unsigned N_STEPS     = 5;
  localparam int unsigned QUEUE_LEN   = 10;    // per-state history queue
  localparam int unsigned SA_W        = 4;     // sa in 0..9
  localparam int unsigned RA_W        = 4;     // ra in 1..10
  localparam int unsigned OST_W       = 8;     // signed offset
  localparam int unsigned OST_NORM    = 192;   // cN used to build Ost tables

  typedef logic [PRB_IDX_W-1:0] prb_idx_t;
  typedef logic [P_W-1:0]       prob_t;
  typedef logic signed [OST_W-1:0] ost_t;
  typedef logic [2:0]           step_sel_t;    // 0..4 -> step 8,24,32,40,64
  typedef logic [QUEUE_LEN-1:0] queue_t;       // bit 0 = most recent bit

  // Fuzzy linguistic terms, smallest to biggest: S, MS, M, MB, B.
  typedef enum logic [2:0] {FZ_S = 3'd0, FZ_MS = 3'd1, FZ_M = 3'd2,
                            FZ_MB = 3'd3, FZ_B = 3'd4} fz_term_e;

  function automatic int unsigned step_value(input int unsigned sel);
    case (sel)
      0: return 8;
      1: return 24;
      2: return 32;
      3: return 40;
      default: return 64;
    endcase
  endfunction

  // Prb[i] in 1/256 units, strictly increasing from 1 to 255.
  function automatic int unsigned prb_value(input int unsigned i);
    if (i <= 60)      return 1 + (106 * i + 30) / 60;
    else if (i == 61) return 110;
    else              return 114 + (141 * (i - 62) + 32) / 65;
  endfunction

  // Index of the Prb entry nearest to num/den (in 1/256 units); ties go to
  // the lower index.
  function automatic int unsigned nearest_index(input longint num, input longint den);
    longint best_err, err;
    int unsigned best;
    best = 0;
    best_err = -1;
    for (int unsigned j = 0; j < PRB_ENTRIES; j++) begin
      err = longint'(prb_value(j)) * den - num;
      if (err < 0) err = -err;
      if (best_err < 0 || err < best_err) begin
        best_err = err;
        best = j;
      end
    end
    return best;
  endfunction

  // Offset added to the pointer at index i after coding bit b with step sel.
  function automatic int ost_value(input int unsigned sel, input bit b,
                                   input int unsigned i);
    longint n, s, num, den;
    n = longint'(OST_NORM);
    s = longint'(step_value(sel));
    den = n + s;
    if (!b) num = longint'(prb_value(i)) * n + 256 * s;
    else    num = longint'(prb_value(i)) * n;
    return int'(nearest_index(num, den)) - int'(i);
  endfunction

  // Index of the Prb entry closest to 1/2: the pointer of a fresh state.
  function automatic int unsigned prb_half_index();
    return nearest_index(128, 1);
  endfunction

  // ---- fuzzy step selection (membership values scaled by 2) ----
  function automatic int unsigned mu_sa(input int unsigned t, input int unsigned x);
    int d;
    case (t)
      0: return (x <= 1) ? 2 : 0;                      // S: 1 on [0,1], 0 at 2
      4: return (x >= 8) ? 2 : (x == 7) ? 1 : 0;       // B: 0 at 6, 1 from 8
      default: begin                                   // MS, M, MB: peaks 2, 4, 6
        d = int'(x) - 2 * int'(t);
        if (d < 0) d = -d;
        return (d >= 2) ? 0 : 2 - d;
      end
    endcase
  endfunction

  function automatic int unsigned mu_ra(input int unsigned t, input int unsigned x);
    int d;
    case (t)
      0: return (x <= 2) ? 2 : (x == 3) ? 1 : 0;       // S: 1 on [1,2], 0 at 4
      4: return (x >= 9) ? 2 : 0;                      // B: 0 at 8, 1 from 9
      default: begin                                   // MS, M, MB: peaks 4, 6, 8
        d = int'(x) - (2 * int'(t) + 2);
        if (d < 0) d = -d;
        return (d >= 2) ? 0 : 2 - d;
      end
    endcase
  endfunction

  // Output sets over sigma in 0..60, membership scaled by 10.
  function automatic int unsigned mu_out(input int unsigned t, input int unsigned x);
    int d;
    case (t)
      0: return (x <= 10) ? 10 : (x < 20) ? 20 - x : 0;
      4: return (x >= 50) ? 10 : (x > 40) ? x - 40 : 0;
      default: begin                                   // peaks 20, 30, 40
        d = int'(x) - (10 * int'(t) + 10);
        if (d < 0) d = -d;
        return (d >= 10) ? 0 : 10 - d;
      end
    endcase
  endfunction

  // Rule base: consequent for (ra term, sa term).
  function automatic int unsigned fz_rule(input int unsigned ra_t, input int unsigned sa_t);
    int unsigned r;
    case ({ra_t[2:0], sa_t[2:0]})
      // ra = S
      {3'd0, 3'd0}: r = 4;  {3'd0, 3'd1}: r = 3;  {3'd0, 3'd2}: r = 2;
      {3'd0, 3'd3}: r = 0;  {3'd0, 3'd4}: r = 0;
      // ra = MS
      {3'd1, 3'd0}: r = 4;  {3'd1, 3'd1}: r = 3;  {3'd1, 3'd2}: r = 2;
      {3'd1, 3'd3}: r = 1;  {3'd1, 3'd4}: r = 0;
      // ra = M
      {3'd2, 3'd0}: r = 4;  {3'd2, 3'd1}: r = 3;  {3'd2, 3'd2}: r = 2;
      {3'd2, 3'd3}: r = 1;  {3'd2, 3'd4}: r = 1;
      // ra = MB
      {3'd3, 3'd0}: r = 4;  {3'd3, 3'd1}: r = 3;  {3'd3, 3'd2}: r = 3;
      {3'd3, 3'd3}: r = 2;  {3'd3, 3'd4}: r = 2;
      // ra = B
      {3'd4, 3'd0}: r = 4;  {3'd4, 3'd1}: r = 4;  {3'd4, 3'd2}: r = 4;
      {3'd4, 3'd3}: r = 3;  {3'd4, 3'd4}: r = 2;
      default: r = 2;
    endcase
    return r;
  endfunction

  // Max-min (Mamdani) inference, centre-of-gravity defuzzification, then
  // quantisation to one of the five steps. Returns the step index 0..4.
  function automatic int unsigned fuzzy_step_index(input int unsigned sa,
                                                   input int unsigned ra);
    int unsigned w [N_STEPS];      // strength per output term, scale 10
    int unsigned ws, agg, m, sel;
    longint num, den;
    for (int unsigned o = 0; o < N_STEPS; o++) w[o] = 0;
    for (int unsigned rt = 0; rt < N_STEPS; rt++)
      for (int unsigned st = 0; st < N_STEPS; st++) begin
        ws = mu_sa(st, sa);
        if (mu_ra(rt, ra) < ws) ws = mu_ra(rt, ra);
        ws = ws * 5;
        if (ws > w[fz_rule(rt, st)]) w[fz_rule(rt, st)] = ws;
      end
    num = 0;
    den = 0;
    for (int unsigned x = 0; x <= 60; x++) begin
      agg = 0;
      for (int unsigned o = 0; o < N_STEPS; o++) begin
        m = mu_out(o, x);
        if (w[o] < m) m = w[o];
        if (m > agg) agg = m;
      end
      num += longint'(x) * longint'(agg);
      den += longint'(agg);
    end
    if (den == 0) return 2;
    sel = 0;
    if (num >= 15 * den) sel = 1;
    if (num >= 25 * den) sel = 2;
    if (num >= 40 * den) sel = 3;
    if (num >= 51 * den) sel = 4;   // the centroid never exceeds 52.2
    return sel;
  endfunction

endpackage
