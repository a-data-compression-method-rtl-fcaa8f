// activity_eval: switching and repeating activity of a state hist.
//
// sa is the number of transitions (0->1 or 1->0) between neighbouring bits
// of the 10-bit queue, 0..9. ra is the number of identical bits counted
// from the most recent bit (queue bit 0) backwards, 1..10. Purely
// combinational.
// Follows the source design: both definitions. Own choice: bit 0 of the
// hist is its last (most recent) bit.
module activity_eval
  import aft_pkg::*;
(
  input  queue_t     hist,
  output logic [SA_W-1:0] sa,
  output logic [RA_W-1:0] ra
);
  always_comb begin
    logic run_on;
    sa = '0;
    for (int i = 0; i < QUEUE_LEN - 1; i++)
      sa = sa + 4'(hist[i] ^ hist[i+1]);
    ra = 4'd1;
    run_on = 1'b1;
    for (int i = 1; i < QUEUE_LEN; i++) begin
      run_on = run_on && (hist[i] == hist[0]);
      if (run_on) ra = ra + 4'd1;
    end
  end
endmodule
