// stuff_buffer: the coder's K-bit output buffer R with bit stuffing.
//
// Bits leaving the top of the encoder's low register C enter R at bit 0;
// the bit pushed out of R[K-1] is transmitted. A carry out of C is added to
// R (R + 1), so carries never reach bits already transmitted. To keep that
// true, whenever the coded stream shows K consecutive data 1-bits, two
// stuffed bits "00" are placed right after them; a later carry can turn
// the second one into 1 (the decoder then adds that carry), the first one
// always stays 0. Stuffed bits do not count as data: the run count restarts
// after them.
//
// A carry may also create a run of K data ones that ends above the bit it
// flipped (all bits below are then 0). The two 0-bits right after the run
// are then relabelled as the stuffed pair and two data zeros are appended,
// which leaves the transmitted data unchanged.
//
// Termination (used by the encoder): op PAD adds data ones without
// stuffing, op MARK adds a 1 in the first stuffed position, so K data ones
// followed by a 1 (K+1 ones) mark the end of the stream; op RAW adds any
// bit outside the data (the mark's 1, the symbol count after it); op FILL
// adds 0 padding to push R out.
//
// Synchronous active-low reset rst_n and synchronous clear.
// Per cycle one op (when ready). Every op except CARRY shifts R by one and
// may emit one bit (out_valid, out_bit); shifts wait for out_ready. A
// stuffing event keeps ready low for the two extra shift cycles.
//
// Follows the source design: the K-bit register R receiving carries, the
// "00" stuffed pair after K ones, second stuffed bit absorbing the carry,
// the K+1 ones termination mark. Own choices: K = 16, the data/stuff mark
// register S and the count of ones already transmitted (trun) used to see
// runs that reach past R, the relabelling after a carry, the FILL padding.
module stuff_buffer #(
  parameter int unsigned K = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       op_valid,
  input  logic [2:0] op,         // see sb_op_e
  input  logic       op_bit,     // bit for OP_SHIFT and OP_RAW
  output logic       ready,
  output logic [$clog2(K+1)-1:0] run_end,  // data ones at the end of the stream
  input  logic       out_ready,
  output logic       out_valid,
  output logic       out_bit,
  output logic       stuff_evt,  // a stuffing was started this cycle
  output logic       relabel_evt // ... by a carry that completed a run above
);
  typedef enum logic [2:0] {OP_SHIFT = 3'd0, OP_CARRY = 3'd1, OP_PAD = 3'd2,
                            OP_RAW = 3'd3, OP_FILL = 3'd4} sb_op_e;
  localparam int unsigned CW = $clog2(K+1);

  logic [K-1:0] r, s, v;           // value, stuffed-bit mark, valid
  logic [CW-1:0] trun;             // trailing data ones already transmitted
  logic [1:0]   pend_s, pend_z;    // stuffed bits / data zeros still to add

  // Data ones counted upwards from position p (through trun if R is left).
  function automatic int unsigned run_from(input logic [K-1:0] rv, input logic [K-1:0] sv,
                                           input logic [K-1:0] vv, input int unsigned p,
                                           input int unsigned tr);
    int unsigned n;
    logic go;
    n  = 0;
    go = 1'b1;
    for (int unsigned i = 0; i < K; i++) begin
      if (i >= p) begin
        go = go && rv[i] && !sv[i] && vv[i];
        if (go) n++;
      end
    end
    if (go) n += tr;
    return n;
  endfunction

  function automatic int unsigned trailing_ones(input logic [K-1:0] rv);
    int unsigned n;
    logic go;
    n  = 0;
    go = 1'b1;
    for (int unsigned i = 0; i < K; i++) begin
      go = go && rv[i];
      if (go) n++;
    end
    return n;
  endfunction

  logic         do_shift, sh_bit, sh_stuff, busy;
  logic [K-1:0] r_car;
  int unsigned  j_car, run_car, run_sh;

  assign busy  = (pend_s != 0) || (pend_z != 0);
  assign ready = !busy && out_ready;

  always_comb begin
    do_shift = 1'b0;
    sh_bit   = 1'b0;
    sh_stuff = 1'b0;
    if (busy) begin
      do_shift = out_ready;
      sh_stuff = (pend_s != 0);
    end else if (op_valid && out_ready) begin
      case (sb_op_e'(op))
        OP_SHIFT: begin do_shift = 1'b1; sh_bit = op_bit; end
        OP_PAD:   begin do_shift = 1'b1; sh_bit = 1'b1; end
        OP_RAW:   begin do_shift = 1'b1; sh_bit = op_bit; sh_stuff = 1'b1; end
        OP_FILL:  begin do_shift = 1'b1; sh_stuff = 1'b1; end
        default:  ;
      endcase
    end
    r_car   = r + 1'b1;
    j_car   = trailing_ones(r);
    run_car = run_from(r_car, s, v, j_car, int'(trun));
    run_sh  = run_from({r[K-2:0], 1'b1}, {s[K-2:0], 1'b0}, {v[K-2:0], 1'b1}, 0, int'(trun));
    run_end = CW'(run_from(r, s, v, 0, int'(trun)));
  end

  assign out_valid = do_shift && v[K-1];
  assign out_bit   = r[K-1];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      r <= '0; s <= '0; v <= '0; trun <= '0; pend_s <= '0; pend_z <= '0;
      stuff_evt <= 1'b0; relabel_evt <= 1'b0;
    end else begin
      stuff_evt   <= 1'b0;
      relabel_evt <= 1'b0;
      if (do_shift) begin
        r <= {r[K-2:0], sh_bit};
        s <= {s[K-2:0], sh_stuff};
        v <= {v[K-2:0], 1'b1};
        if (v[K-1]) begin
          if (!s[K-1] && r[K-1]) trun <= (trun == CW'(K)) ? trun : trun + 1'b1;
          else                   trun <= '0;
        end
        if (busy) begin
          if (pend_s != 0) pend_s <= pend_s - 1'b1;
          else             pend_z <= pend_z - 1'b1;
        end else if (sb_op_e'(op) == OP_SHIFT && op_bit && run_sh >= K) begin
          pend_s    <= 2'd2;
          stuff_evt <= 1'b1;
        end
      end else if (!busy && op_valid && out_ready && sb_op_e'(op) == OP_CARRY) begin
        r <= r_car;
        if (!s[j_car] && run_car >= K) begin
          stuff_evt <= 1'b1;
          if (j_car >= 2) begin
            s[j_car-1] <= 1'b1;
            s[j_car-2] <= 1'b1;
            pend_z <= 2'd2;
            relabel_evt <= 1'b1;
          end else if (j_car == 1) begin
            s[0]   <= 1'b1;
            pend_s <= 2'd1;
            pend_z <= 2'd1;
            relabel_evt <= 1'b1;
          end else begin
            pend_s <= 2'd2;
          end
        end
      end
    end
  end

  // A carry never leaves R and never passes through a stuffed bit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (!busy && op_valid && out_ready && op == 3'(OP_CARRY)) |-> (j_car < K && (s & ((K'(1) << j_car) - 1'b1)) == '0));
endmodule
