// bac_decoder: binary arithmetic decoder (the coder in decoding mode).
//
// Mirrors bac_encoder. D holds the received code value minus the low end
// of the current interval, W bits wide; A the interval width. For each
// bit, with p = p(0|s)/256 from the modeler (same state and tables as the
// encoder had):
//   a0 = floor(A * p / 256)
//   D < a0:  bit 0, A <= a0
//   else:    bit 1, D <= D - a0, A <= A - a0
// then A and D are shifted left until A >= 2^(W-1), each shift taking the
// next data bit (plus a carry flagged by a "01" stuffed pair) from the
// destuffer. At start the first W data bits are loaded into D.
// Before each bit the destuffer is asked whether the termination mark
// comes next; if so, the count sent after the mark says how many more bits
// are decoded (they need no new data), then decoding stops and the rest of
// the stream is drained.
//
// Output: each decoded bit is held one step so that the final one can
// carry out_last. Timing: a bit is decoded in the cycle the modeler's
// p_valid and the destuffer's full window meet; normalisation takes one
// cycle per shift. Synchronous active-low reset; start restarts.
//
// Follows the source design: decoding mode of the coder, the handling of
// the stuffed pair and of the mark. Own choices: as for bac_encoder, and
// the one-bit output delay.
module bac_decoder
  import aft_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned K = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  // compressed stream
  input  logic  in_valid,
  input  logic  in_bit,
  input  logic  in_last,
  output logic  in_ready,
  // modeler
  input  logic  p_valid,
  input  prob_t p0,
  output logic  upd,
  output logic  upd_bit,
  // decoded bits
  input  logic  out_ready,
  output logic  out_valid,
  output logic  out_bit,
  output logic  out_last,
  output logic  done,
  // events
  output logic  carry_evt,
  output logic  end_evt
);
  typedef enum logic [2:0] {D_LOAD, D_CHECK, D_NORM, D_TAIL, D_FLUSHOUT, D_DRAIN, D_DONE} dstate_e;
  localparam int unsigned CNT_W = P_W + 1;

  dstate_e      st;
  logic [W-1:0] a, d, a0;
  logic [$clog2(W+1)-1:0] cnt;
  logic         hold_v, hold_b;
  logic [CNT_W-1:0] tail;
  logic [CNT_W-1:0] ds_count;

  logic ds_avail, ds_bit, ds_carry, ds_end, ds_get, ds_drain, ds_drained;
  logic dec_fire, bit_dec;

  prob_multiplier #(.W(W)) u_mul (.a(a), .p(p0), .a0(a0));

  destuffer #(.K(K), .CNT_W(CNT_W)) u_ds (
    .clk, .rst_n, .clear(start),
    .in_valid, .in_bit, .in_last, .in_ready,
    .avail(ds_avail), .data_bit(ds_bit), .data_carry(ds_carry), .end_mark(ds_end), .end_count(ds_count),
    .get(ds_get), .drain(ds_drain), .drained(ds_drained)
  );

  assign bit_dec  = (d >= a0);
  // A decoded bit leaves through the one-bit hold register; decoding waits
  // while the hold register is full and the sink does not take it.
  assign dec_fire = p_valid && (!hold_v || out_ready) &&
                    (((st == D_CHECK) && ds_avail && !ds_end) || ((st == D_TAIL) && tail != 0));
  assign upd      = dec_fire;
  assign upd_bit  = bit_dec;
  assign ds_get   = ds_avail && ((st == D_LOAD) || (st == D_NORM));
  assign ds_drain = (st == D_DRAIN);
  assign carry_evt = ds_get && ds_carry;
  assign end_evt  = (st == D_CHECK) && ds_avail && ds_end;

  assign out_valid = hold_v && (dec_fire || st == D_FLUSHOUT);
  assign out_bit   = hold_b;
  assign out_last  = (st == D_FLUSHOUT);
  assign done      = (st == D_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      st     <= D_LOAD;
      a      <= {W{1'b1}};
      d      <= '0;
      cnt    <= ($clog2(W+1))'(W);
      hold_v <= 1'b0;
      hold_b <= 1'b0;
      tail   <= '0;
    end else begin
      case (st)
        D_LOAD: if (ds_get) begin
          d   <= {d[W-2:0], ds_bit} + W'(ds_carry);
          cnt <= cnt - 1'b1;
          if (cnt == 1) st <= D_CHECK;
        end
        D_CHECK: begin
          if (ds_avail && ds_end) begin
            tail <= ds_count;
            st   <= D_TAIL;
          end else if (dec_fire) begin
            logic [W-1:0] an;
            an = bit_dec ? (a - a0) : a0;
            a <= an;
            if (bit_dec) d <= d - a0;
            hold_v <= 1'b1;
            hold_b <= bit_dec;
            if (!an[W-1]) st <= D_NORM;
          end
        end
        D_NORM: if (ds_get) begin
          a <= a << 1;
          d <= {d[W-2:0], ds_bit} + W'(ds_carry);
          if (a[W-2]) st <= D_CHECK;
        end
        D_TAIL: begin
          if (tail == 0) st <= hold_v ? D_FLUSHOUT : D_DRAIN;
          else if (dec_fire) begin
            logic [W-1:0] an;
            an = bit_dec ? (a - a0) : a0;
            a <= an;
            if (bit_dec) d <= d - a0;
            hold_v <= 1'b1;
            hold_b <= bit_dec;
            tail   <= tail - 1'b1;
          end
        end
        D_FLUSHOUT: if (out_ready) begin hold_v <= 1'b0; st <= D_DRAIN; end
        D_DRAIN: if (ds_drained) st <= D_DONE;
        default: ;
      endcase
    end
  end

  a_d_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (st == D_CHECK) |-> (d < a));
  // Bits after the last data bit never need a normalisation shift.
  a_tail_no_shift: assert property (@(posedge clk) disable iff (!rst_n)
    (st == D_TAIL && tail != 0) |-> a[W-1]);
endmodule
