// bac_encoder: binary arithmetic encoder (the coder in encoding mode).
//
// Keeps the interval as a W-bit width A, normalised to A >= 2^(W-1), and a
// W-bit low end C. For each input bit x with probability p = p(0|s)/256
// from the modeler:
//   a0 = floor(A * p / 256)                   (prob_multiplier)
//   x = 0:  A <= a0
//   x = 1:  C <= C + a0,  A <= A - a0         (carry out of C goes to R)
// then A and C are shifted left until A >= 2^(W-1), each bit leaving C
// entering the output buffer R (stuff_buffer). Symbol 0 takes the lower
// sub-interval, as in C_{n+1} = C_n + A_n * sum p(i|s) over i < x.
//
// After the bit flagged in_last, all W bits of C are shifted out (C itself
// identifies the final interval), then the termination mark is sent: a
// data 0, K data ones and a 1 in the first stuffed position (inside the
// data a 1 never follows K data ones, and the leading 0 keeps final data
// ones from merging with the mark). Then come CNT_W (9) bits, MSB first:
// the number of final input bits whose coding needed no normalisation
// shift. Those bits add no data to the stream, so without the count the
// decoder could not tell how many of them follow its last data bit (A
// shrinks by at least A/256 per bit, so there are at most 256 of them).
// 2K+2 padding bits follow so that R is emptied and the decoder's
// look-ahead can fill; out_last flags the final padding bit.
//
// Timing: a bit is coded in the cycle in_valid, in_ready and p_valid meet
// (in_ready is high only then; upd tells the modeler the same cycle).
// Each normalisation shift takes one further cycle; a stuffing event adds
// two. With the modeler's two-cycle loop a bit takes 2 cycles when no
// shift is needed. Synchronous active-low reset; start restarts.
//
// Follows the source design: multiplication-based interval update with
// p(0|s), output through R with carries and bit stuffing, K+1 ones as the
// termination mark. Own choices: the symbol count after the mark, W = 16, which sub-interval belongs to 0,
// normalisation one bit per cycle, the flush of C and the padding.
module bac_encoder
  import aft_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned K = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,        // synchronous restart
  // input bits
  input  logic  in_valid,
  input  logic  in_bit,
  input  logic  in_last,
  output logic  in_ready,
  // modeler
  input  logic  p_valid,
  input  prob_t p0,
  output logic  upd,
  output logic  upd_bit,
  // compressed stream
  input  logic  out_ready,
  output logic  out_valid,
  output logic  out_bit,
  output logic  out_last,
  output logic  done,
  // events
  output logic  carry_evt,
  output logic  stuff_evt,
  output logic  relabel_evt
);
  typedef enum logic [2:0] {E_CODE, E_NORM, E_FLUSH, E_PAD, E_MARK, E_CNT, E_FILL, E_DONE} estate_e;
  typedef enum logic [2:0] {OP_SHIFT = 3'd0, OP_CARRY = 3'd1, OP_PAD = 3'd2,
                            OP_RAW = 3'd3, OP_FILL = 3'd4} sb_op_e;
  localparam int unsigned CW = $clog2(K+1);
  localparam int unsigned FILL_BITS = 2 * K + 2;
  localparam int unsigned CNT_W     = P_W + 1;

  estate_e      st;
  logic [W-1:0] a, c, a0;
  logic         last_q;
  logic [CNT_W-1:0] tail_cnt;   // final bits coded without a shift
  logic [$clog2(FILL_BITS+1)-1:0] cnt;

  logic         sb_valid, sb_ready, sb_bit;
  sb_op_e       sb_op;
  logic [CW-1:0] run_end;
  logic [W:0]   c_sum;

  prob_multiplier #(.W(W)) u_mul (.a(a), .p(p0), .a0(a0));

  stuff_buffer #(.K(K)) u_sb (
    .clk, .rst_n, .clear(start),
    .op_valid(sb_valid), .op(sb_op), .op_bit(sb_bit), .ready(sb_ready),
    .run_end, .out_ready, .out_valid, .out_bit,
    .stuff_evt, .relabel_evt
  );

  assign c_sum = {1'b0, c} + {1'b0, a0};

  always_comb begin
    in_ready = (st == E_CODE) && p_valid && sb_ready;
    upd      = in_valid && in_ready;
    upd_bit  = in_bit;
    sb_valid = 1'b0;
    sb_op    = OP_SHIFT;
    sb_bit   = c[W-1];
    case (st)
      E_CODE:  if (upd && in_bit && c_sum[W]) begin sb_valid = 1'b1; sb_op = OP_CARRY; end
      E_NORM:  sb_valid = 1'b1;
      E_FLUSH: sb_valid = 1'b1;
      E_PAD:   begin
        sb_valid = 1'b1;
        sb_op    = (cnt == ($clog2(FILL_BITS+1))'(K + 1)) ? OP_SHIFT : OP_PAD;
        sb_bit   = 1'b0;
      end
      E_MARK:  begin sb_valid = 1'b1; sb_op = OP_RAW; sb_bit = 1'b1; end
      E_CNT:   begin sb_valid = 1'b1; sb_op = OP_RAW; sb_bit = tail_cnt[CNT_W-1]; end
      E_FILL:  begin sb_valid = 1'b1; sb_op = OP_FILL; end
      default: ;
    endcase
  end

  assign carry_evt = (st == E_CODE) && upd && in_bit && c_sum[W];
  assign out_last  = (st == E_FILL) && sb_ready && (cnt == 1);
  assign done      = (st == E_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      st     <= E_CODE;
      a      <= {W{1'b1}};
      c      <= '0;
      last_q <= 1'b0;
      cnt    <= '0;
      tail_cnt <= '0;
    end else begin
      case (st)
        E_CODE: if (upd) begin
          logic [W-1:0] an;
          an = in_bit ? (a - a0) : a0;
          a <= an;
          if (in_bit) c <= c_sum[W-1:0];
          last_q <= in_last;
          tail_cnt <= an[W-1] ? tail_cnt + 1'b1 : '0;
          if (!an[W-1])    st <= E_NORM;
          else if (in_last) begin st <= E_FLUSH; cnt <= ($clog2(FILL_BITS+1))'(W); end
        end
        E_NORM: if (sb_ready) begin
          a <= a << 1;
          c <= c << 1;
          if (a[W-2]) begin
            if (last_q) begin st <= E_FLUSH; cnt <= ($clog2(FILL_BITS+1))'(W); end
            else        st <= E_CODE;
          end
        end
        E_FLUSH: if (sb_ready) begin
          c   <= c << 1;
          cnt <= cnt - 1'b1;
          if (cnt == 1) begin st <= E_PAD; cnt <= ($clog2(FILL_BITS+1))'(K + 1); end
        end
        E_PAD: if (sb_ready) begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) st <= E_MARK;
        end
        E_MARK: if (sb_ready) begin st <= E_CNT; cnt <= ($clog2(FILL_BITS+1))'(CNT_W); end
        E_CNT: if (sb_ready) begin
          tail_cnt <= tail_cnt << 1;
          cnt      <= cnt - 1'b1;
          if (cnt == 1) begin st <= E_FILL; cnt <= ($clog2(FILL_BITS+1))'(FILL_BITS); end
        end
        E_FILL: if (sb_ready) begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) st <= E_DONE;
        end
        default: ;
      endcase
    end
  end

  a_norm: assert property (@(posedge clk) disable iff (!rst_n)
    (st == E_CODE) |-> a[W-1]);
endmodule
