// destuffer: decoder input side of the bit-stuffed stream.
//
// Keeps a look-ahead window of the next K+2+CNT_W received bits (win[0] is the
// oldest) and the number of data ones seen in a row. It delivers data bits
// one per get; when a get takes the K-th one of a run, the two following
// bits are the stuffed pair: "00" is dropped, "01" is dropped and reported
// as carry with that bit (the decoder adds 1 at the position of the bit
// it is taking in), so the pair costs two extra cycles. The termination
// mark is K data ones followed by a 1 where the first stuffed bit would
// be, preceded by a data 0: end_mark is high when the window starts with
// 0, K ones and a 1; end_count then gives the CNT_W bits after them. With drain set the window and the input are
// discarded up to the bit flagged last.
//
// Interface: in_valid/in_ready/in_bit/in_last, one received bit per
// cycle. avail means the window is full and no stuffed pair is being
// skipped; data_bit, data_carry and end_mark are then valid and get takes
// the bit. drained goes high once the last bit has been discarded.
// Synchronous active-low reset; clear restarts.
//
// Follows the source design: decoder behaviour on K ones followed by
// "00", "01" and "1x". Own choices: the window that makes the mark
// visible before another bit is decoded, the count after it, the drain.
module destuffer #(
  parameter int unsigned K     = 16,
  parameter int unsigned CNT_W = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  input  logic in_last,
  output logic in_ready,
  output logic avail,
  output logic data_bit,
  output logic data_carry,
  output logic end_mark,
  output logic [CNT_W-1:0] end_count,
  input  logic get,
  input  logic drain,
  output logic drained
);
  localparam int unsigned LA = K + 2 + CNT_W;
  localparam int unsigned CW = $clog2(LA+1);

  logic [LA-1:0] win, win_last;
  logic [CW-1:0] cnt;          // valid bits in the window
  logic [CW-1:0] run;          // data ones in a row, 0..K-1
  logic [1:0]    skip;
  logic          consume, full, last_in_win;

  assign full     = (cnt == CW'(LA));
  assign avail    = full && (skip == 0) && !drain && !drained;
  assign data_bit = win[0];
  assign data_carry = win[0] && (run == CW'(K-1)) && !win[1] && win[2];

  always_comb begin
    end_mark = !win[0];
    for (int unsigned i = 1; i <= K + 1; i++)
      if (!win[i]) end_mark = 1'b0;
    for (int unsigned b = 0; b < CNT_W; b++)
      end_count[CNT_W-1-b] = win[K+2+b];
    last_in_win = |(win_last & ((LA'(1) << cnt) - 1'b1));
  end

  assign consume  = (cnt != 0) && ((skip != 0) || (avail && get) || (drain && !drained));
  assign in_ready = !drained && ((cnt < CW'(LA)) || consume) && !(drain && last_in_win);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      win <= '0; win_last <= '0; cnt <= '0; run <= '0; skip <= '0; drained <= 1'b0;
    end else begin
      logic [LA-1:0] w, wl;
      logic [CW-1:0] c;
      w = win; wl = win_last; c = cnt;
      if (consume) begin
        if (drain && wl[0]) drained <= 1'b1;
        w  = w >> 1;
        wl = wl >> 1;
        c  = c - 1'b1;
        if (skip != 0) skip <= skip - 1'b1;
        else if (!drain) begin
          if (!win[0])                   run <= '0;
          else if (run == CW'(K-1)) begin run <= '0; skip <= 2'd2; end
          else                           run <= run + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        w[c]  = in_bit;
        wl[c] = in_last;
        c     = c + 1'b1;
      end
      win <= w; win_last <= wl; cnt <= c;
    end
  end
endmodule
