// tb_bac_encoder: the testbench plays the modeler (p0 for bit n taken
// from a random table: a uniform part and a strongly skewed part) and
// encodes random data with input gaps and output back-pressure. A
// software coder with the same arithmetic (a0 = floor(A*p/256), symbol 0
// low, W-bit flush) gives the expected code string with carries added in
// place and the expected final count. The received stream is destuffed in
// software (after K data ones: "0x" pair with carry x, or a 1 = mark).
// Checked: the data bits, the terminator (data 0, K ones, mark, count),
// K+2 zero padding bits (the 2K+2 fill bits minus the K still in R), out_last on the final bit, done, and that carries and
// stuffing occurred.
`timescale 1ns/1ps
module tb_bac_encoder;
  import aft_pkg::*;
  localparam int unsigned W = 16, K = 4, CNT_W = P_W + 1;
  localparam int NBITS = 5000;
  logic clk = 0, rst_n = 0, start = 0;
  logic in_valid = 0, in_bit = 0, in_last = 0, in_ready;
  logic p_valid = 1, upd, upd_bit;
  prob_t p0;
  logic out_ready = 0, out_valid, out_bit, out_last, done;
  logic carry_evt, stuff_evt, relabel_evt;
  int checks = 0, failures = 0, n_carry = 0, n_stuff = 0, n_last = 0;
  always #5 clk = ~clk;
  bac_encoder #(.W(W), .K(K)) dut (.*);

  int unsigned ptab [NBITS];
  bit          xtab [NBITS];
  int idx = 0;
  assign p0 = prob_t'(ptab[idx < NBITS ? idx : NBITS-1]);
  always @(posedge clk) if (upd) begin
    if (upd_bit != xtab[idx]) begin failures++; $display("FAIL upd_bit %0d", idx); end
    idx <= idx + 1;
  end

  bit rx[$];
  bit lastflag[$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin rx.push_back(out_bit); lastflag.push_back(out_last); end
    if (carry_evt) n_carry++;
    if (stuff_evt) n_stuff++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  bit ref_q[$];
  int unsigned tail;

  task automatic sw_encode();
    int unsigned a, c, a0;
    a = (1 << W) - 1; c = 0; tail = 0;
    for (int n = 0; n < NBITS; n++) begin
      int sh;
      sh = 0;
      a0 = (a * ptab[n]) >> 8;
      if (!xtab[n]) a = a0;
      else begin
        c = c + a0; a = a - a0;
        if (c >= (1 << W)) begin
          int i;
          c -= (1 << W);
          i = ref_q.size() - 1;
          while (i >= 0 && ref_q[i] == 1) begin ref_q[i] = 0; i--; end
          if (i >= 0) ref_q[i] = 1;
        end
      end
      while (a < (1 << (W-1))) begin
        ref_q.push_back(bit'((c >> (W-1)) & 1));
        c = (c << 1) & ((1 << W) - 1); a = a << 1; sh++;
      end
      tail = (sh == 0) ? tail + 1 : 0;
    end
    for (int i = 0; i < W; i++) begin
      ref_q.push_back(bit'((c >> (W-1)) & 1));
      c = (c << 1) & ((1 << W) - 1);
    end
  endtask

  initial begin
    for (int n = 0; n < NBITS; n++) begin
      ptab[n] = (n % 1000 < 500) ? $urandom_range(1, 255) : $urandom_range(240, 255);
      xtab[n] = ($urandom_range(0, 255) >= ptab[n]);
    end
    // end on a stretch of likely bits so that the final count is non-zero
    for (int n = NBITS - 40; n < NBITS; n++) begin ptab[n] = 250; xtab[n] = 0; end
    sw_encode();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < NBITS; n++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_bit = xtab[n]; in_last = (n == NBITS - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    begin
      bit d[$];
      int run, i, mark_at;
      int unsigned cnt;
      run = 0; i = 0; mark_at = -1;
      while (i < rx.size()) begin
        if (run == K) begin
          if (rx[i] == 1) begin mark_at = i; break; end
          if (rx[i+1]) begin
            int j;
            j = d.size() - 1;
            while (j >= 0 && d[j] == 1) begin d[j] = 0; j--; end
            if (j >= 0) d[j] = 1;
          end
          i += 2; run = 0;
        end else begin
          d.push_back(rx[i]);
          run = rx[i] ? run + 1 : 0;
          i++;
        end
      end
      checks++;
      if (mark_at < 0 || d.size() != ref_q.size() + 1 + K) begin
        failures++; $display("FAIL mark at %0d, %0d data bits, expected %0d", mark_at, d.size(), ref_q.size() + 1 + K);
      end else begin
        int bad;
        bad = 0;
        for (int k = 0; k < ref_q.size(); k++) begin
          checks++;
          if (d[k] != ref_q[k]) begin failures++; bad++; if (bad < 5) $display("FAIL code bit %0d", k); end
        end
        checks++;
        if (d[ref_q.size()] != 0) begin failures++; $display("FAIL terminator does not start with 0"); end
        for (int k = 1; k <= K; k++) begin
          checks++;
          if (d[ref_q.size() + k] != 1) begin failures++; $display("FAIL terminator one %0d", k); end
        end
        cnt = 0;
        for (int k = 1; k <= CNT_W; k++) cnt = (cnt << 1) | rx[mark_at + k];
        checks++;
        if (cnt != tail) begin failures++; $display("FAIL count %0d vs %0d", cnt, tail); end
        for (int k = mark_at + CNT_W + 1; k < rx.size(); k++) begin
          checks++;
          if (rx[k] != 0) begin failures++; $display("FAIL padding bit %0d", k); end
        end
        checks++;
        if (rx.size() - (mark_at + CNT_W + 1) != K + 2) begin failures++; $display("FAIL padding of %0d bits", rx.size() - (mark_at + CNT_W + 1)); end
      end
      foreach (lastflag[k]) if (lastflag[k]) n_last++;
      checks++;
      if (n_last != 1 || !lastflag[lastflag.size()-1]) begin failures++; $display("FAIL out_last count %0d", n_last); end
      $display("bits=%0d code=%0d sent=%0d tail=%0d carries=%0d stuffings=%0d",
               NBITS, ref_q.size(), rx.size(), tail, n_carry, n_stuff);
    end
    checks++; if (idx != NBITS) begin failures++; $display("FAIL %0d modeler updates", idx); end
    checks++; if (n_carry == 0) begin failures++; $display("FAIL no carry"); end
    checks++; if (n_stuff == 0) begin failures++; $display("FAIL no stuffing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
