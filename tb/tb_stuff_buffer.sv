// tb_stuff_buffer: drives the buffer R with the op sequence of a software
// arithmetic coder (W = 8 bits so that carries are frequent, K = 4 so that
// stuffing and relabelling happen often) and random output back-pressure.
// The reference is the coder's code string with every carry added in
// place. The received stream is destuffed in software by the decoder's
// rule (after K data ones a pair "0x", x = carry added at the last data
// bit) and must equal the reference, followed only by padding zeros.
// Stuffing and relabelling must both have occurred.
`timescale 1ns/1ps
module tb_stuff_buffer;
  localparam int unsigned K = 4, W = 8;
  localparam int NBITS = 4000;
  logic clk = 0, rst_n = 0, clear = 0, op_valid = 0, op_bit = 0, ready;
  logic [2:0] op = 0;
  logic [$clog2(K+1)-1:0] run_end;
  logic out_ready = 0, out_valid, out_bit, stuff_evt, relabel_evt;
  int checks = 0, failures = 0, n_stuff = 0, n_relabel = 0, n_carry = 0;
  always #5 clk = ~clk;
  stuff_buffer #(.K(K)) dut (.*);

  bit ref_q[$];
  bit rx[$];

  always @(posedge clk) begin
    if (out_valid && out_ready) rx.push_back(out_bit);
    if (stuff_evt) n_stuff++;
    if (relabel_evt) n_relabel++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic do_op(input logic [2:0] o, input bit b);
    @(negedge clk);
    op_valid = 1; op = o; op_bit = b;
    @(posedge clk);
    while (!ready) @(posedge clk);
    @(negedge clk);
    op_valid = 0;
  endtask

  task automatic ref_carry();
    int i = ref_q.size() - 1;
    while (i >= 0 && ref_q[i] == 1) begin ref_q[i] = 0; i--; end
    if (i >= 0) ref_q[i] = 1;
  endtask

  initial begin
    int unsigned a, c, a0, p, x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = (1 << W) - 1; c = 0;
    for (int n = 0; n < NBITS; n++) begin
      p = (n % 500 < 250) ? $urandom_range(1, 255) : $urandom_range(200, 255);
      x = ($urandom_range(0, 255) >= p) ? 1 : 0;
      a0 = (a * p) >> 8;
      if (a0 == 0) a0 = 1;
      if (x == 0) a = a0;
      else begin
        c = c + a0; a = a - a0;
        if (c >= (1 << W)) begin
          c -= (1 << W); n_carry++;
          do_op(3'd1, 0); ref_carry();
        end
      end
      while (a < (1 << (W-1))) begin
        bit b;
        b = bit'((c >> (W-1)) & 1);
        do_op(3'd0, b); ref_q.push_back(b);
        c = (c << 1) & ((1 << W) - 1); a = a << 1;
      end
    end
    for (int i = 0; i < W; i++) begin
      bit b;
      b = bit'((c >> (W-1)) & 1);
      do_op(3'd0, b); ref_q.push_back(b);
      c = (c << 1) & ((1 << W) - 1);
    end
    for (int i = 0; i < 3*K + 4; i++) do_op(3'd4, 0);
    repeat (4*K + 20) @(posedge clk);
    // software destuffing
    begin
      bit d[$];
      int run = 0, i = 0;
      while (i < rx.size()) begin
        if (run == K) begin
          if (i + 1 >= rx.size()) break;
          checks++;
          if (rx[i] != 0) begin failures++; $display("FAIL first stuffed bit is 1 at %0d", i); end
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
      if (d.size() < ref_q.size()) begin failures++; $display("FAIL only %0d of %0d data bits", d.size(), ref_q.size()); end
      else begin
        int bad = 0;
        for (int k = 0; k < ref_q.size(); k++) begin
          checks++;
          if (d[k] != ref_q[k]) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL data bit %0d: %0d vs %0d", k, d[k], ref_q[k]);
          end
        end
        for (int k = ref_q.size(); k < d.size(); k++) begin
          checks++;
          if (d[k] != 0) begin failures++; $display("FAIL padding bit %0d is 1", k); end
        end
      end
    end
    begin int r = 0, nr = 0; for (int k = 0; k < ref_q.size(); k++) begin r = ref_q[k] ? r + 1 : 0; if (r == K) begin nr++; r = 0; end end $display("ref runs %0d", nr); end
    $display("carries=%0d stuffings=%0d relabels=%0d data=%0d received=%0d",
             n_carry, n_stuff, n_relabel, ref_q.size(), rx.size());
    checks++; if (n_stuff == 0)   begin failures++; $display("FAIL no stuffing"); end
    checks++; if (n_relabel == 0) begin failures++; $display("FAIL no relabelling"); end
    checks++; if (n_carry == 0)   begin failures++; $display("FAIL no carry"); end
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
