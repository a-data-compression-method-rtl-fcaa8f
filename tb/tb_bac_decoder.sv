// tb_bac_decoder: the stream comes from bac_encoder (checked on its own
// against a software coder in tb_bac_encoder), coded with p0 from a random
// table played by the testbench as modeler. The whole stream is stored,
// then fed to the decoder with input gaps and output back-pressure while
// the testbench models again from the same table. Checked: each decoded
// bit (also as upd_bit), out_last on the last one only, done, the end
// mark event and that carries were taken in. Three messages of different
// lengths and statistics are decoded one after the other with start.
`timescale 1ns/1ps
module tb_bac_decoder;
  import aft_pkg::*;
  localparam int unsigned W = 16, K = 4;
  localparam int NMAX = 4000;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0, n_carry = 0, n_end = 0;
  always #5 clk = ~clk;

  int unsigned ptab [NMAX];
  bit          xtab [NMAX];
  int nbits;

  // encoder side (stimulus)
  logic e_in_valid = 0, e_in_bit = 0, e_in_last = 0, e_in_ready, e_upd, e_upd_bit;
  logic e_out_valid, e_out_bit, e_out_last, e_done, e_c, e_s, e_r;
  int e_idx = 0;
  prob_t e_p0;
  assign e_p0 = prob_t'(ptab[e_idx < NMAX ? e_idx : NMAX-1]);
  bac_encoder #(.W(W), .K(K)) u_enc (
    .clk, .rst_n, .start, .in_valid(e_in_valid), .in_bit(e_in_bit), .in_last(e_in_last),
    .in_ready(e_in_ready), .p_valid(1'b1), .p0(e_p0), .upd(e_upd), .upd_bit(e_upd_bit),
    .out_ready(1'b1), .out_valid(e_out_valid), .out_bit(e_out_bit), .out_last(e_out_last),
    .done(e_done), .carry_evt(e_c), .stuff_evt(e_s), .relabel_evt(e_r));
  bit s_bit[$];
  bit s_last[$];
  always @(posedge clk) begin
    if (e_upd) e_idx <= e_idx + 1;
    if (e_out_valid) begin s_bit.push_back(e_out_bit); s_last.push_back(e_out_last); end
  end

  // decoder under test
  logic in_valid = 0, in_bit = 0, in_last = 0, in_ready, upd, upd_bit;
  logic out_ready = 0, out_valid, out_bit, out_last, done, carry_evt, end_evt;
  int d_idx = 0;
  prob_t p0;
  assign p0 = prob_t'(ptab[d_idx < NMAX ? d_idx : NMAX-1]);
  bac_decoder #(.W(W), .K(K)) dut (
    .clk, .rst_n, .start, .in_valid, .in_bit, .in_last, .in_ready,
    .p_valid(1'b1), .p0, .upd, .upd_bit, .out_ready, .out_valid, .out_bit,
    .out_last, .done, .carry_evt, .end_evt);
  int got = 0;
  always @(posedge clk) begin
    if (upd) begin
      checks++;
      if (d_idx >= nbits || upd_bit != xtab[d_idx]) begin failures++; $display("FAIL upd_bit at %0d", d_idx); end
      d_idx <= d_idx + 1;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (got >= nbits || out_bit != xtab[got] || out_last != (got == nbits - 1)) begin
        failures++; $display("FAIL output bit %0d (%0d, last %0d)", got, out_bit, out_last);
      end
      got <= got + 1;
    end
    if (carry_evt) n_carry++;
    if (end_evt) n_end++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic run_msg(int n, int lo, int hi);
    int ends0;
    nbits = n;
    for (int i = 0; i < n; i++) begin
      ptab[i] = $urandom_range(lo, hi);
      xtab[i] = ($urandom_range(0, 255) >= ptab[i]);
    end
    s_bit = {}; s_last = {};
    @(negedge clk); start = 1; e_idx = 0; d_idx = 0; got = 0; @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      e_in_valid = 1; e_in_bit = xtab[i]; e_in_last = (i == n - 1);
      @(posedge clk);
      while (!e_in_ready) @(posedge clk);
    end
    @(negedge clk); e_in_valid = 0; e_in_last = 0;
    while (!e_done) @(negedge clk);
    ends0 = n_end;
    for (int i = 0; i < s_bit.size(); i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_bit = s_bit[i]; in_last = s_last[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got != n) begin failures++; $display("FAIL %0d of %0d bits decoded", got, n); end
    checks++;
    if (n_end != ends0 + 1) begin failures++; $display("FAIL end mark seen %0d times", n_end - ends0); end
    $display("message of %0d bits: %0d coded bits", n, s_bit.size());
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_msg(4000, 1, 255);
    run_msg(3000, 230, 255);
    run_msg(50, 250, 255);
    checks++; if (n_carry == 0) begin failures++; $display("FAIL no carry taken in"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
