// tb_aftm: runs the modeler against a software model of its tables.
// The model keeps, per state, a pointer and a 10-bit queue, counts sa and
// ra itself, takes the step and offset from the package's table functions
// (whose contents the ROM testbenches check) and follows the order-ORDER
// context. Checked: p0 for every bit, the step chosen, the initialisation
// time (2^ORDER cycles) and the two-cycle loop from upd to the next
// p_valid; a clear in the middle must restore the initial model.
`timescale 1ns/1ps
module tb_aftm;
  import aft_pkg::*;
  localparam int unsigned ORDER = 4;
  logic clk = 0, rst_n = 0, clear = 0, ready, p_valid, upd = 0, upd_bit = 0;
  prob_t p0;
  logic [ORDER-1:0] state;
  prb_idx_t adr_cur;
  step_sel_t step_sel;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aftm #(.ORDER(ORDER)) dut (.*);

  int m_adr [2**ORDER];
  int m_q   [2**ORDER];
  int ctx;

  task automatic model_reset();
    for (int s = 0; s < 2**ORDER; s++) begin m_adr[s] = int'(prb_half_index()); m_q[s] = 0; end
    ctx = 0;
  endtask

  task automatic check_init();
    int cyc = 0;
    while (!ready) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc < 2**ORDER - 1 || cyc > 2**ORDER + 1) begin failures++; $display("FAIL init took %0d cycles", cyc); end
  endtask

  task automatic run_bits(int n, int bias);
    for (int i = 0; i < n; i++) begin
      int sa, ra, st, b, q, lat;
      lat = 0;
      @(negedge clk);
      while (!p_valid) begin @(negedge clk); lat++; end
      checks++;
      if (i > 0 && lat != 0) begin failures++; $display("FAIL loop latency %0d", lat + 1); end
      checks++;
      if (int'(p0) != prb_value(m_adr[ctx])) begin
        failures++; $display("FAIL bit %0d state %0d: p0 %0d vs %0d", i, ctx, p0, prb_value(m_adr[ctx]));
      end
      q = m_q[ctx];
      sa = 0; for (int k = 1; k < 10; k++) if (((q >> k) & 1) != ((q >> (k-1)) & 1)) sa++;
      ra = 1; while (ra < 10 && ((q >> ra) & 1) == (q & 1)) ra++;
      st = int'(fuzzy_step_index(sa, ra));
      checks++;
      if (int'(step_sel) != st) begin failures++; $display("FAIL step %0d vs %0d", step_sel, st); end
      b = ($urandom_range(0, 99) < bias) ? 1 : 0;
      upd = 1; upd_bit = b[0];
      m_adr[ctx] = m_adr[ctx] + ost_value(st, b[0], m_adr[ctx]);
      m_q[ctx] = ((q << 1) | b) & 1023;
      ctx = ((ctx << 1) | b) & (2**ORDER - 1);
      @(negedge clk);
      upd = 0;
    end
  endtask

  initial begin
    model_reset();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    check_init();
    run_bits(3000, 20);
    run_bits(2000, 50);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    model_reset();
    check_init();
    run_bits(2000, 90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
