// tb_aft_codec: end-to-end test of the codec.
//
// Generates bit sequences of different character (strongly biased,
// Markov with long runs, a repeating pattern, uniform random), encodes each
// in mode 0, decodes the captured stream in mode 1 and checks that the
// decoded bits equal the input, bit for bit and in number. The host clock
// runs at a different rate from the core clock. Besides the round trip it
// counts the mechanisms of the design and fails if any never happened:
// encoder carries into R, stuffing after K ones, stuffing completed by a
// carry (relabelling), decoder carries from a "01" stuffed pair, the
// termination mark, every one of the five tuning steps, output back-pressure
// stalls and both modes. It also checks the coding rate: with no
// back-pressure, at most 50/12 core cycles per coded bit (12 Mbit/s at
// 50 MHz). Parameters are reduced (ORDER 8, K 4) to make rare events
// frequent and the run short; tb_aft_codec_full runs the defaults.
`timescale 1ns/1ps
module tb_aft_codec;
  localparam int unsigned ORDER = 8;
  localparam int unsigned K     = 4;
  localparam int unsigned NBITS = 6000;

  logic clk = 0, host_clk = 0, rst_n = 0, host_rst_n = 0;
  always #5 clk = ~clk;
  always #3.5 host_clk = ~host_clk;

  logic mode = 0, start = 0, model_ready, done;
  logic hin_valid = 0, hin_bit = 0, hin_last = 0, hin_ready;
  logic hout_valid, hout_bit, hout_last, hout_ready = 1;
  logic ev_coded, ev_carry, ev_stuff, ev_relabel, ev_end;
  logic [2:0] ev_step;

  aft_codec #(.ORDER(ORDER), .W(16), .K(K), .FIFO_AW(4)) dut (.*);

  int checks = 0, failures = 0;
  bit src [NBITS];
  bit comp [$];
  bit dec [$];
  int n_carry_enc = 0, n_carry_dec = 0, n_stuff = 0, n_relabel = 0, n_end = 0;
  int n_stall = 0, n_coded_enc = 0, n_coded_dec = 0;
  int n_step [5] = '{0, 0, 0, 0, 0};
  int enc_cycles = 0;
  bit counting = 0, bp_on = 0;

  // sampled on the falling edge, away from the core's register updates
  always @(negedge clk) begin
    if (ev_carry && !dut.mode_q) n_carry_enc++;
    if (ev_carry && dut.mode_q)  n_carry_dec++;
    if (ev_stuff)   n_stuff++;
    if (ev_relabel) n_relabel++;
    if (ev_end)     n_end++;
    if (ev_coded) begin
      n_step[ev_step]++;
      if (dut.mode_q) n_coded_dec++; else n_coded_enc++;
    end
    if (dut.u_enc.u_sb.op_valid && !dut.co_ready) n_stall++;
    if (counting) enc_cycles++;
  end

  always @(posedge host_clk) hout_ready <= bp_on ? ($urandom_range(0, 9) == 0) : 1'b1;

  task automatic make_data(input int kind);
    bit prev = 0;
    for (int i = 0; i < NBITS; i++) begin
      case (kind)
        0: src[i] = ($urandom_range(0, 99) < 6);                        // biased
        1: begin src[i] = ($urandom_range(0, 99) < 3) ? ~prev : prev; prev = src[i]; end
        2: src[i] = bit'((i % 7) == 0 || (i % 7) == 3);                 // pattern
        default: src[i] = bit'($urandom_range(0, 1));                   // random
      endcase
    end
  endtask

  task automatic do_start(input bit m);
    @(posedge clk); mode <= m; start <= 1;
    @(posedge clk); start <= 0;
    wait (model_ready);
  endtask

  // Drive bits on the host side while collecting the output.
  task automatic run(input bit m, input int n, output bit res [$]);
    res = {};
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(posedge host_clk);
          hin_valid <= 1;
          hin_bit   <= m ? comp[i] : src[i];
          hin_last  <= (i == n - 1);
          do @(posedge host_clk); while (!hin_ready);
          hin_valid <= 0;
          hin_last  <= 0;
        end
      end
      begin
        bit fin = 0;
        while (!fin) begin
          @(posedge host_clk);
          if (hout_valid && hout_ready) begin
            res.push_back(hout_bit);
            fin = hout_last;
          end
        end
      end
    join
  endtask

  // Faster driver: keeps hin_valid high (for the rate measurement).
  task automatic run_fast(input int n, output bit res [$]);
    res = {};
    fork
      begin
        int i = 0;
        hin_valid <= 1; hin_bit <= src[0]; hin_last <= (n == 1);
        while (i < n) begin
          @(posedge host_clk);
          if (hin_ready) begin
            i++;
            if (i < n) begin hin_bit <= src[i]; hin_last <= (i == n - 1); end
            else hin_valid <= 0;
          end
        end
        hin_last <= 0;
      end
      begin
        bit fin = 0;
        while (!fin) begin
          @(posedge host_clk);
          if (hout_valid && hout_ready) begin
            res.push_back(hout_bit);
            fin = hout_last;
          end
        end
      end
    join
  endtask

  initial begin
    bit got [$];
    int bits_in, bits_out;
    repeat (5) @(posedge clk);
    rst_n = 1; host_rst_n = 1;
    for (int kind = 0; kind < 4; kind++) begin
      make_data(kind);
      bp_on = (kind == 1);
      do_start(0);
      if (kind == 3) begin
        counting = 1;
        run_fast(NBITS, got);
        counting = 0;
      end else begin
        run(0, NBITS, got);
      end
      comp = got;
      wait (done);
      do_start(1);
      run(1, comp.size(), dec);
      wait (done);
      checks++;
      if (dec.size() != NBITS) begin
        failures++;
        $display("FAIL kind %0d: decoded %0d bits, expected %0d", kind, dec.size(), NBITS);
      end
      for (int i = 0; i < NBITS && i < dec.size(); i++) begin
        checks++;
        if (dec[i] != src[i]) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d bit %0d: got %0d want %0d", kind, i, dec[i], src[i]);
        end
      end
      $display("kind %0d: %0d bits -> %0d coded bits", kind, NBITS, comp.size());
      if (kind == 0) begin
        checks++;   // a source with H(0.06) ~ 0.33 bit/bit must compress
        if (comp.size() > NBITS / 2) begin failures++; $display("FAIL biased source not compressed"); end
      end
      if (kind == 3) begin
        real cpb;
        cpb = real'(enc_cycles) / real'(NBITS);
        $display("encode rate: %0d cycles for %0d bits = %f cycles/bit", enc_cycles, NBITS, cpb);
        checks++;
        if (cpb > 50.0 / 12.0) begin failures++; $display("FAIL rate below 12 Mbit/s at 50 MHz"); end
      end
    end
    $display("events: enc carries %0d, stuffings %0d, relabels %0d, dec carries %0d, end marks %0d, stalls %0d",
             n_carry_enc, n_stuff, n_relabel, n_carry_dec, n_end, n_stall);
    $display("steps used: %0d %0d %0d %0d %0d; coded enc %0d dec %0d",
             n_step[0], n_step[1], n_step[2], n_step[3], n_step[4], n_coded_enc, n_coded_dec);
    checks++; if (n_carry_enc == 0) begin failures++; $display("FAIL no encoder carry"); end
    checks++; if (n_stuff == 0)     begin failures++; $display("FAIL no stuffing"); end
    checks++; if (n_relabel == 0)   begin failures++; $display("FAIL no relabelled stuffing"); end
    checks++; if (n_carry_dec == 0) begin failures++; $display("FAIL no decoder carry"); end
    checks++; if (n_end != 4)       begin failures++; $display("FAIL end marks %0d", n_end); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no back-pressure stall"); end
    for (int s = 0; s < 5; s++) begin
      checks++; if (n_step[s] == 0) begin failures++; $display("FAIL step %0d never chosen", s); end
    end
    checks++; if (n_coded_enc != 4 * NBITS || n_coded_dec != 4 * NBITS) begin
      failures++; $display("FAIL coded counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
