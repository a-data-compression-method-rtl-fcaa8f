// tb_aft_workloads: the codec at its default parameters (order 16) on
// small synthetic stand-ins for the three kinds of file a compressor is
// usually judged on. All data is generated here, byte by byte, MSB first:
//   text   - English-like words drawn from a fixed word list, spaces,
//            sentence punctuation and line breaks (ASCII);
//   image  - an 8-bit grey-scale raster: smooth gradients plus small noise;
//   binary - records of little-endian counters, small integers, zero
//            padding and short ASCII tags, as in object files.
// Each source is NBYTES long. It is encoded, decoded and compared bit for
// bit, and the saving (1 - coded/original) is printed. Text and image must
// compress. The full-size files of a real benchmark (tens of megabytes)
// run the same way but are far beyond simulation time.
`timescale 1ns/1ps
module tb_aft_workloads;
  localparam int unsigned NBYTES = 10000;
  localparam int unsigned NBITS = NBYTES * 8;

  logic clk = 0, host_clk = 0, rst_n = 0, host_rst_n = 0;
  always #5 clk = ~clk;
  always #3.5 host_clk = ~host_clk;

  logic mode = 0, start = 0, model_ready, done;
  logic hin_valid = 0, hin_bit = 0, hin_last = 0, hin_ready;
  logic hout_valid, hout_bit, hout_last, hout_ready = 1;
  logic ev_coded, ev_carry, ev_stuff, ev_relabel, ev_end;
  logic [2:0] ev_step;

  aft_codec dut (.*);

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

  string words [24] = '{"the", "of", "and", "to", "in", "is", "that", "for",
                        "data", "coding", "bit", "with", "as", "by", "this",
                        "method", "table", "state", "value", "each", "are",
                        "probability", "model", "on"};

  task automatic put_byte(inout int pos, input int unsigned b);
    for (int k = 7; k >= 0; k--) if (pos < NBITS) begin src[pos] = bit'((b >> k) & 1); pos++; end
  endtask

  task automatic make_data(input int kind);
    int pos, n, col;
    pos = 0; n = 0; col = 0;
    while (pos < NBITS) begin
      case (kind)
        0: begin                                   // text
          string w;
          w = words[$urandom_range(0, 23)];
          if (n % 9 == 0) w = {w.substr(0, 0).toupper(), w.substr(1, w.len() - 1)};
          for (int c = 0; c < w.len(); c++) put_byte(pos, w[c]);
          n++; col += w.len() + 1;
          if (n % 9 == 8) put_byte(pos, 8'h2e);    // '.'
          if (col > 60) begin put_byte(pos, 8'h0a); col = 0; end
          else put_byte(pos, 8'h20);
        end
        1: begin                                   // image, 64 pixels per row
          int x, y, v;
          x = n % 64; y = n / 64;
          v = (x * 3 + y * 2) % 256 + int'($urandom_range(0, 4)) - 2;
          if (v < 0) v = 0;
          if (v > 255) v = 255;
          put_byte(pos, v);
          n++;
        end
        default: begin                             // binary records of 16 bytes
          put_byte(pos, n & 255); put_byte(pos, (n >> 8) & 255); put_byte(pos, 0); put_byte(pos, 0);
          put_byte(pos, $urandom_range(0, 15)); put_byte(pos, 0); put_byte(pos, 0); put_byte(pos, 0);
          put_byte(pos, 8'h2e); put_byte(pos, 8'h74); put_byte(pos, 8'h65); put_byte(pos, 8'h78);
          put_byte(pos, 8'h74); put_byte(pos, 0); put_byte(pos, 8'hff); put_byte(pos, 8'hff);
          n++;
        end
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
    int kinds [3] = '{0, 1, 2};
    string names [3] = '{"text", "image", "binary"};
    int t0, n_init;
    repeat (5) @(posedge clk);
    rst_n = 1; host_rst_n = 1;
    foreach (kinds[k]) begin
      make_data(kinds[k]);
      @(posedge clk); mode <= 0; start <= 1;
      @(posedge clk); start <= 0;
      n_init = 0;
      while (model_ready)  begin @(posedge clk); n_init++; end
      while (!model_ready) begin @(posedge clk); n_init++; end
      checks++;
      if (n_init < 65536 || n_init > 65540) begin failures++; $display("FAIL model clear took %0d cycles", n_init); end
      run(0, NBITS, got);
      comp = got;
      wait (done);
      do_start(1);
      run(1, comp.size(), dec);
      wait (done);
      checks++;
      if (dec.size() != NBITS) begin
        failures++;
        $display("FAIL source %0d: decoded %0d bits, expected %0d", kinds[k], dec.size(), NBITS);
      end
      for (int i = 0; i < NBITS && i < dec.size(); i++) begin
        checks++;
        if (dec[i] != src[i]) begin
          failures++;
          if (failures < 10) $display("FAIL source %0d bit %0d: got %0d want %0d", kinds[k], i, dec[i], src[i]);
        end
      end
      $display("%s: %0d bytes -> %0d coded bits, saving %0.1f%%", names[k], NBYTES, comp.size(),
               100.0 * (1.0 - real'(comp.size()) / real'(NBITS)));
      if (k < 2) begin
        checks++;
        if (comp.size() >= NBITS) begin failures++; $display("FAIL %s not compressed", names[k]); end
      end
    end
    $display("events: enc carries %0d, stuffings %0d, relabels %0d, dec carries %0d, end marks %0d",
             n_carry_enc, n_stuff, n_relabel, n_carry_dec, n_end);
    $display("steps used: %0d %0d %0d %0d %0d; coded enc %0d dec %0d",
             n_step[0], n_step[1], n_step[2], n_step[3], n_step[4], n_coded_enc, n_coded_dec);
    checks++; if (n_end != 3)       begin failures++; $display("FAIL end marks %0d", n_end); end
    checks++; if (n_coded_enc != 3 * NBITS || n_coded_dec != 3 * NBITS) begin
      failures++; $display("FAIL coded counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
