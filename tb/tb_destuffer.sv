// tb_destuffer: feeds a stuffed stream built in software (K = 4): random
// data bits, a stuffed pair after every K data ones ("00", or "01" for a
// carry, chosen at random), then the termination (data 0, K ones, a 1,
// the CNT_W-bit count, 2K+2 zeros, last). Input gaps and random get
// timing. Checked: every data bit and its carry flag, end_mark low on
// every data bit and high after the last one, end_count, and drained
// after drain.
`timescale 1ns/1ps
module tb_destuffer;
  localparam int unsigned K = 4, CNT_W = 9;
  localparam int NDATA = 3000;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_bit = 0, in_last = 0, in_ready;
  logic avail, data_bit, data_carry, end_mark, get = 0, drain = 0, drained;
  logic [CNT_W-1:0] end_count;
  int checks = 0, failures = 0, n_carry = 0;
  always #5 clk = ~clk;
  destuffer #(.K(K), .CNT_W(CNT_W)) dut (.*);

  bit stream[$];
  bit dat[$];
  bit car[$];
  int unsigned cnt_val;

  task automatic build();
    int run = 0;
    for (int i = 0; i < NDATA; i++) begin
      bit b;
      b = ($urandom_range(0, 2) != 0);
      stream.push_back(b); dat.push_back(b); car.push_back(0);
      run = b ? run + 1 : 0;
      if (run == K) begin
        bit c;
        c = ($urandom_range(0, 1) == 1);
        stream.push_back(0); stream.push_back(c);
        car[car.size()-1] = c;
        run = 0;
      end
    end
    stream.push_back(0);
    for (int i = 0; i < K; i++) stream.push_back(1);
    stream.push_back(1);
    cnt_val = $urandom_range(0, 2**CNT_W - 1);
    for (int i = CNT_W - 1; i >= 0; i--) stream.push_back(bit'((cnt_val >> i) & 1));
    for (int i = 0; i < 2*K + 2; i++) stream.push_back(0);
  endtask

  initial begin
    build();
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int i = 0; i < stream.size(); i++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_bit = stream[i]; in_last = (i == stream.size() - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin
        int k = 0;
        while (k < NDATA) begin
          @(negedge clk);
          get = 0;
          if (avail && $urandom_range(0, 2) != 0) begin
            checks++;
            if (end_mark) begin failures++; $display("FAIL end_mark on data bit %0d", k); end
            checks++;
            if (data_bit != dat[k] || data_carry != car[k]) begin
              failures++; $display("FAIL bit %0d: %0d/%0d vs %0d/%0d", k, data_bit, data_carry, dat[k], car[k]);
            end
            if (data_carry) n_carry++;
            get = 1; k++;
          end
        end
        @(negedge clk); get = 0;
        while (!avail) @(negedge clk);
        checks++;
        if (!end_mark) begin failures++; $display("FAIL no end_mark after the data"); end
        checks++;
        if (end_count != CNT_W'(cnt_val)) begin failures++; $display("FAIL end_count %0d vs %0d", end_count, cnt_val); end
        drain = 1;
        while (!drained) @(negedge clk);
        drain = 0;
      end
    join
    checks++; if (n_carry == 0) begin failures++; $display("FAIL no carry seen"); end
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
