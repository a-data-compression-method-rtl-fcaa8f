// tb_async_fifo: writer and reader in unrelated clocks with random
// valid/ready; checks that every word arrives once and in order, that the
// FIFO fills (wready low) and empties (rvalid low) during the run, and
// that a full FIFO holds exactly DEPTH words.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int unsigned WIDTH = 8, ADDR_W = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wvalid = 0, wready, rvalid, rready = 0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  always #5 wclk = ~wclk;
  always #7.3 rclk = ~rclk;
  async_fifo #(.WIDTH(WIDTH), .ADDR_W(ADDR_W)) dut (.*);
  localparam int N = 3000;
  int got = 0;

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // fill without reading: exactly DEPTH words go in
    begin
      int n = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge wclk);
        wvalid = 1; wdata = WIDTH'(n);
        @(posedge wclk);
        if (wready) n++;
      end
      @(negedge wclk); wvalid = 0;
      checks++;
      if (n != (1 << ADDR_W)) begin failures++; $display("FAIL full after %0d words", n); end
    end
    fork
      begin
        int n = 1 << ADDR_W;
        while (n < N) begin
          @(negedge wclk);
          wvalid = (n < N/2) ? 1'b1 : ($urandom_range(0, 3) == 0);
          wdata = WIDTH'(n);
          @(posedge wclk);
          if (!wready) n_full++;
          if (wvalid && wready) n++;
        end
        @(negedge wclk); wvalid = 0;
      end
      begin
        while (got < N) begin
          @(negedge rclk);
          rready = (got < N/2) ? ($urandom_range(0, 1) == 0) : 1'b1;
          @(posedge rclk);
          if (!rvalid) n_empty++;
          if (rvalid && rready) begin
            checks++;
            if (rdata != WIDTH'(got)) begin failures++; $display("FAIL word %0d: %0d", got, rdata); end
            got++;
          end
        end
      end
    join
    checks++; if (n_full == 0)  begin failures++; $display("FAIL never full"); end
    checks++; if (n_empty == 0) begin failures++; $display("FAIL never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
