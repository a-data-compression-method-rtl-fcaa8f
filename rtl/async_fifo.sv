// async_fifo: asynchronous I/O interface between the host and the codec.
//
// A dual-clock FIFO, so that host transfers and coding run in parallel at
// independent clock rates. Write side in wclk, read side in rclk. The
// pointers are ADDR_W+1 bits, passed across the domains in Gray code
// through two-flop synchronisers; full and empty are therefore
// conservative (they may be late to clear by a few cycles, never late to
// set). Storage is an array read combinationally at the read pointer
// (show-ahead: rdata is valid whenever rvalid). wready/rvalid are the
// usual valid/ready handshakes. Each side has its own active-low
// asynchronous reset; both must be applied together.
// The source design says only that the I/O interface is asynchronous and
// lets I/O and coding overlap; the FIFO structure, depth and handshakes
// are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH  = 2,
  parameter int unsigned ADDR_W = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wvalid,
  input  logic [WIDTH-1:0] wdata,
  output logic             wready,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata,
  input  logic             rready
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [ADDR_W:0]  wbin, rbin, wgray, rgray;
  logic [ADDR_W:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = bin2gray(wbin);
  assign rgray = bin2gray(rbin);

  // full: write pointer one lap ahead of the synchronised read pointer
  assign wready = (wgray != {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
  assign rvalid = (rgray != wgray_r2);
  assign rdata  = mem[rbin[ADDR_W-1:0]];

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[ADDR_W-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      if (wvalid && wready) wbin <= wbin + 1'b1;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      if (rvalid && rready) rbin <= rbin + 1'b1;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
