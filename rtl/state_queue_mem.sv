// state_queue_mem: per-state history queues of the fuzzy selector.
//
// For each of the 2^ORDER context states a QUEUE_LEN-bit (10) queue of the
// bits last coded under that state; bit 0 is the most recent. The modeler
// reads a state's queue together with its pointer, and writes back the
// queue shifted by one with the new bit at bit 0. One synchronous read
// port (data in the next cycle) and one write port; no reset, the modeler
// clears every word at start-up.
// Follows the source design: a 10-bit queue per state. Own choice: storage
// as a RAM beside the Adr table, bit order.
module state_queue_mem
  import aft_pkg::*;
#(
  parameter int unsigned ORDER = 16
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ORDER-1:0] rd_addr,
  output queue_t           rd_data,
  input  logic             we,
  input  logic [ORDER-1:0] wr_addr,
  input  queue_t           wr_data
);
  queue_t mem [2**ORDER];

  always_ff @(posedge clk) begin
    if (we)    mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
