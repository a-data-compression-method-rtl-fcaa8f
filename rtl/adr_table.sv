// adr_table: the Adr table, one 7-bit pointer into Prb per context state.
//
// 2^ORDER words of PRB_IDX_W bits with one synchronous read port and one
// write port (a simple dual-port RAM). A read issued with rd_en returns the
// word on rd_data in the next cycle; a write in the same cycle as a read of
// the same address returns the old word. Contents are not reset: the
// modeler writes every word at start-up.
// Follows the source design: 2^o pointers, one per state. Own choice: the
// synchronous read and the port arrangement.
module adr_table
  import aft_pkg::*;
#(
  parameter int unsigned ORDER = 16
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ORDER-1:0] rd_addr,
  output prb_idx_t         rd_data,
  input  logic             we,
  input  logic [ORDER-1:0] wr_addr,
  input  prb_idx_t         wr_data
);
  prb_idx_t mem [2**ORDER];

  always_ff @(posedge clk) begin
    if (we)    mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
