// context_reg: order-o fixed context of the modeler.
//
// Holds the o most recently coded bits; together they are the state s that
// selects a modeler entry. Each coded bit is shifted in at bit 0 one cycle
// after it is presented (the "unit delay" between the coded bit and the
// modeler), so state[0] is bit n-1, state[1] bit n-2, and so on.
// Interface: shift_en with bit_in shifts one bit; clear (synchronous) and
// rst_n (synchronous, like the rest of the core) return the context to
// all zeros.
// Follows the source design: the order-o context of previously coded bits.
// Own choice: the all-zero start context and the bit order.
module context_reg #(
  parameter int unsigned ORDER = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic             bit_in,
  output logic [ORDER-1:0] state
);
  always_ff @(posedge clk) begin
    if (!rst_n)        state <= '0;
    else if (clear)    state <= '0;
    else if (shift_en) state <= {state[ORDER-2:0], bit_in};
  end
endmodule
