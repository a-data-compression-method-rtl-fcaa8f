// aftm: adaptive fuzzy-tuning modeler.
//
// Supplies the coder with p(0|s), the probability that the next bit is 0
// in the current order-ORDER context s, and adapts it after every coded
// bit without any division:
//   p(0|s)     = Prb[Adr[s]]
//   Adr[s]    <= Adr[s] + Ost_bit,sigma[Adr[s]]
//   queue[s]  <= {queue[s], bit}
// where sigma is chosen from the state's history queue by fuzzy inference
// (switching activity sa, repeating activity ra -> fuzzy_step_rom).
//
// Operation: after rst_n or clear the modeler writes every Adr word with
// the index of p = 1/2 and every queue with zeros (2^ORDER cycles). It
// then reads Adr[s] and queue[s] (one cycle) and raises p_valid with p0.
// An upd pulse with upd_bit (accepted only while p_valid) writes the new
// pointer and queue of s, shifts upd_bit into the context, and p_valid
// drops for one cycle while the next state is read. So one bit can be
// modelled every second cycle.
//
// Follows the source design: Adr/Prb/Ost tables, five steps selected by
// fuzzy inference from a 10-bit per-state queue, order-o context. Own
// choices: the sigma used to update is computed from the queue before the
// current bit enters it; start-up values (pointer at p=1/2, queue all
// zeros, context all zeros); the two-cycle timing.
module aftm
  import aft_pkg::*;
#(
  parameter int unsigned ORDER = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // restart: re-initialise all tables
  output logic             ready,      // initialisation finished
  output logic             p_valid,
  output prob_t            p0,         // p(0|s) * 256
  input  logic             upd,        // one bit coded under the current state
  input  logic             upd_bit,
  // observation
  output logic [ORDER-1:0] state,
  output prb_idx_t         adr_cur,
  output step_sel_t        step_sel
);
  typedef enum logic [1:0] {M_INIT, M_READ, M_READY} mstate_e;
  mstate_e mst;

  localparam prb_idx_t HALF_IDX = prb_idx_t'(prb_half_index());

  logic [ORDER-1:0] init_cnt;
  logic             rd_en, adr_we, q_we;
  logic [ORDER-1:0] wr_addr;
  prb_idx_t         adr_rd, adr_wd;
  queue_t           q_rd, q_wd;
  logic [3:0]       sa, ra;
  ost_t             ost;
  logic             do_upd;

  assign do_upd = upd && (mst == M_READY);

  context_reg #(.ORDER(ORDER)) u_ctx (
    .clk, .rst_n, .clear,
    .shift_en(do_upd), .bit_in(upd_bit), .state(state)
  );

  adr_table #(.ORDER(ORDER)) u_adr (
    .clk, .rd_en, .rd_addr(state), .rd_data(adr_rd),
    .we(adr_we), .wr_addr, .wr_data(adr_wd)
  );

  state_queue_mem #(.ORDER(ORDER)) u_q (
    .clk, .rd_en, .rd_addr(state), .rd_data(q_rd),
    .we(q_we), .wr_addr, .wr_data(q_wd)
  );

  activity_eval  u_act (.hist(q_rd), .sa, .ra);
  fuzzy_step_rom u_fz  (.sa, .ra, .step_sel);
  ost_rom        u_ost (.idx(adr_rd), .bit_in(upd_bit), .step_sel, .ost);
  prb_rom        u_prb (.idx(adr_rd), .p0);

  always_comb begin
    rd_en   = (mst == M_READ);
    adr_we  = 1'b0;
    q_we    = 1'b0;
    wr_addr = state;
    adr_wd  = HALF_IDX;
    q_wd    = '0;
    if (mst == M_INIT) begin
      adr_we  = 1'b1;
      q_we    = 1'b1;
      wr_addr = init_cnt;
    end else if (do_upd) begin
      adr_we  = 1'b1;
      q_we    = 1'b1;
      adr_wd  = prb_idx_t'(int'(adr_rd) + int'(ost));
      q_wd    = {q_rd[QUEUE_LEN-2:0], upd_bit};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst      <= M_INIT;
      init_cnt <= '0;
    end else if (clear) begin
      mst      <= M_INIT;
      init_cnt <= '0;
    end else begin
      case (mst)
        M_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (&init_cnt) mst <= M_READ;
        end
        M_READ:  mst <= M_READY;
        M_READY: if (do_upd) mst <= M_READ;
        default: mst <= M_INIT;
      endcase
    end
  end

  assign ready   = (mst != M_INIT);
  assign p_valid = (mst == M_READY);
  assign adr_cur = adr_rd;

  // The pointer update never leaves the Prb table.
  a_ptr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    do_upd |-> (int'(adr_rd) + int'(ost) >= 0 && int'(adr_rd) + int'(ost) < int'(PRB_ENTRIES)));
endmodule
