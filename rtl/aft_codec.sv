// aft_codec: lossless bit-stream codec by adaptive binary arithmetic coding
// with a fuzzy-tuned probability modeler.
//
// One modeler (aftm) and one coder that works in encoding or decoding
// mode. In encoding mode each input bit x is coded with p(0|s) for the
// context s of the ORDER previous bits and the modeler then adapts that
// state; the output is the compressed, bit-stuffed stream ending with the
// termination mark. In decoding mode the compressed stream comes in and
// the decoder, driving the identical modeler with the bits it recovers,
// reproduces the original bits. Both ends start from the same initial
// model, so a stream encoded after one start is decoded after another.
//
// Clocks: clk runs the codec, host_clk the host side; two asynchronous
// FIFOs (2 bits wide: data and last) connect them, so transfers and coding
// overlap. Host side: hin_* (bits to code, hin_last on the final one) and
// hout_* (result, hout_last on the final one), valid/ready handshakes.
// Core side: mode (0 encode, 1 decode) is sampled by a one-cycle start
// pulse, which also restarts the coder and re-initialises the modeler
// (2^ORDER cycles, model_ready low). done rises when the operation is over.
// The remaining outputs show internal events: carries, stuffing,
// termination and the chosen tuning step.
//
// Follows the source design: AFTM + coder organisation, the two modes,
// asynchronous I/O. Own choices: mode/start control, FIFO depth, resets
// (rst_n and host_rst_n active low, to be asserted together).
module aft_codec
  import aft_pkg::*;
#(
  parameter int unsigned ORDER   = 16,
  parameter int unsigned W       = 16,
  parameter int unsigned K       = 16,
  parameter int unsigned FIFO_AW = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      mode,
  input  logic      start,
  output logic      model_ready,
  output logic      done,
  // host side
  input  logic      host_clk,
  input  logic      host_rst_n,
  input  logic      hin_valid,
  input  logic      hin_bit,
  input  logic      hin_last,
  output logic      hin_ready,
  output logic      hout_valid,
  output logic      hout_bit,
  output logic      hout_last,
  input  logic      hout_ready,
  // events (clk domain)
  output logic      ev_coded,      // one bit encoded or decoded
  output logic      ev_carry,      // encoder carry into R / decoder carry from "01"
  output logic      ev_stuff,      // encoder stuffing
  output logic      ev_relabel,    // encoder stuffing completed by a carry
  output logic      ev_end,        // decoder found the termination mark
  output step_sel_t ev_step        // tuning step chosen for the coded bit
);
  logic mode_q;

  // core-side FIFO ends
  logic       ci_valid, ci_ready, co_valid, co_ready;
  logic [1:0] ci_data, co_data;

  // modeler
  logic  p_valid, upd, upd_bit;
  prob_t p0;
  logic [ORDER-1:0] state;
  prb_idx_t adr_cur;

  // encoder / decoder
  logic e_in_ready, e_upd, e_upd_bit, e_out_valid, e_out_bit, e_out_last, e_done;
  logic e_carry, e_stuff, e_relabel;
  logic d_in_ready, d_upd, d_upd_bit, d_out_valid, d_out_bit, d_out_last, d_done;
  logic d_carry, d_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mode_q <= 1'b0;
    else if (start) mode_q <= mode;
  end

  async_fifo #(.WIDTH(2), .ADDR_W(FIFO_AW)) u_fifo_in (
    .wclk(host_clk), .wrst_n(host_rst_n), .wvalid(hin_valid), .wdata({hin_last, hin_bit}),
    .wready(hin_ready),
    .rclk(clk), .rrst_n(rst_n), .rvalid(ci_valid), .rdata(ci_data), .rready(ci_ready)
  );

  async_fifo #(.WIDTH(2), .ADDR_W(FIFO_AW)) u_fifo_out (
    .wclk(clk), .wrst_n(rst_n), .wvalid(co_valid), .wdata(co_data), .wready(co_ready),
    .rclk(host_clk), .rrst_n(host_rst_n), .rvalid(hout_valid), .rdata({hout_last, hout_bit}),
    .rready(hout_ready)
  );

  aftm #(.ORDER(ORDER)) u_aftm (
    .clk, .rst_n, .clear(start), .ready(model_ready),
    .p_valid, .p0, .upd, .upd_bit,
    .state, .adr_cur, .step_sel(ev_step)
  );

  bac_encoder #(.W(W), .K(K)) u_enc (
    .clk, .rst_n, .start,
    .in_valid(ci_valid && !mode_q), .in_bit(ci_data[0]), .in_last(ci_data[1]),
    .in_ready(e_in_ready),
    .p_valid(p_valid && !mode_q), .p0, .upd(e_upd), .upd_bit(e_upd_bit),
    .out_ready(co_ready), .out_valid(e_out_valid), .out_bit(e_out_bit),
    .out_last(e_out_last), .done(e_done),
    .carry_evt(e_carry), .stuff_evt(e_stuff), .relabel_evt(e_relabel)
  );

  bac_decoder #(.W(W), .K(K)) u_dec (
    .clk, .rst_n, .start,
    .in_valid(ci_valid && mode_q), .in_bit(ci_data[0]), .in_last(ci_data[1]),
    .in_ready(d_in_ready),
    .p_valid(p_valid && mode_q), .p0, .upd(d_upd), .upd_bit(d_upd_bit),
    .out_ready(co_ready), .out_valid(d_out_valid), .out_bit(d_out_bit),
    .out_last(d_out_last), .done(d_done),
    .carry_evt(d_carry), .end_evt(d_end)
  );

  always_comb begin
    if (!mode_q) begin
      ci_ready = e_in_ready;
      upd      = e_upd;
      upd_bit  = e_upd_bit;
      co_valid = e_out_valid;
      co_data  = {e_out_last, e_out_bit};
      done     = e_done;
      ev_carry = e_carry;
    end else begin
      ci_ready = d_in_ready;
      upd      = d_upd;
      upd_bit  = d_upd_bit;
      co_valid = d_out_valid;
      co_data  = {d_out_last, d_out_bit};
      done     = d_done;
      ev_carry = d_carry;
    end
  end

  assign ev_coded   = upd;
  assign ev_stuff   = !mode_q && e_stuff;
  assign ev_relabel = !mode_q && e_relabel;
  assign ev_end     = mode_q && d_end;
endmodule
