// delay_card: one delay line card, the dual delay line that delays both bits
// (the "+1" and the "-1" wire) of one 3-level sampler output by the same
// programmed amount.
//
// The card holds its own program register, so the 100 MHz interface to a
// separate control card of the earlier design is gone: prog_load copies
// prog_in (delay, stand-by bit) and the input-source selection into the
// register, and both delay functions run from it.
//
// Interface: samples in on sampler/prn/alt/spare (3-level, one per clock),
// the delayed sample on dout. Latency is delay_line's LATENCY plus the
// programmed delay, identical for both bits.
module delay_card
  import corr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      prog_load,
  input  dly_word_t prog_in,
  input  dly_src_e  src_in,
  input  tri_t      sampler,
  input  tri_t      prn,
  input  tri_t      alt,
  input  tri_t      spare,
  output tri_t      dout
);
  dly_word_t prog;
  dly_src_e  src;

  always_ff @(posedge clk) begin
    if (rst) begin
      prog <= '0;
      src  <= SRC_SAMPLER;
    end else if (prog_load) begin
      prog <= prog_in;
      src  <= src_in;
    end
  end

  delay_line u_plus (
    .clk, .rst, .src, .prog,
    .din_sampler(sampler.p), .din_prn(prn.p), .din_alt(alt.p), .din_spare(spare.p),
    .dout(dout.p)
  );

  delay_line u_minus (
    .clk, .rst, .src, .prog,
    .din_sampler(sampler.m), .din_prn(prn.m), .din_alt(alt.m), .din_spare(spare.m),
    .dout(dout.m)
  );
endmodule
