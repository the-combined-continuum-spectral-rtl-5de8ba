// lag_generator: makes the four lagged copies tau_(m+k), k = 0..3, of the
// recirculator's tau_m stream that one multiplier module correlates against
// tau_0. The generators of the modules fed from one recirculator form one
// chain: a module whose base is 4 gets tau_(m+4)..tau_(m+7), and so on.
// When the band is oversampled (four samples per Nyquist interval instead of
// two) each lag is two bit periods, so tap k is 2*(base+k) bits late.
//
// Built as a 31-stage shift register of tau_m with a tap selector. Every
// output (tau_0 included) leaves through a register, so tau_0 and tap 0 at
// base 0 stay aligned: tap k lags tau_0 by (base+k) << oversample bits.
//
// Interface: one 3-level sample per clock; latency 1 clock for all outputs.
module lag_generator
  import corr_pkg::*;
(
  input  logic       clk,
  input  logic       oversample,
  input  logic [3:0] base,       // 0, 4, 8 or 12 (any 0..12 works)
  input  tri_t       t0,
  input  tri_t       tm,
  output tri_t       t0_o,
  output tri_t       taps [4]
);
  tri_t hist [31];   // hist[d] = tm delayed d+1 clocks

  always_ff @(posedge clk) begin
    hist[0] <= tm;
    for (int d = 1; d < 31; d++) hist[d] <= hist[d-1];
    t0_o <= t0;
    for (int k = 0; k < 4; k++) begin
      logic [5:0] dd;
      dd = (6'(base) + 6'(k)) << oversample;
      if (dd > 6'd31) dd = 6'd31;
      taps[k] <= (dd == 6'd0) ? tm : hist[5'(dd - 6'd1)];
    end
  end
endmodule
