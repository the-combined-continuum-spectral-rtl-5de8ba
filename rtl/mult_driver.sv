// mult_driver: the driver stage of one antenna in one multiplier module. It
// re-times the antenna's signals, fans them out to the multiplier cards as
// the eight per-baseline multiplier inputs, and holds the antenna's own
// driver-board multipliers (self, sine*cosine or auto).
//
// For a baseline (i, j), i < j, cell c multiplies a[c] of antenna i by
// b[c] of antenna j:
//   continuum (module cabled with sines on the sine inputs):
//     a = RS LS RS LS RS LS RS LS,  b = RS LS LS RS RC LC LC RC
//     (arrays 1-8: RR, LL, RL, LR, and the four sine*cosine products)
//   spectral line:
//     a = t0 t0 t0 t0 tm+0..tm+3,   b = tm+0..tm+3 t0 t0 t0 t0
//     (four lags of antenna j against i, then four of i against j)
// The four driver-board multipliers compute, in spectral line, the auto
// products t0 x tm+k; in continuum, cell k multiplies RS (k even) or LS
// (k odd) by itself, or by the matching cosine when self_sel[k] is set,
// which gives the self / sine*cosine mixes of the continuum system.
//
// Latency: 2 clocks (lag generator register, output register) on every path.
module mult_driver
  import corr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       line,
  input  logic       oversample,
  input  logic [3:0] lag_base,
  input  logic [3:0] self_sel,
  input  tri_t       cont [4],     // RS RC LS LC as cabled to this module
  input  tri_t       t0,
  input  tri_t       tm,
  input  logic       en,           // from integ_timer, aligned with a/b
  input  logic       dump,
  input  logic       clr,
  output tri_t       a [MUL_CELLS],
  output tri_t       b [MUL_CELLS],
  output logic [MUL_OUT_W-1:0] auto_res [MUL_AUTO]
);
  tri_t t0_l, taps [4];
  tri_t cont_q [4];
  tri_t ax [MUL_AUTO], ay [MUL_AUTO];

  lag_generator u_lag (
    .clk, .oversample, .base(lag_base), .t0, .tm, .t0_o(t0_l), .taps
  );

  always_ff @(posedge clk) begin
    cont_q <= cont;
    if (line) begin
      for (int c = 0; c < 4; c++) begin
        a[c]   <= t0_l;     b[c]   <= taps[c];
        a[c+4] <= taps[c];  b[c+4] <= t0_l;
        ax[c]  <= t0_l;     ay[c]  <= taps[c];
      end
    end else begin
      a[0] <= cont_q[SIG_RS]; b[0] <= cont_q[SIG_RS];
      a[1] <= cont_q[SIG_LS]; b[1] <= cont_q[SIG_LS];
      a[2] <= cont_q[SIG_RS]; b[2] <= cont_q[SIG_LS];
      a[3] <= cont_q[SIG_LS]; b[3] <= cont_q[SIG_RS];
      a[4] <= cont_q[SIG_RS]; b[4] <= cont_q[SIG_RC];
      a[5] <= cont_q[SIG_LS]; b[5] <= cont_q[SIG_LC];
      a[6] <= cont_q[SIG_RS]; b[6] <= cont_q[SIG_LC];
      a[7] <= cont_q[SIG_LS]; b[7] <= cont_q[SIG_RC];
      for (int k = 0; k < MUL_AUTO; k++) begin
        ax[k] <= (k % 2 == 0) ? cont_q[SIG_RS] : cont_q[SIG_LS];
        if (self_sel[k]) ay[k] <= (k % 2 == 0) ? cont_q[SIG_RC] : cont_q[SIG_LC];
        else             ay[k] <= (k % 2 == 0) ? cont_q[SIG_RS] : cont_q[SIG_LS];
      end
    end
  end

  for (genvar k = 0; k < MUL_AUTO; k++) begin : g_auto
    mult_integrator u_auto (
      .clk, .rst, .a(ax[k]), .b(ay[k]), .en, .dump, .clr, .result(auto_res[k])
    );
  end
endmodule
