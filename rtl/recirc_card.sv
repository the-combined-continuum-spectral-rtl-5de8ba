// recirc_card: one recirculator card with four 100 MHz inputs and four
// 100 MHz outputs: the "+1" and "-1" wires of the sine and cosine samples of
// one IF signal.
//
// In continuum (line = 0) all four inputs pass straight through, two clocks
// later. In spectral line (line = 1) only the two sine wires are used: each
// feeds a recirculator bit slice, and the card's outputs become tau_0 on the
// sine outputs and tau_m on the cosine outputs, as 3-level samples.
// One recirc_control serves both slices, so both wires share addresses.
//
// Interface: sin/cos in as 3-level samples, one per clock; tau_valid and
// lag_m mark the 8192-bit windows of each pass (see recirc_control).
module recirc_card
  import corr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        line,
  input  logic [3:0]  log2n,
  input  logic [6:0]  ls,
  input  logic        blank,
  input  tri_t        sin_in,
  input  tri_t        cos_in,
  output tri_t        sin_out,   // sine or tau_0
  output tri_t        cos_out,   // cosine or tau_m
  output logic        tau_valid,
  output logic [11:0] lag_m,
  output logic        running
);
  rc_ctl_t ctl;

  recirc_control u_ctl (
    .clk, .rst, .line, .log2n, .ls, .blank,
    .ctl, .tau_valid, .lag_m, .filling(), .running
  );

  recirc_slice u_plus (
    .clk, .ctl, .sin_in(sin_in.p), .cos_in(cos_in.p),
    .sin_out(sin_out.p), .cos_out(cos_out.p)
  );

  recirc_slice u_minus (
    .clk, .ctl, .sin_in(sin_in.m), .cos_in(cos_in.m),
    .sin_out(sin_out.m), .cos_out(cos_out.m)
  );
endmodule
