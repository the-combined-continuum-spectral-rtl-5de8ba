// recirc_slice: one bit of a recirculator (the recirculator block diagram
// shows one bit). The sine input goes through an input flip-flop, the
// one-of-N selector and a 40-bit serial to parallel converter into a 10240
// bit RAM (256 x 40); two parallel to serial converters read it back as two
// 100 MHz streams, tau_0 (undelayed) and tau_m (lag M later in the data).
// A LINE/CONT switch picks, for each output flip-flop, either the
// recirculated stream (LINE) or the straight-through input (CONT): the
// sine-or-tau_0 output and the cosine-or-tau_m output.
//
// Each parallel to serial converter keeps an 80-bit window of two RAM words
// and sends bit (offset + slot) of it, so a stream can start at any bit
// address although the RAM is read in whole words once per 400 ns cycle.
// All timing comes from recirc_control through ctl.
//
// Latency: CONT mode, 2 clocks from input to output; LINE mode, see
// recirc_control (tau_valid is aligned with these outputs).
module recirc_slice
  import corr_pkg::*;
(
  input  logic    clk,
  input  rc_ctl_t ctl,
  input  logic    sin_in,
  input  logic    cos_in,
  output logic    sin_out,   // sine (CONT) or tau_0 (LINE)
  output logic    cos_out    // cosine (CONT) or tau_m (LINE)
);
  logic              sin_ff, cos_ff;
  logic [38:0]       sr;
  logic [39:0]       hold, wreg;
  logic [39:0]       mem [RC_WORDS];
  logic [39:0]       f0, fm;
  logic [39:0]       cur0, nxt0, curm, nxtm;
  logic [79:0]       win0, winm;
  logic [6:0]        i0, im;

  assign win0 = {nxt0, cur0};
  assign winm = {nxtm, curm};
  assign i0   = 7'(ctl.off0) + 7'(ctl.slot);
  assign im   = 7'(ctl.offm) + 7'(ctl.slot);

  always_ff @(posedge clk) begin
    sin_ff <= sin_in;
    cos_ff <= cos_in;

    // one-of-N selector feeding the serial to parallel converter
    if (ctl.samp_en) begin
      sr <= {sin_ff, sr[38:1]};
      if (ctl.s2p_last) hold <= {sin_ff, sr};
    end
    if (ctl.commit) wreg <= hold;

    // RAM: one write and two reads per 400 ns cycle
    if (ctl.we)  mem[ctl.waddr] <= wreg;
    if (ctl.re0) f0 <= mem[ctl.raddr0];
    if (ctl.rem) fm <= mem[ctl.raddrm];

    // parallel to serial converters
    if (ctl.shift) begin
      cur0 <= nxt0;  nxt0 <= f0;
      curm <= nxtm;  nxtm <= fm;
    end

    // LINE / CONT switch and output flip-flops
    sin_out <= ctl.line ? win0[i0] : sin_ff;
    cos_out <= ctl.line ? winm[im] : cos_ff;
  end
endmodule
