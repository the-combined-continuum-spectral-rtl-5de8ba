// duty_integrator: the four duty-cycle integrators of the redundant
// recirculator. Each integrator is programmed to one digital sampler line
// (any antenna, system and signal, the "+1" or the "-1" wire, as seen at
// the recirculator inputs) and counts the clocks on which that line is 1.
// A common counter counts the bits of the same period (V_s). The ratio of
// the two is the line's duty cycle, from which the sampler level follows.
//
// Integration runs over a whole data-valid period rather than 8192 bits:
// counting runs while blank is low, and when blank rises the counts are
// moved to the result registers (count, vs) and the counters restart;
// done pulses for one clock. Selections are taken when blank is high.
// The number of integrators and the data-valid integration follow the
// description; line selection by index, counter width (24 bits, enough
// for 52 ms at 100 MHz) and the register timing are this design's choice.
//
// Interface: din[NIN] are the 3-level signals at the recirculator inputs,
// sel[k] picks signal sel[k][..:1] and wire sel[k][0] (0 = "+1", 1 = "-1").
module duty_integrator
  import corr_pkg::*;
#(
  parameter int NIN = 216,          // 2 systems x 27 antennas x 4 signals
  parameter int NINT = 4,
  parameter int CW = 24,
  parameter int SW = $clog2(NIN) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          blank,
  input  tri_t          din   [NIN],
  input  logic [SW-1:0] sel   [NINT],
  output logic [CW-1:0] count [NINT],
  output logic [CW-1:0] vs,
  output logic          done
);
  logic [SW-1:0] sel_q [NINT];
  logic [CW-1:0] acc   [NINT];
  logic [CW-1:0] vacc;
  logic          blank_q;
  logic          bit_k [NINT];

  always_comb
    for (int k = 0; k < NINT; k++)
      bit_k[k] = sel_q[k][0] ? din[sel_q[k][SW-1:1]].m : din[sel_q[k][SW-1:1]].p;

  always_ff @(posedge clk) begin
    if (rst) begin
      blank_q <= 1'b1; vacc <= '0; vs <= '0; done <= 1'b0;
      for (int k = 0; k < NINT; k++) begin
        sel_q[k] <= '0; acc[k] <= '0; count[k] <= '0;
      end
    end else begin
      blank_q <= blank;
      done    <= 1'b0;
      if (blank && !blank_q) begin          // end of a data-valid period
        vs   <= vacc;
        vacc <= '0;
        done <= 1'b1;
        for (int k = 0; k < NINT; k++) begin
          count[k] <= acc[k];
          acc[k]   <= '0;
        end
      end else if (!blank) begin
        vacc <= vacc + 1'b1;
        for (int k = 0; k < NINT; k++) acc[k] <= acc[k] + CW'(bit_k[k]);
      end
      if (blank)
        for (int k = 0; k < NINT; k++) sel_q[k] <= sel[k];
    end
  end
endmodule
