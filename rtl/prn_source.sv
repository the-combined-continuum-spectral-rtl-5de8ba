// prn_source: pseudo-random 3-level test signal for the delay line inputs,
// used by the self test that runs during the data-invalid time.
//
// The document names the source but does not define it; this one is a
// 23-bit maximal-length LFSR (x^23 + x^18 + 1) clocked at 100 MHz. Two
// bits of the register decide the sample: 01 gives +1, 10 gives -1, 00 and
// 11 give 0, so the signal is 3-level with zero mean, like sampler data.
//
// Interface: restart reloads the seed, so every antenna fed from copies of
// this source sees the same sequence; dout changes every clock.
module prn_source
  import corr_pkg::*;
#(
  parameter logic [22:0] SEED = 23'h5A5A5A
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  output tri_t dout
);
  logic [22:0] lfsr;

  always_ff @(posedge clk) begin
    if (rst || restart) lfsr <= SEED;
    else                lfsr <= {lfsr[21:0], lfsr[22] ^ lfsr[17]};
  end

  assign dout.p = lfsr[0] & ~lfsr[5];
  assign dout.m = lfsr[5] & ~lfsr[0];
endmodule
