// tb_prn_source: self-checking test of the pseudo-random test signal.
// A reference 23-bit shift register with taps 23 and 18 is run beside the
// source and must give the same 3-level samples; a restart must bring the
// sequence back to its start; over one full period (2^23 - 1 clocks) the
// register must not return to the seed early, and the samples must be +1
// and -1 a quarter of the time each and never both.
module tb_prn_source;
  import corr_pkg::*;

  localparam logic [22:0] SEED = 23'h5A5A5A;
  localparam int PERIOD = (1 << 23) - 1;

  logic clk = 0, rst = 1, restart = 0;
  tri_t dout;
  int   checks = 0, failures = 0;
  logic [22:0] ref_sr;
  tri_t first [64];

  prn_source #(.SEED(SEED)) dut (.clk, .rst, .restart, .dout);

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", m);
    end
  endtask

  // next state of the reference: new bit = x23 xor x18 enters at the bottom
  function automatic logic [22:0] step(logic [22:0] s);
    return (s << 1) | 23'(s[22] ^ s[17]);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, nm, nb, early;
    repeat (2) @(negedge clk);
    rst = 0;
    ref_sr = SEED;
    for (int t = 0; t < 2000; t++) begin
      check(dout.p == (ref_sr[0] && !ref_sr[5]) && dout.m == (ref_sr[5] && !ref_sr[0]), "sample vs reference");
      if (t < 64) first[t] = dout;
      @(negedge clk);
      ref_sr = step(ref_sr);
    end
    restart = 1;
    @(negedge clk);
    restart = 0;
    for (int t = 0; t < 64; t++) begin
      check(dout == first[t], "restart repeats the sequence");
      @(negedge clk);
    end
    // one period from a restart
    restart = 1;
    @(negedge clk);
    restart = 0;
    np = 0; nm = 0; nb = 0; early = 0;
    for (int t = 0; t < PERIOD; t++) begin
      if (t > 0 && dut.lfsr == SEED) early++;
      np += int'(dout.p); nm += int'(dout.m); nb += int'(dout.p && dout.m);
      @(negedge clk);
    end
    check(dut.lfsr == SEED, "period is 2^23 - 1");
    check(early == 0, "no shorter period");
    check(nb == 0, "never +1 and -1 at once");
    check(np > PERIOD / 4 - 2000 && np < PERIOD / 4 + 2000, "+1 a quarter of the time");
    check(nm > PERIOD / 4 - 2000 && nm < PERIOD / 4 + 2000, "-1 a quarter of the time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
