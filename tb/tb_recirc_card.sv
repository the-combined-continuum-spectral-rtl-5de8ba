// tb_recirc_card: self-checking test of a recirculator card.
//
// The sine input carries a random 3-level sequence held for N clocks per
// sample, so the one-of-N selector takes each sample exactly once whatever
// its phase. For every pass the test captures the 8192 tau_0 and tau_m
// samples marked by tau_valid and checks, against its own record of the
// input sequence:
//   - tau_0 is 8192 consecutive input samples;
//   - tau_m is the same run shifted back by lag_m samples;
//   - lag_m steps 0, Ls, 2Ls, .. (N-1)Ls and wraps;
//   - the run starts about 10240 - N*Ls samples before the newest input;
//   - each window is exactly 8192 clocks long.
// It also checks the straight-through (continuum) path and that a blanking
// pulse sends the card back through a full refill, and runs N = 4 and N = 1.
module tb_recirc_card;
  import corr_pkg::*;

  localparam int SEQ = 65536;

  logic        clk = 0, rst = 1;
  logic        line = 0, blank = 0;
  logic [3:0]  log2n = 2;
  logic [6:0]  ls = 8;
  tri_t        sin_in, cos_in, sin_out, cos_out;
  logic        tau_valid, running;
  logic [11:0] lag_m;
  int          checks = 0, failures = 0;

  tri_t        seq [SEQ];
  int          nseq = 0;          // samples produced so far
  int          hold = 0;
  tri_t        t0buf [8192], tmbuf [8192];
  int          vcnt = 0;
  int          passes = 0, restarts_seen = 0;
  int          exp_lag = 0;
  int          prev_start = -1;
  int          newest_at_valid;
  tri_t        sin_d1, sin_d2, cos_d1, cos_d2;

  recirc_card dut (
    .clk, .rst, .line, .log2n, .ls, .blank, .sin_in, .cos_in,
    .sin_out, .cos_out, .tau_valid, .lag_m, .running
  );

  always #5 clk = ~clk;

  function automatic tri_t rnd_tri();
    tri_t s;
    int   r = $urandom_range(2);
    s.p = (r == 1);
    s.m = (r == 2);
    return s;
  endfunction

  // stimulus: a new sample every N clocks
  always @(negedge clk) begin
    if (hold == 0) begin
      seq[nseq % SEQ] = rnd_tri();
      sin_in = seq[nseq % SEQ];
      nseq++;
      hold = (1 << log2n) - 1;
    end else hold--;
    cos_in = rnd_tri();
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // straight-through check (2 clocks)
  always @(posedge clk) begin
    sin_d1 <= sin_in; sin_d2 <= sin_d1;
    cos_d1 <= cos_in; cos_d2 <= cos_d1;
  end
  always @(negedge clk) if (!line && !rst && $time > 100)
    check(sin_out == sin_d2 && cos_out == cos_d2, "straight through");

  // capture and check the windows
  always @(posedge clk) begin
    if (tau_valid) begin
      if (vcnt == 0) newest_at_valid = nseq;
      if (vcnt < 8192) begin
        t0buf[vcnt] = sin_out;
        tmbuf[vcnt] = cos_out;
      end
      vcnt++;
    end else if (vcnt != 0) begin
      check_pass();
      vcnt = 0;
    end
  end

  task automatic check_pass();
    int n = 1 << log2n;
    int nls = n * int'(ls);
    int s0 = -1;
    int bad0 = 0, badm = 0;
    check(vcnt == 8192, "window length");
    // find where tau_0 starts in the input record
    for (int k = newest_at_valid - 10500; k < newest_at_valid; k++) begin
      bit ok = 1;
      if (k < 0) continue;
      for (int i = 0; i < 64 && ok; i++) if (seq[(k + i) % SEQ] != t0buf[i]) ok = 0;
      if (ok) begin s0 = k; break; end
    end
    check(s0 >= 0, "tau_0 found in input");
    if (s0 >= 0) begin
      for (int i = 0; i < 8192; i++) begin
        if (seq[(s0 + i) % SEQ] != t0buf[i]) bad0++;
        if (seq[(s0 - int'(lag_m) + i) % SEQ] != tmbuf[i]) badm++;
      end
      check(bad0 == 0, "tau_0 consecutive samples");
      check(badm == 0, "tau_m = tau_0 delayed by lag_m");
      // A* = A + N*Ls: the run starts N*Ls samples after the oldest of 10240
      // newest sample is A plus up to 39 not yet written, plus 3 cycles of run-in
      check((newest_at_valid - s0) >= 10240 - nls &&
            (newest_at_valid - s0) <= 10240 - nls + 120 / n + 41, "start address A*");
      if (prev_start >= 0 && exp_lag != 0)
        check((s0 - prev_start) >= 8280 / n - 40 && (s0 - prev_start) <= 8280 / n + 40,
              "advance between passes");
    end
    check(int'(lag_m) == exp_lag, "lag sequence");
    if (int'(lag_m) != exp_lag) $display("lag %0d expected %0d", lag_m, exp_lag);
    exp_lag = (exp_lag + int'(ls) >= nls) ? 0 : exp_lag + int'(ls);
    prev_start = s0;
    passes++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (300) @(negedge clk);          // continuum: straight through
    line = 1;                              // spectral line, N = 4, Ls = 8
    wait (running);
    wait (passes == 6);
    // blanking-time discontinuity: card must refill, lag restarts at 0
    @(negedge clk) blank = 1;
    repeat (50) @(negedge clk);
    blank = 0;
    wait (!running);
    restarts_seen++;
    check(passes >= 6, "passes before blank");
    // refill takes 10240 samples
    begin
      int t_start;
      t_start = nseq;
      wait (running);
      check(nseq - t_start >= 10240 - 40, "refill length");
    end
    exp_lag = 0; prev_start = -1;
    wait (passes == 10);
    // N = 1, Ls = 16 (100 MHz sampling, 16 lags)
    @(negedge clk) blank = 1;
    wait (!running);
    repeat (400) @(negedge clk);           // let the pass in flight finish
    log2n = 0; ls = 16;
    exp_lag = 0; prev_start = -1;
    repeat (20) @(negedge clk);
    blank = 0;
    wait (passes == 14);
    check(restarts_seen == 1, "restart seen");
    $display("passes=%0d", passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
