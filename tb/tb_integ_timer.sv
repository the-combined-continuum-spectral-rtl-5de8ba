// tb_integ_timer: self-checking test of the synchronous blanking timer.
// Continuum: every window between dumps must hold exactly 8192 enabled
// clocks, blank must clear the window in progress and stop counting.
// Spectral line: en must follow valid_in two clocks later, dump must come
// right after each window with res_lag equal to the window's lag.
module tb_integ_timer;
  import corr_pkg::*;

  logic        clk = 0, rst = 1, line = 0, blank = 1, valid_in = 0;
  logic [11:0] lag_in = 0;
  logic        en, dump, clr;
  logic [11:0] res_lag;
  logic [15:0] dump_count;
  int          checks = 0, failures = 0;
  int          ens = 0, clrs = 0, dumps = 0;
  logic        vq1, vq2;

  integ_timer dut (.clk, .rst, .line, .blank, .valid_in, .lag_in,
                   .en, .dump, .clr, .res_lag, .dump_count);

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // count enabled clocks per window (outputs are not defined during reset)
  always @(posedge clk) begin
    if (!rst && clr) begin clrs++; ens = 0; end
    if (!rst && dump) begin
      dumps++;
      check(ens == 8192, "8192 bits per integration");
      ens = 0;
    end
    if (!rst && en) ens++;
    vq1 <= valid_in; vq2 <= vq1;
    if (line && !rst) begin
      checks++;
      if (en != vq2) failures++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    blank = 0;                          // continuum: three full windows
    repeat (3 * 8192 + 100) @(negedge clk);
    check(dumps == 3, "three continuum dumps");
    blank = 1;                          // blank in the middle of a window
    repeat (20) @(negedge clk);
    check(clrs == 1, "blank clears the window");
    check(!en, "no counting while blanked");
    blank = 0;
    repeat (8192 + 10) @(negedge clk);
    check(dumps == 4, "window after blank");
    blank = 1;
    repeat (10) @(negedge clk);
    ens = 0;
    // spectral line: three 8192-bit windows with lags 0, 16, 32
    line = 1; blank = 0;
    for (int w = 0; w < 3; w++) begin
      repeat (100) @(negedge clk);
      lag_in = 12'(16 * w);
      valid_in = 1;
      repeat (8192) @(negedge clk);
      valid_in = 0;
      lag_in = 12'hfff;
      repeat (5) @(negedge clk);
      check(res_lag == 12'(16 * w), "lag of stored result");
    end
    check(dumps == 7, "line dumps");
    check(dump_count == 16'd7, "dump counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
