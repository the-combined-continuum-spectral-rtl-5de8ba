// tb_mult_integrator: self-checking test of one multiplier/integrator cell.
// Random 3-level inputs are integrated over 8192-bit windows (dump in the
// same clock as the next window's first bit); each stored result must be
// the reference count (sum of 1 + a*b) with its two LSBs dropped. Also
// checked: a cleared (blanked) window leaves no trace, the result holds
// between dumps, and the 14-bit counter wraps when every product is +1.
module tb_mult_integrator;
  import corr_pkg::*;

  logic clk = 0, rst = 1;
  tri_t a, b;
  logic en = 0, dump = 0, clr = 0;
  logic [11:0] result;
  int   checks = 0, failures = 0;

  mult_integrator dut (.clk, .rst, .a, .b, .en, .dump, .clr, .result);

  always #5 clk = ~clk;

  function automatic tri_t rnd();
    tri_t s; int r = $urandom_range(2);
    s.p = (r == 1); s.m = (r == 2);
    return s;
  endfunction

  function automatic int pv(tri_t s);
    return s.p ? 1 : (s.m ? -1 : 0);
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // one window of n bits; force = 1 makes every product +1
  task automatic window(int n, bit force_max, output int sum);
    sum = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      a = force_max ? 2'b10 : rnd();
      b = force_max ? a : rnd();
      en = 1;
      dump = (i == 0);
      sum += 1 + pv(a) * pv(b);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, s_prev;
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    window(8192, 0, s_prev);
    for (int w = 0; w < 4; w++) begin
      window(8192, 0, s);
      // the dump at the start of this window stored the previous one
      check(result == 12'(s_prev >> 2), "result of window");
      s_prev = s;
    end
    // close the last window
    @(negedge clk); en = 0; dump = 1;
    @(negedge clk); dump = 0;
    check(result == 12'(s_prev >> 2), "last window");
    // hold between dumps
    repeat (50) @(negedge clk);
    check(result == 12'(s_prev >> 2), "result held");
    // blanked window: clr discards 3000 counted bits
    window(3000, 0, s);
    @(negedge clk); en = 0; dump = 0; clr = 1;
    @(negedge clk); clr = 0;
    window(8192, 0, s);
    @(negedge clk); en = 0; dump = 1;
    @(negedge clk); dump = 0;
    check(result == 12'(s >> 2), "window after clear");
    // overflow: 8192 x 2 = 16384 wraps the 14-bit counter to 0
    window(8192, 1, s);
    @(negedge clk); en = 0; dump = 1;
    @(negedge clk); dump = 0;
    check(s == 16384, "reference overflow count");
    check(result == 12'd0, "14-bit counter wraps");
    // 8191 bits of +1 fit: 16382 >> 2 = 4095
    window(8191, 1, s);
    @(negedge clk); en = 0; dump = 1;
    @(negedge clk); dump = 0;
    check(result == 12'd4095, "full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
