// tb_duty_integrator: self-checking test of the duty-cycle integrators.
// Eight 3-level inputs carry random samples whose +1 / -1 probabilities
// differ per input. Four integrators watch different lines over several
// data-valid periods of random length; after each period the counts and
// V_s must equal the numbers counted here, and a new selection made in
// blank must apply from the next period on.
module tb_duty_integrator;
  import corr_pkg::*;

  localparam int NIN = 8, NINT = 4, CW = 24, SW = $clog2(NIN) + 1;

  logic          clk = 0, rst = 1, blank = 1;
  tri_t          din [NIN];
  logic [SW-1:0] sel [NINT];
  logic [CW-1:0] count [NINT], vs;
  logic          done;
  int            checks = 0, failures = 0;
  int            exp_c [NINT], exp_v;

  duty_integrator #(.NIN(NIN), .NINT(NINT), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", m);
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
    for (int i = 0; i < NIN; i++) din[i] = '0;
    for (int k = 0; k < NINT; k++) sel[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int period = 0; period < 12; period++) begin
      int len;
      // new selection during blank
      for (int k = 0; k < NINT; k++) sel[k] = SW'($urandom_range(2 * NIN - 1));
      repeat (3) @(negedge clk);
      len = 500 + $urandom_range(3000);
      for (int k = 0; k < NINT; k++) exp_c[k] = 0;
      exp_v = 0;
      blank = 0;
      for (int t = 0; t < len; t++) begin
        for (int i = 0; i < NIN; i++) begin
          int r;
          r = $urandom_range(99);
          // input i: +1 with probability 5(i+1) %, -1 with 30 %
          din[i].p = (r < 5 * (i + 1));
          din[i].m = (r >= 70);
        end
        exp_v++;
        for (int k = 0; k < NINT; k++)
          exp_c[k] += sel[k][0] ? int'(din[sel[k][SW-1:1]].m) : int'(din[sel[k][SW-1:1]].p);
        @(negedge clk);
      end
      blank = 1;
      @(negedge clk);
      check(done == 1'b1, "done at the end of the data-valid period");
      check(int'(vs) == exp_v, $sformatf("V_s %0d vs %0d", vs, exp_v));
      for (int k = 0; k < NINT; k++)
        check(int'(count[k]) == exp_c[k], $sformatf("period %0d integrator %0d: %0d vs %0d", period, k, count[k], exp_c[k]));
      @(negedge clk);
      check(done == 1'b0, "done is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
