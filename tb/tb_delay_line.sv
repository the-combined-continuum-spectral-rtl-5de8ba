// tb_delay_line: self-checking test of one delay function. Random bits go
// into the selected input; the output must equal the input from exactly
// 8257 + D clocks earlier, where D = 8192*coarse + 16*mid + 4*slot40 +
// slot10, for a set of program words that exercise each field, the extreme
// values and the input multiplexer. Stand-by must hold the output at 0.
module tb_delay_line;
  import corr_pkg::*;

  localparam int LAT  = 8257;
  localparam int HIST = 32768;

  logic      clk = 0, rst = 1;
  dly_src_e  src;
  logic      din_s, din_p, din_a, din_x;
  dly_word_t prog;
  logic      dout;
  int        checks = 0, failures = 0;
  int        t = 0;
  logic      hist_s [HIST];
  logic      hist_p [HIST];

  delay_line dut (
    .clk, .rst, .src, .din_sampler(din_s), .din_prn(din_p), .din_alt(din_a),
    .din_spare(din_x), .prog, .dout
  );

  always #5 clk = ~clk;

  // stimulus on the falling edge; posedge number t samples hist[t]
  always @(negedge clk) begin
    din_s = 1'($urandom); din_p = 1'($urandom);
    din_a = 1'($urandom); din_x = 1'($urandom);
    hist_s[t % HIST] = din_s;
    hist_p[t % HIST] = din_p;
  end
  always @(posedge clk) t <= t + 1;

  function automatic dly_word_t mkw(int d);
    dly_word_t w;
    w.standby = 0;
    w.coarse  = d[13];
    w.mid     = d[12:4];
    w.slot40  = d[3:2];
    w.slot10  = d[1:0];
    return w;
  endfunction

  task automatic run_delay(int d, bit use_prn);
    int errs = 0;
    src  = use_prn ? SRC_PRN : SRC_SAMPLER;
    prog = mkw(d);
    repeat (LAT + d + 40) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // after posedge t-1, dout holds input sampled at posedge t-1-LAT-d
      begin
        int    k;
        logic  exp;
        k   = t - 1 - LAT - d;
        exp = use_prn ? hist_p[k % HIST] : hist_s[k % HIST];
        checks++;
        if (dout !== exp) begin
          failures++; errs++;
          if (errs < 4) $display("delay %0d: mismatch at t=%0d got %b exp %b", d, t, dout, exp);
        end
      end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = SRC_SAMPLER;
    prog = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    run_delay(0, 0);
    run_delay(1, 0);
    run_delay(3, 0);
    run_delay(4, 0);
    run_delay(15, 0);
    run_delay(16, 0);
    run_delay(37, 0);
    run_delay(16 * 511, 0);
    run_delay(8192, 0);
    run_delay(8192 + 1234, 1);
    run_delay(16383, 0);
    // stand-by: output held at 0
    prog.standby = 1;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      checks++;
      if (dout !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
