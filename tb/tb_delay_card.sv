// tb_delay_card: self-checking test of one dual delay line card. Random
// 3-level samples go in on all four inputs; for a series of program words
// (delay, input source, stand-by) the card output must equal the selected
// input LATENCY + delay clocks earlier, on both wires. The program must
// change only on prog_load, and stand-by must hold the output at 0.
module tb_delay_card;
  import corr_pkg::*;

  localparam int LATENCY = 8257;   // fixed part of the delay, in clocks
  localparam int H = 32768;        // history length (power of two)

  logic      clk = 0, rst = 1, prog_load = 0;
  dly_word_t prog_in;
  dly_src_e  src_in;
  tri_t      sampler, prn, alt, spare, dout;
  tri_t      hist [4][H];
  int        t = 0;
  int        checks = 0, failures = 0;

  delay_card dut (.clk, .rst, .prog_load, .prog_in, .src_in, .sampler, .prn, .alt, .spare, .dout);

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", m);
    end
  endtask

  // new random inputs each clock, recorded by time
  always @(negedge clk) begin
    sampler = 2'($urandom);
    prn     = 2'($urandom);
    alt     = 2'($urandom);
    spare   = 2'($urandom);
    hist[0][t % H] = sampler;
    hist[1][t % H] = prn;
    hist[2][t % H] = alt;
    hist[3][t % H] = spare;
    t++;
  end

  // program, let the line fill, then compare n clocks
  task automatic run(int d, dly_src_e s, bit standby, int n);
    dly_word_t w;
    int t0;
    w.standby = standby;
    w.coarse  = 1'(d >> 13);
    w.mid     = 9'(d >> 4);
    w.slot40  = 2'(d >> 2);
    w.slot10  = 2'(d);
    @(negedge clk);
    #1;
    prog_in = w; src_in = s; prog_load = 1;
    @(negedge clk);
    #1;
    prog_load = 0;
    // a new program without prog_load must be ignored
    prog_in = '0; src_in = SRC_SPARE;
    repeat (LATENCY + d + 40) @(negedge clk);
    #1;
    for (int k = 0; k < n; k++) begin
      // hist[t-1] was just driven; the last rising edge took hist[t-2], and
      // dout now shows the sample taken LATENCY + d rising edges earlier
      t0 = t - 2 - LATENCY - d;
      if (standby) check(dout == 2'b00, "stand-by output is 0");
      else check(dout == hist[int'(s)][t0 % H], $sformatf("delay %0d source %0d", d, s));
      @(negedge clk);
      #1;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_in = '0; src_in = SRC_SAMPLER;
    repeat (3) @(negedge clk);
    rst = 0;
    run(0,     SRC_SAMPLER, 0, 300);
    run(23,    SRC_PRN,     0, 300);
    run(1000,  SRC_ALT,     0, 300);
    run(8195,  SRC_SPARE,   0, 300);
    run(16383, SRC_SAMPLER, 0, 300);
    run(50,    SRC_SAMPLER, 1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
