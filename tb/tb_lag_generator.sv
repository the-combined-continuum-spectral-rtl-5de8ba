// tb_lag_generator: self-checking test of the lag generator. Random tau_0
// and tau_m streams go in; tau_0 must come out one clock later and tap k
// must be tau_m delayed by 1 + (base + k) << oversample clocks, for every
// base used by the modes and with and without oversampling.
module tb_lag_generator;
  import corr_pkg::*;

  logic       clk = 0;
  logic       oversample = 0;
  logic [3:0] base = 0;
  tri_t       t0, tm, t0_o, taps [4];
  tri_t       h0 [64], hm [64];
  int         t = 0, checks = 0, failures = 0;

  lag_generator dut (.clk, .oversample, .base, .t0, .tm, .t0_o, .taps);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    t0 = 2'($urandom); tm = 2'($urandom);
    h0[t % 64] = t0; hm[t % 64] = tm;
  end
  always @(posedge clk) t <= t + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int os = 0; os < 2; os++)
      for (int bb = 0; bb <= 12; bb += 4) begin
        @(negedge clk);
        oversample = 1'(os); base = 4'(bb);
        repeat (40) @(negedge clk);
        for (int n = 0; n < 100; n++) begin
          @(negedge clk);
          // outputs were set at posedge t-1 from inputs of posedge t-1
          checks++;
          if (t0_o != h0[(t - 1) % 64]) failures++;
          for (int k = 0; k < 4; k++) begin
            int d;
            d = (bb + k) << os;
            checks++;
            if (taps[k] != hm[(t - 1 - d + 64) % 64]) begin
              failures++;
              if (failures < 5) $display("tap %0d base %0d os %0d wrong", k, bb, os);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
