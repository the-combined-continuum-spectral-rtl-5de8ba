// tb_multiplier_module: self-checking test of a multiplier module with three
// antennas (three baselines, 24 cross cells, 12 driver-board cells).
// Spectral line: random tau_0 / tau_m per antenna, lag base 4, windows
// marked by rc_valid; every cross and auto result is compared with a
// reference correlation computed here from the inputs (lag of tap k is
// base + k bits). Repeated with oversampling (lags doubled).
// Continuum: random RS RC LS LC per antenna, one 8192-bit window started
// by the end of blank; the eight arrays and the self / sine*cosine cells
// are compared with the reference products.
module tb_multiplier_module;
  import corr_pkg::*;

  localparam int NANT = 3;
  localparam int NX = 24, NA = 12;
  localparam int L = 2000;   // spectral-line window length used here

  logic        clk = 0, rst = 1, line = 0, oversample = 0, blank = 1, rc_valid = 0;
  logic [3:0]  lag_base = 4, self_sel = 4'b0101;
  logic [11:0] rc_lag = 0;
  tri_t        cont [NANT][4];
  tri_t        t0 [NANT], tm [NANT];
  logic [4:0]  rd_addr;
  logic [11:0] rd_data, auto_data;
  logic [3:0]  auto_addr;
  logic [11:0] res_lag;
  logic        dump;
  logic [15:0] dump_count;
  int          checks = 0, failures = 0;

  tri_t hc [8300][NANT][4];
  tri_t h0 [8300][NANT];
  tri_t hm [8300][NANT];

  multiplier_module #(.NANT(NANT)) dut (
    .clk, .rst, .line, .oversample, .lag_base, .self_sel, .blank, .rc_valid, .rc_lag,
    .cont, .t0, .tm, .rd_addr, .rd_data, .auto_addr, .auto_data,
    .res_lag, .dump, .dump_count
  );

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
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", m);
    end
  endtask

  // drive n clocks of random data, recording them from index 40 on
  task automatic drive(int n, bit valid);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      for (int i = 0; i < NANT; i++) begin
        t0[i] = rnd(); tm[i] = rnd();
        for (int s = 0; s < 4; s++) cont[i][s] = rnd();
        h0[t][i] = t0[i]; hm[t][i] = tm[i];
        for (int s = 0; s < 4; s++) hc[t][i][s] = cont[i][s];
      end
      rc_valid = valid && (t >= 40);
    end
  endtask

  task automatic line_window(bit os, int lagv);
    int d;
    oversample = os;
    rc_lag = 12'(lagv);
    drive(40 + L, 1);
    @(negedge clk); rc_valid = 0;
    repeat (10) @(negedge clk);
    check(res_lag == 12'(lagv), "result lag");
    for (int i = 0; i < NANT; i++)
      for (int j = i + 1; j < NANT; j++)
        for (int c = 0; c < 8; c++) begin
          int sum = 0;
          int bl = i * NANT - i * (i + 1) / 2 + (j - i - 1);
          d = (4 + c % 4) << os;
          for (int t = 40; t < 40 + L; t++)
            if (c < 4) sum += 1 + pv(h0[t][i]) * pv(hm[t - d][j]);
            else       sum += 1 + pv(hm[t - d][i]) * pv(h0[t][j]);
          rd_addr = 5'(bl * 8 + c);
          #1;
          check(rd_data == 12'(sum >> 2), $sformatf("line cross %0d-%0d cell %0d", i, j, c));
        end
    for (int i = 0; i < NANT; i++)
      for (int k = 0; k < 4; k++) begin
        int sum = 0;
        d = (4 + k) << os;
        for (int t = 40; t < 40 + L; t++) sum += 1 + pv(h0[t][i]) * pv(hm[t - d][i]);
        auto_addr = 4'(i * 4 + k);
        #1;
        check(auto_data == 12'(sum >> 2), "line auto");
      end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NANT; i++) begin
      t0[i] = '0; tm[i] = '0;
      for (int s = 0; s < 4; s++) cont[i][s] = '0;
    end
    rd_addr = 0; auto_addr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // spectral line
    line = 1; blank = 0;
    line_window(0, 32);
    line_window(1, 64);
    check(dump_count == 16'd2, "two line dumps");
    // continuum: one window of 8192 from the end of blank
    line = 0; blank = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 8192; t++) begin
      @(negedge clk);
      blank = 0;
      for (int i = 0; i < NANT; i++)
        for (int s = 0; s < 4; s++) begin
          cont[i][s] = rnd();
          hc[t][i][s] = cont[i][s];
        end
    end
    @(negedge clk);
    blank = 1;
    repeat (10) @(negedge clk);
    check(dump_count == 16'd3, "continuum dump");
    for (int i = 0; i < NANT; i++)
      for (int j = i + 1; j < NANT; j++)
        for (int c = 0; c < 8; c++) begin
          // arrays 1-8 of module 1: RR LL RL LR, R sin*cos, L sin*cos, ...
          static int xa [8] = '{SIG_RS, SIG_LS, SIG_RS, SIG_LS, SIG_RS, SIG_LS, SIG_RS, SIG_LS};
          static int yb [8] = '{SIG_RS, SIG_LS, SIG_LS, SIG_RS, SIG_RC, SIG_LC, SIG_LC, SIG_RC};
          int sum, bl;
          sum = 0;
          bl = i * NANT - i * (i + 1) / 2 + (j - i - 1);
          for (int t = 0; t < 8192; t++) sum += 1 + pv(hc[t][i][xa[c]]) * pv(hc[t][j][yb[c]]);
          rd_addr = 5'(bl * 8 + c);
          #1;
          check(rd_data == 12'(sum >> 2), $sformatf("continuum cross %0d-%0d array %0d", i, j, c + 1));
        end
    for (int i = 0; i < NANT; i++)
      for (int k = 0; k < 4; k++) begin
        int x, y, sum;
        x = (k % 2 == 0) ? SIG_RS : SIG_LS;
        y = self_sel[k] ? ((k % 2 == 0) ? SIG_RC : SIG_LC) : x;
        sum = 0;
        for (int t = 0; t < 8192; t++) sum += 1 + pv(hc[t][i][x]) * pv(hc[t][i][y]);
        auto_addr = 4'(i * 4 + k);
        #1;
        check(auto_data == 12'(sum >> 2), "continuum self / sin*cos");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
