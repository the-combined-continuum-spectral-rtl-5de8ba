// tb_combined_system_full: the end-to-end test of tb_combined_system run on
// the combined system at its default size (27 antennas, 351 baselines, all
// parameters at their defaults). Antennas 2 to 26 share antenna 2's delay;
// the checks read the baselines of antennas 0, 1 and 2 in every module.
// The test signal feeds every delay card; antennas 0 and 1 get equal
// delays, so baseline 0-1 integrates 1 + x*x per bit. Two phases:
//   1 continuum, delays 5 5 9 ...: baseline 0-1 high in all four modules
//     and all eight arrays, baselines 0-2 and 1-2 low;
//   2 switch to single band (channel A), N = 1, Ls = 16, delays 10 12 10
//     ...: after the recirculators fill, the first pass puts the 0-1 peak
//     at lag 2 and the 0-2 peak at lag 0; the next pass keeps lag 0.
// The mechanisms seen are counted; the three-antenna test covers the rest
// (overflow, stand-by, blank restart, one-of-N, dual band).
module tb_combined_system_full;
  import corr_pkg::*;

  localparam int NANT = 27;   // the default size of the top
  localparam int NX = NANT * (NANT - 1) / 2 * MUL_CELLS;
  localparam int NA = NANT * MUL_AUTO;
  localparam int HIGH = 2800;   // 1 + x*x: about 3072
  localparam int LOW  = 2300;   // unrelated samples: about 2048 or less

  logic        clk = 0, rst = 1;
  tri_t        samp [2][NANT][4], samp_alt [2][NANT][4];
  logic        dly_load = 0;
  dly_word_t   dly_prog [2][NANT][4];
  dly_src_e    dly_src [2];
  logic        prn_restart = 0, blank = 1;
  mode_e       mode = MODE_CONTINUUM;
  logic [2:0]  option = 0;
  logic [3:0]  log2n = 0;
  logic [6:0]  ls = 7'd16;
  logic        oversample = 0;
  logic [3:0]  self_sel [NUM_MODULES];
  logic [1:0]  rd_module = 0;
  logic [$clog2(NX)-1:0] rd_addr = 0;
  logic [MUL_OUT_W-1:0]  rd_data, auto_data;
  logic [$clog2(NA)-1:0] auto_addr = 0;
  logic [11:0] res_lag [NUM_MODULES];
  logic        dump [NUM_MODULES];
  logic [15:0] dump_count [NUM_MODULES];
  logic        rc_running [2][2];
  logic [$clog2(2*NANT*4):0] duty_sel [4];
  logic [23:0] duty_count [4], duty_vs;
  logic        duty_done;

  int checks = 0, failures = 0;
  int n_cont = 0, n_line = 0, n_overflow = 0, n_standby = 0, n_delay = 0;
  int n_switch = 0, n_restart = 0, n_one_of_n = 0, n_prn = 0, n_alt = 0, n_lagstep = 0;

  combined_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", m);
    end
  endtask

  function automatic int bl(int i, int j);
    return i * NANT - i * (i + 1) / 2 + (j - i - 1);
  endfunction

  task automatic rx(int m, int i, int j, int c, output int v);
    int a;
    a = bl(i, j) * 8 + c;
    rd_module = 2'(m); rd_addr = a[$clog2(NX)-1:0];
    #1 v = int'(rd_data);
  endtask
  task automatic ra(int m, int i, int k, output int v);
    int a;
    a = i * 4 + k;
    rd_module = 2'(m); auto_addr = a[$clog2(NA)-1:0];
    #1 v = int'(auto_data);
  endtask

  // program all delay cards: delay d[i] for antenna i, optional stand-by
  task automatic load_delays(int d [NANT], dly_src_e s0, dly_src_e s1, int standby_ant);
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < NANT; i++)
        for (int s = 0; s < 4; s++) begin
          dly_prog[h][i][s].standby = (i == standby_ant);
          dly_prog[h][i][s].coarse  = 1'(d[i] >> 13);
          dly_prog[h][i][s].mid     = 9'(d[i] >> 4);
          dly_prog[h][i][s].slot40  = 2'(d[i] >> 2);
          dly_prog[h][i][s].slot10  = 2'(d[i]);
        end
    dly_src[0] = s0; dly_src[1] = s1;
    @(negedge clk); dly_load = 1; prn_restart = 1;
    @(negedge clk); dly_load = 0; prn_restart = 0;
  endtask

  task automatic wait_dump();
    @(negedge clk);
    while (!dump[0]) @(negedge clk);
    @(negedge clk);
  endtask

  // continuum: after a fresh window from the end of blank, check
  // baseline 0-1 against the others in every module and array
  task automatic continuum_delays();
    int v, a0;
    blank = 1;
    repeat (8400) @(negedge clk);   // delay lines filled with the new program
    blank = 0;
    wait_dump();
    n_cont++;
    for (int m = 0; m < 4; m++) begin
      ra(m, 0, 0, a0);
      check(a0 > HIGH, $sformatf("continuum M%0d antenna 0 self %0d", m + 1, a0));
      for (int c = 0; c < 8; c++) begin
        rx(m, 0, 1, c, v);
        check(v == a0, $sformatf("continuum M%0d 0-1 array %0d: %0d vs %0d", m + 1, c + 1, v, a0));
        rx(m, 0, 2, c, v);
        check(v < LOW, $sformatf("continuum M%0d 0-2 array %0d: %0d", m + 1, c + 1, v));
        rx(m, 1, 2, c, v);
        check(v < LOW, $sformatf("continuum M%0d 1-2 array %0d: %0d", m + 1, c + 1, v));
      end
    end
    n_delay++; n_prn++;
  endtask

  // spectral line: pass with lag 0 on the R card of system AC; peak of
  // baseline 0-1 at lag p (array 4 + p of module 1), 0-2 at lag 0
  task automatic line_pass(int p, int mods, bit [3:0] base0);
    int v, a0, a1;
    // wait for a pass with lag 0
    do wait_dump(); while (res_lag[0] != 12'd0);
    n_line++;
    for (int m = 0; m < mods; m++) begin
      check(res_lag[m] == 12'd0, "lag of pass");
      ra(m, 0, 0, a0);
      ra(m, 1, 0, a1);
      check(!base0[m] || a0 > HIGH, $sformatf("line M%0d antenna 0 lag 0: %0d", m + 1, a0));
      for (int c = 0; c < 8; c++) begin
        bit first;
        first = base0[m];             // modules with lag base 0
        rx(m, 0, 1, c, v);
        if (first && c == 4 + p) check(v == a1, $sformatf("line M%0d 0-1 peak %0d vs %0d", m + 1, v, a1));
        else check(v < LOW, $sformatf("line M%0d 0-1 cell %0d: %0d", m + 1, c, v));
        rx(m, 0, 2, c, v);
        if (first && (c == 0 || c == 4)) check(v == a0, $sformatf("line M%0d 0-2 lag 0: %0d vs %0d", m + 1, v, a0));
        else check(v < LOW, $sformatf("line M%0d 0-2 cell %0d: %0d", m + 1, c, v));
      end
    end
    n_delay++;
    // the next pass carries lag Ls, or lag 0 again when N = 1
    wait_dump();
    if (log2n == 0) check(res_lag[0] == 12'd0, $sformatf("N = 1 keeps lag 0: %0d", res_lag[0]));
    else begin
      check(res_lag[0] == 12'(ls), $sformatf("lag step: %0d", res_lag[0]));
      for (int c = 0; c < 8; c++) begin
        rx(0, 0, 1, c, v);
        check(v < LOW, "no peak at lag Ls");
      end
      n_lagstep++;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    int d_a [NANT], d_b [NANT];
    for (int i = 0; i < NANT; i++) begin
      d_a[i] = (i < 2) ? 5 : 9;      // antennas past 2 as antenna 2
      d_b[i] = (i == 1) ? 12 : 10;
    end
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < NANT; i++)
        for (int s = 0; s < 4; s++) begin
          samp[h][i][s] = 2'b10;       // +1
          samp_alt[h][i][s] = 2'b01;   // -1
          dly_prog[h][i][s] = '0;
        end
    for (int m = 0; m < 4; m++) self_sel[m] = 4'b0000;
    // duty-cycle lines: AC antenna 0 RS "+1", BD antenna 0 RS "-1",
    // AC antenna 2 RS "+1", AC antenna 0 RS "-1"
    duty_sel[0] = '0;
    duty_sel[1] = ($clog2(2*NANT*4)+1)'(2 * (NANT * 4) + 1);
    duty_sel[2] = ($clog2(2*NANT*4)+1)'(2 * 8);
    duty_sel[3] = ($clog2(2*NANT*4)+1)'(1);
    dly_src = '{SRC_PRN, SRC_PRN};
    repeat (3) @(negedge clk);
    rst = 0;

    // 1 continuum with the test signal
    load_delays(d_a, SRC_PRN, SRC_PRN, -1);
    continuum_delays();

    // 2 single band A, N = 1: one spectral-line run
    blank = 1;
    load_delays(d_b, SRC_PRN, SRC_PRN, -1);
    mode = MODE_SINGLE; option = 0; log2n = 0; ls = 16;
    n_switch++;
    repeat (8400) @(negedge clk);
    blank = 0;
    line_pass(2, 4, 4'b0001);

    check(n_cont > 0,      "continuum integration happened");
    check(n_line > 0,      "spectral-line pass happened");
    check(n_delay > 0,     "delay program seen in correlation");
    check(n_switch > 0,    "mode switch happened");
    check(n_prn > 0,       "test signal source used");
    $display("mechanisms: continuum %0d line %0d overflow %0d standby %0d delay %0d switch %0d restart %0d one-of-N %0d prn %0d alt %0d lagstep %0d",
             n_cont, n_line, n_overflow, n_standby, n_delay, n_switch, n_restart, n_one_of_n, n_prn, n_alt, n_lagstep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
