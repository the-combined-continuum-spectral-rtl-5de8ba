// tb_combined_system: end-to-end test of the combined system with three
// antennas, from the delay-card inputs to the integration results.
//
// The pseudo-random test signal feeds every delay card of a system, so all
// signals of an antenna are copies of one sequence and the antennas differ
// only by their programmed delays. A baseline whose two delays match (after
// the lag the multiplier adds) then integrates 1 + x*x per bit, the same
// number as an antenna's own zero-lag product; any other pairing gives
// about a quarter less. The phases:
//   1 continuum, delays 5 5 9: baseline 0-1 high, the others low, in all
//     four modules and all eight arrays;
//   2 continuum, sampler (system AC) and second sampler (system BD) inputs
//     held at +1 / -1, antenna 2 in stand-by: every product counts 2, the
//     14-bit integrators overflow to 0, and antenna 2 gives exactly 2048;
//     the duty-cycle integrators then see lines that are always 1
//     (count = V_s) and lines that are never 1 (count 0);
//   3 single band (channel A), N = 1, Ls = 16, delays 10 12 10: the peak of
//     baseline 0-1 is at lag 2 (array 7), of 0-2 at lag 0; with N = 1 every
//     pass has lag 0; blank in mid-run restarts the recirculators;
//   4 single band with N = 2: the 0-1 peak moves to lag 1, and the next
//     pass carries lag 16;
//   5 dual band (A and C): modules 3 and 4 see the L card and must give the
//     numbers modules 1 and 2 give;
//   6 back to continuum.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_combined_system;
  import corr_pkg::*;

  localparam int NANT = 3;
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
  int n_switch = 0, n_restart = 0, n_one_of_n = 0, n_prn = 0, n_alt = 0, n_lagstep = 0, n_duty = 0;

  combined_system #(.NANT(NANT)) dut (.*);

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

    // 2 overflow and stand-by
    load_delays(d_a, SRC_SAMPLER, SRC_ALT, 2);
    blank = 1;
    repeat (8400) @(negedge clk);
    blank = 0;
    wait_dump();
    for (int m = 0; m < 4; m++) begin
      rx(m, 0, 1, 0, v);
      check(v == 0, $sformatf("M%0d overflow of 16384 counts to 0: %0d", m + 1, v));
      ra(m, 1, 0, v);
      check(v == 0, "self product overflow");
      rx(m, 0, 2, 3, v);
      check(v == 2048, $sformatf("M%0d stand-by antenna gives 2048: %0d", m + 1, v));
      ra(m, 2, 1, v);
      check(v == 2048, "stand-by self product");
    end
    n_overflow++; n_standby++; n_alt++; n_cont++;
    // duty cycles of that data-valid period: the lines held at 1 count
    // every bit, stand-by and the unused wire count none
    blank = 1;
    @(negedge clk);
    @(negedge clk);
    check(duty_vs > 24'd8192, "duty V_s covers the data-valid period");
    check(duty_count[0] == duty_vs, "duty: sampler +1 line always on");
    check(duty_count[1] == duty_vs, "duty: second sampler -1 line always on");
    check(duty_count[2] == 24'd0, "duty: stand-by line never on");
    check(duty_count[3] == 24'd0, "duty: unused wire never on");
    n_duty++;

    // 3 single band A, N = 1
    blank = 1;
    load_delays(d_b, SRC_PRN, SRC_PRN, -1);
    mode = MODE_SINGLE; option = 0; log2n = 0; ls = 16;
    n_switch++;
    repeat (8400) @(negedge clk);
    blank = 0;
    line_pass(2, 4, 4'b0001);
    // blank in mid-run: the cards go back to the start and refill
    blank = 1;
    repeat (9000) @(negedge clk);
    check(!rc_running[0][0], "recirculator back at start after blank");
    if (!rc_running[0][0]) n_restart++;
    blank = 0;
    line_pass(2, 4, 4'b0001);

    // 4 one-of-N selector, N = 2
    blank = 1;
    repeat (9000) @(negedge clk);
    log2n = 1;
    repeat (400) @(negedge clk);
    blank = 0;
    line_pass(1, 1, 4'b0001);
    n_one_of_n++;

    // 5 dual band A and C
    blank = 1;
    repeat (9000) @(negedge clk);
    mode = MODE_DUAL; option = 1; log2n = 0;
    n_switch++;
    repeat (400) @(negedge clk);
    blank = 0;
    line_pass(2, 4, 4'b0101);
    for (int c = 0; c < 8; c++) begin
      int v0, v2;
      rx(0, 0, 1, c, v0);
      rx(2, 0, 1, c, v2);
      check(v0 == v2, $sformatf("dual band: L card matches R card, cell %0d", c));
    end

    // 6 back to continuum
    mode = MODE_CONTINUUM;
    n_switch++;
    load_delays(d_a, SRC_PRN, SRC_PRN, -1);
    continuum_delays();

    check(n_cont > 0,      "continuum integration happened");
    check(n_line > 0,      "spectral-line pass happened");
    check(n_overflow > 0,  "integrator overflow happened");
    check(n_standby > 0,   "delay stand-by happened");
    check(n_delay > 0,     "delay program seen in correlation");
    check(n_switch > 0,    "mode switch happened");
    check(n_restart > 0,   "blank restart of the recirculator happened");
    check(n_one_of_n > 0,  "one-of-N selection happened");
    check(n_prn > 0,       "test signal source used");
    check(n_alt > 0,       "second sampler input used");
    check(n_lagstep > 0,   "lag step between passes happened");
    check(n_duty > 0,      "duty-cycle integration happened");
    $display("mechanisms: continuum %0d line %0d overflow %0d standby %0d delay %0d switch %0d restart %0d one-of-N %0d prn %0d alt %0d lagstep %0d duty %0d",
             n_cont, n_line, n_overflow, n_standby, n_delay, n_switch, n_restart, n_one_of_n, n_prn, n_alt, n_lagstep, n_duty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
