// tb_module_router: self-checking test of the mode cabling. Every card
// output of every antenna gets a random sample; for each mode and option
// the testbench looks up, from its own table of IF channels per module,
// which card each module must see, and compares the tau_0, tau_m and
// continuum inputs, the valid / lag signals, the lag bases and the
// recirculate flags of the cards.
module tb_module_router;
  import corr_pkg::*;

  localparam int NANT = 2;

  mode_e       mode;
  logic [2:0]  option;
  tri_t        sin_o [2][2][NANT], cos_o [2][2][NANT];
  logic        valid [2][2];
  logic [11:0] lag [2][2];
  logic        line;
  logic        card_line [2][2];
  route_t      route [NUM_MODULES];
  tri_t        cont [NUM_MODULES][NANT][4];
  tri_t        t0 [NUM_MODULES][NANT], tm [NUM_MODULES][NANT];
  logic        m_valid [NUM_MODULES];
  logic [11:0] m_lag [NUM_MODULES];
  int          checks = 0, failures = 0;

  module_router #(.NANT(NANT)) dut (.*);

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", m);
    end
  endtask

  // IF letter -> system (0 = AC, 1 = BD) and card (0 = R, 1 = L)
  function automatic int sys_of(byte c); return int'(c == "B" || c == "D"); endfunction
  function automatic int pol_of(byte c); return int'(c == "C" || c == "D"); endfunction

  // expected tau_0 / tau_m channel of module m and its first lag
  task automatic expect_line(mode_e md, int opt, int m, output byte c0, output byte cm, output int base);
    static string single = "ABCD";
    // channel into M1, M2 then channel into M3, M4; a channel stays on its
    // own system's modules unless both are on one system
    static string dual [6] = '{"AB", "AC", "AD", "CB", "BD", "CD"};
    static string four = "ACBD";
    case (md)
      MODE_SINGLE: begin c0 = single[opt]; cm = c0; base = 4 * m; end
      MODE_DUAL:   begin c0 = dual[opt][m / 2]; cm = c0; base = 4 * (m % 2); end
      MODE_FOUR:   begin c0 = four[m]; cm = c0; base = 0; end
      default: begin  // polarization: RR RL LR LL
        byte r, l;
        r = (opt == 0) ? "A" : "B";
        l = (opt == 0) ? "C" : "D";
        c0 = (m < 2) ? r : l;
        cm = (m % 2 == 0) ? r : l;
        base = 0;
      end
    endcase
  endtask

  task automatic randomize_inputs();
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < 2; p++) begin
        valid[s][p] = 1'($urandom);
        lag[s][p]   = 12'($urandom);
        for (int i = 0; i < NANT; i++) begin
          sin_o[s][p][i] = 2'($urandom);
          cos_o[s][p][i] = 2'($urandom);
        end
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static mode_e modes [4] = '{MODE_SINGLE, MODE_DUAL, MODE_FOUR, MODE_POL};
    static int    nopt  [4] = '{4, 6, 1, 2};
    for (int rep = 0; rep < 20; rep++) begin
      // spectral-line modes
      for (int k = 0; k < 4; k++)
        for (int o = 0; o < nopt[k]; o++) begin
          bit used [2][2];
          randomize_inputs();
          mode = modes[k]; option = 3'(o);
          #1;
          check(line == 1'b1, "line flag");
          used = '{default: 0};
          for (int m = 0; m < 4; m++) begin
            byte c0, cm; int base;
            expect_line(modes[k], o, m, c0, cm, base);
            used[sys_of(c0)][pol_of(c0)] = 1; used[sys_of(cm)][pol_of(cm)] = 1;
            check(route[m].lag_base == 4'(base), $sformatf("mode %0d opt %0d M%0d lag base", k, o, m + 1));
            check(m_valid[m] == valid[sys_of(c0)][pol_of(c0)], "valid");
            check(m_lag[m] == lag[sys_of(c0)][pol_of(c0)], "lag");
            for (int i = 0; i < NANT; i++) begin
              check(t0[m][i] == sin_o[sys_of(c0)][pol_of(c0)][i], $sformatf("mode %0d opt %0d M%0d tau0", k, o, m + 1));
              check(tm[m][i] == cos_o[sys_of(cm)][pol_of(cm)][i], $sformatf("mode %0d opt %0d M%0d taum", k, o, m + 1));
            end
          end
          for (int s = 0; s < 2; s++)
            for (int p = 0; p < 2; p++)
              check(card_line[s][p] == used[s][p], "card recirculate flag");
        end
      // continuum: M1, M2 from AC, M3, M4 from BD; M2, M4 sine <-> cosine
      randomize_inputs();
      mode = MODE_CONTINUUM; option = 0;
      #1;
      check(line == 1'b0, "continuum flag");
      for (int s = 0; s < 2; s++)
        for (int p = 0; p < 2; p++) check(card_line[s][p] == 1'b0, "cards pass through");
      for (int m = 0; m < 4; m++)
        for (int i = 0; i < NANT; i++) begin
          int s;
          bit sw;
          s = m / 2;
          sw = (m % 2 == 1);
          check(cont[m][i][SIG_RS] == (sw ? cos_o[s][0][i] : sin_o[s][0][i]), "RS");
          check(cont[m][i][SIG_RC] == (sw ? sin_o[s][0][i] : cos_o[s][0][i]), "RC");
          check(cont[m][i][SIG_LS] == (sw ? cos_o[s][1][i] : sin_o[s][1][i]), "LS");
          check(cont[m][i][SIG_LC] == (sw ? sin_o[s][1][i] : cos_o[s][1][i]), "LC");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
