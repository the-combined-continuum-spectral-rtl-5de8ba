// combined_system: the combined continuum / spectral-line digital delay and
// multiplier system for NANT antennas: two 50 MHz systems (AC and BD), each
// with delay cards and recirculator cards per antenna, four multiplier
// modules, and the cabling that configures them for the five operating
// modes.
//
// Per antenna and system, the sampler delivers four 3-level signals (right
// and left polarisation, sine and cosine components): RS, RC, LS, LC. Each
// goes through a delay card (0..16383 x 10 ns, program word per card, input
// choice of sampler / pseudo-random test signal / second sampler / spare).
// The R card and the L card of the recirculator take the R and L signal
// pairs and either pass them through (continuum) or turn the sine into
// tau_0 and tau_m (spectral line). module_router then cables card outputs to
// the multiplier modules according to mode and option, and every module
// integrates 8192-bit windows into 12-bit results with synchronous blanking.
//
// Interface: sampler inputs one sample per clock (100 MHz); delay program
// words are taken on dly_load; blank is the data-invalid time of the 19.2 Hz
// cycle; results are read from the module picked by rd_module while the next
// integration runs (dump pulses mark new results, res_lag their lag M).
// The spare delay-line input carries no signal (tied to 0); the second
// sampler input is brought out as samp_alt. The four duty-cycle integrators
// of the redundant recirculator can watch any recirculator input line
// (duty_sel); their counts and V_s appear when blank rises (duty_done).
module combined_system
  import corr_pkg::*;
#(
  parameter int NANT = 27,
  parameter int NX   = NANT * (NANT - 1) / 2 * MUL_CELLS,
  parameter int NA   = NANT * MUL_AUTO
) (
  input  logic        clk,
  input  logic        rst,
  // sampler outputs [system][antenna][RS, RC, LS, LC]
  input  tri_t        samp     [2][NANT][4],
  input  tri_t        samp_alt [2][NANT][4],
  // delay programming
  input  logic        dly_load,
  input  dly_word_t   dly_prog [2][NANT][4],
  input  dly_src_e    dly_src  [2],
  input  logic        prn_restart,
  // operating mode
  input  logic        blank,
  input  mode_e       mode,
  input  logic [2:0]  option,
  input  logic [3:0]  log2n,
  input  logic [6:0]  ls,
  input  logic        oversample,
  input  logic [3:0]  self_sel [NUM_MODULES],
  // results
  input  logic [1:0]  rd_module,
  input  logic [$clog2(NX)-1:0] rd_addr,
  output logic [MUL_OUT_W-1:0]  rd_data,
  input  logic [$clog2(NA)-1:0] auto_addr,
  output logic [MUL_OUT_W-1:0]  auto_data,
  output logic [11:0] res_lag    [NUM_MODULES],
  output logic        dump       [NUM_MODULES],
  output logic [15:0] dump_count [NUM_MODULES],
  output logic        rc_running [2][2],
  // duty-cycle integrators: line (system*NANT + antenna)*4 + signal, wire
  input  logic [$clog2(2*NANT*4):0] duty_sel [4],
  output logic [23:0] duty_count [4],
  output logic [23:0] duty_vs,
  output logic        duty_done
);
  tri_t        prn [2];
  tri_t        dly [2][NANT][4];
  tri_t        sin_o [2][2][NANT];
  tri_t        cos_o [2][2][NANT];
  logic        card_valid [2][2][NANT];
  logic [11:0] card_lag   [2][2][NANT];
  logic        card_run   [2][2][NANT];
  logic        valid [2][2];
  logic [11:0] lag   [2][2];
  logic        line;
  logic        card_line [2][2];
  route_t      route [NUM_MODULES];
  tri_t        m_cont [NUM_MODULES][NANT][4];
  tri_t        m_t0   [NUM_MODULES][NANT];
  tri_t        m_tm   [NUM_MODULES][NANT];
  logic        m_valid [NUM_MODULES];
  logic [11:0] m_lag   [NUM_MODULES];
  logic [MUL_OUT_W-1:0] m_rd   [NUM_MODULES];
  logic [MUL_OUT_W-1:0] m_auto [NUM_MODULES];

  for (genvar h = 0; h < 2; h++) begin : g_sys
    prn_source #(.SEED(h == 0 ? 23'h5A5A5A : 23'h3C3C3C)) u_prn (
      .clk, .rst, .restart(prn_restart), .dout(prn[h])
    );

    for (genvar i = 0; i < NANT; i++) begin : g_ant
      for (genvar s = 0; s < 4; s++) begin : g_dly
        delay_card u_dly (
          .clk, .rst, .prog_load(dly_load), .prog_in(dly_prog[h][i][s]),
          .src_in(dly_src[h]), .sampler(samp[h][i][s]), .prn(prn[h]),
          .alt(samp_alt[h][i][s]), .spare('0), .dout(dly[h][i][s])
        );
      end
      for (genvar p = 0; p < 2; p++) begin : g_rc
        recirc_card u_rc (
          .clk, .rst, .line(card_line[h][p]), .log2n, .ls, .blank,
          .sin_in(dly[h][i][2*p]), .cos_in(dly[h][i][2*p+1]),
          .sin_out(sin_o[h][p][i]), .cos_out(cos_o[h][p][i]),
          .tau_valid(card_valid[h][p][i]), .lag_m(card_lag[h][p][i]),
          .running(card_run[h][p][i])
        );
      end
    end

    // all cards of one kind run in lock step; antenna 0 reports timing
    for (genvar p = 0; p < 2; p++) begin : g_tim
      assign valid[h][p]      = card_valid[h][p][0];
      assign lag[h][p]        = card_lag[h][p][0];
      assign rc_running[h][p] = card_run[h][p][0];
    end
  end

  module_router #(.NANT(NANT)) u_route (
    .mode, .option, .sin_o, .cos_o, .valid, .lag,
    .line, .card_line, .route, .cont(m_cont), .t0(m_t0), .tm(m_tm),
    .m_valid, .m_lag
  );

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_mod
    multiplier_module #(.NANT(NANT)) u_mod (
      .clk, .rst, .line, .oversample, .lag_base(route[m].lag_base),
      .self_sel(self_sel[m]), .blank, .rc_valid(m_valid[m]), .rc_lag(m_lag[m]),
      .cont(m_cont[m]), .t0(m_t0[m]), .tm(m_tm[m]),
      .rd_addr, .rd_data(m_rd[m]), .auto_addr, .auto_data(m_auto[m]),
      .res_lag(res_lag[m]), .dump(dump[m]), .dump_count(dump_count[m])
    );
  end

  // the redundant recirculator's duty-cycle integrators watch the
  // recirculator inputs
  tri_t duty_in [2*NANT*4];
  for (genvar h = 0; h < 2; h++) begin : g_dh
    for (genvar i = 0; i < NANT; i++) begin : g_di
      for (genvar s = 0; s < 4; s++) begin : g_ds
        assign duty_in[(h*NANT + i)*4 + s] = dly[h][i][s];
      end
    end
  end

  duty_integrator #(.NIN(2*NANT*4), .NINT(4), .CW(24)) u_duty (
    .clk, .rst, .blank, .din(duty_in), .sel(duty_sel),
    .count(duty_count), .vs(duty_vs), .done(duty_done)
  );

  assign rd_data   = m_rd[rd_module];
  assign auto_data = m_auto[rd_module];
endmodule
