// module_router: the cabling of the combined system. It decides, from the
// operating mode and its option, which recirculator card feeds each of the
// four multiplier modules, and switches the signals accordingly; in spectral
// line modes that use the other system's modules the switched path stands
// for the cable between systems AC and BD at the recirculator output.
//
// IF channels: A and C enter system AC (R and L cards), B and D system BD.
//   continuum   M1, M2 <- AC, M3, M4 <- BD; M2 and M4 get cosines on their
//               sine inputs, so they form the cosine products
//   single band option 0..3 = A, B, C, D into all four modules, lags
//               0-3, 4-7, 8-11, 12-15
//   dual band   option 0..5 = AB, AC, AD, BC, BD, CD; the system AC
//               channel into M1, M2 (lags 0-7), the system BD channel into
//               M3, M4; the cable between systems is needed only for AC
//               and BD, where the second channel goes to the other
//               system's modules
//   four band   A, C, B, D into M1..M4, lags 0-3 each
//   polarization option 0 = A (R) and C (L), 1 = B (R) and D (L):
//               M1 RxR, M2 RxL, M3 LxR, M4 LxL, lags 0-3
// card_line tells each card whether it recirculates (used in a spectral
// line mode) or passes data through.
//
// Purely combinational.
module module_router
  import corr_pkg::*;
#(
  parameter int NANT = 27
) (
  input  mode_e       mode,
  input  logic [2:0]  option,
  // card outputs: [system][card: 0 = R, 1 = L][antenna]
  input  tri_t        sin_o [2][2][NANT],
  input  tri_t        cos_o [2][2][NANT],
  input  logic        valid [2][2],
  input  logic [11:0] lag   [2][2],
  output logic        line,
  output logic        card_line [2][2],
  output route_t      route [NUM_MODULES],
  output tri_t        cont  [NUM_MODULES][NANT][4],
  output tri_t        t0    [NUM_MODULES][NANT],
  output tri_t        tm    [NUM_MODULES][NANT],
  output logic        m_valid [NUM_MODULES],
  output logic [11:0] m_lag   [NUM_MODULES]
);
  // IF channel -> {system, card}
  function automatic logic [1:0] chan(ifch_e c);
    unique case (c)
      IF_A:    return 2'b00;
      IF_B:    return 2'b10;
      IF_C:    return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic route_t mk(logic [1:0] src0, logic [1:0] srcm, logic [3:0] base);
    route_t r;
    r.half0 = src0[1]; r.pol0 = src0[0];
    r.halfm = srcm[1]; r.polm = srcm[0];
    r.swap_sc = 1'b0;
    r.lag_base = base;
    return r;
  endfunction

  ifch_e      first, second;
  logic [1:0] r, l;

  always_comb begin
    card_line = '{default: '0};
    m_valid   = '{default: '0};
    m_lag     = '{default: '0};
    t0        = '{default: '0};
    tm        = '{default: '0};
    cont      = '{default: '0};
    r = option[0] ? chan(IF_B) : chan(IF_A);
    l = option[0] ? chan(IF_D) : chan(IF_C);
    line = (mode != MODE_CONTINUUM);
    unique case (option)
      3'd0: begin first = IF_A; second = IF_B; end
      3'd1: begin first = IF_A; second = IF_C; end
      3'd2: begin first = IF_A; second = IF_D; end
      3'd3: begin first = IF_C; second = IF_B; end   // each on its own system
      3'd4: begin first = IF_B; second = IF_D; end
      default: begin first = IF_C; second = IF_D; end
    endcase

    for (int m = 0; m < NUM_MODULES; m++) route[m] = '0;
    unique case (mode)
      MODE_SINGLE: begin
        for (int m = 0; m < NUM_MODULES; m++)
          route[m] = mk(chan(ifch_e'(option[1:0])), chan(ifch_e'(option[1:0])), 4'(4 * m));
      end
      MODE_DUAL: begin
        route[0] = mk(chan(first),  chan(first),  4'd0);
        route[1] = mk(chan(first),  chan(first),  4'd4);
        route[2] = mk(chan(second), chan(second), 4'd0);
        route[3] = mk(chan(second), chan(second), 4'd4);
      end
      MODE_FOUR: begin
        route[0] = mk(chan(IF_A), chan(IF_A), 4'd0);
        route[1] = mk(chan(IF_C), chan(IF_C), 4'd0);
        route[2] = mk(chan(IF_B), chan(IF_B), 4'd0);
        route[3] = mk(chan(IF_D), chan(IF_D), 4'd0);
      end
      MODE_POL: begin
        route[0] = mk(r, r, 4'd0);
        route[1] = mk(r, l, 4'd0);
        route[2] = mk(l, r, 4'd0);
        route[3] = mk(l, l, 4'd0);
      end
      default: begin  // continuum
        for (int m = 0; m < NUM_MODULES; m++) begin
          route[m].half0   = (m >= 2);
          route[m].halfm   = (m >= 2);
          route[m].swap_sc = (m % 2 == 1);
        end
      end
    endcase

    if (line)
      for (int m = 0; m < NUM_MODULES; m++) begin
        card_line[route[m].half0][route[m].pol0] = 1'b1;
        card_line[route[m].halfm][route[m].polm] = 1'b1;
      end

    for (int m = 0; m < NUM_MODULES; m++) begin
      m_valid[m] = valid[route[m].half0][route[m].pol0];
      m_lag[m]   = lag[route[m].half0][route[m].pol0];
      for (int i = 0; i < NANT; i++) begin
        t0[m][i] = sin_o[route[m].half0][route[m].pol0][i];
        tm[m][i] = cos_o[route[m].halfm][route[m].polm][i];
        if (!route[m].swap_sc) begin
          cont[m][i][SIG_RS] = sin_o[route[m].half0][0][i];
          cont[m][i][SIG_RC] = cos_o[route[m].half0][0][i];
          cont[m][i][SIG_LS] = sin_o[route[m].half0][1][i];
          cont[m][i][SIG_LC] = cos_o[route[m].half0][1][i];
        end else begin
          cont[m][i][SIG_RS] = cos_o[route[m].half0][0][i];
          cont[m][i][SIG_RC] = sin_o[route[m].half0][0][i];
          cont[m][i][SIG_LS] = cos_o[route[m].half0][1][i];
          cont[m][i][SIG_LC] = sin_o[route[m].half0][1][i];
        end
      end
    end
  end
endmodule
