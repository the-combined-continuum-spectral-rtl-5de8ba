// corr_pkg: types and constants shared by the delay, recirculator and
// multiplier blocks of the combined continuum / spectral-line correlator.
//
// A digitised signal is 3-level (2 bits): one wire says "+1", the other says
// "-1", neither says 0. Each of the two wires is delayed and recirculated as
// an independent bit stream, exactly as the hardware carries them on separate
// cards; the multipliers recombine them.
//
// The delay program word is 14 bits of delay (0..16383 steps of 10 ns) split
// as the delay card splits it, plus the stand-by bit. The field split follows
// the delay card description; the field order in the packed word is this
// design's choice.
package corr_pkg;

  // ---------------------------------------------------------------- samples
  typedef struct packed {
    logic p;   // sample is +1
    logic m;   // sample is -1
  } tri_t;

  // Value of a 3-level sample as a small signed number (p&m is treated as 0).
  function automatic logic signed [1:0] tri_val(tri_t s);
    if (s.p && !s.m) return 2'sd1;
    if (s.m && !s.p) return -2'sd1;
    return 2'sd0;
  endfunction

  // Product of two 3-level samples, -1, 0 or +1.
  function automatic logic signed [1:0] tri_mul(tri_t a, tri_t b);
    logic signed [3:0] prod;
    prod = 4'(tri_val(a)) * 4'(tri_val(b));
    return prod[1:0];
  endfunction

  // Index of the four sampler outputs of one antenna in one 50 MHz system.
  localparam int SIG_RS = 0;  // right polarisation, sine
  localparam int SIG_RC = 1;  // right polarisation, cosine
  localparam int SIG_LS = 2;  // left polarisation, sine
  localparam int SIG_LC = 3;  // left polarisation, cosine

  // ------------------------------------------------------------- delay line
  localparam int DLY_LANES      = 16;    // 100 MHz -> 16 x 6.25 MHz
  localparam int DLY_FIXED_LEN  = 512;   // first stage: 0 or 512 words
  localparam int DLY_VAR_MIN    = 513;   // second stage: 513..1024 words
  localparam int DLY_VAR_MAX    = 1024;

  typedef struct packed {
    logic       standby;  // stop the card clocks, output held at 0
    logic       coarse;   // MSB: 0 or 512 words (8192 bits)
    logic [8:0] mid;      // 9 bits: 0..511 words of 16 bits (160 ns)
    logic [1:0] slot40;   // 2 bits: 0..3 x 40 ns
    logic [1:0] slot10;   // 2 bits: 0..3 x 10 ns
  } dly_word_t;

  // Delay in 10 ns steps that a program word asks for (0..16383).
  function automatic int unsigned dly_bits(dly_word_t w);
    return 8192 * int'(w.coarse) + 16 * int'(w.mid) + 4 * int'(w.slot40) + int'(w.slot10);
  endfunction

  // Input multiplexer of one delay function.
  typedef enum logic [1:0] {
    SRC_SAMPLER = 2'd0,
    SRC_PRN     = 2'd1,
    SRC_ALT     = 2'd2,  // second sampler (13-antenna interconnection)
    SRC_SPARE   = 2'd3
  } dly_src_e;

  // ----------------------------------------------------------- recirculator
  localparam int RC_WORD      = 40;     // RAM width (bits per 400 ns cycle)
  localparam int RC_WORDS     = 256;    // RAM depth
  localparam int RC_BITS      = RC_WORD * RC_WORDS;  // 10240
  localparam int RC_PASS_BITS = 8192;   // bits per read pass (integration)
  // RAM cycles per pass: 2 prefetch cycles, 205 cycles that carry the 8192
  // bits, so consecutive passes never need a fourth RAM access in a cycle.
  localparam int RC_PASS_CYC  = 207;

  // Timing shared by all bit slices of a recirculator card.
  typedef struct packed {
    logic        line;      // 1: recirculate (spectral line), 0: straight through
    logic        samp_en;   // one-of-N selector strobe
    logic        s2p_last;  // this sample completes a 40-bit word
    logic        commit;    // take the completed word into the write register
    logic        we;        // write the write register this clock
    logic [7:0]  waddr;
    logic        re0;       // fetch a tau_0 word this clock
    logic [7:0]  raddr0;
    logic        rem;       // fetch a tau_m word this clock
    logic [7:0]  raddrm;
    logic        shift;     // end of a 400 ns cycle: advance the read windows
    logic [5:0]  slot;      // position 0..39 inside the 400 ns cycle
    logic [5:0]  off0;      // bit offset of the tau_0 stream in its window
    logic [5:0]  offm;      // bit offset of the tau_m stream in its window
  } rc_ctl_t;

  // ------------------------------------------------------------- multiplier
  localparam int MUL_ACC_W  = 14;    // on-card integrator
  localparam int MUL_OUT_W  = 12;    // secondary storage (2 LSBs dropped)
  localparam int MUL_INTEG  = 8192;  // bits per integration
  localparam int MUL_CELLS  = 8;     // multipliers per baseline per module
  localparam int MUL_AUTO   = 4;     // driver-board multipliers per antenna
  localparam int NUM_MODULES = 4;

  // The five operating modes.
  typedef enum logic [2:0] {
    MODE_CONTINUUM = 3'd0,
    MODE_SINGLE    = 3'd1,
    MODE_DUAL      = 3'd2,
    MODE_FOUR      = 3'd3,
    MODE_POL       = 3'd4
  } mode_e;

  // IF channels of one antenna: A and C enter system AC, B and D system BD.
  typedef enum logic [1:0] { IF_A = 2'd0, IF_B = 2'd1, IF_C = 2'd2, IF_D = 2'd3 } ifch_e;

  // What one multiplier module is fed with (chosen by the cabling).
  typedef struct packed {
    logic       half0;   // system (0 = AC, 1 = BD) giving tau_0 / R signals
    logic       pol0;    // 0 = R card, 1 = L card, for tau_0
    logic       halfm;   // system giving tau_m
    logic       polm;    // card giving tau_m
    logic       swap_sc; // continuum: feed cosine where sine is expected
    logic [3:0] lag_base;// first lag of this module's lag generator
  } route_t;

endpackage
