// recirc_control: timing and address generator of one recirculator card,
// shared by the card's bit slices (recirc_slice), following the recirculator
// flow chart.
//
// The RAM is 256 words of 40 bits (10240 bits). Time is divided into 400 ns
// cycles of 40 clocks; each cycle has one potential write and two reads:
//   slot 0  a completed 40-bit input word is committed to the write register
//   slot 1  read one tau_0 word       slot 2  read one tau_m word
//   slot 3  write the committed word at the write address A
// Reads come before the write, so at N = 1 a word can be read in the same
// cycle in which it is overwritten.
//
// Input side: the one-of-N selector takes every N-th 100 MHz bit
// (N = 2^log2n, 1..256); 40 selected bits make a word.
// Flow: START (A = 0, L = 0; waits while blank is high) -> FILL (write
// 10240 bits at the sample rate) -> RUN, entered at a cycle boundary: back-to-back passes of RC_PASS_CYC
// cycles. A pass starting with write pointer A reads 8192 bits from
// A* = A + N*Ls for tau_0 and from A* - L for tau_m, while writing goes on.
// After each pass L = L + Ls, back to 0 when it reaches N*Ls. If blank was
// seen during a pass (a blanking-time discontinuity) the card returns to
// START at the end of the pass.
//
// A pass fetches the word before A* (40 bits of look-back, used by the lag
// generators) and then 206 words, so its 8192 output bits appear from the
// fourth cycle of the pass on; tau_valid marks them (aligned with the slice
// outputs) and lag_m gives the L they were read with. 88 of the pass's 8280
// bit periods carry no data.
//
// Line = 0 (continuum) keeps the card in START: the slices pass data
// straight through and the RAM side stands by.
module recirc_control
  import corr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        line,
  input  logic [3:0]  log2n,   // recirculation factor N = 2^log2n, 0..8
  input  logic [6:0]  ls,      // lag step Ls (4, 8, 16, 32; doubled when oversampling)
  input  logic        blank,   // data-invalid time
  output rc_ctl_t     ctl,
  output logic        tau_valid,
  output logic [11:0] lag_m,
  output logic        filling,
  output logic        running
);
  typedef enum logic [1:0] { S_START, S_FILL, S_RUN } st_e;

  st_e         st;
  logic [5:0]  slot;
  logic [8:0]  sp;          // one-of-N phase
  logic [5:0]  sidx;        // index of the next sample in its 40-bit word
  logic        hold_full;
  logic        wpend;
  logic [7:0]  wa;          // next word to write (A / 40)
  logic [8:0]  wcount;      // words written during FILL
  logic [7:0]  pc;          // 400 ns cycle inside the pass
  logic [11:0] lag;         // L
  logic [11:0] pass_lag;
  logic [7:0]  fa0, fam;    // next words to fetch
  logic [5:0]  noff0, noffm;
  logic [5:0]  off0, offm;
  logic        blank_seen;
  logic        oact;
  logic [12:0] ocnt;

  logic [8:0]  n_val;
  logic [12:0] nls;         // N * Ls, limited to the 2048-bit lag range
  logic        samp_en, s2p_last, commit;
  logic        pass_start;
  logic [7:0]  a_next;
  logic [14:0] s0_raw;
  logic [13:0] s0, sm;
  logic [7:0]  w0_0, w0_m;

  always_comb begin
    n_val    = 9'd1 << log2n;
    nls      = 13'(ls) << log2n;
    if (nls > 13'd2048) nls = 13'd2048;
    samp_en  = (st != S_START) && (sp == 9'd0);
    s2p_last = samp_en && (sidx == 6'd39);
    commit   = (st != S_START) && (slot == 6'd0) && hold_full;
    pass_start = (st == S_RUN) && (slot == 6'd0) && (pc == 8'd0);
    a_next   = wa + 8'(commit);
    s0_raw   = 15'(a_next) * 15'd40 + 15'(nls);
    s0       = (s0_raw >= 15'(RC_BITS)) ? 14'(s0_raw - 15'(RC_BITS)) : s0_raw[13:0];
    sm       = (s0 >= 14'(lag)) ? (s0 - 14'(lag)) : (s0 + 14'(RC_BITS) - 14'(lag));
    w0_0     = 8'(s0 / 14'd40);
    w0_m     = 8'(sm / 14'd40);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_START; slot <= '0; sp <= '0; sidx <= '0; hold_full <= 1'b0;
      wpend <= 1'b0; wa <= '0; wcount <= '0; pc <= '0; lag <= '0; pass_lag <= '0;
      fa0 <= '0; fam <= '0; noff0 <= '0; noffm <= '0; off0 <= '0; offm <= '0;
      blank_seen <= 1'b0; oact <= 1'b0; ocnt <= '0; lag_m <= '0; tau_valid <= 1'b0;
    end else begin
      slot      <= (slot == 6'd39) ? 6'd0 : slot + 6'd1;
      tau_valid <= oact;

      // one-of-N selector and 40-bit serial to parallel word count
      if (st == S_START) begin
        sp <= '0; sidx <= '0; hold_full <= 1'b0;
      end else begin
        sp <= (sp == n_val - 9'd1) ? 9'd0 : sp + 9'd1;
        if (samp_en) sidx <= (sidx == 6'd39) ? 6'd0 : sidx + 6'd1;
        if (s2p_last)    hold_full <= 1'b1;
        else if (commit) hold_full <= 1'b0;
      end

      // write side
      if (commit) wpend <= 1'b1;
      if (slot == 6'd3 && wpend) begin
        wpend <= 1'b0;
        wa    <= wa + 8'd1;
        if (st == S_FILL) wcount <= wcount + 9'd1;
      end

      // read side: a pass starts at slot 0 of its first cycle
      if (pass_start) begin
        fa0      <= w0_0 - 8'd1;
        fam      <= w0_m - 8'd1;
        noff0    <= 6'(s0 - 14'(w0_0) * 14'd40);
        noffm    <= 6'(sm - 14'(w0_m) * 14'd40);
        pass_lag <= lag;
      end
      if (slot == 6'd2 && st == S_RUN) begin
        fa0 <= fa0 + 8'd1;
        fam <= fam + 8'd1;
      end
      if (slot == 6'd39 && st == S_RUN) begin
        pc <= (pc == 8'(RC_PASS_CYC - 1)) ? 8'd0 : pc + 8'd1;
        if (pc == 8'd0) begin
          off0 <= noff0;
          offm <= noffm;
        end
        if (pc == 8'd2) begin
          oact  <= 1'b1;
          ocnt  <= '0;
          lag_m <= pass_lag;
        end
      end

      // output window of 8192 bits
      if (oact) begin
        ocnt <= ocnt + 13'd1;
        if (ocnt == 13'(RC_PASS_BITS - 1)) oact <= 1'b0;
      end

      // flow chart
      if (blank) blank_seen <= 1'b1;
      unique case (st)
        S_START: begin
          wa <= '0; lag <= '0; wcount <= '0; pc <= '0; wpend <= 1'b0;
          if (line && !blank) begin
            st         <= S_FILL;
            blank_seen <= 1'b0;
          end
        end
        S_FILL: begin
          if (!line || blank) st <= S_START;
          else if (wcount == 9'(RC_WORDS) && slot == 6'd39) begin
            st <= S_RUN;
            pc <= '0;
          end
        end
        S_RUN: begin
          if (slot == 6'd39 && pc == 8'(RC_PASS_CYC - 1)) begin
            lag <= (lag + 12'(ls) >= 12'(nls)) ? 12'd0 : lag + 12'(ls);
            if (blank_seen || blank || !line) st <= S_START;
          end
        end
        default: st <= S_START;
      endcase
    end
  end

  assign filling = (st == S_FILL);
  assign running = (st == S_RUN);

  always_comb begin
    ctl          = '0;
    ctl.line     = line;
    ctl.samp_en  = samp_en;
    ctl.s2p_last = s2p_last;
    ctl.commit   = commit;
    ctl.we       = (slot == 6'd3) && wpend;
    ctl.waddr    = wa;
    ctl.re0      = (st == S_RUN) && (slot == 6'd1);
    ctl.raddr0   = fa0;
    ctl.rem      = (st == S_RUN) && (slot == 6'd2);
    ctl.raddrm   = fam;
    ctl.shift    = (slot == 6'd39);
    ctl.slot     = slot;
    ctl.off0     = off0;
    ctl.offm     = offm;
  end
endmodule
