// integ_timer: the synchronous blanking of a multiplier module's driver
// stage. It decides, clock by clock, which bits the module's integrators
// count, so that every integration is exactly 8192 bits.
//
// Spectral line: the recirculator marks its 8192-bit windows (valid_in);
// the integration runs while valid_in is high and is dumped the clock after
// it falls, labelled with the lag M of that pass.
// Continuum: free-running 8192-bit windows while blank is low. Blank
// discards the window in progress (clr) and the next window starts when
// blank falls. A window that completed on the clock before blank rises is
// still dumped.
//
// Interface: en/dump/clr and res_lag are delayed by LAT clocks to match the
// driver pipeline that the data goes through; dump_count counts dumps.
module integ_timer
  import corr_pkg::*;
#(
  parameter int LAT   = 2,
  parameter int INTEG = MUL_INTEG
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        line,
  input  logic        blank,
  input  logic        valid_in,
  input  logic [11:0] lag_in,
  output logic        en,
  output logic        dump,
  output logic        clr,
  output logic [11:0] res_lag,
  output logic [15:0] dump_count
);
  localparam int CW = $clog2(INTEG);

  logic [CW-1:0] cnt;
  logic          inwin;     // continuum: a window is in progress
  logic          valid_q;
  logic [11:0]   lag_q;
  logic          en_c, dump_c, clr_c;
  logic [LAT-1:0] en_d, dump_d, clr_d;
  logic [11:0]   lag_d [LAT];

  always_comb begin
    if (line) begin
      en_c   = valid_in;
      dump_c = valid_q && !valid_in;
      clr_c  = 1'b0;
    end else begin
      en_c   = !blank;
      dump_c = inwin && (cnt == '0);   // a full window ended last clock
      clr_c  = inwin && blank && (cnt != '0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; inwin <= 1'b0; valid_q <= 1'b0; lag_q <= '0;
      en_d <= '0; dump_d <= '0; clr_d <= '0; dump_count <= '0;
      for (int i = 0; i < LAT; i++) lag_d[i] <= '0;
    end else begin
      valid_q <= valid_in;
      if (valid_in) lag_q <= lag_in;
      if (line || blank) begin
        cnt   <= '0;
        inwin <= 1'b0;
      end else begin
        cnt   <= cnt + 1'b1;          // wraps after INTEG bits
        inwin <= 1'b1;
      end
      en_d     <= {en_d[LAT-2:0], en_c};
      dump_d   <= {dump_d[LAT-2:0], dump_c};
      clr_d    <= {clr_d[LAT-2:0], clr_c};
      lag_d[0] <= line ? lag_q : '0;
      for (int i = 1; i < LAT; i++) lag_d[i] <= lag_d[i-1];
      if (dump_d[LAT-1]) dump_count <= dump_count + 16'd1;
    end
  end

  assign en   = en_d[LAT-1];
  assign dump = dump_d[LAT-1];
  assign clr  = clr_d[LAT-1];

  always_ff @(posedge clk) begin
    if (rst)                res_lag <= '0;
    else if (dump_d[LAT-1]) res_lag <= lag_d[LAT-1];
  end
endmodule
