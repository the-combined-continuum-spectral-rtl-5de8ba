// multiplier_module: one multiplier module: the drivers of all NANT antennas,
// the cross-multiplier arrays for all NANT*(NANT-1)/2 baselines (eight
// multipliers each, with on-card integration), the driver-board multipliers
// (four per antenna) and the synchronous blanking timer.
//
// Cross cell c of baseline (i, j), i < j, has readout index
// bl*8 + c, where bl numbers the baselines (0,1), (0,2), ..., (0,N-1),
// (1,2), ... ; driver-board multiplier k of antenna i has index i*4 + k.
// See mult_driver for what each cell multiplies in each mode.
//
// Every 8192-bit integration ends with a one-clock dump that moves all the
// 12-bit results into secondary storage; they stay readable, through rd_addr
// / rd_data (combinational), until the next dump. res_lag is the lag M of
// the recirculator pass the stored results belong to (0 in continuum);
// dump_count counts dumps.
module multiplier_module
  import corr_pkg::*;
#(
  parameter int NANT = 27,
  parameter int NBL  = NANT * (NANT - 1) / 2,
  parameter int NX   = NBL * MUL_CELLS,
  parameter int NA   = NANT * MUL_AUTO
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        line,
  input  logic        oversample,
  input  logic [3:0]  lag_base,
  input  logic [3:0]  self_sel,
  input  logic        blank,
  input  logic        rc_valid,
  input  logic [11:0] rc_lag,
  input  tri_t        cont [NANT][4],
  input  tri_t        t0   [NANT],
  input  tri_t        tm   [NANT],
  input  logic [$clog2(NX)-1:0] rd_addr,
  output logic [MUL_OUT_W-1:0]  rd_data,
  input  logic [$clog2(NA)-1:0] auto_addr,
  output logic [MUL_OUT_W-1:0]  auto_data,
  output logic [11:0] res_lag,
  output logic        dump,
  output logic [15:0] dump_count
);
  logic en, clr;
  tri_t a [NANT][MUL_CELLS];
  tri_t b [NANT][MUL_CELLS];
  logic [MUL_OUT_W-1:0] xres [NX];
  logic [MUL_OUT_W-1:0] ares [NANT][MUL_AUTO];

  integ_timer #(.LAT(2)) u_timer (
    .clk, .rst, .line, .blank, .valid_in(rc_valid), .lag_in(rc_lag),
    .en, .dump, .clr, .res_lag, .dump_count
  );

  for (genvar i = 0; i < NANT; i++) begin : g_drv
    mult_driver u_drv (
      .clk, .rst, .line, .oversample, .lag_base, .self_sel,
      .cont(cont[i]), .t0(t0[i]), .tm(tm[i]), .en, .dump, .clr,
      .a(a[i]), .b(b[i]), .auto_res(ares[i])
    );
  end

  for (genvar i = 0; i < NANT; i++) begin : g_i
    for (genvar j = i + 1; j < NANT; j++) begin : g_j
      localparam int BL = i * NANT - (i * (i + 1)) / 2 + (j - i - 1);
      for (genvar c = 0; c < MUL_CELLS; c++) begin : g_c
        mult_integrator u_cell (
          .clk, .rst, .a(a[i][c]), .b(b[j][c]), .en, .dump, .clr,
          .result(xres[BL * MUL_CELLS + c])
        );
      end
    end
  end

  assign rd_data   = (32'(rd_addr) < NX) ? xres[rd_addr] : '0;
  assign auto_data = (32'(auto_addr) < NA)
                   ? ares[32'(auto_addr) / MUL_AUTO][32'(auto_addr) % MUL_AUTO] : '0;
endmodule
