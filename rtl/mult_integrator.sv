// mult_integrator: one correlator cell of a multiplier card: a 3-level by
// 3-level multiplier followed by the on-card integrator and its secondary
// storage.
//
// Each enabled clock the counter advances by 1 + a*b, that is by 0, 1 or 2,
// so 8192 bits give a 14-bit count centred on 8192. (Counting by two on every
// one of 8192 bits would need 16384, one more than 14 bits hold; the counter
// then wraps, as the hardware would.) At dump the count is truncated by its
// two noise-only LSBs and the remaining 12 bits go into secondary storage,
// where they can be read out during the next integration while the counter
// starts again. clr discards a partial integration (synchronous blanking).
//
// Interface: en, dump and clr are synchronous. dump may come in the same
// clock as the first en of the next integration. result changes only on dump.
module mult_integrator
  import corr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  tri_t                 a,
  input  tri_t                 b,
  input  logic                 en,
  input  logic                 dump,
  input  logic                 clr,
  output logic [MUL_OUT_W-1:0] result
);
  logic [MUL_ACC_W-1:0] acc;
  logic [MUL_ACC_W-1:0] inc;

  always_comb begin
    logic signed [1:0] p;
    p = tri_mul(a, b);
    unique case (p)
      2'sd1:   inc = MUL_ACC_W'(2);
      -2'sd1:  inc = MUL_ACC_W'(0);
      default: inc = MUL_ACC_W'(1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      result <= '0;
    end else begin
      if (dump) result <= acc[MUL_ACC_W-1 -: MUL_OUT_W];
      if (dump || clr) acc <= en ? inc : '0;
      else if (en)     acc <= acc + inc;
    end
  end
endmodule
