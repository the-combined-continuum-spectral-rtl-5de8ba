// delay_line: one delay function (half of a delay card), delaying one 100 MHz
// bit stream by 0..16383 bit periods (10 ns steps, 163.84 us range) plus a
// fixed pipeline latency.
//
// Signal path, as on the card: a four-way input multiplexer (sampler,
// pseudo-random test source, second sampler for the 13-antenna option,
// spare) -> serial 100 MHz to 16 parallel 6.25 MHz lanes -> 0 or 512 word
// stage (program MSB) -> 513..1024 word stage (nine program bits, 160 ns
// steps) -> timed parallel-to-serial transfers (two bits in 40 ns steps, two
// bits in 10 ns steps) -> 100 MHz output.
//
// Total delay from din to dout is LATENCY + 8192*coarse + 16*mid
// + 4*slot40 + slot10 clocks, LATENCY = 8257: the 513-word minimum of the
// second stage (8208) and 49 clocks of converter and register latency.
// The stand-by bit stops all stages and holds dout at 0; the stages keep
// their contents, so the line needs one full delay to refill after wake-up.
//
// Timing: one bit per clock in and out; changes of the program word take
// effect at once (a program update at 19.2 Hz is expected to fall in the
// data-invalid time).
module delay_line
  import corr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  dly_src_e  src,
  input  logic      din_sampler,
  input  logic      din_prn,
  input  logic      din_alt,
  input  logic      din_spare,
  input  dly_word_t prog,
  output logic      dout
);

  logic        din;
  logic        run;
  logic [15:0] w0, w1, w2;
  logic        ce;

  always_comb begin
    unique case (src)
      SRC_SAMPLER: din = din_sampler;
      SRC_PRN:     din = din_prn;
      SRC_ALT:     din = din_alt;
      default:     din = din_spare;
    endcase
  end

  assign run = !prog.standby;

  delay_deserializer u_deser (
    .clk, .rst, .run, .din, .word_o(w0), .word_ce(ce)
  );

  delay_bulk_fixed #(.W(16), .DEPTH(DLY_FIXED_LEN)) u_fixed (
    .clk, .rst, .ce, .sel(prog.coarse), .d(w0), .q(w1)
  );

  delay_bulk_var #(.W(16), .MIN_LEN(DLY_VAR_MIN), .MAX_LEN(DLY_VAR_MAX), .LW(9)) u_var (
    .clk, .rst, .ce, .len(prog.mid), .d(w1), .q(w2)
  );

  delay_serializer u_ser (
    .clk, .rst, .run, .ce, .d(w2),
    .slot40(prog.slot40), .slot10(prog.slot10), .dout
  );
endmodule
