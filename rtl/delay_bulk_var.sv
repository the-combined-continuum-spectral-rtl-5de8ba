// delay_bulk_var: second bulk stage of a delay function, a delay of
// MIN_LEN + len words, that is 513 to 1024 words per lane at the defaults,
// set in one-word (160 ns at 100 MHz) steps by nine bits of the program word.
//
// The card builds this from two paths of 512-bit MOS shift registers whose
// duty cycle and clock are varied; this model keeps the behaviour (a delay
// adjustable in one-word steps) and builds it as a circular buffer of
// MAX_LEN words read MIN_LEN + len words behind the write pointer. The read
// happens before the write in the same clock, so len = MAX_LEN - MIN_LEN
// reads the word being replaced. The output register adds one word of
// latency, as in delay_bulk_fixed.
//
// Interface: ce is the word clock enable; q changes only on ce.
module delay_bulk_var #(
  parameter int W       = 16,
  parameter int MIN_LEN = 513,
  parameter int MAX_LEN = 1024,
  parameter int LW      = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  logic [LW-1:0] len,   // 0 .. MAX_LEN-MIN_LEN
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);
  localparam int AW = $clog2(MAX_LEN);

  logic [W-1:0]  mem [MAX_LEN];
  logic [AW-1:0] wp;
  logic [AW-1:0] rp;
  logic [AW:0]   total;

  always_comb begin
    total = (AW+1)'(MIN_LEN) + (AW+1)'(len);
    if (total > (AW+1)'(MAX_LEN)) total = (AW+1)'(MAX_LEN);
    // rp = wp - total modulo MAX_LEN
    if ({1'b0, wp} >= total) rp = AW'({1'b0, wp} - total);
    else                     rp = AW'({1'b0, wp} + (AW+1)'(MAX_LEN) - total);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      q  <= '0;
    end else if (ce) begin
      q       <= mem[rp];
      mem[wp] <= d;
      wp      <= (wp == AW'(MAX_LEN - 1)) ? '0 : wp + 1'b1;
    end
  end
endmodule
