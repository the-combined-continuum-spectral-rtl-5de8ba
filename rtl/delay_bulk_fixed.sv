// delay_bulk_fixed: first bulk stage of a delay function, a delay of either
// 0 or DEPTH words (the document's 0 or 512 bits on each of the 16 lanes),
// chosen by the most significant bit of the delay program word.
//
// The MOS shift registers of the card are modelled as a circular word
// memory: every word clock the oldest word is read and the new word written
// in its place, which is an exact DEPTH-word delay. With sel low the word
// bypasses the memory. Either way the output is registered, so the stage
// adds one word of latency on top of the programmed 0 or DEPTH words.
//
// Interface: ce is the 6.25 MHz word clock enable; q changes only on ce.
module delay_bulk_fixed #(
  parameter int W     = 16,
  parameter int DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic         sel,   // 1: insert DEPTH words
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      q  <= '0;
    end else if (ce) begin
      q       <= sel ? mem[wp] : d;
      mem[wp] <= d;
      wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
    end
  end
endmodule
