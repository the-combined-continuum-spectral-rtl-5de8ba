// delay_serializer: back end of one delay function. The 16 parallel
// 6.25 MHz lanes are turned back into one 100 MHz stream, with the fine part
// of the delay set by when the transfers happen: two program bits pick one of
// four 40 ns times for the 6.25 -> 25 MHz transfer, and two more one of four
// 10 ns times for the 25 -> 100 MHz transfer.
//
// Both timed transfers together shift the stream by 4*slot40 + slot10 bit
// periods (0..15). This model keeps the current and the previous word and,
// at output phase j, sends bit 16 + j - shift of that 32-bit window: a later
// transfer time means older bits, i.e. more delay.
//
// Interface: ce marks the word clock, the clock in which d holds a new word;
// dout is registered and changes every clock while run is high, and is 0
// while run is low (stand-by).
module delay_serializer (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        ce,
  input  logic [15:0] d,
  input  logic [1:0]  slot40,
  input  logic [1:0]  slot10,
  output logic        dout
);
  logic [15:0] cur, prev;
  logic [3:0]  j;
  logic [4:0]  idx;
  logic [31:0] window;

  assign window = {cur, prev};
  assign idx    = 5'd16 + 5'(j) - 5'({slot40, 2'b00} + {2'b00, slot10});

  always_ff @(posedge clk) begin
    if (rst) begin
      cur  <= '0;
      prev <= '0;
      j    <= '0;
      dout <= 1'b0;
    end else if (!run) begin
      dout <= 1'b0;
    end else begin
      if (ce) begin
        cur  <= d;
        prev <= cur;
        j    <= '0;
      end else begin
        j <= j + 4'd1;
      end
      dout <= window[idx];
    end
  end
endmodule
