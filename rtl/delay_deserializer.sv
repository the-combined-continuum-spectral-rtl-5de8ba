// delay_deserializer: front end of one delay function. The 100 MHz serial
// bit stream is split into four 25 MHz paths, and each 25 MHz path into four
// 6.25 MHz paths, giving sixteen parallel lanes that the slow bulk-delay
// stages can handle.
//
// Lane i of an output word holds the bit that arrived in phase i of the
// 16-clock word period, so bit 0 is the oldest. A 4-bit nibble register plays
// the part of the 100->25 MHz converter and the 16-bit assembly register the
// four 25->6.25 MHz converters.
//
// Interface: one bit per clock on din while run is high (run low freezes the
// converter, the card's stand-by). word_o is updated on the edge that takes
// the 16th bit; word_ce is high for the one clock that follows, and marks the
// 6.25 MHz word clock for all later stages.
module delay_deserializer (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        din,
  output logic [15:0] word_o,
  output logic        word_ce
);
  logic [3:0]  ph;      // phase inside the 16-bit word period
  logic [2:0]  nib;     // 100 MHz -> 25 MHz converter (first three bits)
  logic [11:0] lanes;   // 25 MHz -> 6.25 MHz converters (first three nibbles)

  always_ff @(posedge clk) begin
    if (rst) begin
      ph      <= '0;
      nib     <= '0;
      lanes   <= '0;
      word_o  <= '0;
      word_ce <= 1'b0;
    end else begin
      word_ce <= 1'b0;
      if (run) begin
        ph <= ph + 4'd1;
        if (ph[1:0] != 2'd3)
          nib[ph[1:0]] <= din;
        else if (ph[3:2] != 2'd3)
          lanes[4*ph[3:2] +: 4] <= {din, nib};
        else begin
          word_o  <= {din, nib, lanes};
          word_ce <= 1'b1;
        end
      end
    end
  end
endmodule
