// row_decoder: one-hot word-line decoder of a VRAM sub-array.
//
// A VRAM carries two of these, decoder A and decoder B, so that a bit-line
// compute micro-op can raise two word lines in the same cycle; ordinary
// reads and writes use decoder A alone. When en is low no word line is
// raised (the bit lines stay precharged). Purely combinational: the word
// lines follow addr and en within the cycle.
//
// The two decoders follow the sub-array block diagram; their inner
// structure (a plain binary-to-one-hot decode) is this design's choice.
module row_decoder #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned AW   = $clog2(ROWS)
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] wl
);

  always_comb begin
    wl = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      wl[r] = en && (addr == AW'(r));
  end

endmodule
