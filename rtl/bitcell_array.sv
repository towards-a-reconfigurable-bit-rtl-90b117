// bitcell_array: the 6T SRAM bitcell array of a VRAM sub-array.
//
// ROWS x COLS cells. Writes: at the clock edge every row whose word line A
// is raised takes wdata in the columns where wmask is 1 (the SRAM's native
// write mask). Reads: each column has a true bit line BL and a complement
// bit line BLB, both precharged high. A cell holding 0 discharges BL, a
// cell holding 1 discharges BLB. With two word lines raised (A and B) BL
// stays high only if both cells hold 1 (AND) and BLB stays high only if
// both hold 0 (NOR); with one word line raised BL/BLB are the stored value
// and its complement. bl/blb are combinational from the word lines and the
// cells; the bitline logic samples them.
//
// The bit-line compute behaviour follows the description of the design; the
// cells themselves are an analog array, modelled here as a register array
// with no reset (an SRAM powers up with unknown contents).
module bitcell_array #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 256
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl_a,
  input  logic [ROWS-1:0] wl_b,
  input  logic            we,
  input  logic [COLS-1:0] wdata,
  input  logic [COLS-1:0] wmask,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb
);

  logic [COLS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < ROWS; r++)
      if (we && wl_a[r])
        cells[r] <= (cells[r] & ~wmask) | (wdata & wmask);
  end

  always_comb begin
    bl  = '1;
    blb = '1;
    for (int unsigned r = 0; r < ROWS; r++)
      if (wl_a[r] || wl_b[r]) begin
        bl  = bl  &  cells[r];
        blb = blb & ~cells[r];
      end
  end

endmodule
