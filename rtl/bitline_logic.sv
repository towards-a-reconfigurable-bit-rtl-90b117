// bitline_logic: sense amplifiers of a VRAM sub-array.
//
// On a read or bit-line compute (sense_en high) every column's amplifiers
// sample its two bit lines at the clock edge: sa_and takes BL (the stored
// value for a one-row read, the AND of two rows for a bit-line compute) and
// sa_nor takes BLB (its complement, or the NOR of two rows). The outputs
// hold until the next sense, so one bit-line compute can feed several
// following write-back or mask micro-ops. Reset clears them.
//
// The document's amplifiers are reconfigurable single-ended/differential
// analog circuits; only their logic function, a pair of latching samplers
// per column, is modelled here.
module bitline_logic #(
  parameter int unsigned COLS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sense_en,
  input  logic [COLS-1:0] bl,
  input  logic [COLS-1:0] blb,
  output logic [COLS-1:0] sa_and,
  output logic [COLS-1:0] sa_nor
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_and <= '0;
      sa_nor <= '0;
    end else if (sense_en) begin
      sa_and <= bl;
      sa_nor <= blb;
    end
  end

endmodule
