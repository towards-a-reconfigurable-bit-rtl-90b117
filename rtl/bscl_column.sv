// bscl_column: one column of bit-serial compute logic (BSCL).
//
// Each column of a bit-serial VRAM is a 1-bit ALU working on one element
// whose bits are stored in successive rows. The column holds:
//  * bus logic and XOR/XNOR logic (bus_logic);
//  * ADD logic: one stage of a serial Manchester carry chain. Generate is
//    sa_and, propagate the XOR value, and carry-in the XRegister, so
//    sum = XOR ^ xreg and cout = sa_and | (XOR & xreg);
//  * XRegister: a flip-flop that holds the carry between bit positions. It
//    loads cin when init_cin is high (0 for an addition, 1 for a
//    subtraction) and cout when ff_en is high (on every add write-back);
//  * mask logic: a latch that holds the column's write mask. When lat_en is
//    high it is transparent and takes either the bus (s_mask_in low) or the
//    column's mask_in bit (s_mask_in high); mask_out is the write mask the
//    SRAM uses. A conventional write loads mask_in through it in the same
//    cycle.
// Timing: the bus, sum and mask_out are combinational; the XRegister and
// the latch's held value change at the clock edge. Reset clears both.
//
// Block structure, carry and mask muxing follow the column schematic of the
// document. The latch is modelled as a held register with a transparent
// bypass so that the whole design stays edge-triggered.
module bscl_column
  import vram_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sa_and,
  input  logic sa_nor,
  input  logic din,
  input  logic mask_in,
  input  src_e src,
  input  logic init_cin,
  input  logic cin,
  input  logic ff_en,
  input  logic lat_en,
  input  logic s_mask_in,
  output logic bus,
  output logic mask_out
);

  logic xreg, lat_q;
  logic xor_v, sum, cout, lat_d;

  bus_logic u_bus (
    .src    (src),
    .sa_and (sa_and),
    .sa_nor (sa_nor),
    .sum    (sum),
    .din    (din),
    .xor_v  (xor_v),
    .bus    (bus)
  );

  // ADD logic: serial Manchester carry stage
  always_comb begin
    sum  = xor_v ^ xreg;
    cout = sa_and | (xor_v & xreg);
  end

  // XRegister
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        xreg <= 1'b0;
    else if (init_cin) xreg <= cin;
    else if (ff_en)    xreg <= cout;
  end

  // Mask logic
  always_comb begin
    lat_d    = s_mask_in ? mask_in : bus;
    mask_out = lat_en ? lat_d : lat_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lat_q <= 1'b0;
    else if (lat_en) lat_q <= lat_d;
  end

endmodule
