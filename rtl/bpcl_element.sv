// bpcl_element: bit-parallel compute logic (BPCL) for one element.
//
// A bit-parallel VRAM groups EB adjacent columns into one EB-bit ALU;
// column i of the group holds bit i of the element (column 0 is the LSB).
// Per column it reuses the bus logic and XOR/XNOR logic of the bit-serial
// column and replaces the last three blocks:
//  * ADD logic: a Manchester carry chain across the EB columns. Column i
//    generates sa_and[i], propagates XOR[i], and its sum is XOR[i] ^ c[i];
//    c[0] is cin and c[i+1] = g[i] | (p[i] & c[i]). The carry out of the
//    element is dropped (arithmetic wraps modulo 2**EB).
//  * XRegister: one flip-flop per column, loaded when xr_en is high from the
//    bus (XR_BUS), from mask_in (XR_MASK_IN) or from the column to its left,
//    i.e. one bit more significant (XR_SR, a logical right shift: the MSB
//    takes 0). It is the mask state element and, shifted, steps a
//    multiplier from its LSB to its MSB.
//  * mask logic: the write mask of column i is, by cond, mask_in[i], its own
//    XRegister bit, the element's LSB XRegister bit or its MSB bit.
// Timing: bus and mask_out are combinational (the carry ripples through
// all EB columns in one cycle); the XRegisters change at the clock edge.
// Reset clears them.
//
// The carry chain, the three XRegister inputs and the three mask choices
// follow the document. Shifting 0 into the MSB at an element boundary is
// this design's choice. The document's inverting carry buffers are a
// circuit detail with no logic effect and are not modelled.
module bpcl_element
  import vram_pkg::*;
#(
  parameter int unsigned EB = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [EB-1:0] sa_and,
  input  logic [EB-1:0] sa_nor,
  input  logic [EB-1:0] din,
  input  logic [EB-1:0] mask_in,
  input  src_e          src,
  input  logic          cin,
  input  logic          xr_en,
  input  logic [1:0]    xr_sel,   // 0: bus, 1: mask_in, 2: shift right
  input  cond_e         cond,
  output logic [EB-1:0] bus,
  output logic [EB-1:0] mask_out,
  output logic [EB-1:0] xreg
);

  localparam logic [1:0] XR_BUS = 2'd0, XR_MASK_IN = 2'd1, XR_SR = 2'd2;

  logic [EB-1:0] xor_v, sum;
  logic          carry;

  for (genvar i = 0; i < EB; i++) begin : g_col
    bus_logic u_bus (
      .src    (src),
      .sa_and (sa_and[i]),
      .sa_nor (sa_nor[i]),
      .sum    (sum[i]),
      .din    (din[i]),
      .xor_v  (xor_v[i]),
      .bus    (bus[i])
    );
  end

  // ADD logic: Manchester carry chain
  always_comb begin
    carry = cin;
    for (int i = 0; i < EB; i++) begin
      sum[i] = xor_v[i] ^ carry;
      carry  = sa_and[i] | (xor_v[i] & carry);
    end
  end

  // XRegister
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xreg <= '0;
    else if (xr_en) begin
      unique case (xr_sel)
        XR_BUS:     xreg <= bus;
        XR_MASK_IN: xreg <= mask_in;
        XR_SR:      xreg <= {1'b0, xreg[EB-1:1]};
        default:    xreg <= xreg;
      endcase
    end
  end

  // Mask logic
  always_comb begin
    unique case (cond)
      COND_IN:   mask_out = mask_in;
      COND_SELF: mask_out = xreg;
      COND_LSB:  mask_out = {EB{xreg[0]}};
      default:   mask_out = {EB{xreg[EB-1]}};
    endcase
  end

endmodule
