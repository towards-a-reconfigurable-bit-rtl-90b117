// vram_subarray: one VRAM sub-array, bit-serial (BS) or bit-parallel (BP).
//
// An SRAM sub-array whose column periphery computes, so that the register
// file and the vector ALU are the same structure. It holds two row
// decoders (A and B), the bitcell array, the bitline logic (sense
// amplifiers) and a row of compute logic:
//  * FLAVOR_BS: one bscl_column per column. Each column is a 1-bit ALU on
//    one element stored transposed (bit k of an element in row base+k), so
//    a macro-op loops over bit positions and all COLS elements advance
//    together.
//  * FLAVOR_BP: one bpcl_element per EB columns. Elements are stored one
//    per EB columns of a row, and an add completes in one write-back.
//
// Interface: one micro-op per cycle on uop, with data_in and mask_in (one
// bit per column). data_out is the column bus, so after an OP_RD the next
// cycle's data_out is the row read when that cycle's uop selects SRC_AND
// (as OP_NOP with default fields does).
// Micro-op timing (every uop takes one cycle):
//  * OP_RD row_a / OP_BLC row_a,row_b: sense amplifiers sample at the edge.
//  * OP_WR row_a: data_in is written where the mask is set. BS: the mask
//    latch is transparent and takes mask_in. BP: the mask is chosen by cond.
//  * OP_WB row_a: the bus (source src, computed from the sense amplifiers
//    latched earlier) is written. BS: masked by the mask latch, and a
//    SRC_ADD write-back also clocks the carry into the XRegister.
//    BP: masked as chosen by cond.
//  * OP_WR_MASK: the mask state (BS latch, BP XRegister) takes the bus, or
//    mask_in when src is SRC_MASK_IN.
//  * srl (BP): XRegisters shift right; combinable with any uop, the uop
//    sees the value before the shift.
//  * init_cin (BS): every XRegister takes cin. BP: cin is the carry into
//    every element's chain in the same cycle.
//
// The micro-op set and the per-flavour behaviour follow the document. Which
// decoder a one-row uop uses, the exact cycle in which the carry is clocked
// and the data_out timing are this design's choices. The bit-serial flavour
// ignores the cond and srl fields of uop, which only steer bit-parallel
// hardware, so lint reports those bits as unused there.
module vram_subarray
  import vram_pkg::*;
#(
  parameter flavor_e     FLAVOR = FLAVOR_BS,
  parameter int unsigned ROWS   = DEF_ROWS,
  parameter int unsigned COLS   = DEF_COLS,
  parameter int unsigned EB     = DEF_EB
) (
  input  logic            clk,
  input  logic            rst_n,
  input  array_uop_t      uop,
  input  logic [COLS-1:0] data_in,
  input  logic [COLS-1:0] mask_in,
  output logic [COLS-1:0] data_out
);

  localparam int unsigned AW = $clog2(ROWS);

  logic [ROWS-1:0] wl_a, wl_b;
  logic [COLS-1:0] bl, blb, sa_and, sa_nor, bus, wmask;
  logic            dec_a_en, dec_b_en, sense_en, we;
  src_e            src_eff;

  always_comb begin
    dec_a_en = uop.op inside {OP_RD, OP_WR, OP_BLC, OP_WB};
    dec_b_en = (uop.op == OP_BLC);
    sense_en = uop.op inside {OP_RD, OP_BLC};
    we       = uop.op inside {OP_WR, OP_WB};
    // a conventional write puts data_in on the bus
    src_eff  = (uop.op == OP_WR) ? SRC_DIN : uop.src;
  end

  row_decoder #(.ROWS(ROWS)) u_dec_a (
    .en(dec_a_en), .addr(uop.row_a[AW-1:0]), .wl(wl_a));
  row_decoder #(.ROWS(ROWS)) u_dec_b (
    .en(dec_b_en), .addr(uop.row_b[AW-1:0]), .wl(wl_b));

  bitcell_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk   (clk),
    .wl_a  (wl_a),
    .wl_b  (wl_b),
    .we    (we),
    .wdata (bus),
    .wmask (wmask),
    .bl    (bl),
    .blb   (blb)
  );

  bitline_logic #(.COLS(COLS)) u_bitline (
    .clk      (clk),
    .rst_n    (rst_n),
    .sense_en (sense_en),
    .bl       (bl),
    .blb      (blb),
    .sa_and   (sa_and),
    .sa_nor   (sa_nor)
  );

  if (FLAVOR == FLAVOR_BS) begin : g_bs
    logic ff_en, lat_en, s_mask_in;
    always_comb begin
      ff_en     = (uop.op == OP_WB) && (uop.src == SRC_ADD);
      lat_en    = uop.op inside {OP_WR, OP_WR_MASK};
      s_mask_in = (uop.op == OP_WR) || (uop.src == SRC_MASK_IN);
    end
    for (genvar c = 0; c < COLS; c++) begin : g_col
      bscl_column u_col (
        .clk       (clk),
        .rst_n     (rst_n),
        .sa_and    (sa_and[c]),
        .sa_nor    (sa_nor[c]),
        .din       (data_in[c]),
        .mask_in   (mask_in[c]),
        .src       (src_eff),
        .init_cin  (uop.init_cin),
        .cin       (uop.cin),
        .ff_en     (ff_en),
        .lat_en    (lat_en),
        .s_mask_in (s_mask_in),
        .bus       (bus[c]),
        .mask_out  (wmask[c])
      );
    end
  end else begin : g_bp
    logic       xr_en;
    logic [1:0] xr_sel;
    always_comb begin
      xr_en  = (uop.op == OP_WR_MASK) || uop.srl;
      xr_sel = uop.srl ? 2'd2 : (uop.src == SRC_MASK_IN) ? 2'd1 : 2'd0;
    end
    for (genvar e = 0; e < COLS / EB; e++) begin : g_elem
      logic [EB-1:0] xreg_unused;
      bpcl_element #(.EB(EB)) u_elem (
        .clk      (clk),
        .rst_n    (rst_n),
        .sa_and   (sa_and[e*EB +: EB]),
        .sa_nor   (sa_nor[e*EB +: EB]),
        .din      (data_in[e*EB +: EB]),
        .mask_in  (mask_in[e*EB +: EB]),
        .src      (src_eff),
        .cin      (uop.cin),
        .xr_en    (xr_en),
        .xr_sel   (xr_sel),
        .cond     (uop.cond),
        .bus      (bus[e*EB +: EB]),
        .mask_out (wmask[e*EB +: EB]),
        .xreg     (xreg_unused)
      );
    end
  end

  assign data_out = bus;

endmodule
