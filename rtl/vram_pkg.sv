// vram_pkg: types and constants shared by the VRAM sub-array, its compute
// logic and its micro-op controller.
//
// A VRAM is an SRAM sub-array whose periphery can compute. Every cycle it
// executes one micro-op (uop): an ordinary read or write, a bit-line compute
// (two rows read at once), a write-back of a computed value, a load of the
// write-mask state, a right shift of the bit-parallel XRegister, or
// initialisation of the carry. The set of uops follows the description of
// the architecture; the binary encoding below is this design's own.
//
// Geometry defaults: 128 rows x 256 columns (one 4 kB macro, 256 bit-serial
// ALUs); bit-parallel elements are 32 bits wide, so the bit-parallel flavour
// holds 8 elements per row.
package vram_pkg;

  localparam int unsigned DEF_ROWS   = 128;
  localparam int unsigned DEF_COLS   = 256;
  localparam int unsigned DEF_EB     = 32;
  localparam int unsigned ROW_W      = 7;    // row address width, 2**ROW_W >= DEF_ROWS
  localparam int unsigned PROG_DEPTH = 32;   // micro-program words
  localparam int unsigned PC_W       = 5;
  localparam int unsigned CNT_W      = 8;    // loop counter width

  // Which peripheral compute logic a sub-array carries.
  typedef enum logic {
    FLAVOR_BS = 1'b0,   // bit-serial: one ALU per column, operands stored transposed
    FLAVOR_BP = 1'b1    // bit-parallel: one ALU per ELEM_BITS columns
  } flavor_e;

  // Array micro-ops.
  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,
    OP_RD      = 3'd1,  // read row_a into the sense amplifiers
    OP_WR      = 3'd2,  // write data_in to row_a under mask_in
    OP_BLC     = 3'd3,  // bit-line compute on rows row_a and row_b
    OP_WB      = 3'd4,  // write the selected bus source back to row_a
    OP_WR_MASK = 3'd5   // load the mask state element from the bus (or mask_in)
  } array_op_e;

  // Bus source: which value the compute logic puts on the column bus.
  typedef enum logic [3:0] {
    SRC_AND     = 4'd0,
    SRC_NAND    = 4'd1,
    SRC_OR      = 4'd2,
    SRC_NOR     = 4'd3,
    SRC_XOR     = 4'd4,
    SRC_XNOR    = 4'd5,
    SRC_ADD     = 4'd6,
    SRC_DIN     = 4'd7,  // data_in driven onto the bus
    SRC_MASK_IN = 4'd8   // wr_mask only: load mask_in directly into the mask state
  } src_e;

  // Write condition (bit-parallel flavour only): which bit masks a column's write.
  typedef enum logic [1:0] {
    COND_IN   = 2'd0,  // the column's mask_in bit
    COND_SELF = 2'd1,  // the column's own XRegister bit
    COND_LSB  = 2'd2,  // XRegister bit of the element's least significant column
    COND_MSB  = 2'd3   // XRegister bit of the element's most significant column
  } cond_e;

  // Control part of a micro-program word.
  typedef enum logic [1:0] {
    CTL_NONE = 2'd0,
    CTL_JND0 = 2'd1,   // j_n_done_0: decrement counter 0, jump unless it was zero
    CTL_JND1 = 2'd2    // j_n_done_1: same with counter 1
  } ctl_e;

  // Row offset added to a row address of a micro-program word.
  typedef enum logic [1:0] {
    IDX_NONE = 2'd0,
    IDX_I0   = 2'd1,   // iteration index of loop counter 0
    IDX_I1   = 2'd2,   // iteration index of loop counter 1
    IDX_I01  = 2'd3    // sum of both
  } idx_e;

  // One cycle of work for a sub-array.
  typedef struct packed {
    array_op_e        op;
    src_e             src;
    cond_e            cond;
    logic [ROW_W-1:0] row_a;
    logic [ROW_W-1:0] row_b;
    logic             srl;       // bit-parallel: shift XRegisters right by one
    logic             init_cin;  // bit-serial: load every carry XRegister with cin
    logic             cin;       // carry value (bit-parallel: carry into each element)
  } array_uop_t;

  // One word of the micro-program store.
  typedef struct packed {
    array_op_e        op;
    src_e             src;
    cond_e            cond;
    logic [ROW_W-1:0] row_a;
    idx_e             idx_a;
    logic [ROW_W-1:0] row_b;
    idx_e             idx_b;
    logic             imm;       // value broadcast on data_in, "<(X)"
    logic             set_cin;   // mini-op: set the carry to cin from the next uop on
    logic             cin;
    logic             srl;       // mini-op: shift right (bit-parallel)
    ctl_e             ctl;
    logic [PC_W-1:0]  target;    // jump label
    logic             last;      // macro-op ends when this word falls through
  } uprog_word_t;

  // Macro-op start command.
  typedef struct packed {
    logic             start;
    logic [PC_W-1:0]  pc;        // first micro-program word
    logic [CNT_W-1:0] trip0;     // loop counter 0 trip count (e.g. the bit width)
    logic [CNT_W-1:0] trip1;     // loop counter 1 trip count
    logic             tri_inner; // counter 1 reloads from counter 0 (shrinking inner loop)
    logic             cin;       // initial carry
  } start_cmd_t;

  localparam array_uop_t UOP_NOP = '{op: OP_NOP, src: SRC_AND, cond: COND_IN,
                                     default: '0};

endpackage
