// vram_top: a bit-serial and a bit-parallel vector RAM side by side.
//
// Both flavours are built from the same SRAM sub-array and share most of
// their column logic; they differ in the last three blocks of the compute
// logic. Index 0 of every port array is the bit-serial VRAM (BS-VRAM: 256
// one-bit ALUs per sub-array, operands stored transposed, any precision),
// index 1 the bit-parallel VRAM (BP-VRAM: eight 32-bit ALUs per sub-array,
// one element per 32 columns of a row). Each has its own micro-op
// controller (uop_sequencer), micro-program store and host port, and they
// run independently.
//
// Per flavour f: load micro-program words with prog_we[f]/prog_addr[f]/
// prog_wdata[f]; start a macro-op with cmd[f].start for one cycle while
// busy[f] is low; done[f] pulses when it ends and uop_count[f] holds the
// number of micro-ops (cycles) it took. While idle, host_valid[f] issues
// one micro-op host_uop[f] with host_data[f]/host_mask[f]; data_out[f] is
// the column bus (the row read, one cycle after an OP_RD, under a default
// OP_NOP).
//
// Placing the two flavours next to each other, rather than making one
// sub-array switchable between them, is this design's choice: the document
// sketches the switchable version as future work without detailing it.
// Lint's report that rst_n is used both asynchronously and as a sampled
// signal comes from the reset-disabled assertions inside uop_sequencer.
module vram_top
  import vram_pkg::*;
#(
  parameter int unsigned ROWS  = DEF_ROWS,
  parameter int unsigned COLS  = DEF_COLS,
  parameter int unsigned EB    = DEF_EB,
  parameter int unsigned DEPTH = PROG_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we    [2],
  input  logic [PC_W-1:0] prog_addr  [2],
  input  uprog_word_t     prog_wdata [2],
  input  start_cmd_t      cmd        [2],
  output logic            busy       [2],
  output logic            done       [2],
  output logic [15:0]     uop_count  [2],
  input  logic            host_valid [2],
  input  array_uop_t      host_uop   [2],
  input  logic [COLS-1:0] host_data  [2],
  input  logic [COLS-1:0] host_mask  [2],
  output logic [COLS-1:0] data_out   [2]
);

  for (genvar f = 0; f < 2; f++) begin : g_vram
    localparam flavor_e FL = (f == 0) ? FLAVOR_BS : FLAVOR_BP;
    array_uop_t      uop;
    logic [COLS-1:0] din, min;

    uop_sequencer #(.DEPTH(DEPTH), .COLS(COLS)) u_seq (
      .clk        (clk),
      .rst_n      (rst_n),
      .prog_we    (prog_we[f]),
      .prog_addr  (prog_addr[f]),
      .prog_wdata (prog_wdata[f]),
      .cmd        (cmd[f]),
      .busy       (busy[f]),
      .done       (done[f]),
      .uop_count  (uop_count[f]),
      .host_valid (host_valid[f]),
      .host_uop   (host_uop[f]),
      .host_data  (host_data[f]),
      .host_mask  (host_mask[f]),
      .uop        (uop),
      .data_in    (din),
      .mask_in    (min)
    );

    vram_subarray #(.FLAVOR(FL), .ROWS(ROWS), .COLS(COLS), .EB(EB)) u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .uop      (uop),
      .data_in  (din),
      .mask_in  (min),
      .data_out (data_out[f])
    );
  end

endmodule
