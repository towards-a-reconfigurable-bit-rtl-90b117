// uop_sequencer: micro-op controller of one VRAM sub-array.
//
// Macro-operations (add, mul, ...) are short micro-programs. This block
// stores them (DEPTH words, written through prog_we/prog_addr/prog_wdata),
// and on a start command runs one from cmd.pc, issuing one array micro-op
// per cycle until a word marked last falls through.
//
// Control flow uses two loop counters, as the document describes: each is
// initialised to a trip count (e.g. the bit width 8 or 32). A word whose
// ctl is CTL_JND0/CTL_JND1 (j_n_done_0/1) checks its counter: if it is zero
// the counter is reloaded and execution falls through, otherwise it is
// decremented and execution jumps to target. A counter holds
// (remaining trips - 1), so a loop of N trips runs its body N times.
//
// Row addresses: a bit-serial operand occupies successive rows, so each row
// address of a word may be offset by the iteration index of loop 0 (i0),
// of loop 1 (i1) or by i0 + i1. With cmd.tri_inner set, counter 1 takes the
// trip count of counter 0's current iteration (N0 - i0 trips): the inner
// loop shrinks by one each outer iteration, which is what a truncated
// bit-serial multiply needs.
//
// Mini-ops: set_cin sets the carry (bit-serial: loaded into all carry
// XRegisters at the edge, effective from the next micro-op; bit-parallel:
// the carry into every element, effective from this micro-op on), srl
// shifts the bit-parallel XRegisters. data_in is the word's imm bit on every
// column ("<(X)") and mask_in is all ones while a program runs.
//
// Timing: the cycle in which start is accepted issues a carry
// initialisation (init_cin with cmd.cin) and no array access; the first
// program word issues in the next cycle. done pulses in the cycle after the
// last word issued. uop_count is the number of micro-ops the running or
// last macro-op issued. While idle (busy low) host_uop, host_data and
// host_mask pass straight to the array, giving plain reads and writes.
//
// The two counters and their jump-if-not-done semantics follow the
// document; the program store, the address offsets, the shrinking inner
// loop, the start command and the host pass-through are this design's own,
// as the document does not describe how micro-ops reach the array.
// Two concurrent assertions at the end check that no host micro-op or start
// arrives while busy. They are disabled during reset by rst_n, which lint
// therefore sees as used both as an asynchronous reset and as a sampled
// signal.
module uop_sequencer
  import vram_pkg::*;
#(
  parameter int unsigned DEPTH = PROG_DEPTH,
  parameter int unsigned COLS  = DEF_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  // micro-program store
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  uprog_word_t     prog_wdata,
  // macro-op control
  input  start_cmd_t      cmd,
  output logic            busy,
  output logic            done,
  output logic [15:0]     uop_count,
  // single micro-ops while idle
  input  logic            host_valid,
  input  array_uop_t      host_uop,
  input  logic [COLS-1:0] host_data,
  input  logic [COLS-1:0] host_mask,
  // to the sub-array
  output array_uop_t      uop,
  output logic [COLS-1:0] data_in,
  output logic [COLS-1:0] mask_in
);

  uprog_word_t      prog [DEPTH];
  uprog_word_t      word;
  logic [PC_W-1:0]  pc;
  logic [CNT_W-1:0] cnt0, cnt1, trip0_q, trip1_q;
  logic [CNT_W-1:0] i0, i1;
  logic             tri_q, cin_q;
  logic             start_ok, jump;

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end

  function automatic logic [ROW_W-1:0] offset(idx_e sel, logic [CNT_W-1:0] a,
                                               logic [CNT_W-1:0] b);
    unique case (sel)
      IDX_I0:  return ROW_W'(a);
      IDX_I1:  return ROW_W'(b);
      IDX_I01: return ROW_W'(a + b);
      default: return '0;
    endcase
  endfunction

  always_comb begin
    word     = prog[pc];
    start_ok = cmd.start && !busy;
    i0       = trip0_q - 8'd1 - cnt0;
    i1       = tri_q ? (cnt0 - cnt1) : (trip1_q - 8'd1 - cnt1);
    jump     = ((word.ctl == CTL_JND0) && (cnt0 != '0)) ||
               ((word.ctl == CTL_JND1) && (cnt1 != '0));
    uop      = UOP_NOP;
    data_in  = host_data;
    mask_in  = host_mask;
    if (busy) begin
      uop.op       = word.op;
      uop.src      = word.src;
      uop.cond     = word.cond;
      uop.row_a    = word.row_a + offset(word.idx_a, i0, i1);
      uop.row_b    = word.row_b + offset(word.idx_b, i0, i1);
      uop.srl      = word.srl;
      uop.init_cin = word.set_cin;
      uop.cin      = word.set_cin ? word.cin : cin_q;
      data_in      = {COLS{word.imm}};
      mask_in      = '1;
    end else if (start_ok) begin
      uop.init_cin = 1'b1;
      uop.cin      = cmd.cin;
    end else if (host_valid) begin
      uop = host_uop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      pc        <= '0;
      cnt0      <= '0;
      cnt1      <= '0;
      trip0_q   <= 8'd1;
      trip1_q   <= 8'd1;
      tri_q     <= 1'b0;
      cin_q     <= 1'b0;
      uop_count <= '0;
    end else begin
      done <= 1'b0;
      if (start_ok) begin
        busy      <= 1'b1;
        pc        <= cmd.pc;
        trip0_q   <= cmd.trip0;
        trip1_q   <= cmd.trip1;
        tri_q     <= cmd.tri_inner;
        cnt0      <= cmd.trip0 - 8'd1;
        cnt1      <= cmd.tri_inner ? cmd.trip0 - 8'd1 : cmd.trip1 - 8'd1;
        cin_q     <= cmd.cin;
        uop_count <= '0;
      end else if (busy) begin
        uop_count <= uop_count + 16'd1;
        if (word.set_cin) cin_q <= word.cin;
        unique case (word.ctl)
          CTL_JND0:
            if (cnt0 == '0) cnt0 <= trip0_q - 8'd1;
            else cnt0 <= cnt0 - 8'd1;
          CTL_JND1:
            if (cnt1 == '0) cnt1 <= tri_q ? cnt0 - 8'd1 : trip1_q - 8'd1;
            else cnt1 <= cnt1 - 8'd1;
          default: ;
        endcase
        if (jump) pc <= word.target;
        else if (word.last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else pc <= pc + 1'b1;
      end
    end
  end

  // A host micro-op or a new start while a macro-op runs would be lost.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_valid |-> !busy)
    else $error("host micro-op issued while a macro-op is running");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) cmd.start |-> !busy)
    else $error("start issued while a macro-op is running");

endmodule
