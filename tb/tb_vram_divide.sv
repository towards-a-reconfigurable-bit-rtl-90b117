// tb_vram_divide: bit-parallel 32-bit unsigned division and remainder on the
// full-size design (vram_top at its defaults), as restoring division.
//
// Rows: 0 = dividend a, 1 = divisor b, 2 = quotient (starts as a copy of a
// and is shifted left one bit per step), 4 = ~b, 5 = partial remainder R,
// 6 = H, 7 = D, 8 = F, 9 = G. A read followed by an add writes x + x + cin,
// so "rd x; wb.add x" shifts x left and puts the carry-in in bit 0. Each of
// the 32 steps:
//   H  = all ones where the MSB of R is set (2R below then needs 33 bits,
//        so the subtraction must succeed)
//   XRegister = A, so that its MSB is the next dividend bit
//   R  = 2R + (MSB of A): an unconditional add with carry-in 0 and an
//        MSB-conditioned add with carry-in 1 on the same sensed value
//   D  = R + ~b + 1; F = R | ~b; G = R & ~b, all from one bit-line compute
//   F  = G where the MSB of D is set: F's MSB is now the carry out of
//        R + ~b + 1, which is 1 exactly when R >= b (32-bit compare)
//   XRegister = F | H; where its MSB is set, R = D
//   A  = 2A + (MSB of the XRegister), the quotient bit, in the same
//        two-add way as R.
// The quotient program takes 5 + 32 * 24 = 773 cycles; the remainder
// program only shifts A (5 + 32 * 23 = 741 cycles). Division by zero gives
// a quotient of all ones and a remainder equal to a.
module tb_vram_divide;
  import vram_pkg::*;
  import vram_tb_pkg::*;
  localparam int COLS = DEF_COLS, EB = DEF_EB, NE = COLS / EB;
  localparam int BP = 1;

  logic clk = 0, rst_n = 0;
  logic            prog_we    [2];
  logic [PC_W-1:0] prog_addr  [2];
  uprog_word_t     prog_wdata [2];
  start_cmd_t      cmd        [2];
  logic            busy       [2];
  logic            done       [2];
  logic [15:0]     uop_count  [2];
  logic            host_valid [2];
  array_uop_t      host_uop   [2];
  logic [COLS-1:0] host_data  [2];
  logic [COLS-1:0] host_mask  [2];
  logic [COLS-1:0] data_out   [2];
  int checks = 0, failures = 0;

  vram_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host(array_uop_t u, logic [COLS-1:0] d = '0);
    @(negedge clk);
    host_valid[BP] = 1; host_uop[BP] = u; host_data[BP] = d; host_mask[BP] = '1;
    @(negedge clk);
    host_valid[BP] = 0; host_uop[BP] = UOP_NOP;
  endtask

  task automatic load(int pc, uprog_word_t w);
    @(negedge clk);
    prog_we[BP] = 1; prog_addr[BP] = PC_W'(pc); prog_wdata[BP] = w;
    @(negedge clk);
    prog_we[BP] = 0;
  endtask

  task automatic run(string name, int exp_cycles);
    int cyc;
    @(negedge clk);
    cmd[BP] = '{start: 1, pc: '0, trip0: 8'(32), trip1: 8'(1), tri_inner: 0, cin: 0};
    @(negedge clk);
    cmd[BP].start = 0;
    cyc = 0;
    while (!done[BP]) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (uop_count[BP] != 16'(exp_cycles) || cyc != exp_cycles) begin
      failures++; $display("FAIL %s: %0d cycles, expected %0d", name, cyc, exp_cycles);
    end else $display("%s: %0d cycles", name, cyc);
  endtask

  // Loads the division program; with quot = 0 the quotient bit is left out.
  task automatic load_div(bit quot);
    load(0,  uw(OP_RD, SRC_AND, COND_IN, 0));
    load(1,  uw(OP_WB, SRC_AND, COND_IN, 2));
    load(2,  uw(OP_RD, SRC_AND, COND_IN, 1));
    load(3,  uw(OP_WB, SRC_NOR, COND_IN, 4));
    load(4,  uw(OP_WR, SRC_AND, COND_IN, 5));
    load(5,  uw(OP_RD, SRC_AND, COND_IN, 5));
    load(6,  uw(OP_WR_MASK, SRC_AND));
    load(7,  uw(OP_WR, SRC_AND, COND_IN, 6));
    load(8,  uw(OP_WR, SRC_AND, COND_MSB, 6, IDX_NONE, 0, IDX_NONE, 1));
    load(9,  uw(OP_RD, SRC_AND, COND_IN, 2));
    load(10, uw(OP_WR_MASK, SRC_AND));
    load(11, uw(OP_RD, SRC_AND, COND_IN, 5));
    load(12, uw(OP_WB, SRC_ADD, COND_IN, 5, IDX_NONE, 0, IDX_NONE, 0, 1, 0));
    load(13, uw(OP_WB, SRC_ADD, COND_MSB, 5, IDX_NONE, 0, IDX_NONE, 0, 1, 1));
    load(14, uw(OP_BLC, SRC_AND, COND_IN, 5, IDX_NONE, 4));
    load(15, uw(OP_WB, SRC_ADD, COND_IN, 7));
    load(16, uw(OP_WB, SRC_OR, COND_IN, 8));
    load(17, uw(OP_WB, SRC_AND, COND_IN, 9));
    load(18, uw(OP_RD, SRC_AND, COND_IN, 7));
    load(19, uw(OP_WR_MASK, SRC_AND));
    load(20, uw(OP_RD, SRC_AND, COND_IN, 9));
    load(21, uw(OP_WB, SRC_AND, COND_MSB, 8));
    load(22, uw(OP_BLC, SRC_AND, COND_IN, 8, IDX_NONE, 6));
    load(23, uw(OP_WR_MASK, SRC_OR));
    load(24, uw(OP_RD, SRC_AND, COND_IN, 7));
    load(25, uw(OP_WB, SRC_AND, COND_MSB, 5));
    load(26, uw(OP_RD, SRC_AND, COND_IN, 2));
    if (quot) begin
      load(27, uw(OP_WB, SRC_ADD, COND_IN, 2, IDX_NONE, 0, IDX_NONE, 0, 1, 0));
      load(28, uw(OP_WB, SRC_ADD, COND_MSB, 2, IDX_NONE, 0, IDX_NONE, 0, 1, 1, 0, CTL_JND0, 5, 1));
    end else
      load(27, uw(OP_WB, SRC_ADD, COND_IN, 2, IDX_NONE, 0, IDX_NONE, 0, 1, 0, 0, CTL_JND0, 5, 1));
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      prog_we[f] = 0; prog_addr[f] = '0; prog_wdata[f] = '0; cmd[f] = '0;
      host_valid[f] = 0; host_uop[f] = UOP_NOP; host_data[f] = '0; host_mask[f] = '1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int q = 1; q >= 0; q--) begin
      load_div(q[0]);
      for (int rep = 0; rep < 8; rep++) begin
        logic [COLS-1:0] ra, rb, gq, gr;
        for (int e = 0; e < NE; e++) begin
          logic [31:0] av, bv;
          av = $urandom;
          case ((e + rep) % 6)
            0: bv = $urandom;
            1: bv = $urandom >> ($urandom % 32);
            2: bv = 32'hffff_ffff - ($urandom % 4);
            3: bv = (rep == 0) ? 32'd0 : 32'd1;
            4: bv = 32'h8000_0000 | $urandom;
            default: bv = $urandom % 16;
          endcase
          if (rep == 1 && e == 0) begin av = 32'hffff_ffff; bv = 32'h8000_0001; end
          if (rep == 1 && e == 1) begin av = 32'h1234_5678; bv = 32'h1234_5678; end
          ra[e*EB +: EB] = av; rb[e*EB +: EB] = bv;
        end
        host(au(OP_WR, SRC_AND, COND_IN, 0), ra);
        host(au(OP_WR, SRC_AND, COND_IN, 1), rb);
        run((q != 0) ? "bp udiv" : "bp rem", (q != 0) ? 773 : 741);
        host(au(OP_RD, SRC_AND, COND_IN, 2));
        #1 gq = data_out[BP];
        host(au(OP_RD, SRC_AND, COND_IN, 5));
        #1 gr = data_out[BP];
        for (int e = 0; e < NE; e++) begin
          logic [31:0] av, bv, eq, er;
          av = ra[e*EB +: EB]; bv = rb[e*EB +: EB];
          eq = (bv == 0) ? 32'hffff_ffff : av / bv;
          er = (bv == 0) ? av : av % bv;
          checks++;
          if (gr[e*EB +: EB] !== er) begin
            failures++; $display("FAIL rem a=%h b=%h got %h exp %h", av, bv, gr[e*EB +: EB], er);
          end
          if (q != 0) begin
            checks++;
            if (gq[e*EB +: EB] !== eq) begin
              failures++; $display("FAIL udiv a=%h b=%h got %h exp %h", av, bv, gq[e*EB +: EB], eq);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
