// tb_vram_cmp_logic: the comparison and logic macro-ops on the full-size
// design (vram_top at its defaults).
//
// Bit-serial, 32-bit signed compares. With the sign bits inverted, X > Y
// exactly when the carry out of X + ~Y (carry-in 0) is 1, and X >= Y when
// the carry out of X + ~Y + 1 is 1. So:
//   sgt a,b = carry(a + ~b + 0), sge a,b = carry(a + ~b + 1),
//   slt a,b = sgt b,a,           sle a,b = sge b,a.
// The carry runs through one temporary row t. At the sign bit, t = ~X31 is
// added to Y31. The final carry is then written to bit 0 of the result and
// bits 1..31 are cleared. That is 31*4 + 4 + 2 + 31 = 161 cycles.
// Bit-serial seq: c = 1, then for each bit blc a_i,b_i; wr_mask.xor;
// wb.din c_0 <(0). A differing bit clears the result. That is
// 1 + 31 + 32*3 = 128 cycles.
// Bit-parallel, 32-bit signed compares (cin = 1 throughout):
//   d = a - b; where the signs of a and b differ d's sign is replaced by a's
//   (MSB-conditioned copy, XRegister = a ^ b); the MSB of the result is then
//   a < b. XRegister = result, c = 0, and an MSB-conditioned write of
//   0 + 0 + cin puts 1 in c (slt, 13 cycles); sge writes 1 everywhere and 0
//   where the MSB is set (14 cycles); sgt / sle swap the operands.
// Bit-parallel seq: t = a ^ b, u = -t, XRegister = t | -t (MSB set iff
//   t != 0), c = 1, then 0 where the MSB is set (12 cycles, 2 temporaries).
// Logic: and, nand, or, nor, xnor on both flavours (64 and 2 cycles).
// Every result element is compared with arithmetic done here, and every
// cycle count is checked.
module tb_vram_cmp_logic;
  import vram_pkg::*;
  import vram_tb_pkg::*;
  localparam int COLS = DEF_COLS, EB = DEF_EB, NE = COLS / EB;
  localparam int BS = 0, BP = 1;
  localparam int RA = 0, RB = 32, RC = 64, RT = 96;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host(int f, array_uop_t u, logic [COLS-1:0] d = '0);
    @(negedge clk);
    host_valid[f] = 1; host_uop[f] = u; host_data[f] = d; host_mask[f] = '1;
    @(negedge clk);
    host_valid[f] = 0; host_uop[f] = UOP_NOP;
  endtask

  task automatic load(int f, int pc, uprog_word_t w);
    @(negedge clk);
    prog_we[f] = 1; prog_addr[f] = PC_W'(pc); prog_wdata[f] = w;
    @(negedge clk);
    prog_we[f] = 0;
  endtask

  task automatic run(int f, string name, int pc, int n0, int n1, bit cin, int exp_cycles);
    int cyc;
    @(negedge clk);
    cmd[f] = '{start: 1, pc: PC_W'(pc), trip0: 8'(n0), trip1: 8'(n1), tri_inner: 0, cin: cin};
    @(negedge clk);
    cmd[f].start = 0;
    cyc = 0;
    while (!done[f]) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (uop_count[f] != 16'(exp_cycles) || cyc != exp_cycles) begin
      failures++; $display("FAIL %s: %0d cycles, expected %0d", name, cyc, exp_cycles);
    end else $display("%s: %0d cycles", name, cyc);
  endtask

  logic [31:0] a_bs [COLS], b_bs [COLS];

  task automatic bs_put(int base, ref logic [31:0] v [COLS]);
    for (int i = 0; i < 32; i++) begin
      logic [COLS-1:0] r;
      for (int c = 0; c < COLS; c++) r[c] = v[c][i];
      host(BS, au(OP_WR, SRC_AND, COND_IN, base + i), r);
    end
  endtask

  task automatic bs_get(int base, output logic [31:0] v [COLS]);
    for (int c = 0; c < COLS; c++) v[c] = '0;
    for (int i = 0; i < 32; i++) begin
      host(BS, au(OP_RD, SRC_AND, COND_IN, base + i));
      #1;
      for (int c = 0; c < COLS; c++) v[c][i] = data_out[BS][c];
    end
  endtask

  // operands with many equal, off-by-one and sign-boundary pairs
  task automatic bs_operands();
    for (int c = 0; c < COLS; c++) begin
      a_bs[c] = $urandom;
      case (c % 5)
        0: b_bs[c] = a_bs[c];
        1: b_bs[c] = a_bs[c] + 1;
        2: b_bs[c] = a_bs[c] ^ 32'h8000_0000;
        3: b_bs[c] = a_bs[c] ^ (32'd1 << (c % 32));
        default: b_bs[c] = $urandom;
      endcase
    end
    a_bs[0] = 32'h7fff_ffff; b_bs[0] = 32'h8000_0000;
    a_bs[1] = 32'h8000_0000; b_bs[1] = 32'h7fff_ffff;
    bs_put(RA, a_bs);
    bs_put(RB, b_bs);
  endtask

  // signed compare program at pc: result = carry(X + ~Y + cin), X/Y rows
  task automatic load_cmp(int pc, int x, int y);
    load(BS, pc + 0, uw(OP_RD, SRC_AND, COND_IN, y, IDX_I0));
    load(BS, pc + 1, uw(OP_WB, SRC_NOR, COND_IN, RT));
    load(BS, pc + 2, uw(OP_BLC, SRC_AND, COND_IN, x, IDX_I0, RT));
    load(BS, pc + 3, uw(OP_WB, SRC_ADD, COND_IN, RT, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0,
                        CTL_JND0, pc));
    load(BS, pc + 4, uw(OP_RD, SRC_AND, COND_IN, x + 31));
    load(BS, pc + 5, uw(OP_WB, SRC_NOR, COND_IN, RT));
    load(BS, pc + 6, uw(OP_BLC, SRC_AND, COND_IN, RT, IDX_NONE, y + 31));
    load(BS, pc + 7, uw(OP_WB, SRC_ADD, COND_IN, RT));
    load(BS, pc + 8, uw(OP_RD, SRC_AND, COND_IN, RT));
    load(BS, pc + 9, uw(OP_WB, SRC_ADD, COND_IN, RC));
    load(BS, pc + 10, uw(OP_WR, SRC_AND, COND_IN, RC + 1, IDX_I1, 0, IDX_NONE, 0, 0, 0, 0,
                         CTL_JND1, pc + 10, 1));
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      prog_we[f] = 0; prog_addr[f] = '0; prog_wdata[f] = '0; cmd[f] = '0;
      host_valid[f] = 0; host_uop[f] = UOP_NOP; host_data[f] = '0; host_mask[f] = '1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    load_cmp(0, RA, RB);    // X = a, Y = b
    load_cmp(11, RB, RA);   // X = b, Y = a
    // seq at 22
    load(BS, 22, uw(OP_WR, SRC_AND, COND_IN, RC, IDX_NONE, 0, IDX_NONE, 1));
    load(BS, 23, uw(OP_WR, SRC_AND, COND_IN, RC + 1, IDX_I1, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND1, 23));
    load(BS, 24, uw(OP_BLC, SRC_AND, COND_IN, RA, IDX_I0, RB, IDX_I0));
    load(BS, 25, uw(OP_WR_MASK, SRC_XOR));
    load(BS, 26, uw(OP_WB, SRC_DIN, COND_IN, RC, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 24, 1));

    for (int k = 0; k < 5; k++) begin
      string nm [5];
      int    pcs [5], n0s [5];
      bit    cins [5];
      logic [31:0] got [COLS];
      int bad;
      nm   = '{"bs sgt", "bs sge", "bs slt", "bs sle", "bs seq"};
      pcs  = '{0, 0, 11, 11, 22};
      cins = '{0, 1, 0, 1, 0};
      n0s  = '{31, 31, 31, 31, 32};
      bs_operands();
      run(BS, nm[k], pcs[k], n0s[k], 31, cins[k], (k == 4) ? 128 : 161);
      bs_get(RC, got);
      bad = 0;
      for (int c = 0; c < COLS; c++) begin
        logic e;
        case (k)
          0: e = $signed(a_bs[c]) >  $signed(b_bs[c]);
          1: e = $signed(a_bs[c]) >= $signed(b_bs[c]);
          2: e = $signed(a_bs[c]) <  $signed(b_bs[c]);
          3: e = $signed(a_bs[c]) <= $signed(b_bs[c]);
          default: e = a_bs[c] == b_bs[c];
        endcase
        checks++;
        if (got[c] !== {31'b0, e}) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s col %0d a=%h b=%h got %h", nm[k], c, a_bs[c], b_bs[c], got[c]);
        end
      end
    end

    // ---- bit-parallel compares and seq ----
    for (int k = 0; k < 5; k++) begin
      string nm [5];
      int    ncyc [5];
      logic [COLS-1:0] ra, rb, got;
      int x, y;
      nm   = '{"bp slt", "bp sgt", "bp sge", "bp sle", "bp seq"};
      ncyc = '{13, 13, 14, 14, 12};
      x = (k == 1 || k == 3) ? 1 : 0;   // operand rows: a = 0, b = 1
      y = 1 - x;
      if (k < 4) begin
        load(BP, 0, uw(OP_RD, SRC_AND, COND_IN, y));
        load(BP, 1, uw(OP_WB, SRC_NOR, COND_IN, 2));
        load(BP, 2, uw(OP_BLC, SRC_AND, COND_IN, x, IDX_NONE, 2));
        load(BP, 3, uw(OP_WB, SRC_ADD, COND_IN, 2));
        load(BP, 4, uw(OP_BLC, SRC_AND, COND_IN, x, IDX_NONE, y));
        load(BP, 5, uw(OP_WR_MASK, SRC_XOR));
        load(BP, 6, uw(OP_RD, SRC_AND, COND_IN, x));
        load(BP, 7, uw(OP_WB, SRC_AND, COND_MSB, 2));
        load(BP, 8, uw(OP_RD, SRC_AND, COND_IN, 2));
        load(BP, 9, uw(OP_WR_MASK, SRC_AND));
        load(BP, 10, uw(OP_WR, SRC_AND, COND_IN, 2));
        load(BP, 11, uw(OP_RD, SRC_AND, COND_IN, 2));
        if (k < 2)
          load(BP, 12, uw(OP_WB, SRC_ADD, COND_MSB, 2, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
        else begin
          load(BP, 12, uw(OP_WB, SRC_ADD, COND_IN, 2));
          load(BP, 13, uw(OP_WR, SRC_AND, COND_MSB, 2, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
        end
      end else begin
        load(BP, 0, uw(OP_BLC, SRC_AND, COND_IN, 0, IDX_NONE, 1));
        load(BP, 1, uw(OP_WB, SRC_XOR, COND_IN, 3));
        load(BP, 2, uw(OP_RD, SRC_AND, COND_IN, 3));
        load(BP, 3, uw(OP_WB, SRC_NOR, COND_IN, 4));
        load(BP, 4, uw(OP_WR, SRC_AND, COND_IN, 2));
        load(BP, 5, uw(OP_BLC, SRC_AND, COND_IN, 4, IDX_NONE, 2));
        load(BP, 6, uw(OP_WB, SRC_ADD, COND_IN, 4));
        load(BP, 7, uw(OP_BLC, SRC_AND, COND_IN, 3, IDX_NONE, 4));
        load(BP, 8, uw(OP_WR_MASK, SRC_OR));
        load(BP, 9, uw(OP_RD, SRC_AND, COND_IN, 2));
        load(BP, 10, uw(OP_WB, SRC_ADD, COND_IN, 2));
        load(BP, 11, uw(OP_WR, SRC_AND, COND_MSB, 2, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
      end
      for (int rep = 0; rep < 6; rep++) begin
        for (int e = 0; e < NE; e++) begin
          logic [31:0] av, bv;
          av = $urandom;
          case ((e + rep) % 5)
            0: bv = av;
            1: bv = av + 1;
            2: bv = av ^ 32'h8000_0000;
            3: bv = av - 1;
            default: bv = $urandom;
          endcase
          if (rep == 0 && e == 0) begin av = 32'h7fff_ffff; bv = 32'h8000_0000; end
          if (rep == 0 && e == 1) begin av = 32'h8000_0000; bv = 32'h7fff_ffff; end
          if (rep == 0 && e == 2) begin av = 32'h8000_0000; bv = 32'h0000_0001; end
          ra[e*EB +: EB] = av; rb[e*EB +: EB] = bv;
        end
        host(BP, au(OP_WR, SRC_AND, COND_IN, 0), ra);
        host(BP, au(OP_WR, SRC_AND, COND_IN, 1), rb);
        run(BP, nm[k], 0, 1, 1, 1, ncyc[k]);
        host(BP, au(OP_RD, SRC_AND, COND_IN, 2));
        #1 got = data_out[BP];
        for (int e = 0; e < NE; e++) begin
          logic [31:0] av, bv;
          logic r;
          av = ra[e*EB +: EB]; bv = rb[e*EB +: EB];
          case (k)
            0: r = $signed(av) <  $signed(bv);
            1: r = $signed(av) >  $signed(bv);
            2: r = $signed(av) >= $signed(bv);
            3: r = $signed(av) <= $signed(bv);
            default: r = av == bv;
          endcase
          checks++;
          if (got[e*EB +: EB] !== {31'b0, r}) begin
            failures++;
            $display("FAIL %s elem %0d a=%h b=%h got %h", nm[k], e, av, bv, got[e*EB +: EB]);
          end
        end
      end
    end

    // ---- logic ops on both flavours ----
    load(BS, 0, uw(OP_BLC, SRC_AND, COND_IN, RA, IDX_I0, RB, IDX_I0));
    load(BP, 0, uw(OP_BLC, SRC_AND, COND_IN, 0, IDX_NONE, 1));
    for (int s = 0; s < 6; s++) begin
      src_e src;
      logic [31:0] got [COLS];
      logic [COLS-1:0] ra, rb, rbp;
      src = src_e'(s);
      load(BS, 1, uw(OP_WB, src, COND_IN, RC, IDX_I0, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 0, 1));
      load(BP, 1, uw(OP_WB, src, COND_IN, 2, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
      bs_operands();
      run(BS, $sformatf("bs %s", src.name()), 0, 32, 1, 0, 64);
      bs_get(RC, got);
      for (int c = 0; c < COLS; c++) begin
        logic [31:0] e, x, y;
        x = a_bs[c]; y = b_bs[c];
        case (s)
          0: e = x & y;  1: e = ~(x & y); 2: e = x | y;
          3: e = ~(x | y); 4: e = x ^ y; default: e = ~(x ^ y);
        endcase
        checks++;
        if (got[c] !== e) begin failures++; $display("FAIL bs logic %0d col %0d", s, c); end
      end
      for (int i = 0; i < COLS / 32; i++) begin ra[i*32 +: 32] = $urandom; rb[i*32 +: 32] = $urandom; end
      host(BP, au(OP_WR, SRC_AND, COND_IN, 0), ra);
      host(BP, au(OP_WR, SRC_AND, COND_IN, 1), rb);
      run(BP, $sformatf("bp %s", src.name()), 0, 1, 1, 0, 2);
      host(BP, au(OP_RD, SRC_AND, COND_IN, 2));
      #1 rbp = data_out[BP];
      checks++;
      case (s)
        0: if (rbp !== (ra & rb))    begin failures++; $display("FAIL bp and");  end
        1: if (rbp !== ~(ra & rb))   begin failures++; $display("FAIL bp nand"); end
        2: if (rbp !== (ra | rb))    begin failures++; $display("FAIL bp or");   end
        3: if (rbp !== ~(ra | rb))   begin failures++; $display("FAIL bp nor");  end
        4: if (rbp !== (ra ^ rb))    begin failures++; $display("FAIL bp xor");  end
        default: if (rbp !== ~(ra ^ rb)) begin failures++; $display("FAIL bp xnor"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
