// tb_vram_top: end-to-end test of both VRAM flavours at full size
// (128 x 256 sub-arrays, 32-bit bit-parallel elements).
//
// Loads micro-programs for add, sub, xor, mul and mac into each flavour,
// writes random operands through the host port (transposed for bit-serial,
// 8 elements per row for bit-parallel), runs each macro-op, reads the result
// rows back and compares every element with arithmetic done here. The cycle
// count of each macro-op is checked against the expected micro-op counts:
//   bit-serial,   32-bit: add 64, sub 128, xor 64, mul 1185, mac 1152
//   bit-serial,    8-bit: add 16, mul 105, mac 96
//   bit-parallel, 32-bit: add 2, sub 4, xor 2, mul 133, mac 132
//   bit-parallel, 8-bit operands in 32-bit elements, 8 multiplier steps:
//                         mul 37, mac 36
// Every mechanism (carry init, jump on each counter, shrinking inner loop,
// masked write-back, XRegister shift, LSB-conditioned write, host read and
// write) is counted and must occur at least once.
module tb_vram_top;
  import vram_pkg::*;
  import vram_tb_pkg::*;
  localparam int COLS = DEF_COLS, EB = DEF_EB, NE = COLS / EB;
  localparam int BS = 0, BP = 1;

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

  // ---------------- mechanism counters ----------------
  int n_cin_init, n_jnd0, n_jnd1, n_tri, n_masked_bs, n_srl, n_cond_lsb, n_host_wr, n_host_rd;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_vram[0].uop.init_cin) n_cin_init++;
    if (busy[0] && dut.g_vram[0].u_seq.jump && dut.g_vram[0].u_seq.word.ctl == CTL_JND0) n_jnd0++;
    if (busy[1] && dut.g_vram[1].u_seq.jump && dut.g_vram[1].u_seq.word.ctl == CTL_JND0) n_jnd0++;
    if (busy[0] && dut.g_vram[0].u_seq.jump && dut.g_vram[0].u_seq.word.ctl == CTL_JND1) n_jnd1++;
    for (int f = 0; f < 2; f++) begin
      if (!busy[f] && host_valid[f] && host_uop[f].op == OP_WR) n_host_wr++;
      if (!busy[f] && host_valid[f] && host_uop[f].op == OP_RD) n_host_rd++;
    end
    if (busy[0] && dut.g_vram[0].u_seq.tri_q && !dut.g_vram[0].u_seq.jump &&
        dut.g_vram[0].u_seq.word.ctl == CTL_JND1) n_tri++;
    if (busy[0] && dut.g_vram[0].u_sub.we && dut.g_vram[0].u_sub.wmask != '1) n_masked_bs++;
    if (dut.g_vram[1].uop.srl) n_srl++;
    if (dut.g_vram[1].uop.op == OP_WB && dut.g_vram[1].uop.cond == COND_LSB) n_cond_lsb++;
  end

  // ---------------- host access ----------------
  task automatic host(int f, array_uop_t u, logic [COLS-1:0] d = '0, logic [COLS-1:0] m = '1);
    @(negedge clk);
    host_valid[f] = 1; host_uop[f] = u; host_data[f] = d; host_mask[f] = m;
    @(negedge clk);
    host_valid[f] = 0; host_uop[f] = UOP_NOP;
  endtask

  task automatic wr_row(int f, int r, logic [COLS-1:0] d);
    host(f, au(OP_WR, SRC_AND, COND_IN, r), d);
  endtask

  task automatic rd_row(int f, int r, output logic [COLS-1:0] v);
    host(f, au(OP_RD, SRC_AND, COND_IN, r));
    #1 v = data_out[f];
  endtask

  task automatic load(int f, int pc, uprog_word_t w);
    @(negedge clk);
    prog_we[f] = 1; prog_addr[f] = PC_W'(pc); prog_wdata[f] = w;
    @(negedge clk);
    prog_we[f] = 0;
  endtask

  // run a macro-op, check its cycle count both from uop_count and by counting
  task automatic run(int f, string name, int pc, int n0, bit tri_mode, bit cin, int exp_cycles);
    int cyc;
    @(negedge clk);
    cmd[f] = '{start: 1, pc: PC_W'(pc), trip0: 8'(n0), trip1: 8'(n0), tri_inner: tri_mode,
               cin: cin};
    @(negedge clk);
    cmd[f].start = 0;
    cyc = 0;
    while (!done[f]) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (uop_count[f] != 16'(exp_cycles) || cyc != exp_cycles) begin
      failures++;
      $display("FAIL %s: %0d micro-ops (%0d cycles), expected %0d", name, uop_count[f], cyc,
               exp_cycles);
    end else $display("%s: %0d cycles", name, cyc);
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // ---------------- bit-serial data (transposed) ----------------
  localparam int RA = 0, RB = 32, RC = 64;
  logic [31:0] a_bs [COLS], b_bs [COLS], c_bs [COLS];

  task automatic bs_put(int base, int nbits, ref logic [31:0] v [COLS]);
    for (int i = 0; i < nbits; i++) begin
      logic [COLS-1:0] r;
      for (int c = 0; c < COLS; c++) r[c] = v[c][i];
      wr_row(BS, base + i, r);
    end
  endtask

  task automatic bs_get(int base, int nbits, ref logic [31:0] v [COLS]);
    for (int c = 0; c < COLS; c++) v[c] = '0;
    for (int i = 0; i < nbits; i++) begin
      logic [COLS-1:0] r;
      rd_row(BS, base + i, r);
      for (int c = 0; c < COLS; c++) v[c][i] = r[c];
    end
  endtask

  task automatic bs_op(string name, int pc, int nbits, bit tri_mode, bit cin, int exp_cycles,
                       int kind, bit preset_c);
    logic [31:0] msk;
    msk = (nbits == 32) ? '1 : (32'd1 << nbits) - 1;
    for (int c = 0; c < COLS; c++) begin
      a_bs[c] = $urandom & msk; b_bs[c] = $urandom & msk; c_bs[c] = $urandom & msk;
    end
    a_bs[0] = msk; b_bs[0] = 1; a_bs[1] = 0; b_bs[1] = msk;   // corner cases
    bs_put(RA, nbits, a_bs);
    bs_put(RB, nbits, b_bs);
    if (preset_c) bs_put(RC, nbits, c_bs);
    run(BS, name, pc, nbits, tri_mode, cin, exp_cycles);
    begin
      logic [31:0] got [COLS];
      int bad;
      bs_get(RC, nbits, got);
      bad = 0;
      for (int c = 0; c < COLS; c++) begin
        logic [31:0] e;
        case (kind)
          0: e = a_bs[c] + b_bs[c];
          1: e = a_bs[c] - b_bs[c];
          2: e = a_bs[c] ^ b_bs[c];
          3: e = a_bs[c] * b_bs[c];
          default: e = c_bs[c] + a_bs[c] * b_bs[c];
        endcase
        e &= msk;
        checks++;
        if (got[c] !== e) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s col %0d: a=%h b=%h got %h exp %h", name, c, a_bs[c],
                                b_bs[c], got[c], e);
        end
      end
    end
  endtask

  // ---------------- bit-parallel data ----------------
  localparam int PA = 0, PB = 1, PC = 2;
  // nbits < EB limits a and b to nbits bits and runs nbits multiplier steps
  task automatic bp_op(string name, int pc, bit cin, int exp_cycles, int kind, int nbits = EB);
    logic [COLS-1:0] ra, rb, rc, got;
    logic [EB-1:0] msk;
    msk = (nbits == EB) ? '1 : (EB'(1) << nbits) - 1;
    ra = rnd(); rb = rnd(); rc = rnd();
    for (int e = 0; e < NE; e++) begin
      ra[e*EB +: EB] &= msk; rb[e*EB +: EB] &= msk;
    end
    ra[EB-1:0] = msk; rb[EB-1:0] = 1;
    ra[2*EB-1:EB] = msk; rb[2*EB-1:EB] = msk;
    wr_row(BP, PA, ra); wr_row(BP, PB, rb); wr_row(BP, PC, rc);
    run(BP, name, pc, nbits, 1'b0, cin, exp_cycles);
    rd_row(BP, PC, got);
    for (int e = 0; e < NE; e++) begin
      logic [EB-1:0] a, b, c, x;
      a = ra[e*EB +: EB]; b = rb[e*EB +: EB]; c = rc[e*EB +: EB];
      case (kind)
        0: x = a + b;
        1: x = a - b;
        2: x = a ^ b;
        3: x = a * b;
        default: x = c + a * b;
      endcase
      checks++;
      if (got[e*EB +: EB] !== x) begin
        failures++; $display("FAIL %s elem %0d: a=%h b=%h got %h exp %h", name, e, a, b,
                             got[e*EB +: EB], x);
      end
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      prog_we[f] = 0; prog_addr[f] = '0; prog_wdata[f] = '0; cmd[f] = '0;
      host_valid[f] = 0; host_uop[f] = UOP_NOP; host_data[f] = '0; host_mask[f] = '1;
    end
    n_cin_init = 0; n_jnd0 = 0; n_jnd1 = 0; n_tri = 0; n_masked_bs = 0; n_srl = 0;
    n_cond_lsb = 0; n_host_wr = 0; n_host_rd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- bit-serial micro-programs ----
    // add c, a, b                                           (pc 0)
    load(BS, 0, uw(OP_BLC, SRC_AND, COND_IN, RA, IDX_I0, RB, IDX_I0));
    load(BS, 1, uw(OP_WB, SRC_ADD, COND_IN, RC, IDX_I0, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 0, 1));
    // sub c, a, b: c_i = ~b_i, then c_i = a_i + c_i, carry 1 (pc 2)
    load(BS, 2, uw(OP_RD, SRC_AND, COND_IN, RB, IDX_I0));
    load(BS, 3, uw(OP_WB, SRC_NOR, COND_IN, RC, IDX_I0));
    load(BS, 4, uw(OP_BLC, SRC_AND, COND_IN, RA, IDX_I0, RC, IDX_I0));
    load(BS, 5, uw(OP_WB, SRC_ADD, COND_IN, RC, IDX_I0, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 2, 1));
    // mul c, a, b                                           (pc 6; mac starts at 8)
    load(BS, 6, uw(OP_WR_MASK, SRC_DIN, COND_IN, 0, IDX_NONE, 0, IDX_NONE, 1));
    load(BS, 7, uw(OP_WR, SRC_AND, COND_IN, RC, IDX_I0, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 7));
    load(BS, 8, uw(OP_RD, SRC_AND, COND_IN, RB, IDX_I0));
    load(BS, 9, uw(OP_WR_MASK, SRC_AND, COND_IN, 0, IDX_NONE, 0, IDX_NONE, 0, 1, 0));
    load(BS, 10, uw(OP_BLC, SRC_AND, COND_IN, RC, IDX_I01, RA, IDX_I1));
    load(BS, 11, uw(OP_WB, SRC_ADD, COND_IN, RC, IDX_I01, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND1, 10));
    load(BS, 12, uw(OP_NOP, SRC_AND, COND_IN, 0, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 8, 1));
    // xor c, a, b                                           (pc 13)
    load(BS, 13, uw(OP_BLC, SRC_AND, COND_IN, RA, IDX_I0, RB, IDX_I0));
    load(BS, 14, uw(OP_WB, SRC_XOR, COND_IN, RC, IDX_I0, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 13, 1));

    // ---- bit-parallel micro-programs (rows: a 0, b 1, c 2, t0 3) ----
    load(BP, 0, uw(OP_BLC, SRC_AND, COND_IN, PA, IDX_NONE, PB));
    load(BP, 1, uw(OP_WB, SRC_ADD, COND_IN, PC, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
    load(BP, 2, uw(OP_RD, SRC_AND, COND_IN, PB));
    load(BP, 3, uw(OP_WB, SRC_NOR, COND_IN, PC));
    load(BP, 4, uw(OP_BLC, SRC_AND, COND_IN, PA, IDX_NONE, PC));
    load(BP, 5, uw(OP_WB, SRC_ADD, COND_IN, PC, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));
    load(BP, 6, uw(OP_WR, SRC_AND, COND_IN, PC));                       // c = 0 (mac starts at 7)
    load(BP, 7, uw(OP_RD, SRC_AND, COND_IN, PA));
    load(BP, 8, uw(OP_WB, SRC_AND, COND_IN, 3));                        // t0 = a
    load(BP, 9, uw(OP_RD, SRC_AND, COND_IN, PB));
    load(BP, 10, uw(OP_WR_MASK, SRC_AND));                              // XRegister = b
    load(BP, 11, uw(OP_BLC, SRC_AND, COND_IN, PC, IDX_NONE, 3));
    load(BP, 12, uw(OP_WB, SRC_ADD, COND_LSB, PC, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 1)); // ; srl
    load(BP, 13, uw(OP_RD, SRC_AND, COND_IN, 3));
    load(BP, 14, uw(OP_WB, SRC_ADD, COND_IN, 3, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 11, 1));
    load(BP, 15, uw(OP_BLC, SRC_AND, COND_IN, PA, IDX_NONE, PB));
    load(BP, 16, uw(OP_WB, SRC_XOR, COND_IN, PC, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_NONE, 0, 1));

    // ---- bit-serial runs ----
    bs_op("bs add 32b", 0, 32, 0, 0, 64, 0, 0);
    bs_op("bs sub 32b", 2, 32, 0, 1, 128, 1, 0);
    bs_op("bs xor 32b", 13, 32, 0, 0, 64, 2, 0);
    bs_op("bs mul 32b", 6, 32, 1, 0, 1185, 3, 0);
    bs_op("bs mac 32b", 8, 32, 1, 0, 1152, 4, 1);
    bs_op("bs add 8b", 0, 8, 0, 0, 16, 0, 0);
    bs_op("bs mul 8b", 6, 8, 1, 0, 105, 3, 0);
    bs_op("bs mac 8b", 8, 8, 1, 0, 96, 4, 1);

    // ---- bit-parallel runs ----
    bp_op("bp add", 0, 0, 2, 0);
    bp_op("bp sub", 2, 1, 4, 1);
    bp_op("bp xor", 15, 0, 2, 2);
    bp_op("bp mul", 6, 0, 133, 3);
    bp_op("bp mac", 7, 0, 132, 4);
    bp_op("bp mul 8b", 6, 0, 37, 3, 8);
    bp_op("bp mac 8b", 7, 0, 36, 4, 8);

    // ---- both flavours at once ----
    @(negedge clk);
    cmd[BS] = '{start: 1, pc: 0, trip0: 8'd32, trip1: 8'd32, tri_inner: 0, cin: 0};
    cmd[BP] = '{start: 1, pc: 0, trip0: 8'd32, trip1: 8'd32, tri_inner: 0, cin: 0};
    @(negedge clk);
    cmd[BS].start = 0; cmd[BP].start = 0;
    checks++;
    if (!(busy[BS] && busy[BP])) begin failures++; $display("FAIL concurrent start"); end
    while (busy[BS] || busy[BP]) @(negedge clk);

    begin
      string names [9];
      int    cnt   [9];
      names = '{"carry init", "j_n_done_0 jump", "j_n_done_1 jump", "shrinking inner loop",
                "masked bit-serial write-back", "XRegister shift", "LSB-conditioned write-back",
                "host write", "host read"};
      cnt = '{n_cin_init, n_jnd0, n_jnd1, n_tri, n_masked_bs, n_srl, n_cond_lsb, n_host_wr,
              n_host_rd};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %-30s %0d", names[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
