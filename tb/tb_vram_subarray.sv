// tb_vram_subarray: drives a bit-serial and a bit-parallel sub-array with
// hand-issued micro-ops and checks the rows they leave against values
// computed here: BS 16-bit add, subtract and conditional (masked) copy,
// BP 32-bit add, subtract and a conditional add masked by the LSB / MSB of
// a shifted XRegister. Also checks that rd/blc take one cycle each.
module tb_vram_subarray;
  import vram_pkg::*;
  import vram_tb_pkg::*;
  localparam int ROWS = 128, COLS = 256, EB = 32, NE = COLS / EB;

  logic clk = 0, rst_n = 0;
  array_uop_t      uop [2];
  logic [COLS-1:0] din [2], min [2], dout [2];
  int checks = 0, failures = 0;

  vram_subarray #(.FLAVOR(FLAVOR_BS)) dut_bs (
    .clk(clk), .rst_n(rst_n), .uop(uop[0]), .data_in(din[0]), .mask_in(min[0]),
    .data_out(dout[0]));
  vram_subarray #(.FLAVOR(FLAVOR_BP)) dut_bp (
    .clk(clk), .rst_n(rst_n), .uop(uop[1]), .data_in(din[1]), .mask_in(min[1]),
    .data_out(dout[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one micro-op for one cycle
  task automatic issue(int f, array_uop_t u, logic [COLS-1:0] d = '0,
                       logic [COLS-1:0] m = '1);
    uop[f] = u; din[f] = d; min[f] = m;
    @(negedge clk);
    uop[f] = UOP_NOP; din[f] = '0; min[f] = '1;
  endtask

  task automatic read_row(int f, int r, output logic [COLS-1:0] v);
    issue(f, au(OP_RD, SRC_AND, COND_IN, r));
    #1 v = dout[f];
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  logic [15:0] a16 [COLS], b16 [COLS];
  logic [EB-1:0] ae [NE], be [NE];

  initial begin
    logic [COLS-1:0] row, m;
    for (int f = 0; f < 2; f++) begin uop[f] = UOP_NOP; din[f] = '0; min[f] = '1; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- bit-serial ----------------
    // operands transposed: a in rows 0..15, b in rows 16..31
    for (int c = 0; c < COLS; c++) begin a16[c] = 16'($urandom); b16[c] = 16'($urandom); end
    for (int i = 0; i < 16; i++) begin
      logic [COLS-1:0] ra, rb;
      for (int c = 0; c < COLS; c++) begin ra[c] = a16[c][i]; rb[c] = b16[c][i]; end
      issue(0, au(OP_WR, SRC_AND, COND_IN, i), ra);
      issue(0, au(OP_WR, SRC_AND, COND_IN, 16 + i), rb);
    end
    // c = a + b in rows 32..47: carry init, then blc / wb.add per bit
    issue(0, au(OP_NOP, SRC_AND, COND_IN, 0, 0, 0, 1, 0));
    for (int i = 0; i < 16; i++) begin
      issue(0, au(OP_BLC, SRC_AND, COND_IN, i, 16 + i));
      issue(0, au(OP_WB, SRC_ADD, COND_IN, 32 + i));
    end
    // d = a - b in rows 48..63: rd b, wb.nor d, blc a,d, wb.add d, carry 1
    issue(0, au(OP_NOP, SRC_AND, COND_IN, 0, 0, 0, 1, 1));
    for (int i = 0; i < 16; i++) begin
      issue(0, au(OP_RD, SRC_AND, COND_IN, 16 + i));
      issue(0, au(OP_WB, SRC_NOR, COND_IN, 48 + i));
      issue(0, au(OP_BLC, SRC_AND, COND_IN, i, 48 + i));
      issue(0, au(OP_WB, SRC_ADD, COND_IN, 48 + i));
    end
    // e = (b[0] ? a ^ b : 0): clear e, mask from row 16 (bit 0 of b), then
    // a masked write-back of a ^ b in rows 64..79
    for (int i = 0; i < 16; i++) issue(0, au(OP_WR, SRC_AND, COND_IN, 64 + i), '0);
    issue(0, au(OP_RD, SRC_AND, COND_IN, 16));
    issue(0, au(OP_WR_MASK, SRC_AND));
    for (int i = 0; i < 16; i++) begin
      issue(0, au(OP_BLC, SRC_AND, COND_IN, i, 16 + i));
      issue(0, au(OP_WB, SRC_XOR, COND_IN, 64 + i));
    end
    for (int i = 0; i < 16; i++) begin
      logic [COLS-1:0] rc, rd, re;
      read_row(0, 32 + i, rc);
      read_row(0, 48 + i, rd);
      read_row(0, 64 + i, re);
      for (int c = 0; c < COLS; c++) begin
        logic [15:0] s, d, e;
        s = a16[c] + b16[c]; d = a16[c] - b16[c]; e = b16[c][0] ? a16[c] ^ b16[c] : '0;
        checks += 3;
        if (rc[c] !== s[i]) begin failures++; $display("FAIL bs add col %0d bit %0d", c, i); end
        if (rd[c] !== d[i]) begin failures++; $display("FAIL bs sub col %0d bit %0d", c, i); end
        if (re[c] !== e[i]) begin failures++; $display("FAIL bs cond col %0d bit %0d", c, i); end
      end
    end

    // ---------------- bit-parallel ----------------
    for (int e = 0; e < NE; e++) begin ae[e] = $urandom; be[e] = $urandom; end
    ae[0] = '1; be[0] = 1;  // carry through all 32 columns
    for (int e = 0; e < NE; e++) row[e*EB +: EB] = ae[e];
    issue(1, au(OP_WR, SRC_AND, COND_IN, 0), row);
    for (int e = 0; e < NE; e++) row[e*EB +: EB] = be[e];
    issue(1, au(OP_WR, SRC_AND, COND_IN, 1), row);
    // add: blc; wb.add  (carry-in 0)
    issue(1, au(OP_BLC, SRC_AND, COND_IN, 0, 1));
    issue(1, au(OP_WB, SRC_ADD, COND_IN, 2));
    // sub: rd b; wb.nor; blc; wb.add with carry-in 1
    issue(1, au(OP_RD, SRC_AND, COND_IN, 1));
    issue(1, au(OP_WB, SRC_NOR, COND_IN, 3));
    issue(1, au(OP_BLC, SRC_AND, COND_IN, 0, 3));
    issue(1, au(OP_WB, SRC_ADD, COND_IN, 3, 0, 0, 0, 1));
    // conditional: XRegister = b >> 1; rows 4/5 = a, then a+b written to
    // row 4 only where (b>>1) has LSB set, to row 5 only where its MSB is set
    issue(1, au(OP_RD, SRC_AND, COND_IN, 1));
    issue(1, au(OP_WR_MASK, SRC_AND));
    issue(1, au(OP_NOP, SRC_AND, COND_IN, 0, 0, 1));
    issue(1, au(OP_RD, SRC_AND, COND_IN, 0));
    issue(1, au(OP_WB, SRC_AND, COND_IN, 4));
    issue(1, au(OP_WB, SRC_AND, COND_IN, 5));
    issue(1, au(OP_BLC, SRC_AND, COND_IN, 0, 1));
    issue(1, au(OP_WB, SRC_ADD, COND_LSB, 4));
    issue(1, au(OP_WB, SRC_ADD, COND_MSB, 5));
    // partial write under mask_in
    m = rnd();
    issue(1, au(OP_WR, SRC_AND, COND_IN, 6), '0);
    issue(1, au(OP_WR, SRC_AND, COND_IN, 6), '1, m);
    begin
      logic [COLS-1:0] r2, r3, r4, r5, r6;
      read_row(1, 2, r2); read_row(1, 3, r3); read_row(1, 4, r4); read_row(1, 5, r5);
      read_row(1, 6, r6);
      for (int e = 0; e < NE; e++) begin
        logic [EB-1:0] sh;
        sh = be[e] >> 1;
        checks += 4;
        if (r2[e*EB +: EB] !== ae[e] + be[e]) begin failures++; $display("FAIL bp add %0d", e); end
        if (r3[e*EB +: EB] !== ae[e] - be[e]) begin failures++; $display("FAIL bp sub %0d", e); end
        if (r4[e*EB +: EB] !== (sh[0] ? ae[e] + be[e] : ae[e])) begin
          failures++; $display("FAIL bp lsb cond %0d", e);
        end
        if (r5[e*EB +: EB] !== (sh[EB-1] ? ae[e] + be[e] : ae[e])) begin
          failures++; $display("FAIL bp msb cond %0d", e);
        end
      end
      checks++;
      if (r6 !== m) begin failures++; $display("FAIL bp masked write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
