// tb_bpcl_element: one 32-bit bit-parallel element. Checks the ripple-carry
// add with carry-in 0 and 1, the XRegister loads (bus, mask_in) and logical
// right shift, and the four write-mask choices.
module tb_bpcl_element;
  import vram_pkg::*;
  localparam int EB = 32;
  logic clk = 0, rst_n = 0;
  logic [EB-1:0] sa_and, sa_nor, din, mask_in, bus, mask_out, xreg;
  logic cin, xr_en;
  logic [1:0] xr_sel;
  src_e src;
  cond_e cond;
  int checks = 0, failures = 0;

  bpcl_element #(.EB(EB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic [EB-1:0] x, logic [EB-1:0] y);
    sa_and = x & y; sa_nor = ~(x | y);
  endtask

  initial begin
    din = '0; mask_in = '0; cin = 0; xr_en = 0; xr_sel = 0; src = SRC_AND; cond = COND_IN;
    put('0, '0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      logic [EB-1:0] a, b;
      a = $urandom; b = $urandom;
      if (k < 4) begin a = '1; b = 32'(k); end   // long carry ripple
      @(negedge clk);
      put(a, b); cin = k[0]; src = SRC_ADD;
      #1;
      checks++;
      if (bus !== a + b + 32'(k[0])) begin
        failures++; $display("FAIL add a=%h b=%h cin=%0d got %h", a, b, k[0], bus);
      end
    end
    // XRegister: load from bus, then shift right step by step
    for (int k = 0; k < 20; k++) begin
      logic [EB-1:0] v, m;
      v = $urandom; m = $urandom;
      @(negedge clk);
      din = v; src = SRC_DIN; xr_en = 1; xr_sel = 0;
      @(negedge clk);
      xr_en = 0;
      checks++;
      if (xreg !== v) begin failures++; $display("FAIL xreg load bus"); end
      for (int s = 1; s <= 3; s++) begin
        @(negedge clk);
        xr_en = 1; xr_sel = 2;
        @(negedge clk);
        xr_en = 0;
        checks++;
        if (xreg !== (v >> s)) begin failures++; $display("FAIL srl %0d", s); end
      end
      // mask choices
      mask_in = m;
      for (int c = 0; c < 4; c++) begin
        logic [EB-1:0] exp;
        logic [EB-1:0] x;
        x = v >> 3;
        cond = cond_e'(c);
        #1;
        case (c)
          0: exp = m;
          1: exp = x;
          2: exp = {EB{x[0]}};
          default: exp = {EB{x[EB-1]}};
        endcase
        checks++;
        if (mask_out !== exp) begin failures++; $display("FAIL cond %0d", c); end
      end
      // load from mask_in
      @(negedge clk);
      xr_en = 1; xr_sel = 1;
      @(negedge clk);
      xr_en = 0;
      checks++;
      if (xreg !== m) begin failures++; $display("FAIL xreg load mask_in"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
