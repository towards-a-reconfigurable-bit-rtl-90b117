// tb_bscl_column: one bit-serial column. Runs random 16-bit additions and
// subtractions one bit per cycle (carry held in the XRegister), checks the
// logic sources, and the mask latch: transparent load from mask_in or the
// bus, hold when disabled.
module tb_bscl_column;
  import vram_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sa_and, sa_nor, din, mask_in, init_cin, cin, ff_en, lat_en, s_mask_in;
  logic bus, mask_out;
  src_e src;
  int checks = 0, failures = 0;

  bscl_column dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    init_cin = 0; ff_en = 0; lat_en = 0; s_mask_in = 0; src = SRC_AND;
  endtask

  initial begin
    sa_and = 0; sa_nor = 0; din = 0; mask_in = 0; cin = 0;
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // serial add / subtract
    for (int k = 0; k < 200; k++) begin
      logic [15:0] a, b, bb, res, exp;
      logic sub;
      a = 16'($urandom); b = 16'($urandom); sub = k[0];
      bb  = sub ? ~b : b;
      exp = sub ? a - b : a + b;
      @(negedge clk);
      idle(); init_cin = 1; cin = sub;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        idle();
        sa_and = a[i] & bb[i]; sa_nor = ~(a[i] | bb[i]);
        src = SRC_ADD; ff_en = 1;
        #1 res[i] = bus;
      end
      checks++;
      if (res !== exp) begin
        failures++; $display("FAIL %s a=%h b=%h got %h exp %h", sub ? "sub" : "add", a, b, res, exp);
      end
    end
    // logic sources
    for (int k = 0; k < 64; k++) begin
      logic x, y, exp;
      x = k[0]; y = k[1];
      @(negedge clk);
      idle(); sa_and = x & y; sa_nor = ~(x | y); src = src_e'((k >> 2) % 6);
      #1;
      case ((k >> 2) % 6)
        0: exp = x & y; 1: exp = ~(x & y); 2: exp = x | y;
        3: exp = ~(x | y); 4: exp = x ^ y; default: exp = ~(x ^ y);
      endcase
      checks++;
      if (bus !== exp) begin failures++; $display("FAIL logic src=%0d", (k >> 2) % 6); end
    end
    // mask latch
    for (int k = 0; k < 100; k++) begin
      logic m, bv, hold;
      m = 1'($urandom); bv = 1'($urandom);
      @(negedge clk);
      idle(); lat_en = 1; s_mask_in = k[0]; mask_in = m; din = bv; src = SRC_DIN;
      #1;
      hold = k[0] ? m : bv;
      checks++;
      if (mask_out !== hold) begin failures++; $display("FAIL transparent latch"); end
      @(negedge clk);
      idle(); mask_in = ~m; din = ~bv; src = SRC_DIN;
      #1;
      checks++;
      if (mask_out !== hold) begin failures++; $display("FAIL latch hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
