// tb_bus_logic: every bus source for every legal pair of sense outputs.
module tb_bus_logic;
  import vram_pkg::*;
  src_e src;
  logic sa_and, sa_nor, sum, din, xor_v, bus;
  int checks = 0, failures = 0;

  bus_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // two stored bits x, y: AND = x&y, NOR = ~(x|y)
    for (int s = 0; s <= 8; s++)
      for (int xy = 0; xy < 4; xy++)
        for (int sd = 0; sd < 4; sd++) begin
          logic x, y, exp;
          x = xy[0]; y = xy[1];
          src = src_e'(s); sa_and = x & y; sa_nor = ~(x | y);
          sum = sd[0]; din = sd[1];
          #1;
          case (s)
            0: exp = x & y;
            1: exp = ~(x & y);
            2: exp = x | y;
            3: exp = ~(x | y);
            4: exp = x ^ y;
            5: exp = ~(x ^ y);
            6: exp = sd[0];
            7: exp = sd[1];
            default: exp = 1'b0;
          endcase
          checks += 2;
          if (bus !== exp) begin
            failures++; $display("FAIL src=%0d x=%0d y=%0d bus=%0d", s, x, y, bus);
          end
          if (xor_v !== (x ^ y)) begin
            failures++; $display("FAIL xor x=%0d y=%0d", x, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
