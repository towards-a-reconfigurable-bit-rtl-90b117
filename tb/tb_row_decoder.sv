// tb_row_decoder: exhaustive check of the one-hot word-line decoder.
module tb_row_decoder;
  localparam int ROWS = 128;
  logic            en;
  logic [6:0]      addr;
  logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(ROWS)) dut (.en(en), .addr(addr), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        logic [ROWS-1:0] exp;
        en = e[0]; addr = 7'(a);
        #1;
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d wl=%h", e, a, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
