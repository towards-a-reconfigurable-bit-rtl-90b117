// tb_bitcell_array: masked writes and one- and two-row bit-line reads of the
// bitcell array against a reference copy kept in the testbench.
module tb_bitcell_array;
  localparam int ROWS = 128, COLS = 256;
  logic            clk = 0;
  logic [ROWS-1:0] wl_a, wl_b;
  logic            we;
  logic [COLS-1:0] wdata, wmask, bl, blb;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  bitcell_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic wr(int r, logic [COLS-1:0] d, logic [COLS-1:0] m);
    @(negedge clk);
    wl_a = '0; wl_a[r] = 1'b1; wl_b = '0; we = 1; wdata = d; wmask = m;
    @(negedge clk);
    we = 0; wl_a = '0;
    model[r] = (model[r] & ~m) | (d & m);
  endtask

  initial begin
    we = 0; wl_a = '0; wl_b = '0; wdata = '0; wmask = '0;
    // fill every row fully, then overwrite with random masks
    for (int r = 0; r < ROWS; r++) begin
      model[r] = '0;
      wr(r, rnd(), '1);
    end
    for (int k = 0; k < 300; k++) wr($urandom_range(0, ROWS - 1), rnd(), rnd());
    // precharged bit lines with no row selected
    #1;
    checks++;
    if (bl !== '1 || blb !== '1) begin failures++; $display("FAIL precharge"); end
    for (int k = 0; k < 400; k++) begin
      int a, b;
      a = $urandom_range(0, ROWS - 1);
      b = (k % 4 == 0) ? a : $urandom_range(0, ROWS - 1);
      wl_a = '0; wl_b = '0; wl_a[a] = 1'b1;
      if (k % 8 != 1) wl_b[b] = 1'b1;
      #1;
      checks++;
      if (k % 8 == 1) begin
        if (bl !== model[a] || blb !== ~model[a]) begin
          failures++; $display("FAIL single read row %0d", a);
        end
      end else if (bl !== (model[a] & model[b]) || blb !== ~(model[a] | model[b])) begin
        failures++; $display("FAIL blc rows %0d,%0d", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
