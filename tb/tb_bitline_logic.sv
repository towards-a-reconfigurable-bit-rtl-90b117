// tb_bitline_logic: the sense amplifiers sample on sense_en and hold otherwise.
module tb_bitline_logic;
  localparam int COLS = 256;
  logic            clk = 0, rst_n = 0, sense_en;
  logic [COLS-1:0] bl, blb, sa_and, sa_nor, exp_and, exp_nor;
  int checks = 0, failures = 0;

  bitline_logic #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    sense_en = 0; bl = '0; blb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (sa_and !== '0 || sa_nor !== '0) begin failures++; $display("FAIL reset"); end
    exp_and = '0; exp_nor = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      sense_en = ($urandom_range(0, 2) == 0);
      bl = rnd(); blb = rnd();
      if (sense_en) begin exp_and = bl; exp_nor = blb; end
      @(negedge clk);
      sense_en = 0; bl = rnd(); blb = rnd();
      checks++;
      if (sa_and !== exp_and || sa_nor !== exp_nor) begin
        failures++; $display("FAIL step %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
