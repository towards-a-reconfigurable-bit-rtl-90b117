// tb_uop_sequencer: runs a small nested-loop micro-program and compares the
// micro-op stream, cycle by cycle, with one built here from explicit
// for-loops: init loop on counter 0, outer loop on counter 0 with an inner
// loop on counter 1, in both the shrinking-inner-loop mode and the fixed
// trip-count mode. Also checks the start-cycle carry init, set_cin, the
// uop count, done, and host pass-through while idle.
module tb_uop_sequencer;
  import vram_pkg::*;
  import vram_tb_pkg::*;
  localparam int COLS = 256;

  logic clk = 0, rst_n = 0;
  logic prog_we, busy, done, host_valid;
  logic [PC_W-1:0] prog_addr;
  uprog_word_t prog_wdata;
  start_cmd_t cmd;
  logic [15:0] uop_count;
  array_uop_t host_uop, uop;
  logic [COLS-1:0] host_data, host_mask, data_in, mask_in;
  int checks = 0, failures = 0;

  uop_sequencer #(.DEPTH(32), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  array_uop_t exp_q [$];
  logic       imm_q [$];

  function automatic array_uop_t eu(array_op_e op, src_e src, int ra, int rb, bit srl,
                                    bit init_cin, bit cin);
    return au(op, src, COND_IN, ra, rb, srl, init_cin, cin);
  endfunction

  task automatic build_expected(int n0, bit tri_mode, int n1);
    exp_q.delete(); imm_q.delete();
    for (int i = 0; i < n0; i++) begin
      exp_q.push_back(eu(OP_WR, SRC_AND, 10 + i, 0, 0, 0, 0)); imm_q.push_back(1);
    end
    for (int i = 0; i < n0; i++) begin
      int inner;
      inner = tri_mode ? n0 - i : n1;
      exp_q.push_back(eu(OP_RD, SRC_AND, 50 + i, 0, 0, 0, (i > 0)));
      imm_q.push_back(0);
      for (int j = 0; j < inner; j++) begin
        exp_q.push_back(eu(OP_BLC, SRC_AND, 20 + i + j, 40 + j, 0, 1, 1)); imm_q.push_back(0);
        exp_q.push_back(eu(OP_WB, SRC_ADD, 60 + i + j, 0, 1, 0, 1));      imm_q.push_back(0);
      end
      exp_q.push_back(eu(OP_NOP, SRC_AND, 0, 0, 0, 0, 1)); imm_q.push_back(0);
    end
  endtask

  task automatic run(int n0, bit tri_mode, int n1);
    int n;
    build_expected(n0, tri_mode, n1);
    n = exp_q.size();
    @(negedge clk);
    while (busy) @(negedge clk);   // a wrong stream may leave the last run going
    cmd = '{start: 1, pc: 0, trip0: 8'(n0), trip1: 8'(n1), tri_inner: tri_mode, cin: 0};
    #1;
    checks++;
    if (!(uop.op == OP_NOP && uop.init_cin && !uop.cin)) begin
      failures++; $display("FAIL start-cycle carry init");
    end
    @(negedge clk);
    cmd.start = 0;
    for (int k = 0; k < n; k++) begin
      array_uop_t e;
      e = exp_q[k];
      checks++;
      if (!busy || uop.op != e.op || uop.src != e.src || uop.row_a != e.row_a ||
          (e.op == OP_BLC && uop.row_b != e.row_b) || uop.srl != e.srl ||
          uop.init_cin != e.init_cin || uop.cin != e.cin ||
          data_in != {COLS{imm_q[k]}} || mask_in != '1) begin
        failures++;
        $display("FAIL step %0d: op %0d/%0d ra %0d/%0d rb %0d/%0d cin %0d/%0d", k,
                 uop.op, e.op, uop.row_a, e.row_a, uop.row_b, e.row_b, uop.cin, e.cin);
      end
      @(negedge clk);
    end
    checks++;
    if (busy || !done || uop_count != 16'(n)) begin
      failures++; $display("FAIL end: busy=%0d done=%0d count=%0d exp %0d", busy, done, uop_count, n);
    end
  endtask

  initial begin
    prog_we = 0; prog_addr = '0; prog_wdata = '0; cmd = '0;
    host_valid = 0; host_uop = UOP_NOP; host_data = '0; host_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    begin
      uprog_word_t p [5];
      p[0] = uw(OP_WR, SRC_AND, COND_IN, 10, IDX_I0, 0, IDX_NONE, 1, 0, 0, 0, CTL_JND0, 0);
      p[1] = uw(OP_RD, SRC_AND, COND_IN, 50, IDX_I0);
      p[2] = uw(OP_BLC, SRC_AND, COND_IN, 20, IDX_I01, 40, IDX_I1, 0, 1, 1);
      p[3] = uw(OP_WB, SRC_ADD, COND_IN, 60, IDX_I01, 0, IDX_NONE, 0, 0, 0, 1, CTL_JND1, 2);
      p[4] = uw(OP_NOP, SRC_AND, COND_IN, 0, IDX_NONE, 0, IDX_NONE, 0, 0, 0, 0, CTL_JND0, 1, 1);
      for (int i = 0; i < 5; i++) begin
        @(negedge clk);
        prog_we = 1; prog_addr = PC_W'(i); prog_wdata = p[i];
      end
      @(negedge clk);
      prog_we = 0;
    end
    run(3, 1, 0);
    run(4, 1, 0);
    run(3, 0, 4);
    run(1, 0, 1);
    // host pass-through while idle
    @(negedge clk);
    host_valid = 1; host_uop = au(OP_WR, SRC_AND, COND_IN, 77);
    host_data = {8{32'hdeadbeef}}; host_mask = {8{32'h0f0f0f0f}};
    #1;
    checks++;
    if (uop != host_uop || data_in != host_data || mask_in != host_mask) begin
      failures++; $display("FAIL host pass-through");
    end
    @(negedge clk);
    host_valid = 0;
    #1;
    checks++;
    if (uop != UOP_NOP) begin failures++; $display("FAIL idle nop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
