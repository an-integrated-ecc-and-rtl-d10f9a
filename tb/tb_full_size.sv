// tb_full_size: the memory wrapper at its default size (32K x 64 data bits,
// 7 check bits, 8 spare rows, 4 spare columns, ITER_T = 4) through one
// complete life cycle:
//  1. production: March C- BIST over all 32K words with a cell stuck at 0
//     (word 12345, bit 50): exactly the two r1 reads of that word fail, with
//     the right address and syndrome; the run takes 10*32768 + 1 cycles; the
//     tester enters spare column 0 for (column 1, bit 50); a second BIST run
//     passes;
//  2. field use: all 32K words written and read back through the ECC; a soft
//     error is scrubbed (Hold 4 cycles); a hard fault is identified after 4
//     rounds and repaired on-line with spare row 0 (Hold 1 + 3*4 + 2*8 + 1 =
//     30 cycles); all words are read back again.
module tb_full_size;
  import ecc_pkg::*;
  localparam int DW = 64, CWW = 71, AW = 15, N = 2**AW;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, mbs = 0;
  logic req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic rvalid, rd_err, rd_ue;
  logic bist_start = 0, bist_done, bist_fail_hold, bist_busy;
  logic [AW-1:0] bist_fail_addr;
  logic [CWW-1:0] bist_fail_syn;
  rc_op_e rc_op = RC_NOP;
  logic [1:0] rc_cidx = '0;
  logic [2:0] rc_ridx = '0;
  logic [11:0] rc_row = '0;
  logic [2:0] rc_col = '0;
  logic [6:0] rc_bit = '0;
  logic repair_defer = 0, mem_idle = 0;
  ecc_state_e ecc_state;
  logic rc_fr;
  logic [7:0] rc_row_used, rc_row_ff;
  logic [3:0] rc_col_used, rc_col_ff;
  logic ev_detect, ev_soft, ev_hard, ev_repaired, ev_spare_fault;

  mem_test_wrapper dut (.*);

  always #5 clk = ~clk;
  wire hold = bist_fail_hold && !mbs;

  bit sa0 = 0, sa1 = 0;
  bit sa1_val;
  always @(negedge clk) begin
    if (sa0) dut.u_core.u_mem.mem[12345][50] = 1'b0;
    if (sa1) dut.u_core.u_mem.mem[20000][33] = sa1_val;
  end

  int n_fail = 0, n_bad = 0, n_soft = 0, n_hard = 0, n_rep = 0;
  always @(posedge clk) if (rst_n) begin
    if (mbs && bist_fail_hold) begin
      n_fail++;
      if (bist_fail_addr != 15'd12345 || bist_fail_syn != (71'd1 << 50)) n_bad++;
    end
    n_soft += int'(ev_soft);
    n_hard += int'(ev_hard);
    n_rep  += int'(ev_repaired);
  end

  // words are a fixed function of the address so no 32K model is needed
  function automatic logic [DW-1:0] pattern(input int a, input int salt);
    logic [31:0] h;
    h = 32'(a) * 32'h9e3779b1 + 32'(salt);
    return {h ^ 32'h5bd1e995, ~h};
  endfunction

  task automatic expect_that(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic bist_run(output int cycles);
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    cycles = 0;
    while (!bist_done && cycles < 20 * N) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic fill(input int salt);
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      req = 1; we = 1; addr = AW'(a); wdata = pattern(a, salt);
    end
    @(negedge clk);
    req = 0; we = 0;
  endtask

  // pipelined read of every word, one request per cycle
  task automatic check_all(input int salt, input string what);
    int errs, exp_a;
    errs = 0;
    exp_a = 0;
    for (int a = 0; a <= N; a++) begin
      @(negedge clk);
      if (a > 0) begin
        if (!rvalid || rdata != pattern(exp_a, salt) || rd_err) errs++;
        exp_a = a;
      end
      req = (a < N); we = 0; addr = AW'(a);
    end
    req = 0;
    expect_that(errs == 0, $sformatf("%s: %0d words wrong", what, errs));
  endtask

  task automatic rd_hold(input int a, input int salt, output int hc);
    @(negedge clk);
    req = 1; we = 0; addr = AW'(a);
    @(negedge clk);
    req = 0;
    expect_that(rvalid && rdata == pattern(a, salt), $sformatf("read of word %0d", a));
    hc = 0;
    while (hold && hc < 100000) begin hc++; @(negedge clk); end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, hc;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- production test ----
    mbs = 1;
    sa0 = 1;
    bist_run(cyc);
    expect_that(cyc == 10 * N + 1, $sformatf("BIST cycles %0d", cyc));
    expect_that(n_fail == 2 && n_bad == 0, $sformatf("BIST fails %0d (%0d wrong)", n_fail, n_bad));
    @(negedge clk);
    rc_op = RC_SET_COL; rc_cidx = 2'd0; rc_col = 3'(12345 % 8); rc_bit = 7'd50;
    @(negedge clk);
    rc_op = RC_NOP;
    n_fail = 0;
    bist_run(cyc);
    expect_that(n_fail == 0, "BIST passes after repair");
    mbs = 0;

    // ---- field use ----
    fill(1);
    check_all(1, "after fill");

    dut.u_core.u_mem.mem[777][5] = !dut.u_core.u_mem.mem[777][5];
    rd_hold(777, 1, hc);
    expect_that(hc == 4 && n_soft == 1, $sformatf("soft error hold %0d", hc));

    sa1_val = !dut.u_core.u_mem.mem[20000][33];
    sa1 = 1;
    rd_hold(20000, 1, hc);
    expect_that(hc == 30 && n_hard == 1 && n_rep == 1, $sformatf("hard repair hold %0d", hc));
    expect_that(rc_row_used == 8'h01 && rc_col_used == 4'h1, "spare usage");
    check_all(1, "after repair");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
