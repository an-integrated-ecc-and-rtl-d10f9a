// tb_mem_test_wrapper: end-to-end test of the memory with integrated ECC and
// redundancy repair, at reduced size (256 words of 16 data + 5 check bits,
// 64 rows x 4 words, 2 spare rows, 2 spare columns, ITER_T = 3).
//
// Sequence, mirroring a product's life:
//  1. production test: a cell stuck at 1 is found by the BIST (fail pulses on
//     the shared pin with address and syndrome), the tester enters a spare row
//     in the RC, and a second BIST run passes;
//  2. field use with a reference model: writes and reads; a soft error is
//     corrected and scrubbed; a hard fault in the main array is repaired with
//     the remaining spare row; a second hard fault, with repair postponed by
//     system software until an idle period, takes a spare column; a hard
//     fault in that spare column marks it faulty and moves to the other spare
//     column; with no redundancy left the controller settles in FFWR and a
//     double error is reported as uncorrectable;
//  3. a request issued while Hold is high is refused and has no effect.
// Every mechanism is counted and a failure is counted for any that never
// happened. All words are read back and compared after every repair.
module tb_mem_test_wrapper;
  import ecc_pkg::*;
  localparam int DW = 16, PW = 5, CWW = 21, AW = 8, CLW = 2, RW = 6, NR = 2, NC = 2, BW = 5;
  localparam int T = 3;
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
  logic [0:0] rc_cidx = '0, rc_ridx = '0;
  logic [RW-1:0] rc_row = '0;
  logic [CLW-1:0] rc_col = '0;
  logic [BW-1:0] rc_bit = '0;
  logic repair_defer = 0, mem_idle = 0;
  ecc_state_e ecc_state;
  logic rc_fr;
  logic [NR-1:0] rc_row_used, rc_row_ff;
  logic [NC-1:0] rc_col_used, rc_col_ff;
  logic ev_detect, ev_soft, ev_hard, ev_repaired, ev_spare_fault;

  mem_test_wrapper #(
    .DATA_W(DW), .ADDR_W(AW), .COL_W(CLW), .N_ROW(NR), .N_COL(NC), .ITER_T(T)
  ) dut (.*);

  always #5 clk = ~clk;

  wire hold = bist_fail_hold && !mbs;

  // ---- fault injection: forced cells ----
  bit sa_main [2];
  int sa_addr [2], sa_bit [2];
  bit sa_val [2];
  bit sa_col = 0;
  int sc_row, sc_idx;
  bit sc_val;
  always @(negedge clk) begin
    for (int k = 0; k < 2; k++)
      if (sa_main[k]) dut.u_core.u_mem.mem[sa_addr[k]][sa_bit[k]] = sa_val[k];
    if (sa_col) dut.u_core.u_rmem.cols[sc_row][sc_idx] = sc_val;
  end

  // ---- mechanism counters ----
  int n_bist_fail = 0, n_bad_fail = 0, n_detect = 0, n_soft = 0, n_hard = 0, n_rep = 0;
  int n_srf = 0, n_pend = 0, n_refused = 0, n_ffwr = 0, n_ue = 0, n_corr = 0;
  int exp_fail_addr, exp_fail_bit;
  always @(posedge clk) if (rst_n) begin
    if (mbs && bist_fail_hold) begin
      n_bist_fail++;
      if (int'(bist_fail_addr) != exp_fail_addr || bist_fail_syn != (CWW'(1) << exp_fail_bit))
        n_bad_fail++;
    end
    n_detect += int'(ev_detect);
    n_soft   += int'(ev_soft);
    n_hard   += int'(ev_hard);
    n_rep    += int'(ev_repaired);
    n_srf    += int'(ev_spare_fault);
    n_pend   += int'(ecc_state == S_PEND);
    n_ffwr   += int'(ecc_state == S_FFWR);
    n_ue     += int'(rd_ue);
    n_corr   += int'(rd_err && !rd_ue);
    n_refused += int'(req && hold);
  end

  logic [DW-1:0] model [2**AW];

  task automatic expect_that(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [CWW-1:0] enc(input logic [DW-1:0] d);
    logic [CWW-1:0] cw;
    int di;
    int unsigned s;
    cw = '0; di = 0; s = 0;
    for (int pos = 1; pos <= CWW; pos++)
      if ((pos & (pos - 1)) != 0) begin cw[pos-1] = d[di]; di++; end
    for (int pos = 1; pos <= CWW; pos++) if (cw[pos-1]) s ^= pos;
    for (int p = 0; p < PW; p++) cw[(1 << p) - 1] = s[p];
    return cw;
  endfunction

  task automatic wr(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    while (hold) @(negedge clk);
    req = 1; we = 1; addr = AW'(a); wdata = d; model[a] = d;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  task automatic rd_check(input int a, output int hold_cycles);
    @(negedge clk);
    while (hold) @(negedge clk);
    req = 1; we = 0; addr = AW'(a);
    @(negedge clk);
    req = 0;
    expect_that(rvalid && rdata == model[a], $sformatf("read word %0d: %h exp %h", a, rdata, model[a]));
    hold_cycles = 0;
    while (hold && hold_cycles < 100000) begin
      hold_cycles++;
      @(negedge clk);
    end
  endtask

  task automatic check_all_words(input string what);
    int hc;
    for (int a = 0; a < 2**AW; a++) begin
      rd_check(a, hc);
      expect_that(hc == 0, $sformatf("%s: word %0d without hold", what, a));
    end
  endtask

  task automatic bist_run(output int cycles);
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    cycles = 0;
    while (!bist_done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic tester(input rc_op_e op, input int idx, input int row, input int col, input int b);
    @(negedge clk);
    rc_op = op; rc_ridx = 1'(idx); rc_cidx = 1'(idx);
    rc_row = RW'(row); rc_col = CLW'(col); rc_bit = BW'(b);
    @(negedge clk);
    rc_op = RC_NOP;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hc, cyc, f0;
    sa_main[0] = 0; sa_main[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ===== 1. production test and repair =====
    mbs = 1;
    exp_fail_addr = 77; exp_fail_bit = 4;
    sa_addr[0] = 77; sa_bit[0] = 4; sa_val[0] = 1; sa_main[0] = 1;
    bist_run(cyc);
    expect_that(cyc == 10 * 2**AW + 1, $sformatf("BIST run %0d cycles", cyc));
    expect_that(n_bist_fail == 3 && n_bad_fail == 0, $sformatf("BIST fails %0d", n_bist_fail));
    tester(RC_SET_ROW, 0, 77 >> CLW, 0, 0);
    f0 = n_bist_fail;
    bist_run(cyc);
    expect_that(n_bist_fail == f0, "BIST passes after production repair");
    expect_that(rc_row_used == 2'b01 && rc_fr, "one spare row used in production");
    mbs = 0;

    // ===== 2. field use =====
    for (int a = 0; a < 2**AW; a++) wr(a, DW'($urandom));
    check_all_words("after fill");
    expect_that(n_detect == 0, "no error on a clean memory");

    // soft error
    dut.u_core.u_mem.mem[10][13] = !dut.u_core.u_mem.mem[10][13];
    rd_check(10, hc);
    expect_that(hc == 4 && n_soft == 1, $sformatf("soft error, hold %0d", hc));
    expect_that(dut.u_core.u_mem.mem[10] == enc(model[10]), "soft error scrubbed");

    // hard fault in MEM: word 200 bit 9 -> spare row 1
    sa_addr[1] = 200; sa_bit[1] = 9; sa_val[1] = !enc(model[200])[9]; sa_main[1] = 1;
    rd_check(200, hc);
    expect_that(hc == 1 + 3 * T + 2 * 4 + 1, $sformatf("row repair, hold %0d", hc));
    expect_that(rc_row_used == 2'b11 && n_rep == 1, "spare row 1 used on-line");
    check_all_words("after row repair");

    // hard fault in MEM with deferred repair: word 130 (row 32, col 2) bit 0
    repair_defer = 1;
    sa_addr[1] = 130; sa_bit[1] = 0; sa_val[1] = !enc(model[130])[0];
    rd_check(130, hc);
    expect_that(hc == 1 + 3 * T && ecc_state == S_PEND, $sformatf("repair deferred, hold %0d", hc));
    wr(131, 16'hbeef);
    rd_check(131, hc);
    // a request while hold is high is refused
    @(negedge clk);
    mem_idle = 1;
    req = 1; we = 1; addr = 8'd5; wdata = ~model[5];
    @(negedge clk);
    req = 0; we = 0; mem_idle = 0;
    while (hold) @(negedge clk);
    expect_that(rc_col_used == 2'b01 && n_rep == 2, "spare column 0 used after idle");
    rd_check(5, hc);
    check_all_words("after column repair");
    repair_defer = 0;

    // hard fault inside spare column 0 (column 2, bit 0) at row 40 (word 162)
    sc_row = 40; sc_idx = 0; sc_val = !enc(model[162])[0]; sa_col = 1;
    rd_check(162, hc);
    expect_that(hc == 1 + 3 * T + 2 * 2**RW + 2, $sformatf("spare column replaced, hold %0d", hc));
    expect_that(rc_col_ff == 2'b01 && rc_col_used == 2'b11 && n_srf == 1, "faulty spare column marked");
    check_all_words("after spare column repair");
    expect_that(!rc_fr && ecc_state == S_FFWR, "no redundancy left");

    // double error: positions 8 and 16 give syndrome 24, outside the word
    dut.u_core.u_mem.mem[99][7]  = !dut.u_core.u_mem.mem[99][7];
    dut.u_core.u_mem.mem[99][15] = !dut.u_core.u_mem.mem[99][15];
    @(negedge clk);
    while (hold) @(negedge clk);
    req = 1; we = 0; addr = 8'd99;
    @(negedge clk);
    req = 0;
    expect_that(rvalid && rd_ue, "uncorrectable error flagged");
    @(negedge clk);

    // ===== mechanism coverage =====
    expect_that(n_bist_fail > 0, "BIST fail report");
    expect_that(n_corr > 0, "on-the-fly correction");
    expect_that(n_soft > 0, "soft error identified");
    expect_that(n_hard >= 3, "hard fault identified");
    expect_that(n_rep >= 3, "on-line repair");
    expect_that(n_srf > 0, "faulty spare marked (SRF)");
    expect_that(n_pend > 0, "repair postponed");
    expect_that(n_refused > 0, "request refused under hold");
    expect_that(n_ffwr > 0, "FFWR reached");
    expect_that(n_ue > 0, "uncorrectable word reported");
    $display("mechanisms: bist_fail=%0d corrected=%0d soft=%0d hard=%0d repaired=%0d srf=%0d pend=%0d refused=%0d ffwr=%0d ue=%0d",
             n_bist_fail, n_corr, n_soft, n_hard, n_rep, n_srf, n_pend, n_refused, n_ffwr, n_ue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
