// table1_case: one memory configuration of the size study, run through a
// complete sequence on its own clock (used by tb_table1_configs).
// Sequence: March C- BIST with a cell stuck at 0 (exactly its two r1 reads
// must fail), production repair with spare column 0, clean BIST rerun, fill
// and read back every word, a soft error (Hold 4 cycles), a hard fault
// repaired on-line with a spare row (Hold 1 + 3*4 + 2*8 + 1 = 30 cycles), and
// a second full read-back. Reports its own check and failure counts.
module table1_case
  import ecc_pkg::*;
#(
  parameter int DW = 64,
  parameter int AW = 15
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int PW = int'(par_bits(DW)), CWW = DW + PW, N = 2**AW, RW = AW - 3;
  localparam int BW = $clog2(CWW);
  localparam int SA_ADDR = N - 11, SA_BIT = CWW - 3, HF_ADDR = N / 3, HF_BIT = DW / 2;

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
  logic [RW-1:0] rc_row = '0;
  logic [2:0] rc_col = '0;
  logic [BW-1:0] rc_bit = '0;
  logic repair_defer = 0, mem_idle = 0;
  ecc_state_e ecc_state;
  logic rc_fr;
  logic [7:0] rc_row_used, rc_row_ff;
  logic [3:0] rc_col_used, rc_col_ff;
  logic ev_detect, ev_soft, ev_hard, ev_repaired, ev_spare_fault;

  mem_test_wrapper #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;
  wire hold = bist_fail_hold && !mbs;

  bit sa0 = 0, sa1 = 0;
  bit sa1_val;
  always @(negedge clk) begin
    if (sa0) dut.u_core.u_mem.mem[SA_ADDR][SA_BIT] = 1'b0;
    if (sa1) dut.u_core.u_mem.mem[HF_ADDR][HF_BIT] = sa1_val;
  end

  int n_fail = 0, n_bad = 0, n_soft = 0, n_hard = 0, n_rep = 0;
  always @(posedge clk) if (rst_n) begin
    if (mbs && bist_fail_hold) begin
      n_fail++;
      if (int'(bist_fail_addr) != SA_ADDR || bist_fail_syn != (CWW'(1) << SA_BIT)) n_bad++;
    end
    n_soft += int'(ev_soft);
    n_hard += int'(ev_hard);
    n_rep  += int'(ev_repaired);
  end

  function automatic logic [DW-1:0] pattern(input int a);
    logic [DW-1:0] v;
    logic [31:0] h;
    v = '0;
    h = 32'(a) * 32'h9e3779b1 + 32'(DW);
    for (int i = 0; i < DW; i += 32) begin
      v = (v << 32) | DW'(h);
      h = h * 32'h01000193 ^ 32'(i);
    end
    return v;
  endfunction

  task automatic expect_that(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0dx%0d: %s", N, DW, what); end
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

  task automatic check_all(input string what);
    int errs, exp_a;
    errs = 0;
    exp_a = 0;
    for (int a = 0; a <= N; a++) begin
      @(negedge clk);
      if (a > 0) begin
        if (!rvalid || rdata != pattern(exp_a) || rd_err) errs++;
        exp_a = a;
      end
      req = (a < N); we = 0; addr = AW'(a);
    end
    req = 0;
    expect_that(errs == 0, $sformatf("%s: %0d words wrong", what, errs));
  endtask

  task automatic rd_hold(input int a, output int hc);
    @(negedge clk);
    req = 1; we = 0; addr = AW'(a);
    @(negedge clk);
    req = 0;
    expect_that(rvalid && rdata == pattern(a), $sformatf("read of word %0d", a));
    hc = 0;
    while (hold && hc < 100000) begin hc++; @(negedge clk); end
  endtask

  initial begin
    int cyc, hc;
    done = 0; checks = 0; failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mbs = 1;
    sa0 = 1;
    bist_run(cyc);
    expect_that(cyc == 10 * N + 1, $sformatf("BIST cycles %0d", cyc));
    expect_that(n_fail == 2 && n_bad == 0, $sformatf("BIST fails %0d (%0d wrong)", n_fail, n_bad));
    @(negedge clk);
    rc_op = RC_SET_COL; rc_cidx = 2'd0; rc_col = 3'(SA_ADDR % 8); rc_bit = BW'(SA_BIT);
    @(negedge clk);
    rc_op = RC_NOP;
    n_fail = 0;
    bist_run(cyc);
    expect_that(n_fail == 0, "BIST passes after repair");
    mbs = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      req = 1; we = 1; addr = AW'(a); wdata = pattern(a);
    end
    @(negedge clk);
    req = 0; we = 0;
    check_all("after fill");
    dut.u_core.u_mem.mem[77][5] = !dut.u_core.u_mem.mem[77][5];
    rd_hold(77, hc);
    expect_that(hc == 4 && n_soft == 1, $sformatf("soft error hold %0d", hc));
    sa1_val = !dut.u_core.u_mem.mem[HF_ADDR][HF_BIT];
    sa1 = 1;
    rd_hold(HF_ADDR, hc);
    expect_that(hc == 30 && n_hard == 1 && n_rep == 1, $sformatf("hard repair hold %0d hard %0d rep %0d soft %0d", hc, n_hard, n_rep, n_soft));
    expect_that(rc_row_used == 8'h01 && rc_col_used == 4'h1, "spare usage");
    check_all("after repair");
    $display("config %0d x %0d (%0d-bit codewords): checks=%0d failures=%0d", N, DW, CWW, checks, failures);
    done = 1;
  end
endmodule
