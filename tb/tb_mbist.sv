// tb_mbist: self-checking test of the March C- BIST.
// Drives a 32-word main array. A fault-free run must report no failure and
// finish after exactly 10*N + 1 cycles (10 operations per word, one cycle to
// check the last read). A run with one cell stuck at 1 (word 7, bit 3) must
// report exactly the three r0 reads of that word (elements 1, 3 and 5), each
// with address 7 and syndrome bit 3 only. Memory outputs must be zero when
// the BIST is idle (they are ORed with other signals in the wrapper).
module tb_mbist;
  localparam int AW = 5, W = 13, N = 2**AW;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, enable = 0, start = 0;
  logic mem_en, mem_we, busy, done, fail;
  logic [AW-1:0] mem_addr, fail_addr;
  logic [W-1:0] mem_wdata, mem_rdata, fail_syn;

  mbist #(.ADDR_W(AW), .WORD_W(W)) dut (.*);
  sram_main #(.ADDR_W(AW), .WORD_W(W)) mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  bit sa_on = 0;
  always @(negedge clk) if (sa_on) mem.mem[7][3] = 1'b1;

  int nfail, badfail;
  always @(posedge clk) if (fail) begin
    nfail++;
    if (fail_addr != 7 || fail_syn != 13'h0008) badfail++;
  end

  task automatic run(output int cycles);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // cycles counted from the clock edge that samples start
    cycles = 0;
    while (!done && cycles < 20 * N) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (mem_en || mem_we || mem_addr != 0 || mem_wdata != 0 || busy || done) failures++;
    enable = 1;
    nfail = 0; badfail = 0;
    run(cyc);
    checks++;
    if (cyc != 10 * N + 1) begin
      failures++;
      $display("FAIL fault-free run took %0d cycles, exp %0d", cyc, 10 * N + 1);
    end
    checks++;
    if (nfail != 0) begin failures++; $display("FAIL %0d fails on a good memory", nfail); end
    checks++;
    if (mem_en || mem_wdata != 0) failures++;

    sa_on = 1;
    nfail = 0; badfail = 0;
    run(cyc);
    checks++;
    if (nfail != 3 || badfail != 0) begin
      failures++;
      $display("FAIL stuck-at-1: %0d fails (%0d wrong), exp 3", nfail, badfail);
    end
    checks++;
    if (cyc != 10 * N + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
