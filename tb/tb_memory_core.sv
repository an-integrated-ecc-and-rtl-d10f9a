// tb_memory_core: self-checking test of the memory core with redundancy.
// Small instance: 64 words (16 rows x 4 words) of 13 bits, 2 spare rows,
// 2 spare columns. A reference copy of the logical contents is kept here.
// Hard faults are modelled by forcing a cell of the main array to a wrong
// value on every falling clock edge. The test checks that:
//  - plain reads return the written data one cycle later, no RM hit;
//  - a stuck cell corrupts its word until a spare row (filled through the
//    direct-write port, then enabled in the RC) takes over the row, after
//    which reads and writes of that row use the spare (RM hit reported);
//  - a spare column enabled for (column, bit) masks a stuck bit in another
//    row and follows later writes;
//  - marking a spare row faulty returns its row to the main array.
module tb_memory_core;
  import ecc_pkg::*;
  localparam int AW = 6, CW = 2, RW = AW - CW, W = 13, NR = 2, NC = 2, BW = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic acc_en = 0, acc_we = 0;
  logic [AW-1:0] acc_addr = '0;
  logic [W-1:0] acc_wdata = '0, rdata;
  logic rvalid, rd_row_hit;
  logic [0:0] rd_row_idx;
  logic [NC-1:0] rd_col_hit;
  logic dw_en = 0, dw_is_col = 0, dw_bit = 0;
  logic [0:0] dw_ridx = '0, dw_cidx = '0;
  logic [RW-1:0] dw_row = '0;
  logic [CW-1:0] dw_col = '0;
  logic [W-1:0] dw_word = '0;
  rc_op_e cmd_op = RC_NOP;
  logic [0:0] cmd_cidx = '0, cmd_ridx = '0;
  logic [RW-1:0] cmd_row = '0;
  logic [CW-1:0] cmd_col = '0;
  logic [BW-1:0] cmd_bit = '0;
  logic [BW-1:0] col_bit [NC];
  logic fr, free_row_ok, free_col_ok;
  logic [0:0] free_row_idx, free_col_idx;
  logic [NR-1:0] row_used, row_ff;
  logic [NC-1:0] col_used, col_ff;

  memory_core #(.ADDR_W(AW), .COL_W(CW), .WORD_W(W), .N_ROW(NR), .N_COL(NC)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] model [2**AW];

  // stuck-at cells of the main array
  bit sa_on [2];
  int sa_addr [2], sa_bit [2];
  bit sa_val [2];
  always @(negedge clk)
    for (int k = 0; k < 2; k++)
      if (sa_on[k]) dut.u_mem.mem[sa_addr[k]][sa_bit[k]] = sa_val[k];

  task automatic wr(input int a, input logic [W-1:0] d);
    @(negedge clk);
    acc_en = 1; acc_we = 1; acc_addr = AW'(a); acc_wdata = d;
    model[a] = d;
    @(negedge clk);
    acc_en = 0; acc_we = 0;
  endtask

  task automatic rd(input int a, output logic [W-1:0] d, output logic hit,
                    output logic [NC-1:0] chit);
    @(negedge clk);
    acc_en = 1; acc_we = 0; acc_addr = AW'(a);
    @(negedge clk);
    acc_en = 0;
    checks++;
    if (!rvalid) failures++;
    d = rdata; hit = rd_row_hit; chit = rd_col_hit;
  endtask

  task automatic expect_read(input int a, input logic [W-1:0] exp, input logic exp_hit,
                             input logic [NC-1:0] exp_chit, input string what);
    logic [W-1:0] d;
    logic h;
    logic [NC-1:0] c;
    rd(a, d, h, c);
    checks++;
    if (d !== exp || h !== exp_hit || c !== exp_chit) begin
      failures++;
      $display("FAIL %s: addr %0d got %h hit %b col %b, exp %h hit %b col %b",
               what, a, d, h, c, exp, exp_hit, exp_chit);
    end
  endtask

  task automatic cmd(input rc_op_e op, input int idx, input int row, input int col, input int b);
    @(negedge clk);
    cmd_op = op; cmd_ridx = 1'(idx); cmd_cidx = 1'(idx);
    cmd_row = RW'(row); cmd_col = CW'(col); cmd_bit = BW'(b);
    @(negedge clk);
    cmd_op = RC_NOP;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a_row, b_word, b_col;
    sa_on[0] = 0; sa_on[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 2**AW; a++) wr(a, W'($urandom));
    for (int a = 0; a < 2**AW; a++) expect_read(a, model[a], 1'b0, '0, "plain read");

    // stuck cell in word 22 (row 5), bit 4
    sa_addr[0] = 22; sa_bit[0] = 4; sa_val[0] = !model[22][4]; sa_on[0] = 1;
    expect_read(22, model[22] ^ 13'(1 << 4), 1'b0, '0, "stuck cell visible");
    // copy row 5 into spare row 1, then enable it
    a_row = 5;
    for (int w = 0; w < 2**CW; w++) begin
      @(negedge clk);
      dw_en = 1; dw_is_col = 0; dw_ridx = 1'b1; dw_col = CW'(w); dw_word = model[a_row*4 + w];
    end
    @(negedge clk);
    dw_en = 0;
    cmd(RC_SET_ROW, 1, a_row, 0, 0);
    checks++;
    if (row_used !== 2'b10 || free_row_idx !== 1'b0 || !fr) failures++;
    for (int w = 0; w < 4; w++) expect_read(a_row*4 + w, model[a_row*4 + w], 1'b1, '0, "spare row read");
    wr(21, 13'h1abc);
    expect_read(21, 13'h1abc, 1'b1, '0, "spare row write");
    expect_read(20, model[20], 1'b1, '0, "spare row other word");

    // stuck bit 9 of word 45 (row 11, column 1): spare column 0 for (col 1, bit 9)
    b_word = 45; b_col = 1;
    sa_addr[1] = b_word; sa_bit[1] = 9; sa_val[1] = !model[b_word][9]; sa_on[1] = 1;
    expect_read(b_word, model[b_word] ^ 13'(1 << 9), 1'b0, '0, "stuck bit visible");
    for (int r = 0; r < 2**RW; r++) begin
      @(negedge clk);
      dw_en = 1; dw_is_col = 1; dw_cidx = 1'b0; dw_row = RW'(r); dw_bit = model[r*4 + b_col][9];
    end
    @(negedge clk);
    dw_en = 0;
    cmd(RC_SET_COL, 0, 0, b_col, 9);
    expect_read(b_word, model[b_word], 1'b0, 2'b01, "spare column masks stuck bit");
    expect_read(13, model[13], 1'b0, 2'b01, "spare column other row");
    expect_read(14, model[14], 1'b0, 2'b00, "other column untouched");
    wr(b_word, model[b_word] ^ 13'h0200);
    expect_read(b_word, model[b_word], 1'b0, 2'b01, "spare column follows write");
    expect_read(21, 13'h1abc, 1'b1, 2'b00, "row spare has priority");

    // mark spare row 1 faulty: row 5 returns to the main array
    cmd(RC_MARK_ROW, 1, 0, 0, 0);
    expect_read(20, dut.u_mem.mem[20], 1'b0, 2'b00, "marked spare row unused");
    checks++;
    if (row_ff !== 2'b10) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
