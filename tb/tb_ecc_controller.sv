// tb_ecc_controller: self-checking test of the ECC controller.
// The controller is wired here to a small memory core (64 words of 8 data +
// 4 check bits, 16 rows x 4 words, 2 spare rows, 1 spare column), an encoder
// and a decoder; the user path is blocked while Hold is high. ITER_T = 3.
// Faults are injected into the arrays from the testbench (one flipped bit for
// a soft error, a cell forced on every falling edge for a hard fault).
// Checked, with exact Hold lengths in cycles:
//  - soft error: corrected read data, Hold for 4 cycles (detect, WFW, RFW,
//    COMP), cell scrubbed, no spare used;
//  - hard fault in MEM: Hold for 1 + 3*3 + 2*4 + 1 = 19 cycles, spare row 0
//    takes the row, data of the whole row preserved, no error afterwards;
//  - hard fault inside that spare row: one more cycle (SRF), spare row 0
//    flagged faulty, spare row 1 takes over;
//  - deferred repair: Hold only for identification (10 cycles), user traffic
//    runs in PEND, repair (spare column, 16 rows copied, 2*16 + 1 cycles)
//    when mem_idle rises;
//  - no redundancy left: controller in FFWR, errors only corrected.
module tb_ecc_controller;
  import ecc_pkg::*;
  localparam int DW = 8, PW = 4, CWW = 12, AW = 6, CLW = 2, RW = 4, NR = 2, NC = 1, BW = 4;
  localparam int T = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0;
  logic repair_defer = 0, mem_idle = 0;

  // user path encoder
  logic [CWW-1:0] n_cw;
  hamming_enc #(.DATA_W(DW)) u_enc (.data_i(wdata), .cw_o(n_cw));

  // controller outputs
  logic hold, c_en, c_we;
  logic [AW-1:0] c_addr;
  logic [CWW-1:0] c_wdata;
  logic dw_en, dw_is_col, dw_bit;
  logic [0:0] dw_ridx, dw_cidx;
  logic [RW-1:0] dw_row;
  logic [CLW-1:0] dw_col;
  logic [CWW-1:0] dw_word;
  rc_op_e c_op;
  logic [0:0] c_cidx, c_ridx;
  logic [RW-1:0] c_row;
  logic [CLW-1:0] c_col;
  logic [BW-1:0] c_bit;
  ecc_state_e state;
  logic ev_detect, ev_soft, ev_hard, ev_repaired, ev_spare_fault;

  // memory core
  logic m_en, m_we, m_rvalid, rd_row_hit;
  logic [AW-1:0] m_addr;
  logic [CWW-1:0] m_wdata, m_rdata;
  logic [0:0] rd_row_idx, free_row_idx, free_col_idx;
  logic [NC-1:0] rd_col_hit, col_used, col_ff;
  logic [BW-1:0] col_bit [NC];
  logic fr, free_row_ok, free_col_ok;
  logic [NR-1:0] row_used, row_ff;

  assign m_en    = hold ? c_en    : req;
  assign m_we    = hold ? c_we    : we;
  assign m_addr  = hold ? c_addr  : addr;
  assign m_wdata = hold ? c_wdata : n_cw;

  memory_core #(.ADDR_W(AW), .COL_W(CLW), .WORD_W(CWW), .N_ROW(NR), .N_COL(NC)) u_core (
    .clk, .rst_n, .acc_en(m_en), .acc_we(m_we), .acc_addr(m_addr), .acc_wdata(m_wdata),
    .rdata(m_rdata), .rvalid(m_rvalid), .rd_row_hit, .rd_row_idx, .rd_col_hit,
    .dw_en, .dw_is_col, .dw_ridx, .dw_cidx, .dw_row, .dw_col, .dw_word, .dw_bit,
    .cmd_op(c_op), .cmd_cidx(c_cidx), .cmd_ridx(c_ridx), .cmd_row(c_row), .cmd_col(c_col),
    .cmd_bit(c_bit), .col_bit, .fr, .free_row_ok, .free_row_idx, .free_col_ok, .free_col_idx,
    .row_used, .row_ff, .col_used, .col_ff
  );

  logic [CWW-1:0] d_cw;
  logic [DW-1:0] rdata;
  logic d_err, d_ue;
  logic [PW-1:0] d_syn, d_bit;
  hamming_dec #(.DATA_W(DW)) u_dec (
    .cw_i(m_rdata), .cw_corr_o(d_cw), .data_o(rdata), .err_o(d_err), .ue_o(d_ue),
    .syn_o(d_syn), .err_bit_o(d_bit)
  );

  logic user_rd_q;
  logic [AW-1:0] user_addr_q;
  always_ff @(posedge clk) begin
    user_rd_q <= req && !we && !hold;
    if (req && !we && !hold) user_addr_q <= addr;
  end

  ecc_controller #(.DATA_W(DW), .ADDR_W(AW), .COL_W(CLW), .N_ROW(NR), .N_COL(NC), .ITER_T(T)) dut (
    .clk, .rst_n, .rd_valid(m_rvalid), .user_rd_valid(m_rvalid && user_rd_q),
    .user_rd_addr(user_addr_q), .dec_err(d_err), .dec_ue(d_ue), .dec_cw(d_cw),
    .dec_err_bit(d_bit), .rd_row_hit, .rd_row_idx, .rd_col_hit, .col_bit,
    .fr, .free_row_ok, .free_row_idx, .free_col_ok, .free_col_idx,
    .repair_defer, .mem_idle, .hold,
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata),
    .dw_en, .dw_is_col, .dw_ridx, .dw_cidx, .dw_row, .dw_col, .dw_word, .dw_bit,
    .cmd_op(c_op), .cmd_cidx(c_cidx), .cmd_ridx(c_ridx), .cmd_row(c_row), .cmd_col(c_col),
    .cmd_bit(c_bit), .state, .ev_detect, .ev_soft, .ev_hard, .ev_repaired, .ev_spare_fault
  );

  always #5 clk = ~clk;

  // ---- fault injection ----
  bit sa_main = 0, sa_row = 0;
  int sa_addr, sa_bit, sr_word, sr_bit;
  bit sa_val, sr_val;
  always @(negedge clk) begin
    if (sa_main) u_core.u_mem.mem[sa_addr][sa_bit] = sa_val;
    if (sa_row)  u_core.u_rmem.rows[sr_word][sr_bit] = sr_val;
  end

  int n_detect = 0, n_soft = 0, n_hard = 0, n_rep = 0, n_srf = 0;
  always @(posedge clk) if (rst_n) begin
    n_detect += int'(ev_detect);
    n_soft   += int'(ev_soft);
    n_hard   += int'(ev_hard);
    n_rep    += int'(ev_repaired);
    n_srf    += int'(ev_spare_fault);
  end

  logic [DW-1:0] model [2**AW];

  task automatic expect_that(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    while (hold) @(negedge clk);
    req = 1; we = 1; addr = AW'(a); wdata = d; model[a] = d;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  // read, check data, then count the cycles Hold stays high
  task automatic rd_check(input int a, output int hold_cycles);
    @(negedge clk);
    while (hold) @(negedge clk);
    req = 1; we = 0; addr = AW'(a);
    @(negedge clk);
    req = 0;
    expect_that(m_rvalid && user_rd_q && rdata == model[a], $sformatf("read data of word %0d", a));
    hold_cycles = 0;
    while (hold && hold_cycles < 100000) begin
      hold_cycles++;
      @(negedge clk);
    end
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

  task automatic check_all_words(input string what);
    int hc;
    for (int a = 0; a < 2**AW; a++) begin
      rd_check(a, hc);
      expect_that(hc == 0, $sformatf("%s: word %0d clean", what, a));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 2**AW; a++) wr(a, DW'($urandom));
    check_all_words("after fill");
    expect_that(state == S_FFR && n_detect == 0, "idle in FFR");

    // ---- soft error ----
    u_core.u_mem.mem[10][6] = !u_core.u_mem.mem[10][6];
    rd_check(10, hc);
    expect_that(hc == 4, $sformatf("soft error hold %0d cycles, exp 4", hc));
    expect_that(n_soft == 1 && n_hard == 0 && state == S_FFR, "soft error identified");
    expect_that(u_core.u_mem.mem[10] == enc(model[10]), "soft error scrubbed");
    expect_that(row_used == 0 && col_used == 0, "no spare used for a soft error");

    // ---- hard fault in MEM: word 22 (row 5) bit 3 ----
    sa_addr = 22; sa_bit = 3; sa_val = !enc(model[22])[3]; sa_main = 1;
    rd_check(22, hc);
    expect_that(hc == 1 + 3 * T + 2 * 4 + 1, $sformatf("hard repair hold %0d cycles, exp %0d", hc, 1 + 3 * T + 9));
    expect_that(n_hard == 1 && n_rep == 1 && state == S_FFR, "hard fault repaired");
    expect_that(row_used == 2'b01 && row_ff == 0, "spare row 0 in use");
    check_all_words("after row repair");

    // ---- hard fault inside spare row 0, word 1 (= address 21) bit 7 ----
    sr_word = 1; sr_bit = 7; sr_val = !enc(model[21])[7]; sa_row = 1;
    rd_check(21, hc);
    expect_that(hc == 1 + 3 * T + 2 * 4 + 2, $sformatf("spare-row repair hold %0d cycles", hc));
    expect_that(n_srf == 1 && row_ff == 2'b01 && row_used == 2'b11, "faulty spare row replaced");
    check_all_words("after spare-row repair");

    // ---- deferred repair with the spare column: word 45 (row 11, col 1) bit 0 ----
    repair_defer = 1;
    sa_addr = 45; sa_bit = 0; sa_val = !enc(model[45])[0];
    rd_check(45, hc);
    expect_that(hc == 1 + 3 * T, $sformatf("identification hold %0d cycles, exp %0d", hc, 1 + 3 * T));
    expect_that(state == S_PEND && n_hard == 3, "repair pending");
    wr(3, 8'h5a);
    rd_check(3, hc);
    expect_that(hc == 0 && state == S_PEND, "user traffic while pending");
    @(negedge clk);
    mem_idle = 1;
    hc = 0;
    @(negedge clk);
    while (hold) begin hc++; @(negedge clk); end
    mem_idle = 0;
    expect_that(hc == 2 * 16 + 1, $sformatf("column copy hold %0d cycles, exp 33", hc));
    expect_that(col_used == 1'b1 && n_rep == 3, "spare column in use");
    check_all_words("after column repair");
    expect_that(state == S_FFWR && !fr, "no redundancy left: FFWR");

    // ---- no redundancy: error only corrected ----
    u_core.u_mem.mem[50][2] = !u_core.u_mem.mem[50][2];
    rd_check(50, hc);
    expect_that(hc == 0 && n_detect == 4, "FFWR does not hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
