// tb_reconfig_circuit: self-checking test of the reconfiguration circuit.
// Programs spare rows and columns, marks some faulty, and after every command
// compares the address comparison (row hit / index, column hits, column bit)
// and the free-spare outputs with a reference model kept in this testbench.
module tb_reconfig_circuit;
  import ecc_pkg::*;
  localparam int NR = 8, NC = 4, RW = 12, CW = 3, BW = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  rc_op_e cmd_op = RC_NOP;
  logic [1:0] cmd_cidx = '0;
  logic [2:0] cmd_ridx = '0;
  logic [RW-1:0] cmd_row = '0;
  logic [CW-1:0] cmd_col = '0;
  logic [BW-1:0] cmd_bit = '0;
  logic [RW-1:0] lk_row = '0;
  logic [CW-1:0] lk_col = '0;
  logic row_hit, fr, free_row_ok, free_col_ok;
  logic [2:0] row_idx, free_row_idx;
  logic [1:0] free_col_idx;
  logic [NC-1:0] col_hit, col_used, col_ff;
  logic [BW-1:0] col_bit [NC];
  logic [NR-1:0] row_used, row_ff;

  reconfig_circuit #(.N_ROW(NR), .N_COL(NC), .ROW_W(RW), .COL_W(CW), .BIT_W(BW)) dut (.*);

  // reference model
  bit m_ru [NR], m_rf [NR], m_cu [NC], m_cf [NC];
  int m_ra [NR], m_ca [NC], m_cb [NC];

  always #5 clk = ~clk;

  task automatic check_all();
    int erow, ecols;
    bit efr, efro, efco;
    int efri, efci;
    // look up a programmed row, a random row and each programmed column
    for (int k = 0; k < 12; k++) begin
      lk_row = (k < NR) ? RW'(m_ra[k]) : RW'($urandom);
      lk_col = (k < NC) ? CW'(m_ca[k]) : CW'($urandom);
      #1;
      erow = -1;
      for (int i = 0; i < NR; i++)
        if (erow < 0 && m_ru[i] && !m_rf[i] && m_ra[i] == int'(lk_row)) erow = i;
      checks++;
      if (row_hit !== (erow >= 0) || (erow >= 0 && int'(row_idx) != erow)) begin
        failures++;
        $display("FAIL row lookup %0d: hit %b idx %0d exp %0d", lk_row, row_hit, row_idx, erow);
      end
      for (int j = 0; j < NC; j++) begin
        checks++;
        if (col_hit[j] !== (m_cu[j] && !m_cf[j] && m_ca[j] == int'(lk_col)) ||
            (m_cu[j] && int'(col_bit[j]) != m_cb[j])) failures++;
      end
    end
    efro = 0; efco = 0; efri = 0; efci = 0;
    for (int i = NR - 1; i >= 0; i--) if (!m_ru[i] && !m_rf[i]) begin efro = 1; efri = i; end
    for (int j = NC - 1; j >= 0; j--) if (!m_cu[j] && !m_cf[j]) begin efco = 1; efci = j; end
    efr = efro || efco;
    checks++;
    if (fr !== efr || free_row_ok !== efro || free_col_ok !== efco ||
        (efro && int'(free_row_idx) != efri) || (efco && int'(free_col_idx) != efci)) begin
      failures++;
      $display("FAIL free: fr %b row %b/%0d col %b/%0d", fr, free_row_ok, free_row_idx,
               free_col_ok, free_col_idx);
    end
  endtask

  task automatic do_cmd(input rc_op_e op, input int idx, input int row, input int col, input int b);
    @(negedge clk);
    cmd_op = op; cmd_ridx = 3'(idx); cmd_cidx = 2'(idx);
    cmd_row = RW'(row); cmd_col = CW'(col); cmd_bit = BW'(b);
    case (op)
      RC_SET_ROW:  begin m_ru[idx] = 1; m_ra[idx] = row; end
      RC_SET_COL:  begin m_cu[idx] = 1; m_ca[idx] = col; m_cb[idx] = b; end
      RC_MARK_ROW: m_rf[idx] = 1;
      RC_MARK_COL: m_cf[idx] = 1;
      default: ;
    endcase
    @(negedge clk);
    cmd_op = RC_NOP;
    check_all();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NR; i++) begin m_ru[i] = 0; m_rf[i] = 0; m_ra[i] = 0; end
    for (int j = 0; j < NC; j++) begin m_cu[j] = 0; m_cf[j] = 0; m_ca[j] = 0; m_cb[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int i = 0; i < NR; i++) do_cmd(RC_SET_ROW, i, $urandom_range(4095), 0, 0);
    do_cmd(RC_MARK_ROW, 3, 0, 0, 0);
    do_cmd(RC_MARK_ROW, 0, 0, 0, 0);
    do_cmd(RC_MARK_COL, 1, 0, 0, 0);   // mark an unused spare column faulty
    for (int j = 0; j < NC; j++)
      if (j != 1) do_cmd(RC_SET_COL, j, 0, $urandom_range(7), $urandom_range(70));
    do_cmd(RC_MARK_COL, 2, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
