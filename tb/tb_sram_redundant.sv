// tb_sram_redundant: self-checking test of the redundant memory.
// Small instance (2 spare rows of 4 words, 3 spare columns of 16 bits).
// Writes every spare-row word and checks read-back one cycle later; writes
// spare-column bits with single-column masks and checks that a masked write
// touches only its own column.
module tb_sram_redundant;
  localparam int NR = 2, NC = 3, RW = 4, CW = 2, W = 13;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic row_en = 0, row_we = 0;
  logic [0:0] row_idx = '0;
  logic [CW-1:0] row_col = '0;
  logic [W-1:0] row_wdata = '0, row_rdata;
  logic col_en = 0;
  logic [NC-1:0] col_wmask = '0, col_wbits = '0, col_rbits;
  logic [RW-1:0] col_row = '0;
  logic [W-1:0] rmodel [NR * 2**CW];
  logic [NC-1:0] cmodel [2**RW];

  sram_redundant #(.N_ROW(NR), .N_COL(NC), .ROW_W(RW), .COL_W(CW), .WORD_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < NR * 2**CW; i++) begin
      rmodel[i] = W'($urandom);
      row_en = 1; row_we = 1; row_idx = 1'(i / 2**CW); row_col = CW'(i % 2**CW);
      row_wdata = rmodel[i];
      @(negedge clk);
    end
    for (int i = NR * 2**CW - 1; i >= 0; i--) begin
      row_en = 1; row_we = 0; row_idx = 1'(i / 2**CW); row_col = CW'(i % 2**CW);
      @(negedge clk);
      checks++;
      if (row_rdata !== rmodel[i]) begin
        failures++;
        $display("FAIL spare row word %0d got %h exp %h", i, row_rdata, rmodel[i]);
      end
    end
    row_en = 0;
    // spare columns: initialise every row, then random single-column writes
    for (int r = 0; r < 2**RW; r++) begin
      cmodel[r] = NC'($urandom);
      col_en = 1; col_wmask = '1; col_row = RW'(r); col_wbits = cmodel[r];
      @(negedge clk);
    end
    for (int t = 0; t < 200; t++) begin
      int r, j;
      r = $urandom_range(2**RW - 1);
      j = $urandom_range(NC - 1);
      col_en = 1; col_wmask = NC'(1) << j; col_row = RW'(r); col_wbits = NC'($urandom);
      cmodel[r][j] = col_wbits[j];
      @(negedge clk);
      r = $urandom_range(2**RW - 1);
      col_en = 1; col_wmask = '0; col_row = RW'(r);
      @(negedge clk);
      checks++;
      if (col_rbits !== cmodel[r]) begin
        failures++;
        $display("FAIL spare column row %0d got %b exp %b", r, col_rbits, cmodel[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
