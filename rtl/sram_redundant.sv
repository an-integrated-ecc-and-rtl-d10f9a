// sram_redundant: redundant memory (RMEM) of the wrapper.
//
// Holds the spare elements: N_ROW spare rows, each as wide as a physical row of
// the main array (2^COL_W codewords), and N_COL spare bit columns, each one bit
// tall per main-array row (2^ROW_W bits). A spare column replaces one bit of
// one word-column of the main array, as selected by the reconfiguration
// circuit.
//
// Two synchronous ports, one per kind of spare, each with one-cycle read
// latency like the main array:
//  - row port: word col_sel of spare row idx (read or write).
//  - column port: the N_COL spare-column bits of main row `row` are read
//    together; writes update only the columns set in col_wmask.
// The spare sizes (8 rows, 4 columns) follow the example memory; the row
// width and the bit-column organisation are this design's choices.
module sram_redundant
  import ecc_pkg::*;
#(
  parameter  int unsigned N_ROW  = DEF_N_SPARE_ROW,
  parameter  int unsigned N_COL  = DEF_N_SPARE_COL,
  parameter  int unsigned ROW_W  = 12,
  parameter  int unsigned COL_W  = DEF_COL_W,
  parameter  int unsigned WORD_W = 71,
  localparam int unsigned RIDX_W = clog2_min1(N_ROW)
) (
  input  logic              clk,
  // spare-row port
  input  logic              row_en,
  input  logic              row_we,
  input  logic [RIDX_W-1:0] row_idx,
  input  logic [COL_W-1:0]  row_col,
  input  logic [WORD_W-1:0] row_wdata,
  output logic [WORD_W-1:0] row_rdata,
  // spare-column port
  input  logic              col_en,
  input  logic [N_COL-1:0]  col_wmask,   // all zero: read
  input  logic [ROW_W-1:0]  col_row,
  input  logic [N_COL-1:0]  col_wbits,
  output logic [N_COL-1:0]  col_rbits
);

  logic [WORD_W-1:0] rows [N_ROW * (2**COL_W)];
  logic [N_COL-1:0]  cols [2**ROW_W];

  always_ff @(posedge clk) begin
    if (row_en) begin
      if (row_we) rows[{row_idx, row_col}] <= row_wdata;
      else        row_rdata                <= rows[{row_idx, row_col}];
    end
  end

  always_ff @(posedge clk) begin
    if (col_en) begin
      if (col_wmask == '0) col_rbits <= cols[col_row];
      for (int unsigned j = 0; j < N_COL; j++)
        if (col_wmask[j]) cols[col_row][j] <= col_wbits[j];
    end
  end

endmodule
