// reconfig_circuit: reconfiguration circuit (RC) of the wrapper.
//
// Keeps, for every spare element, a "used" bit, a fault flag FF and the
// address it replaces: a main-array row address for a spare row, a
// (word-column address, bit index) pair for a spare column. An element is
// active when used and not flagged faulty. The incoming address is compared
// with every active entry in parallel (combinational): row_hit/row_idx say
// that the whole word lives in a spare row (the RM signal), col_hit[j] that
// spare column j supplies bit col_bit[j] of the word. The lowest free,
// non-faulty spare of each kind is offered for the next repair; fr is the
// "unused redundancy left" signal FR.
//
// Entries change only through the command port, one command per cycle, from
// the tester (production repair) or from the ECC controller (on-line repair).
// Reset clears every entry (the repair information is assumed to be reloaded
// by the tester after power-up).
module reconfig_circuit
  import ecc_pkg::*;
#(
  parameter  int unsigned N_ROW  = DEF_N_SPARE_ROW,
  parameter  int unsigned N_COL  = DEF_N_SPARE_COL,
  parameter  int unsigned ROW_W  = 12,
  parameter  int unsigned COL_W  = DEF_COL_W,
  parameter  int unsigned BIT_W  = 7,
  localparam int unsigned RIDX_W = clog2_min1(N_ROW),
  localparam int unsigned CIDX_W = clog2_min1(N_COL)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command port
  input  rc_op_e            cmd_op,
  input  logic [CIDX_W-1:0] cmd_cidx,   // spare column index
  input  logic [RIDX_W-1:0] cmd_ridx,   // spare row index
  input  logic [ROW_W-1:0]  cmd_row,
  input  logic [COL_W-1:0]  cmd_col,
  input  logic [BIT_W-1:0]  cmd_bit,
  // address comparison
  input  logic [ROW_W-1:0]  lk_row,
  input  logic [COL_W-1:0]  lk_col,
  output logic              row_hit,    // RM
  output logic [RIDX_W-1:0] row_idx,
  output logic [N_COL-1:0]  col_hit,
  output logic [BIT_W-1:0]  col_bit [N_COL],
  // free redundancy
  output logic              fr,
  output logic              free_row_ok,
  output logic [RIDX_W-1:0] free_row_idx,
  output logic              free_col_ok,
  output logic [CIDX_W-1:0] free_col_idx,
  // entry state, for observation
  output logic [N_ROW-1:0]  row_used,
  output logic [N_ROW-1:0]  row_ff,
  output logic [N_COL-1:0]  col_used,
  output logic [N_COL-1:0]  col_ff
);

  logic [ROW_W-1:0] row_addr [N_ROW];
  logic [COL_W-1:0] col_addr [N_COL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_used <= '0;
      row_ff   <= '0;
      col_used <= '0;
      col_ff   <= '0;
      for (int unsigned i = 0; i < N_ROW; i++) row_addr[i] <= '0;
      for (int unsigned j = 0; j < N_COL; j++) begin
        col_addr[j] <= '0;
        col_bit[j]  <= '0;
      end
    end else begin
      unique case (cmd_op)
        RC_SET_ROW: begin
          row_used[cmd_ridx] <= 1'b1;
          row_addr[cmd_ridx] <= cmd_row;
        end
        RC_SET_COL: begin
          col_used[cmd_cidx] <= 1'b1;
          col_addr[cmd_cidx] <= cmd_col;
          col_bit[cmd_cidx]  <= cmd_bit;
        end
        RC_MARK_ROW: row_ff[cmd_ridx] <= 1'b1;
        RC_MARK_COL: col_ff[cmd_cidx] <= 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    row_hit = 1'b0;
    row_idx = '0;
    for (int i = N_ROW - 1; i >= 0; i--) begin
      if (row_used[i] && !row_ff[i] && row_addr[i] == lk_row) begin
        row_hit = 1'b1;
        row_idx = RIDX_W'(i);
      end
    end
    for (int unsigned j = 0; j < N_COL; j++)
      col_hit[j] = col_used[j] && !col_ff[j] && col_addr[j] == lk_col;
  end

  always_comb begin
    free_row_ok  = 1'b0;
    free_row_idx = '0;
    for (int i = N_ROW - 1; i >= 0; i--) begin
      if (!row_used[i] && !row_ff[i]) begin
        free_row_ok  = 1'b1;
        free_row_idx = RIDX_W'(i);
      end
    end
    free_col_ok  = 1'b0;
    free_col_idx = '0;
    for (int j = N_COL - 1; j >= 0; j--) begin
      if (!col_used[j] && !col_ff[j]) begin
        free_col_ok  = 1'b1;
        free_col_idx = CIDX_W'(j);
      end
    end
    fr = free_row_ok || free_col_ok;
  end

endmodule
