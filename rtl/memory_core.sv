// memory_core: the memory core with redundancy - main array (MEM), redundant
// memory (RMEM) and reconfiguration circuit (RC).
//
// Every access address {row, col} is compared in RC. A write goes to the spare
// row that replaces the row (RM hit), otherwise to the main array and, for
// each active spare column of that word-column, the replaced bit is written
// into the spare column as well. A read fetches the main word, the spare-row
// word and the spare-column bits in parallel; one cycle later rdata is the
// spare-row word on a row hit, else the main word with the replaced bits taken
// from the spare columns. The RM information of that read (row hit and index,
// spare columns used) is returned alongside, so that the ECC controller can
// tell whether an error sits in MEM or in RMEM.
//
// A separate direct-write port fills one spare element while it is being
// brought into use (copying), and the RC command port programs the RC. The
// direct-write port has priority over the access port; the controller never
// drives both in one cycle.
// Timing: one access per cycle, read latency one cycle (rvalid).
module memory_core
  import ecc_pkg::*;
#(
  parameter  int unsigned ADDR_W = DEF_ADDR_W,
  parameter  int unsigned COL_W  = DEF_COL_W,
  parameter  int unsigned WORD_W = 71,
  parameter  int unsigned N_ROW  = DEF_N_SPARE_ROW,
  parameter  int unsigned N_COL  = DEF_N_SPARE_COL,
  localparam int unsigned ROW_W  = ADDR_W - COL_W,
  localparam int unsigned BIT_W  = $clog2(WORD_W),
  localparam int unsigned RIDX_W = clog2_min1(N_ROW),
  localparam int unsigned CIDX_W = clog2_min1(N_COL)
) (
  input  logic              clk,
  input  logic              rst_n,
  // access port (logical address, through RC)
  input  logic              acc_en,
  input  logic              acc_we,
  input  logic [ADDR_W-1:0] acc_addr,
  input  logic [WORD_W-1:0] acc_wdata,
  output logic [WORD_W-1:0] rdata,
  output logic              rvalid,
  output logic              rd_row_hit,   // RM of the returned word
  output logic [RIDX_W-1:0] rd_row_idx,
  output logic [N_COL-1:0]  rd_col_hit,   // spare columns used by the returned word
  // direct spare write (copy into a new spare element)
  input  logic              dw_en,
  input  logic              dw_is_col,
  input  logic [RIDX_W-1:0] dw_ridx,
  input  logic [CIDX_W-1:0] dw_cidx,
  input  logic [ROW_W-1:0]  dw_row,       // main row (spare column target)
  input  logic [COL_W-1:0]  dw_col,       // word in row (spare row target)
  input  logic [WORD_W-1:0] dw_word,
  input  logic              dw_bit,
  // RC command port
  input  rc_op_e            cmd_op,
  input  logic [CIDX_W-1:0] cmd_cidx,
  input  logic [RIDX_W-1:0] cmd_ridx,
  input  logic [ROW_W-1:0]  cmd_row,
  input  logic [COL_W-1:0]  cmd_col,
  input  logic [BIT_W-1:0]  cmd_bit,
  // RC state
  output logic [BIT_W-1:0]  col_bit [N_COL],
  output logic              fr,
  output logic              free_row_ok,
  output logic [RIDX_W-1:0] free_row_idx,
  output logic              free_col_ok,
  output logic [CIDX_W-1:0] free_col_idx,
  output logic [N_ROW-1:0]  row_used,
  output logic [N_ROW-1:0]  row_ff,
  output logic [N_COL-1:0]  col_used,
  output logic [N_COL-1:0]  col_ff
);

  logic [ROW_W-1:0] lk_row;
  logic [COL_W-1:0] lk_col;
  logic              row_hit;
  logic [RIDX_W-1:0] row_idx;
  logic [N_COL-1:0]  col_hit;

  assign lk_row = acc_addr[ADDR_W-1:COL_W];
  assign lk_col = acc_addr[COL_W-1:0];

  reconfig_circuit #(
    .N_ROW(N_ROW), .N_COL(N_COL), .ROW_W(ROW_W), .COL_W(COL_W), .BIT_W(BIT_W)
  ) u_rc (
    .clk, .rst_n,
    .cmd_op, .cmd_cidx, .cmd_ridx, .cmd_row, .cmd_col, .cmd_bit,
    .lk_row, .lk_col, .row_hit, .row_idx, .col_hit, .col_bit,
    .fr, .free_row_ok, .free_row_idx, .free_col_ok, .free_col_idx,
    .row_used, .row_ff, .col_used, .col_ff
  );

  // ---- main array ----
  logic              main_en;
  logic [WORD_W-1:0] main_rdata;

  assign main_en = acc_en && !dw_en && !(acc_we && row_hit);

  sram_main #(.ADDR_W(ADDR_W), .WORD_W(WORD_W)) u_mem (
    .clk, .en(main_en), .we(acc_we), .addr(acc_addr), .wdata(acc_wdata),
    .rdata(main_rdata)
  );

  // ---- redundant memory ----
  logic              srow_en, srow_we;
  logic [RIDX_W-1:0] srow_idx;
  logic [COL_W-1:0]  srow_col;
  logic [WORD_W-1:0] srow_wdata, srow_rdata;
  logic              scol_en;
  logic [N_COL-1:0]  scol_wmask, scol_wbits, scol_rbits;
  logic [ROW_W-1:0]  scol_row;

  always_comb begin
    if (dw_en && !dw_is_col) begin
      srow_en    = 1'b1;
      srow_we    = 1'b1;
      srow_idx   = dw_ridx;
      srow_col   = dw_col;
      srow_wdata = dw_word;
    end else begin
      srow_en    = acc_en && !dw_en && row_hit;
      srow_we    = acc_we;
      srow_idx   = row_idx;
      srow_col   = lk_col;
      srow_wdata = acc_wdata;
    end
    if (dw_en && dw_is_col) begin
      scol_en    = 1'b1;
      scol_wmask = N_COL'(1) << dw_cidx;
      scol_row   = dw_row;
      scol_wbits = {N_COL{dw_bit}};
    end else begin
      scol_en    = acc_en && !dw_en && !(acc_we && row_hit);
      scol_wmask = acc_we ? col_hit : '0;
      scol_row   = lk_row;
      for (int unsigned j = 0; j < N_COL; j++)
        scol_wbits[j] = (32'(col_bit[j]) < WORD_W) ? acc_wdata[col_bit[j]] : 1'b0;
    end
  end

  sram_redundant #(
    .N_ROW(N_ROW), .N_COL(N_COL), .ROW_W(ROW_W), .COL_W(COL_W), .WORD_W(WORD_W)
  ) u_rmem (
    .clk,
    .row_en(srow_en), .row_we(srow_we), .row_idx(srow_idx), .row_col(srow_col),
    .row_wdata(srow_wdata), .row_rdata(srow_rdata),
    .col_en(scol_en), .col_wmask(scol_wmask), .col_row(scol_row),
    .col_wbits(scol_wbits), .col_rbits(scol_rbits)
  );

  // ---- read merge, one cycle after the request ----
  logic [BIT_W-1:0] cbit_q [N_COL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid     <= 1'b0;
      rd_row_hit <= 1'b0;
      rd_row_idx <= '0;
      rd_col_hit <= '0;
      for (int unsigned j = 0; j < N_COL; j++) cbit_q[j] <= '0;
    end else begin
      rvalid <= acc_en && !acc_we && !dw_en;
      if (acc_en && !acc_we && !dw_en) begin
        rd_row_hit <= row_hit;
        rd_row_idx <= row_idx;
        rd_col_hit <= row_hit ? '0 : col_hit;
        for (int unsigned j = 0; j < N_COL; j++) cbit_q[j] <= col_bit[j];
      end
    end
  end

  always_comb begin
    if (rd_row_hit) begin
      rdata = srow_rdata;
    end else begin
      rdata = main_rdata;
      for (int unsigned j = 0; j < N_COL; j++)
        if (rd_col_hit[j] && 32'(cbit_q[j]) < WORD_W) rdata[cbit_q[j]] = scol_rbits[j];
    end
  end

endmodule
