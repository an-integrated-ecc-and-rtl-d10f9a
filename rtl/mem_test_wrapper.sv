// mem_test_wrapper: memory with integrated ECC and redundancy repair.
//
// A 2^ADDR_W x DATA_W memory whose words carry Hamming SEC check bits and
// whose array has spare rows and spare columns. Hard faults found by the
// production test are repaired by the tester through the RC command port.
// Faults that appear in the field are handled on-line: the ECC decoder
// corrects every single-bit error on the fly, and the ECC controller decides
// by repeated write-back and re-read whether the error was soft (gone after
// scrubbing) or hard (still there), and repairs a hard fault with an unused
// spare element while Hold keeps the user away.
//
// Structure: user write data -> ECCE -> path multiplexers -> memory core
// (MEM + RMEM + RC) -> ECCD -> user read data. The BIST and the ECC
// controller share the second multiplexer input through OR gates; MBS selects
// test mode. Hold is ORed onto the BIST fail pin.
//
// User interface: one request per cycle (req, we, addr, wdata). A request is
// taken only while MBS is low and bist_fail_hold is low (Hold); the user must
// repeat a refused request. Read data, with ECC correction applied, appear on
// rdata one cycle later with rvalid; rd_err / rd_ue flag a corrected /
// uncorrectable word. With MBS high, bist_start runs the March test and
// bist_fail_hold pulses with bist_fail_addr / bist_fail_syn for every faulty
// word. repair_defer / mem_idle let system software postpone a repair to an
// idle period. ecc_state and the rc_* outputs expose the controller state and
// the RC contents for monitoring.
module mem_test_wrapper
  import ecc_pkg::*;
#(
  parameter  int unsigned DATA_W = DEF_DATA_W,
  parameter  int unsigned ADDR_W = DEF_ADDR_W,
  parameter  int unsigned COL_W  = DEF_COL_W,
  parameter  int unsigned N_ROW  = DEF_N_SPARE_ROW,
  parameter  int unsigned N_COL  = DEF_N_SPARE_COL,
  parameter  int unsigned ITER_T = DEF_ITER_T,
  localparam int unsigned PAR_W  = par_bits(DATA_W),
  localparam int unsigned CW_W   = DATA_W + PAR_W,
  localparam int unsigned ROW_W  = ADDR_W - COL_W,
  localparam int unsigned BIT_W  = $clog2(CW_W),
  localparam int unsigned RIDX_W = clog2_min1(N_ROW),
  localparam int unsigned CIDX_W = clog2_min1(N_COL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mbs,            // Memory BISR Select: test mode
  // user port
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              rvalid,
  output logic              rd_err,
  output logic              rd_ue,
  // BIST / tester
  input  logic              bist_start,
  output logic              bist_done,
  output logic              bist_fail_hold, // BIST fail pulse OR Hold
  output logic [ADDR_W-1:0] bist_fail_addr,
  output logic [CW_W-1:0]   bist_fail_syn,
  // tester programming of the RC (production repair)
  input  rc_op_e            rc_op,
  input  logic [CIDX_W-1:0] rc_cidx,
  input  logic [RIDX_W-1:0] rc_ridx,
  input  logic [ROW_W-1:0]  rc_row,
  input  logic [COL_W-1:0]  rc_col,
  input  logic [BIT_W-1:0]  rc_bit,
  // system software
  input  logic              repair_defer,
  input  logic              mem_idle,
  // monitoring
  output ecc_state_e        ecc_state,
  output logic              rc_fr,
  output logic [N_ROW-1:0]  rc_row_used,
  output logic [N_ROW-1:0]  rc_row_ff,
  output logic [N_COL-1:0]  rc_col_used,
  output logic [N_COL-1:0]  rc_col_ff,
  output logic              bist_busy,
  output logic              ev_detect,      // one-cycle event pulses of the
  output logic              ev_soft,        // ECC controller
  output logic              ev_hard,
  output logic              ev_repaired,
  output logic              ev_spare_fault
);

  // ---- encoder on the normal write path ----
  logic [CW_W-1:0] n_cw;

  hamming_enc #(.DATA_W(DATA_W)) u_ecce (.data_i(wdata), .cw_o(n_cw));

  // ---- BIST ----
  logic              b_en, b_we, b_fail;
  logic [ADDR_W-1:0] b_addr;
  logic [CW_W-1:0]   b_wdata;
  logic [CW_W-1:0]   m_rdata;

  mbist #(.ADDR_W(ADDR_W), .WORD_W(CW_W)) u_bist (
    .clk, .rst_n, .enable(mbs), .start(bist_start),
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata),
    .mem_rdata(m_rdata), .busy(bist_busy), .done(bist_done), .fail(b_fail),
    .fail_addr(bist_fail_addr), .fail_syn(bist_fail_syn)
  );

  // ---- ECC controller ----
  logic              hold;
  logic              c_en, c_we;
  logic [ADDR_W-1:0] c_addr;
  logic [CW_W-1:0]   c_wdata;
  logic              dw_en, dw_is_col, dw_bit;
  logic [RIDX_W-1:0] dw_ridx;
  logic [CIDX_W-1:0] dw_cidx;
  logic [ROW_W-1:0]  dw_row;
  logic [COL_W-1:0]  dw_col;
  logic [CW_W-1:0]   dw_word;
  rc_op_e            c_op;
  logic [CIDX_W-1:0] c_cidx;
  logic [RIDX_W-1:0] c_ridx;
  logic [ROW_W-1:0]  c_row;
  logic [COL_W-1:0]  c_col;
  logic [BIT_W-1:0]  c_bit;

  // ---- path multiplexers and OR gates ----
  logic              m_en, m_we, n_accept;
  logic [ADDR_W-1:0] m_addr;
  logic [CW_W-1:0]   m_wdata;

  wrapper_path_mux #(.ADDR_W(ADDR_W), .WORD_W(CW_W)) u_mux (
    .mbs, .hold,
    .n_en(req), .n_we(we), .n_addr(addr), .n_wdata(n_cw), .n_accept,
    .b_en, .b_we, .b_addr, .b_wdata,
    .c_en, .c_we, .c_addr, .c_wdata,
    .m_en, .m_we, .m_addr, .m_wdata,
    .bist_fail(b_fail), .fail_hold_pin(bist_fail_hold)
  );

  // ---- RC command: controller has priority, tester otherwise ----
  rc_op_e            k_op;
  logic [CIDX_W-1:0] k_cidx;
  logic [RIDX_W-1:0] k_ridx;
  logic [ROW_W-1:0]  k_row;
  logic [COL_W-1:0]  k_col;
  logic [BIT_W-1:0]  k_bit;

  always_comb begin
    if (c_op != RC_NOP) begin
      k_op = c_op;  k_cidx = c_cidx;  k_ridx = c_ridx;
      k_row = c_row; k_col = c_col;   k_bit = c_bit;
    end else begin
      k_op = rc_op;  k_cidx = rc_cidx; k_ridx = rc_ridx;
      k_row = rc_row; k_col = rc_col;  k_bit = rc_bit;
    end
  end

  // ---- memory core ----
  logic              m_rvalid, rd_row_hit;
  logic [RIDX_W-1:0] rd_row_idx;
  logic [N_COL-1:0]  rd_col_hit;
  logic [BIT_W-1:0]  col_bit [N_COL];
  logic              free_row_ok, free_col_ok;
  logic [RIDX_W-1:0] free_row_idx;
  logic [CIDX_W-1:0] free_col_idx;

  memory_core #(
    .ADDR_W(ADDR_W), .COL_W(COL_W), .WORD_W(CW_W), .N_ROW(N_ROW), .N_COL(N_COL)
  ) u_core (
    .clk, .rst_n,
    .acc_en(m_en), .acc_we(m_we), .acc_addr(m_addr), .acc_wdata(m_wdata),
    .rdata(m_rdata), .rvalid(m_rvalid),
    .rd_row_hit, .rd_row_idx, .rd_col_hit,
    .dw_en, .dw_is_col, .dw_ridx, .dw_cidx, .dw_row, .dw_col, .dw_word, .dw_bit,
    .cmd_op(k_op), .cmd_cidx(k_cidx), .cmd_ridx(k_ridx), .cmd_row(k_row),
    .cmd_col(k_col), .cmd_bit(k_bit),
    .col_bit, .fr(rc_fr), .free_row_ok, .free_row_idx, .free_col_ok, .free_col_idx,
    .row_used(rc_row_used), .row_ff(rc_row_ff), .col_used(rc_col_used), .col_ff(rc_col_ff)
  );

  // ---- decoder on the read path ----
  logic [CW_W-1:0]  d_cw;
  logic             d_err, d_ue;
  logic [PAR_W-1:0] d_syn, d_bit;

  hamming_dec #(.DATA_W(DATA_W)) u_eccd (
    .cw_i(m_rdata), .cw_corr_o(d_cw), .data_o(rdata), .err_o(d_err), .ue_o(d_ue),
    .syn_o(d_syn), .err_bit_o(d_bit)
  );

  // which read result belongs to the user
  logic              user_rd_q;
  logic [ADDR_W-1:0] user_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      user_rd_q   <= 1'b0;
      user_addr_q <= '0;
    end else begin
      user_rd_q <= req && !we && n_accept;
      if (req && !we && n_accept) user_addr_q <= addr;
    end
  end

  assign rvalid = m_rvalid && user_rd_q;
  assign rd_err = rvalid && d_err;
  assign rd_ue  = rvalid && d_ue;

  ecc_controller #(
    .DATA_W(DATA_W), .ADDR_W(ADDR_W), .COL_W(COL_W), .N_ROW(N_ROW), .N_COL(N_COL),
    .ITER_T(ITER_T)
  ) u_ctrl (
    .clk, .rst_n,
    .rd_valid(m_rvalid), .user_rd_valid(rvalid), .user_rd_addr(user_addr_q),
    .dec_err(d_err), .dec_ue(d_ue), .dec_cw(d_cw), .dec_err_bit(d_bit),
    .rd_row_hit, .rd_row_idx, .rd_col_hit, .col_bit,
    .fr(rc_fr), .free_row_ok, .free_row_idx, .free_col_ok, .free_col_idx,
    .repair_defer, .mem_idle,
    .hold,
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata),
    .dw_en, .dw_is_col, .dw_ridx, .dw_cidx, .dw_row, .dw_col, .dw_word, .dw_bit,
    .cmd_op(c_op), .cmd_cidx(c_cidx), .cmd_ridx(c_ridx), .cmd_row(c_row),
    .cmd_col(c_col), .cmd_bit(c_bit),
    .state(ecc_state),
    .ev_detect, .ev_soft, .ev_hard, .ev_repaired, .ev_spare_fault
  );

endmodule
