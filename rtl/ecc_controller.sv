// ecc_controller: ECC controller (control module) of the wrapper.
//
// Watches the ECC decoder on normal reads. When a correctable error is seen
// and unused redundancy is left (FR), it raises Hold at once (combinationally,
// so the user request of that cycle is refused) and runs the two phases:
//
//  Error identification: write the corrected word back (WFW), read it again
//  (RFW) and check the decoder (COMP). If the word is clean the error was soft:
//  back to FFR, Hold released. If it is still wrong after ITER_T rounds the
//  fault is hard.
//
//  Hard repair: pick a spare element. A fault in a spare row (RM hit) is
//  replaced by another spare row, a fault in a bit served by a spare column by
//  another spare column for the same bit; a fault in the main array takes a
//  spare row if one is left, else a spare column. The element's data are
//  copied, ECC-corrected, from the memory into the new spare: read (RMe) then
//  write (WRe), word by word for a row (2^COL_W words), bit by bit for a
//  column (2^ROW_W rows). If the faulty word sat in RMEM, the old spare is
//  marked faulty (SRF). Finally the new spare's address is entered in the RC
//  (SRA) and the controller returns to FFR.
//
// With repair_defer high the repair is postponed: after identification Hold is
// dropped (PEND) and the repair starts in the first cycle mem_idle is high.
// When no redundancy is left, or no spare of the needed kind, the controller
// rests in FFWR and errors are only corrected by the ECC on the fly.
// Uncorrectable syndromes start nothing.
//
// Memory accesses go out on the m_* port (ORed onto the BIST path); the
// memory core returns read data one cycle later, decoded, on the dec_* inputs.
// The state sequence follows the published scheme's state diagram; the order of spare
// choice, ITER_T, the deferred-repair handshake and the FFWR behaviour are
// this design's choices.
module ecc_controller
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
  localparam int unsigned CIDX_W = clog2_min1(N_COL),
  localparam int unsigned ITER_W = clog2_min1(ITER_T + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // read results (one cycle after the request)
  input  logic              rd_valid,      // any read result present
  input  logic              user_rd_valid, // ... and it belongs to a user read
  input  logic [ADDR_W-1:0] user_rd_addr,
  input  logic              dec_err,
  input  logic              dec_ue,
  input  logic [CW_W-1:0]   dec_cw,        // corrected codeword
  input  logic [PAR_W-1:0]  dec_err_bit,
  input  logic              rd_row_hit,    // RM
  input  logic [RIDX_W-1:0] rd_row_idx,
  input  logic [N_COL-1:0]  rd_col_hit,
  input  logic [BIT_W-1:0]  col_bit [N_COL],
  // free redundancy from RC
  input  logic              fr,
  input  logic              free_row_ok,
  input  logic [RIDX_W-1:0] free_row_idx,
  input  logic              free_col_ok,
  input  logic [CIDX_W-1:0] free_col_idx,
  // system software control
  input  logic              repair_defer,
  input  logic              mem_idle,
  // outputs
  output logic              hold,
  output logic              m_en,
  output logic              m_we,
  output logic [ADDR_W-1:0] m_addr,
  output logic [CW_W-1:0]   m_wdata,
  output logic              dw_en,
  output logic              dw_is_col,
  output logic [RIDX_W-1:0] dw_ridx,
  output logic [CIDX_W-1:0] dw_cidx,
  output logic [ROW_W-1:0]  dw_row,
  output logic [COL_W-1:0]  dw_col,
  output logic [CW_W-1:0]   dw_word,
  output logic              dw_bit,
  output rc_op_e            cmd_op,
  output logic [CIDX_W-1:0] cmd_cidx,
  output logic [RIDX_W-1:0] cmd_ridx,
  output logic [ROW_W-1:0]  cmd_row,
  output logic [COL_W-1:0]  cmd_col,
  output logic [BIT_W-1:0]  cmd_bit,
  output ecc_state_e        state,
  // one-cycle event pulses
  output logic              ev_detect,     // error identification started
  output logic              ev_soft,       // identified as soft error
  output logic              ev_hard,       // identified as hard fault
  output logic              ev_repaired,   // spare entered in RC
  output logic              ev_spare_fault // hard fault was inside RMEM
);

  ecc_state_e        st;
  logic [ADDR_W-1:0] fa;        // faulty word address
  logic [CW_W-1:0]   cw_q;      // corrected word to write back
  logic [BIT_W-1:0]  eb;        // faulty bit index
  logic [ITER_W-1:0] iter;
  logic              tgt_is_col;
  logic [RIDX_W-1:0] tgt_ridx;
  logic [CIDX_W-1:0] tgt_cidx;
  logic              old_rf;    // fault located in RMEM (RF)
  logic              old_is_col;
  logic [RIDX_W-1:0] old_ridx;
  logic [CIDX_W-1:0] old_cidx;
  logic [ROW_W-1:0]  cnt;       // copy counter

  logic [ROW_W-1:0] fa_row;
  logic [COL_W-1:0] fa_col;
  logic [BIT_W-1:0] eb_now;

  assign fa_row = fa[ADDR_W-1:COL_W];
  assign fa_col = fa[COL_W-1:0];
  assign eb_now = BIT_W'(dec_err_bit);
  assign state  = st;

  logic detect;
  assign detect = (st == S_FFR) && user_rd_valid && dec_err && !dec_ue && fr;

  // ---- where is the hard fault, and which spare replaces it (in COMP) ----
  logic              in_col;
  logic [CIDX_W-1:0] in_col_idx;
  logic              fit, fit_is_col;
  logic [RIDX_W-1:0] fit_ridx;
  logic [CIDX_W-1:0] fit_cidx;

  always_comb begin
    in_col     = 1'b0;
    in_col_idx = '0;
    for (int j = N_COL - 1; j >= 0; j--) begin
      if (rd_col_hit[j] && col_bit[j] == eb_now) begin
        in_col     = 1'b1;
        in_col_idx = CIDX_W'(j);
      end
    end
    fit_ridx = free_row_idx;
    fit_cidx = free_col_idx;
    if (rd_row_hit) begin
      fit = free_row_ok;  fit_is_col = 1'b0;
    end else if (in_col) begin
      fit = free_col_ok;  fit_is_col = 1'b1;
    end else begin
      fit = free_row_ok || free_col_ok;
      fit_is_col = !free_row_ok;
    end
  end

  logic copy_last;
  assign copy_last = tgt_is_col ? (cnt == '1) : (cnt == ROW_W'((2**COL_W) - 1));

  // ---- outputs ----
  always_comb begin
    hold     = detect;
    m_en     = 1'b0;
    m_we     = 1'b0;
    m_addr   = '0;
    m_wdata  = '0;
    dw_en    = 1'b0;
    cmd_op   = RC_NOP;
    cmd_cidx = '0;
    cmd_ridx = '0;
    cmd_row  = '0;
    cmd_col  = '0;
    cmd_bit  = '0;
    unique case (st)
      S_WFW: begin
        hold = 1'b1; m_en = 1'b1; m_we = 1'b1; m_addr = fa; m_wdata = cw_q;
      end
      S_RFW: begin
        hold = 1'b1; m_en = 1'b1; m_addr = fa;
      end
      S_COMP: hold = 1'b1;
      S_PEND: hold = mem_idle;
      S_RME: begin
        hold = 1'b1; m_en = 1'b1;
        m_addr = tgt_is_col ? {cnt, fa_col} : {fa_row, cnt[COL_W-1:0]};
      end
      S_WRE: begin
        hold  = 1'b1;
        dw_en = rd_valid;
      end
      S_SRF: begin
        hold     = 1'b1;
        cmd_op   = old_is_col ? RC_MARK_COL : RC_MARK_ROW;
        cmd_ridx = old_ridx;
        cmd_cidx = old_cidx;
      end
      S_SRA: begin
        hold     = 1'b1;
        cmd_op   = tgt_is_col ? RC_SET_COL : RC_SET_ROW;
        cmd_ridx = tgt_ridx;
        cmd_cidx = tgt_cidx;
        cmd_row  = fa_row;
        cmd_col  = fa_col;
        cmd_bit  = eb;
      end
      default: ;
    endcase
  end

  assign dw_is_col = tgt_is_col;
  assign dw_ridx   = tgt_ridx;
  assign dw_cidx   = tgt_cidx;
  assign dw_row    = cnt;
  assign dw_col    = cnt[COL_W-1:0];
  assign dw_word   = dec_cw;
  assign dw_bit    = dec_cw[eb];

  // ---- state register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_FFR;
      fa         <= '0;
      cw_q       <= '0;
      eb         <= '0;
      iter       <= '0;
      tgt_is_col <= 1'b0;
      tgt_ridx   <= '0;
      tgt_cidx   <= '0;
      old_rf     <= 1'b0;
      old_is_col <= 1'b0;
      old_ridx   <= '0;
      old_cidx   <= '0;
      cnt        <= '0;
    end else begin
      unique case (st)
        S_FFR: begin
          if (!fr) begin
            st <= S_FFWR;
          end else if (detect) begin
            st   <= S_WFW;
            fa   <= user_rd_addr;
            cw_q <= dec_cw;
            iter <= '0;
          end
        end
        S_WFW: st <= S_RFW;
        S_RFW: st <= S_COMP;
        S_COMP: begin
          if (!dec_err) begin
            st <= S_FFR;
          end else if (32'(iter) + 1 < ITER_T) begin
            iter <= iter + 1'b1;
            cw_q <= dec_cw;
            st   <= S_WFW;
          end else if (!fit) begin
            st <= S_FFWR;
          end else begin
            eb         <= eb_now;
            tgt_is_col <= fit_is_col;
            tgt_ridx   <= fit_ridx;
            tgt_cidx   <= fit_cidx;
            old_rf     <= rd_row_hit || in_col;
            old_is_col <= !rd_row_hit;
            old_ridx   <= rd_row_idx;
            old_cidx   <= in_col_idx;
            cnt        <= '0;
            st         <= repair_defer ? S_PEND : S_RME;
          end
        end
        S_PEND: if (mem_idle) st <= S_RME;
        S_RME:  st <= S_WRE;
        S_WRE: begin
          if (copy_last) begin
            st <= old_rf ? S_SRF : S_SRA;
          end else begin
            cnt <= cnt + 1'b1;
            st  <= S_RME;
          end
        end
        S_SRF:  st <= S_SRA;
        S_SRA:  st <= S_FFR;
        S_FFWR: st <= S_FFWR;
        default: st <= S_FFR;
      endcase
    end
  end

  assign ev_detect      = detect;
  assign ev_soft        = (st == S_COMP) && !dec_err;
  assign ev_hard        = (st == S_COMP) && dec_err && !(32'(iter) + 1 < ITER_T);
  assign ev_repaired    = (st == S_SRA);
  assign ev_spare_fault = (st == S_SRF);

  // Read results must arrive exactly when the controller expects them.
  a_comp_data: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_COMP || st == S_WRE) |-> rd_valid);
  // The controller never drives the memory and the spare write port together.
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) !(m_en && dw_en));

endmodule
