// ecc_pkg: constants, helper functions and shared types of the ECC + redundancy
// memory wrapper.
//
// The default sizes follow the 32K x 64 example memory (8 spare rows, 4 spare
// columns, single-error-correcting Hamming code with log2(k)+1 parity bits).
// The physical organisation (8 words per row) and the identification iteration
// count are this design's own choices.
package ecc_pkg;

  localparam int unsigned DEF_DATA_W      = 64; // information bits per word
  localparam int unsigned DEF_ADDR_W      = 15; // 32K words
  localparam int unsigned DEF_COL_W       = 3;  // 8 words share one physical row
  localparam int unsigned DEF_N_SPARE_ROW = 8;
  localparam int unsigned DEF_N_SPARE_COL = 4;
  localparam int unsigned DEF_ITER_T      = 4;  // write/read/compare rounds before "hard"

  // Number of Hamming SEC check bits for k information bits: smallest p with
  // 2^p >= k + p + 1 (6 for 32, 7 for 64, 8 for 128).
  function automatic int unsigned par_bits(int unsigned k);
    int unsigned p;
    p = 1;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

  function automatic logic is_pow2(int unsigned x);
    return (x != 0) && ((x & (x - 1)) == 0);
  endfunction

  // 1-based codeword position of information bit i: the i-th position that is
  // not a power of two (powers of two hold the check bits): start from i+1
  // and skip one position for every power of two at or below it.
  function automatic int unsigned data_pos(int unsigned i);
    int unsigned pos;
    pos = i + 1;
    for (int unsigned p = 0; p < 16; p++)
      if ((1 << p) <= pos) pos++;
    return pos;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Commands into the reconfiguration circuit (RC), from the tester or from
  // the ECC controller.
  typedef enum logic [2:0] {
    RC_NOP      = 3'd0,
    RC_SET_ROW  = 3'd1,  // enable spare row idx for main row address
    RC_SET_COL  = 3'd2,  // enable spare column idx for (column address, bit)
    RC_MARK_ROW = 3'd3,  // set the fault flag FF of spare row idx
    RC_MARK_COL = 3'd4   // set the fault flag FF of spare column idx
  } rc_op_e;

  // States of the ECC controller (control module state diagram).
  typedef enum logic [3:0] {
    S_FFR  = 4'd0,  // fault free (redundancy left)
    S_WFW  = 4'd1,  // write back faulty word
    S_RFW  = 4'd2,  // read faulty word
    S_COMP = 4'd3,  // compare (check decoder result)
    S_PEND = 4'd4,  // hard fault found, repair postponed until idle
    S_RME  = 4'd5,  // read memory (copy source)
    S_WRE  = 4'd6,  // write redundancy (copy target)
    S_SRF  = 4'd7,  // set redundancy faulty flag
    S_SRA  = 4'd8,  // set redundancy address in RC
    S_FFWR = 4'd9   // fault free without redundancy
  } ecc_state_e;

endpackage
