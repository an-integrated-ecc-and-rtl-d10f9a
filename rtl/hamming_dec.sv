// hamming_dec: ECC decoder (ECCD) of the wrapper.
//
// Computes the Hamming syndrome of a CW_W-bit codeword (see hamming_enc for
// the layout). A non-zero syndrome s flags an error; if s <= CW_W the bit at
// index s-1 is flipped back (single-error correction), otherwise the word is
// flagged uncorrectable and passed through. Outputs the corrected codeword
// (used by the ECC controller for write-back and copying), the corrected
// information bits and the index of the corrected bit. Purely combinational.
module hamming_dec
  import ecc_pkg::*;
#(
  parameter  int unsigned DATA_W = DEF_DATA_W,
  localparam int unsigned PAR_W  = par_bits(DATA_W),
  localparam int unsigned CW_W   = DATA_W + PAR_W
) (
  input  logic [CW_W-1:0]   cw_i,
  output logic [CW_W-1:0]   cw_corr_o,  // codeword after correction
  output logic [DATA_W-1:0] data_o,     // corrected information bits
  output logic              err_o,      // syndrome non-zero
  output logic              ue_o,       // syndrome points outside the word
  output logic [PAR_W-1:0]  syn_o,      // raw syndrome (1-based error position)
  output logic [PAR_W-1:0]  err_bit_o   // index of the corrected bit (syn-1)
);

  always_comb begin
    syn_o = '0;
    for (int unsigned p = 0; p < PAR_W; p++)
      for (int unsigned pos = 1; pos <= CW_W; pos++)
        if (((pos >> p) & 1) == 1) syn_o[p] = syn_o[p] ^ cw_i[pos - 1];
  end

  always_comb begin
    err_o     = (syn_o != '0);
    ue_o      = (32'(syn_o) > CW_W);
    err_bit_o = syn_o - PAR_W'(1);
    cw_corr_o = cw_i;
    if (err_o && !ue_o) cw_corr_o[err_bit_o] = ~cw_i[err_bit_o];
    for (int unsigned i = 0; i < DATA_W; i++) data_o[i] = cw_corr_o[data_pos(i) - 1];
  end

endmodule
