// hamming_enc: ECC encoder (ECCE) of the wrapper.
//
// Single-error-correcting Hamming code. The codeword has CW_W = DATA_W + PAR_W
// bits; bit index j holds codeword position j+1. Check bit p sits at position
// 2^p and is the XOR of every information bit whose position has bit p set,
// so the decoder syndrome equals the position of a single flipped bit.
// With DATA_W = 64 this gives the 71-bit word (64 + 7) of the example memory.
// Purely combinational.
module hamming_enc
  import ecc_pkg::*;
#(
  parameter  int unsigned DATA_W = DEF_DATA_W,
  localparam int unsigned PAR_W  = par_bits(DATA_W),
  localparam int unsigned CW_W   = DATA_W + PAR_W
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [CW_W-1:0]   cw_o
);

  logic [CW_W-1:0] placed;   // information bits in place, check bits zero

  always_comb begin
    placed = '0;
    for (int unsigned i = 0; i < DATA_W; i++) placed[data_pos(i) - 1] = data_i[i];
  end

  always_comb begin
    cw_o = placed;
    for (int unsigned p = 0; p < PAR_W; p++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos <= CW_W; pos++)
        if (((pos >> p) & 1) == 1) par ^= placed[pos - 1];
      cw_o[(1 << p) - 1] = par;
    end
  end

endmodule
