// wrapper_path_mux: the multiplexers and OR gates of the memory test wrapper.
//
// The memory core is driven either from the normal (user) path or from the
// BIST path. The multiplexers select the BIST path when the Memory BISR
// Select signal MBS is high (test mode) or when the ECC controller raises
// Hold (error identification / hard repair). The ECC controller does not have
// its own multiplexer input: its address, data and control signals are ORed
// onto the BIST path, which is legal because the BIST drives zeros when idle
// and the controller drives zeros in test mode. This keeps the normal path
// free of an extra multiplexer level. Hold is likewise ORed onto the BIST
// fail output pin, so no extra pin is needed. Purely combinational;
// n_accept tells the user side that its request reaches the memory.
module wrapper_path_mux #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned WORD_W = 71
) (
  input  logic              mbs,
  input  logic              hold,
  // normal path (data already encoded)
  input  logic              n_en,
  input  logic              n_we,
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [WORD_W-1:0] n_wdata,
  output logic              n_accept,
  // BIST path
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [WORD_W-1:0] b_wdata,
  // ECC controller, ORed onto the BIST path
  input  logic              c_en,
  input  logic              c_we,
  input  logic [ADDR_W-1:0] c_addr,
  input  logic [WORD_W-1:0] c_wdata,
  // to the memory core
  output logic              m_en,
  output logic              m_we,
  output logic [ADDR_W-1:0] m_addr,
  output logic [WORD_W-1:0] m_wdata,
  // shared output pin
  input  logic              bist_fail,
  output logic              fail_hold_pin
);

  logic sel_test;

  assign sel_test      = mbs | hold;
  assign n_accept      = !sel_test;
  assign m_en          = sel_test ? (b_en | c_en)       : n_en;
  assign m_we          = sel_test ? (b_we | c_we)       : n_we;
  assign m_addr        = sel_test ? (b_addr | c_addr)   : n_addr;
  assign m_wdata       = sel_test ? (b_wdata | c_wdata) : n_wdata;
  assign fail_hold_pin = bist_fail | hold;

endmodule
