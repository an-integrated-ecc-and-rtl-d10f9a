// sram_main: main memory array (MEM) of the wrapper.
//
// Single-port synchronous SRAM of 2^ADDR_W codewords of WORD_W bits
// (information and check bits). One access per cycle when en is high: a write
// stores wdata at addr; a read returns mem[addr] on rdata one cycle later.
// rdata holds its value between reads. Written as an array so that a
// compiler can map it onto an SRAM macro; contents are not reset.
module sram_main #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned WORD_W = 71
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
