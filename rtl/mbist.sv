// mbist: memory built-in self-test of the wrapper.
//
// Runs a March C- test over the whole memory core (information and check bits
// together, raw codewords, through the reconfiguration circuit so that a
// repaired memory is tested as the user sees it):
//   {both(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); both(r0)}
// with the all-zero / all-one word as data background. One memory operation
// is issued per cycle; a read is checked in the next cycle, when its data
// returns. Every mismatch produces a one-cycle fail pulse with the faulty word
// address and its fault syndrome (read XOR expected, one bit per failing
// cell), which the tester collects for redundancy analysis.
//
// Interface: start (pulse, only while enable = MBS is high) begins a run;
// busy is high while running; done rises after 10*2^ADDR_W + 1 cycles and
// stays high until the next start. All memory-side outputs are zero when not
// running, so they can be ORed with the ECC controller's signals.
// The published scheme reuses an existing BIST and names no algorithm: March C- is
// this design's choice.
module mbist #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned WORD_W = 71
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              start,
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic [WORD_W-1:0] mem_rdata,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [ADDR_W-1:0] fail_addr,
  output logic [WORD_W-1:0] fail_syn
);

  typedef enum logic [1:0] {B_IDLE, B_RUN, B_FLUSH, B_DONE} bist_state_e;

  bist_state_e       st;
  logic [2:0]        elem;     // March element 0..5
  logic              ph;       // operation within the element
  logic [ADDR_W-1:0] addr;
  logic              chk_q;    // a read was issued last cycle
  logic              exp_q;    // its expected background bit
  logic [ADDR_W-1:0] chk_addr_q;

  logic op_write, op_val, down, two_ops, last_addr, last_op;

  // March C- element table
  always_comb begin
    unique case (elem)
      3'd0:    begin two_ops = 1'b0; down = 1'b0; op_write = 1'b1; op_val = 1'b0; end
      3'd1:    begin two_ops = 1'b1; down = 1'b0; op_write = ph;   op_val = ph;   end
      3'd2:    begin two_ops = 1'b1; down = 1'b0; op_write = ph;   op_val = !ph;  end
      3'd3:    begin two_ops = 1'b1; down = 1'b1; op_write = ph;   op_val = ph;   end
      3'd4:    begin two_ops = 1'b1; down = 1'b1; op_write = ph;   op_val = !ph;  end
      default: begin two_ops = 1'b0; down = 1'b0; op_write = 1'b0; op_val = 1'b0; end
    endcase
    last_addr = down ? (addr == '0) : (addr == '1);
    last_op   = !two_ops || ph;
  end

  assign busy      = (st == B_RUN) || (st == B_FLUSH);
  assign done      = (st == B_DONE);
  assign mem_en    = (st == B_RUN);
  assign mem_we    = (st == B_RUN) && op_write;
  assign mem_addr  = (st == B_RUN) ? addr : '0;
  assign mem_wdata = (st == B_RUN && op_write) ? {WORD_W{op_val}} : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= B_IDLE;
      elem       <= '0;
      ph         <= 1'b0;
      addr       <= '0;
      chk_q      <= 1'b0;
      exp_q      <= 1'b0;
      chk_addr_q <= '0;
    end else begin
      chk_q      <= (st == B_RUN) && !op_write;
      exp_q      <= op_val;
      chk_addr_q <= addr;
      unique case (st)
        B_IDLE, B_DONE: begin
          if (enable && start) begin
            st   <= B_RUN;
            elem <= '0;
            ph   <= 1'b0;
            addr <= '0;
          end
        end
        B_RUN: begin
          if (!last_op) begin
            ph <= 1'b1;
          end else begin
            ph <= 1'b0;
            if (!last_addr) begin
              addr <= down ? addr - 1'b1 : addr + 1'b1;
            end else if (elem == 3'd5) begin
              st <= B_FLUSH;
            end else begin
              elem <= elem + 1'b1;
              // elements 3 and 4 run downwards
              addr <= (elem == 3'd2 || elem == 3'd3) ? '1 : '0;
            end
          end
        end
        B_FLUSH: st <= B_DONE;
        default: st <= B_IDLE;
      endcase
      if (!enable) st <= B_IDLE;
    end
  end

  always_comb begin
    fail_syn  = chk_q ? (mem_rdata ^ {WORD_W{exp_q}}) : '0;
    fail      = chk_q && (fail_syn != '0);
    fail_addr = chk_q ? chk_addr_q : '0;
  end

endmodule
