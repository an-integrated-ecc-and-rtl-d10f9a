// tb_sram_main: self-checking test of the main array.
// Small instance (64 words x 71 bits). Fills the array with random words,
// reads every address back and checks the data one cycle after the request,
// checks that rdata holds while idle, and that writes do not disturb rdata.
module tb_sram_main;
  localparam int AW = 6, W = 71;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [2**AW];

  sram_main #(.ADDR_W(AW), .WORD_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = {$urandom, $urandom, $urandom};
      en = 1; we = 1; addr = AW'(a); wdata = model[a];
      @(negedge clk);
    end
    for (int r = 0; r < 3 * 2**AW; r++) begin
      int a;
      a = $urandom_range(2**AW - 1);
      en = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL read %0d got %h exp %h", a, rdata, model[a]);
      end
      // an idle cycle and a write must leave rdata alone
      en = (r % 2 == 0);
      we = 1; addr = AW'(a ^ 1); wdata = model[a ^ 1];
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) failures++;
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
