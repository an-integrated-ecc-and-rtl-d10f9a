// tb_hamming_dec: self-checking test of the Hamming SEC decoder.
// Codewords are built by a reference encoder in this testbench; then no error,
// every single-bit error and random double errors are applied. Expected:
// clean words pass unchanged; a single error is flagged, its bit index
// reported and the data and codeword restored; a double error is flagged
// (never silently passed as clean).
module tb_hamming_dec;
  int checks = 0, failures = 0;

  logic [70:0] cw_in, cw_corr;
  logic [63:0] data;
  logic        err, ue;
  logic [6:0]  syn, ebit;

  hamming_dec #(.DATA_W(64)) dut (
    .cw_i(cw_in), .cw_corr_o(cw_corr), .data_o(data), .err_o(err), .ue_o(ue),
    .syn_o(syn), .err_bit_o(ebit)
  );

  function automatic logic [70:0] ref_enc(input logic [63:0] d);
    logic [70:0] cw;
    int di;
    int unsigned syn_v;
    cw = '0;
    di = 0;
    for (int pos = 1; pos <= 71; pos++)
      if ((pos & (pos - 1)) != 0) begin cw[pos-1] = d[di]; di++; end
    syn_v = 0;
    for (int pos = 1; pos <= 71; pos++) if (cw[pos-1]) syn_v ^= pos;
    for (int p = 0; p < 7; p++) cw[(1 << p) - 1] = syn_v[p];
    return cw;
  endfunction

  task automatic expect_that(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    logic [70:0] good;
    for (int t = 0; t < 60; t++) begin
      d = (t == 0) ? '0 : (t == 1) ? '1 : {$urandom, $urandom};
      good = ref_enc(d);
      cw_in = good;
      #1;
      expect_that(!err && !ue && data == d && cw_corr == good, "clean word");
      for (int b = 0; b < 71; b++) begin
        cw_in = good ^ (71'd1 << b);
        #1;
        expect_that(err && !ue, "single error flagged");
        expect_that(int'(ebit) == b, "error bit index");
        expect_that(data == d && cw_corr == good, "single error corrected");
      end
      for (int k = 0; k < 20; k++) begin
        int b1, b2;
        b1 = $urandom_range(70);
        b2 = (b1 + 1 + $urandom_range(69)) % 71;
        cw_in = good ^ (71'd1 << b1) ^ (71'd1 << b2);
        #1;
        expect_that(err, "double error detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
