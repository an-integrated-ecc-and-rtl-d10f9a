// tb_hamming_enc: self-checking test of the Hamming SEC encoder.
// For random and corner information words the codeword is checked against a
// reference built here in a different way: the information bits must appear,
// in order, at the non-power-of-two positions, and the XOR of the positions
// of all set bits (the syndrome) must be zero. Runs for 64- and 32-bit words.
module tb_hamming_enc;
  int checks = 0, failures = 0;

  logic [63:0] d64;
  logic [70:0] c64;
  logic [31:0] d32;
  logic [37:0] c32;

  hamming_enc #(.DATA_W(64)) dut64 (.data_i(d64), .cw_o(c64));
  hamming_enc #(.DATA_W(32)) dut32 (.data_i(d32), .cw_o(c32));

  function automatic bit check_cw(input logic [127:0] cw, input int n, input logic [127:0] d, input int k);
    int unsigned syn;
    int di;
    syn = 0;
    di = 0;
    for (int pos = 1; pos <= n; pos++) begin
      if (cw[pos-1]) syn ^= pos;
      if ((pos & (pos - 1)) != 0) begin
        if (cw[pos-1] !== d[di]) return 1'b0;
        di++;
      end
    end
    return (syn == 0) && (di == k);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t == 0) begin d64 = '0; d32 = '0; end
      else if (t == 1) begin d64 = '1; d32 = '1; end
      else if (t < 66) begin d64 = 64'd1 << (t - 2); d32 = 32'd1 << ((t - 2) % 32); end
      else begin d64 = {$urandom, $urandom}; d32 = $urandom; end
      #1;
      checks++;
      if (!check_cw(128'(c64), 71, 128'(d64), 64)) begin
        failures++;
        if (failures < 5) $display("FAIL 64-bit data %h cw %h", d64, c64);
      end
      checks++;
      if (!check_cw(128'(c32), 38, 128'(d32), 32)) begin
        failures++;
        if (failures < 5) $display("FAIL 32-bit data %h cw %h", d32, c32);
      end
    end
    // width check: 7 check bits for 64, 6 for 32
    checks++;
    if ($bits(c64) != 71 || $bits(c32) != 38) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
