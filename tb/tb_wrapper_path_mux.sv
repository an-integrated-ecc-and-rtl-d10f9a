// tb_wrapper_path_mux: self-checking test of the path multiplexers and OR gates.
// Random stimulus; the expected memory-side signals are the normal path when
// MBS and Hold are low, else the OR of the BIST and controller signals. The
// shared pin must be BIST fail OR Hold.
module tb_wrapper_path_mux;
  localparam int AW = 15, W = 71;
  int checks = 0, failures = 0;
  logic mbs, hold, n_en, n_we, b_en, b_we, c_en, c_we, bist_fail;
  logic [AW-1:0] n_addr, b_addr, c_addr, m_addr;
  logic [W-1:0]  n_wdata, b_wdata, c_wdata, m_wdata;
  logic m_en, m_we, n_accept, fail_hold_pin;

  wrapper_path_mux #(.ADDR_W(AW), .WORD_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic sel;
      {mbs, hold, n_en, n_we, b_en, b_we, c_en, c_we, bist_fail} = 9'($urandom);
      n_addr = AW'($urandom); b_addr = AW'($urandom); c_addr = AW'($urandom);
      n_wdata = {$urandom, $urandom, $urandom};
      b_wdata = {$urandom, $urandom, $urandom};
      c_wdata = {$urandom, $urandom, $urandom};
      #1;
      sel = mbs || hold;
      checks++;
      if (n_accept !== !sel) failures++;
      checks++;
      if (fail_hold_pin !== (bist_fail || hold)) failures++;
      checks++;
      if (sel) begin
        if (m_en !== (b_en || c_en) || m_we !== (b_we || c_we) ||
            m_addr !== (b_addr | c_addr) || m_wdata !== (b_wdata | c_wdata)) failures++;
      end else begin
        if (m_en !== n_en || m_we !== n_we || m_addr !== n_addr || m_wdata !== n_wdata)
          failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
