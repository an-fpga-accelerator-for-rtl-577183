// stripe_generator_tb: for every stripe of a 32-row block and of a 30-row
// block (partial last stripe) checks the six row addresses and that rows
// above the first and below the last row of the block read as zero and
// invalid while the others pass the memory rows through.
module stripe_generator_tb;
  localparam int W = 8;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // one instance per block height
  logic [2:0]               st32;
  logic [5:0][4:0]          ra32;
  logic [5:0][W-1:0]        m_bp, m_sgn, m_sig, m_eta, m_refd;
  logic [5:0][W-1:0]        o_sig32, o_sgn32, o_sig30, o_sgn30;
  logic [3:0][W-1:0]        o_bit32, o_eta32, o_refd32, o_bit30, o_eta30, o_refd30;
  logic [5:0]               v32, v30;
  logic [2:0]               st30;
  logic [5:0][4:0]          ra30;

  stripe_generator #(.W(W), .H(32)) dut32 (
    .stripe(st32), .rd_row(ra32), .bp_row(m_bp), .sgn_row(m_sgn), .sig_row(m_sig),
    .eta_row(m_eta), .refd_row(m_refd), .s_sig(o_sig32), .s_sgn(o_sgn32), .s_bit(o_bit32),
    .s_eta(o_eta32), .s_refd(o_refd32), .s_valid(v32));
  stripe_generator #(.W(W), .H(30)) dut30 (
    .stripe(st30), .rd_row(ra30), .bp_row(m_bp), .sgn_row(m_sgn), .sig_row(m_sig),
    .eta_row(m_eta), .refd_row(m_refd), .s_sig(o_sig30), .s_sgn(o_sgn30), .s_bit(o_bit30),
    .s_eta(o_eta30), .s_refd(o_refd30), .s_valid(v30));

  initial begin
    int row;
    bit ok;
    for (int it = 0; it < 200; it++) begin
      m_bp = 48'($urandom) ^ (48'($urandom) << 20); m_sgn = 48'($urandom) << 7;
      m_sig = 48'($urandom) << 3; m_eta = 48'($urandom) << 11; m_refd = 48'($urandom) << 5;
      st32 = 3'(it % 8); st30 = 3'(it % 8);
      #1;
      for (int r = 0; r < 6; r++) begin
        row = (it % 8) * 4 + r - 1;
        ok  = row >= 0 && row < 32;
        check(v32[r] == ok, "valid32");
        if (ok) check(int'(ra32[r]) == row, "address32");
        check(o_sig32[r] == (ok ? m_sig[r] : '0), "sig32");
        check(o_sgn32[r] == (ok ? m_sgn[r] : '0), "sgn32");
        if (r >= 1 && r <= 4) begin
          check(o_bit32[r-1] == (ok ? m_bp[r] : '0), "bit32");
          check(o_eta32[r-1] == (ok ? m_eta[r] : '0), "eta32");
          check(o_refd32[r-1] == (ok ? m_refd[r] : '0), "refd32");
        end
        ok = row >= 0 && row < 30;
        check(v30[r] == ok, "valid30");
        check(o_sig30[r] == (ok ? m_sig[r] : '0), "sig30");
        if (r >= 1 && r <= 4) check(o_bit30[r-1] == (ok ? m_bp[r] : '0), "bit30");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
