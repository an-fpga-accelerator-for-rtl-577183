// mq_coder_tb: codes random CX/D streams (skewed and uniform decisions, few
// and many contexts, an empty stream) and compares the bytes with the
// sequential reference MQ encoder of t1_ref_pkg. Input gaps and a stalling
// byte reader are used in some streams. Without stalls the cycle count must
// be 1 per pair + 1 per byte-out step + 1 per renormalisation resumed after
// a byte-out + 1 to take the first pair and each pair that follows a
// byte-out + 5 for the flush: renormalisation shifts cost no cycles, as they
// are fused with the interval update, and pairs are taken back to back. Counts LPS, MPS switches,
// carries and bit stuffing and fails if one never happened.
module mq_coder_tb;
  import jp2k_pkg::*;
  import t1_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  logic in_valid = 0, in_ready, end_i = 0, out_valid, out_ready = 1, done, busy;
  cxd_t in_pair = '0;
  logic [7:0] out_byte;
  logic ev_lps, ev_switch, ev_carry, ev_stuff;
  int checks = 0, failures = 0;
  int c_lps, c_sw, c_carry, c_stuff;
  logic [7:0] got[$];
  bit stall_out = 0;

  always #5 clk = ~clk;
  mq_coder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) got.push_back(out_byte);
    c_lps += ev_lps; c_sw += ev_switch; c_carry += ev_carry; c_stuff += ev_stuff;
  end
  always @(negedge clk) out_ready <= stall_out ? (($urandom % 3) == 0) : 1'b1;

  task automatic stream(int n, int skew, int ncx, bit gaps, bit stall);
    mq_ref m;
    cxd_t s[$];
    cxd_t p;
    int t0, t1, cyc, exp_cyc;
    m = new();
    for (int i = 0; i < n; i++) begin
      p.cx = 5'($urandom % ncx);
      // decision: mostly 0 for context-dependent skew, else uniform
      p.d  = (skew == 0) ? 1'($urandom % 2) : ((($urandom % 100) < skew) ? 1'b1 : 1'b0);
      if (p.cx == 5'd7) p.d = 1'b1;    // one context always 1
      s.push_back(p);
      m.encode(int'(p.cx), int'(p.d));
    end
    m.flush();
    got.delete();
    stall_out = stall;
    @(negedge clk);
    init = 1; @(negedge clk); init = 0;
    t0 = $time;
    foreach (s[i]) begin
      in_pair = s[i];
      in_valid = 1;
      // in_ready does not depend on in_valid: sample it mid-cycle
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      if (gaps && ($urandom % 3) == 0) begin
        in_valid = 0;
        repeat ($urandom % 4) @(negedge clk);
      end
    end
    in_valid = 0;
    end_i = 1;
    while (!done) @(negedge clk);
    t1 = $time;
    end_i = 0;
    stall_out = 0;
    @(negedge clk);
    check(got.size() == m.bytes.size(), $sformatf("%0d bytes, expected %0d", got.size(), m.bytes.size()));
    for (int i = 0; i < got.size() && i < m.bytes.size(); i++)
      if (got[i] != m.bytes[i]) begin
        check(0, $sformatf("byte %0d: %02x expected %02x", i, got[i], m.bytes[i]));
        break;
      end
    check(1, "stream");
    cyc = (t1 - t0) / 10;
    exp_cyc = m.n_byteout + m.n_resume + 5;
    if (n > 0) exp_cyc += n + 1 + m.n_bo_pair - int'(m.last_bo);
    if (!gaps && !stall)
      check(cyc == exp_cyc, $sformatf("%0d cycles, expected %0d", cyc, exp_cyc));
    $display("stream n=%0d skew=%0d: %0d bytes, %0d cycles", n, skew, got.size(), cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    stream(0, 0, 19, 0, 0);
    stream(3000, 0, 19, 0, 0);
    stream(3000, 5, 19, 0, 0);
    stream(3000, 50, 3, 1, 1);
    stream(5000, 2, 19, 0, 1);
    stream(3000, 95, 19, 1, 0);
    stream(200, 30, 1, 0, 0);
    $display("lps=%0d switch=%0d carry=%0d stuff=%0d", c_lps, c_sw, c_carry, c_stuff);
    check(c_lps > 0 && c_sw > 0 && c_carry > 0 && c_stuff > 0, "an MQ mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
