// context_sequencer_tb: offers random columns of 0..10 CX/D pairs with a
// randomly full FIFO and checks that every pair comes out once, in order,
// one per cycle, never while the FIFO is full, and that a column of n pairs
// is taken n cycles after the previous one when the FIFO never fills.
module context_sequencer_tb;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_wr, fifo_full = 0, idle;
  cxd_t [MAX_PAIRS-1:0] in_pairs;
  logic [3:0] in_npairs;
  cxd_t out_pair;
  int checks = 0, failures = 0;
  cxd_t expq[$];
  int ncols = 0, nwr = 0;
  bit full_mode = 0;

  always #5 clk = ~clk;
  context_sequencer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_wr) begin
      check(!fifo_full, "write while full");
      check(expq.size() > 0 && out_pair == expq[0], "pair order");
      if (expq.size() > 0) void'(expq.pop_front());
      nwr++;
    end
  end

  always @(negedge clk) fifo_full <= full_mode ? (($urandom % 3) == 0) : 1'b0;

  task automatic offer(int n);
    in_npairs = 4'(n);
    for (int i = 0; i < MAX_PAIRS; i++) in_pairs[i] = cxd_t'($urandom);
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    for (int i = 0; i < n; i++) expq.push_back(in_pairs[i]);
    ncols++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, n;
    in_npairs = 0; in_pairs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // throughput: back-to-back columns of n pairs take n cycles each
    for (int k = 1; k <= MAX_PAIRS; k++) begin
      offer(k);                       // loads; the next offer waits k cycles
      t0 = $time;
      offer(k);
      check(($time - t0) / 10 == k, $sformatf("column of %0d pairs took %0d cycles", k, ($time - t0) / 10));
    end
    full_mode = 1;
    for (int it = 0; it < 2000; it++) begin
      n = $urandom % (MAX_PAIRS + 1);
      offer(n);
      if (($urandom % 4) == 0) repeat ($urandom % 4) @(negedge clk);
    end
    full_mode = 0;
    while (!idle) @(negedge clk);
    @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d pairs never written", expq.size()));
    check(nwr > 0, "nothing written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
