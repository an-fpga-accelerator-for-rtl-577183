// bpc_controller_tb: runs the controller on a small block (8 x 12, three
// stripes, the last one full) with a randomly pausing sequencer and checks
// the accepted columns against the expected scan order: bit planes from
// msb_plane down, cleanup only on the first plane, then SPP, MRP, CUP;
// stripes top to bottom, columns left to right. Also checks one visited-flag
// clear between planes, the cycle count without pauses (one column per
// cycle, one clear cycle at the start and one per later plane) and an
// all-zero block finishing without any column.
module bpc_controller_tb;
  import jp2k_pkg::*;
  localparam int W = 8, H = 12, NBP = 9;
  logic clk = 0, rst_n = 0, start = 0, nonzero = 0, col_ready = 0;
  logic [$clog2(NBP)-1:0] msb_plane = '0, plane;
  pass_e pass;
  logic [$clog2(H)-3:0] stripe;
  logic [$clog2(W)-1:0] col;
  logic col_valid, st_wr, clear_all, clear_eta, busy, done;
  bit pause_mode = 0;
  int checks = 0, failures = 0, n_eta = 0, n_acc = 0, n_pause = 0;

  typedef struct { int p; int ps; int s; int c; } tup_t;
  tup_t expq[$];

  always #5 clk = ~clk;
  bpc_controller #(.W(W), .H(H), .NBP(NBP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) col_ready <= pause_mode ? (($urandom % 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    n_eta += clear_eta;
    if (col_valid && !col_ready) n_pause++;
    if (st_wr) begin
      n_acc++;
      if (expq.size() == 0) check(0, "extra column");
      else begin
        check(int'(plane) == expq[0].p && int'(pass) == expq[0].ps &&
              int'(stripe) == expq[0].s && int'(col) == expq[0].c,
              $sformatf("got p%0d pass%0d s%0d c%0d expected p%0d pass%0d s%0d c%0d",
                        plane, pass, stripe, col, expq[0].p, expq[0].ps, expq[0].s, expq[0].c));
        void'(expq.pop_front());
      end
    end
  end

  task automatic run(int msb, bit nz, bit pm);
    int t0, ncols;
    tup_t t;
    expq.delete();
    ncols = 0;
    if (nz)
      for (int p = msb; p >= 0; p--)
        for (int ps = (p == msb) ? 2 : 0; ps <= 2; ps++)
          for (int s = 0; s < H / 4; s++)
            for (int c = 0; c < W; c++) begin
              t.p = p; t.ps = ps; t.s = s; t.c = c;
              expq.push_back(t);
              ncols++;
            end
    pause_mode = pm;
    msb_plane = 4'(msb);
    nonzero = nz;
    n_eta = 0;
    @(negedge clk);
    start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d columns missing", expq.size()));
    check(n_eta == (nz ? msb : 0), $sformatf("%0d eta clears", n_eta));
    if (!pm)
      check(($time - t0) / 10 == 1 + ncols + (nz ? msb : 0) + 1,
            $sformatf("took %0d cycles for %0d columns", ($time - t0) / 10, ncols));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 1, 0);
    run(5, 1, 1);
    run(0, 1, 1);
    run(8, 1, 0);
    run(4, 0, 0);
    check(n_pause > 0, "never paused");
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
