// mq_ilt_ram_tb: checks the start states after reset and after init, and
// random index and MPS updates against a model of the two tables.
module mq_ilt_ram_tb;
  logic clk = 0, rst_n = 0, init = 0;
  logic [4:0] cx = '0, wr_cx = '0;
  logic [5:0] icx, new_icx = '0;
  logic mps, ren_out = 0, lps_sw = 0;
  int mi[19], mm[19];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mq_ilt_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic model_init();
    for (int c = 0; c < 19; c++) begin mi[c] = 0; mm[c] = 0; end
    mi[0] = 4; mi[17] = 3; mi[18] = 46;
  endtask

  task automatic compare_all(string when);
    for (int c = 0; c < 19; c++) begin
      cx = 5'(c); #1;
      check(int'(icx) == mi[c] && int'(mps) == mm[c], $sformatf("%s cx %0d: %0d/%0d expected %0d/%0d", when, c, icx, mps, mi[c], mm[c]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    model_init();
    compare_all("reset");
    for (int it = 0; it < 2000; it++) begin
      wr_cx = 5'($urandom % 19); new_icx = 6'($urandom % 47);
      ren_out = $urandom % 2; lps_sw = $urandom % 2;
      init = (($urandom % 400) == 0);
      @(posedge clk);
      if (init) model_init();
      else begin
        if (ren_out) mi[wr_cx] = new_icx;
        if (lps_sw)  mm[wr_cx] = 1 - mm[wr_cx];
      end
      @(negedge clk);
      ren_out = 0; lps_sw = 0; init = 0;
      cx = 5'($urandom % 19); #1;
      check(int'(icx) == mi[cx] && int'(mps) == mm[cx], $sformatf("cx %0d", cx));
    end
    init = 1; @(negedge clk); init = 0;
    model_init();
    compare_all("init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
