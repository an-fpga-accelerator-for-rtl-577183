// state_mem_tb: random column writes, visited-flag clears and full clears
// against a model of the three state arrays; every cycle six random rows
// are read back and compared.
module state_mem_tb;
  localparam int W = 32, H = 32;
  logic clk = 0, rst_n = 0, clear_all = 0, clear_eta = 0, wr_en = 0;
  logic [$clog2(H)-3:0] wr_stripe = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [3:0] wr_sig = '0, wr_eta = '0, wr_refd = '0;
  logic [5:0][$clog2(H)-1:0] rd_row = '0;
  logic [5:0][W-1:0] sig_row, eta_row, refd_row;
  bit msig [H][W], meta [H][W], mref [H][W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  state_mem #(.W(W), .H(H)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      clear_all = (($urandom % 500) == 0);
      clear_eta = (($urandom % 60) == 0);
      wr_en     = ($urandom % 4) != 0;
      wr_stripe = 3'($urandom);
      wr_col    = 5'($urandom);
      wr_sig = 4'($urandom); wr_eta = 4'($urandom); wr_refd = 4'($urandom);
      @(posedge clk);
      if (clear_all) begin
        for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin msig[r][c] = 0; meta[r][c] = 0; mref[r][c] = 0; end
      end else begin
        if (clear_eta) for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) meta[r][c] = 0;
        if (wr_en) for (int j = 0; j < 4; j++) begin
          msig[wr_stripe*4+j][wr_col] = wr_sig[j];
          meta[wr_stripe*4+j][wr_col] = wr_eta[j];
          mref[wr_stripe*4+j][wr_col] = wr_refd[j];
        end
      end
      @(negedge clk);
      clear_all = 0; clear_eta = 0; wr_en = 0;
      for (int k = 0; k < 6; k++) rd_row[k] = 5'($urandom);
      #1;
      for (int k = 0; k < 6; k++)
        for (int c = 0; c < W; c++) begin
          check(sig_row[k][c] == msig[rd_row[k]][c], "sigma");
          check(eta_row[k][c] == meta[rd_row[k]][c], "eta");
          check(refd_row[k][c] == mref[rd_row[k]][c], "sigma'");
        end
    end
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
