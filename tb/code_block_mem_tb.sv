// code_block_mem_tb: loads a random code block, then reads random groups of
// six rows at random bit planes and compares bits and signs with a model
// array; also checks the most significant non-zero plane and the non-zero
// flag, including after clear and for an all-zero block.
module code_block_mem_tb;
  localparam int W = 32, H = 32, NBP = 9;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, wr_sign = 0;
  logic [$clog2(H)-1:0] wr_row = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [NBP-1:0] wr_mag = '0;
  logic [$clog2(NBP)-1:0] plane = '0, msb_plane;
  logic [5:0][$clog2(H)-1:0] rd_row = '0;
  logic [5:0][W-1:0] bp_row, sgn_row;
  logic nonzero;
  int checks = 0, failures = 0;
  int mag [H][W];
  int sgn [H][W];

  always #5 clk = ~clk;
  code_block_mem #(.W(W), .H(H), .NBP(NBP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic load(int maxbits);
    clear = 1; @(negedge clk); clear = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        mag[r][c] = (maxbits == 0) ? 0 : int'($urandom % (1 << maxbits));
        sgn[r][c] = $urandom % 2;
        wr_en = 1; wr_row = 5'(r); wr_col = 5'(c); wr_mag = 9'(mag[r][c]); wr_sign = sgn[r][c][0];
        @(negedge clk);
      end
    wr_en = 0;
    @(negedge clk);
  endtask

  initial begin
    int omax;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      load(blk == 2 ? 0 : (blk == 0 ? 9 : 5));
      omax = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) omax |= mag[r][c];
      check(nonzero == (omax != 0), "nonzero flag");
      if (omax != 0) check(int'(msb_plane) == $clog2(omax + 1) - 1, $sformatf("msb plane %0d", msb_plane));
      for (int it = 0; it < 300; it++) begin
        plane = 4'($urandom % NBP);
        for (int k = 0; k < 6; k++) rd_row[k] = 5'($urandom % H);
        #1;
        for (int k = 0; k < 6; k++)
          for (int c = 0; c < W; c++) begin
            check(bp_row[k][c] == ((mag[rd_row[k]][c] >> plane) & 1), "bit plane read");
            check(sgn_row[k][c] == sgn[rd_row[k]][c][0], "sign read");
          end
        @(negedge clk);
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
