// column_info_gen_tb: random stripe windows and every column index; checks
// the 6 x 3 significance and sign window (zero beyond the left and right
// block edges) and the per-row bit, visited, refined and valid fields.
module column_info_gen_tb;
  import jp2k_pkg::*;
  localparam int W = 32;
  logic [$clog2(W)-1:0] col;
  logic [5:0][W-1:0] s_sig, s_sgn;
  logic [3:0][W-1:0] s_bit, s_eta, s_refd;
  logic [5:0] s_valid;
  col_info_t ci;
  int checks = 0, failures = 0;

  column_info_gen #(.W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int c;
    for (int it = 0; it < 400; it++) begin
      for (int r = 0; r < 6; r++) begin s_sig[r] = $urandom; s_sgn[r] = $urandom; end
      for (int j = 0; j < 4; j++) begin s_bit[j] = $urandom; s_eta[j] = $urandom; s_refd[j] = $urandom; end
      s_valid = 6'($urandom);
      col = 5'(it % W);
      #1;
      for (int k = 0; k < 3; k++) begin
        c = int'(col) + k - 1;
        for (int r = 0; r < 6; r++) begin
          check(ci.sig[r][k] == ((c < 0 || c >= W) ? 1'b0 : s_sig[r][c]), "sig window");
          check(ci.sgn[r][k] == ((c < 0 || c >= W) ? 1'b0 : s_sgn[r][c]), "sgn window");
        end
      end
      for (int j = 0; j < 4; j++) begin
        check(ci.bit_v[j] == s_bit[j][col], "bit");
        check(ci.eta[j] == s_eta[j][col], "eta");
        check(ci.refd[j] == s_refd[j][col], "refd");
        check(ci.valid[j] == s_valid[j+1], "valid");
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
