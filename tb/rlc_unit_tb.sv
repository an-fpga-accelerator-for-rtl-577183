// rlc_unit_tb: random columns; the run-mode condition (full column, nothing
// visited, no significant sample in the 6 x 3 window) and the position of
// the first 1 are recomputed in the testbench.
module rlc_unit_tb;
  import jp2k_pkg::*;
  col_info_t  ci;
  logic       run_mode, hit;
  logic [1:0] first_row;
  int checks = 0, failures = 0, nrun = 0;

  rlc_unit dut (.ci(ci), .run_mode(run_mode), .hit(hit), .first_row(first_row));

  initial begin
    bit exp_run, exp_hit;
    int exp_first;
    for (int it = 0; it < 5000; it++) begin
      ci = '0;
      if ($urandom % 2) ci.sig = 18'(1 << ($urandom % 18)) & {18{($urandom % 2) == 1'b1}};
      ci.sgn   = 18'($urandom);
      ci.bit_v = 4'($urandom);
      if (($urandom % 3) == 0) ci.bit_v = 4'(1 << ($urandom % 4));
      ci.eta   = (($urandom % 4) == 0) ? 4'($urandom) : 4'h0;
      ci.refd  = 4'($urandom);
      ci.valid = (($urandom % 5) == 0) ? 4'b0111 : 4'hF;
      #1;
      exp_run = (ci.valid == 4'hF) && (ci.eta == 0);
      for (int r = 0; r < 6; r++) for (int k = 0; k < 3; k++) if (ci.sig[r][k]) exp_run = 0;
      exp_hit = 0; exp_first = 0;
      for (int j = 0; j < 4; j++) if (ci.bit_v[j] && !exp_hit) begin exp_hit = 1; exp_first = j; end
      checks++;
      if (run_mode != exp_run || hit != exp_hit || (exp_hit && int'(first_row) != exp_first)) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d: run %0d hit %0d first %0d", it, run_mode, hit, first_row);
      end
      nrun += run_mode;
    end
    checks++; if (nrun == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
