// spp_unit_tb: self-checking test of spp_unit.
//
// Drives random stripe columns (random neighbourhood significance and signs,
// magnitude bits, visited and refined flags, full and partial columns at the
// bottom block edge, sparse and dense neighbourhoods so that run mode
// occurs) and compares the CX/D pairs and new state bits with the
// sample-by-sample reference in t1_ref_pkg, which codes the same column
// from a 6 x 3 piece of code block.
module spp_unit_tb;
  import jp2k_pkg::*;
  import t1_ref_pkg::*;

  localparam int N = 4000;

  band_e       band;
  pass_e       pass;
  col_info_t   ci;
  col_result_t res;

  spp_unit dut (.band(band), .ci(ci), .res(res));

  int checks = 0, failures = 0;
  int n_pairs_total = 0, n_run = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    ebcot_ref er;
    int nvalid, dens, hgt, np;
    pass_e ps;
    for (int it = 0; it < N; it++) begin
      band   = band_e'($urandom % 4);
      ps     = PASS_SPP;
      pass   = ps;
      nvalid = (($urandom % 5) == 0) ? 1 + int'($urandom % 3) : 4;
      dens   = $urandom % 5;                 // 0: empty neighbourhood
      ci     = '0;
      for (int r = 0; r < 6; r++)
        for (int k = 0; k < 3; k++) begin
          ci.sig[r][k] = (int'($urandom % 8) < dens);
          ci.sgn[r][k] = $urandom % 2;
        end
      for (int j = 0; j < 4; j++) begin
        ci.bit_v[j] = $urandom % 2;
        ci.eta[j]   = (($urandom % 4) == 0);
        ci.refd[j]  = $urandom % 2;
        ci.valid[j] = (j < nvalid);
      end
      if (dens == 0 && ($urandom % 2)) ci.bit_v = '0;
      if (dens == 0) ci.eta = '0;
      // rows that do not exist are zero
      for (int r = nvalid + 1; r < 6; r++) begin
        ci.sig[r] = '0;
        ci.sgn[r] = '0;
      end
      for (int j = nvalid; j < 4; j++) begin
        ci.bit_v[j] = 0; ci.eta[j] = 0; ci.refd[j] = 0;
      end
      hgt = (nvalid == 4) ? 6 : nvalid + 1;
      er = new(3, hgt, int'(band));
      for (int r = 0; r < hgt; r++)
        for (int k = 0; k < 3; k++) begin
          er.sig[r][k] = ci.sig[r][k];
          er.sgn[r][k] = ci.sgn[r][k];
          er.mag[r][k] = 0;
          er.eta[r][k] = 0;
          er.rfd[r][k] = 0;
        end
      for (int j = 0; j < nvalid; j++) begin
        er.mag[j+1][1] = ci.bit_v[j];
        er.eta[j+1][1] = ci.eta[j];
        er.rfd[j+1][1] = ci.refd[j];
      end
      if (ps == PASS_SPP)      er.spp_col(1, 1, 0);
      else if (ps == PASS_MRP) er.mrp_col(1, 1, 0);
      else                     er.cup_col(1, 1, 0);
      #1;
      np = er.out.size();
      n_pairs_total += np;

      check(int'(res.npairs) == np, $sformatf("it %0d pass %0d: %0d pairs, expected %0d", it, ps, res.npairs, np));
      for (int i = 0; i < np && i < int'(res.npairs); i++)
        check(int'(res.pairs[i].cx) == er.out[i].cx && int'(res.pairs[i].d) == er.out[i].d,
              $sformatf("it %0d pair %0d: cx=%0d d=%0d expected cx=%0d d=%0d", it, i,
                        res.pairs[i].cx, res.pairs[i].d, er.out[i].cx, er.out[i].d));
      for (int j = 0; j < nvalid; j++) begin
        check(res.sig_new[j]  == er.sig[j+1][1], $sformatf("it %0d sig row %0d", it, j));
        check(res.eta_new[j]  == er.eta[j+1][1], $sformatf("it %0d eta row %0d", it, j));
        check(res.refd_new[j] == er.rfd[j+1][1], $sformatf("it %0d refd row %0d", it, j));
      end
    end
    $display("%0d pairs compared", n_pairs_total);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
