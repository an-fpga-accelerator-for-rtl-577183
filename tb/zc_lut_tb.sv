// zc_lut_tb: exhaustive test of the zero-coding context table for all four
// subbands and every legal neighbour count, against t1_ref_pkg::zc_context.
module zc_lut_tb;
  import jp2k_pkg::*;
  import t1_ref_pkg::*;
  band_e band;
  logic [1:0] h, v;
  logic [2:0] d;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  zc_lut dut (.band(band), .h(h), .v(v), .d(d), .cx(cx));

  initial begin
    for (int b = 0; b < 4; b++)
      for (int hi = 0; hi <= 2; hi++)
        for (int vi = 0; vi <= 2; vi++)
          for (int di = 0; di <= 4; di++) begin
            band = band_e'(b); h = 2'(hi); v = 2'(vi); d = 3'(di);
            #1;
            checks++;
            if (int'(cx) != zc_context(b, hi, vi, di)) begin
              failures++;
              $display("FAIL band %0d h %0d v %0d d %0d: %0d expected %0d", b, hi, vi, di, cx,
                       zc_context(b, hi, vi, di));
            end
          end
    // a few hand-picked entries of the table
    band = BAND_LL; h = 2; v = 0; d = 0; #1; checks++; if (cx != 8) failures++;
    band = BAND_HL; h = 0; v = 2; d = 0; #1; checks++; if (cx != 8) failures++;
    band = BAND_HH; h = 0; v = 0; d = 3; #1; checks++; if (cx != 8) failures++;
    band = BAND_LH; h = 0; v = 0; d = 1; #1; checks++; if (cx != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
