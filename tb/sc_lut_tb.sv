// sc_lut_tb: exhaustive test of the sign-coding context and XOR bit over all
// 256 combinations of neighbour significance and sign, against the
// contribution rule worked out in the testbench and t1_ref_pkg::sc_context.
module sc_lut_tb;
  import t1_ref_pkg::*;
  logic [1:0] hs, hn, vs, vn;
  logic [4:0] cx;
  logic       xb;
  int checks = 0, failures = 0;

  sc_lut dut (.h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn), .cx(cx), .xorbit(xb));

  function automatic int contrib(logic [1:0] s, logic [1:0] n);
    int a = 0;
    for (int i = 0; i < 2; i++) if (s[i]) a += n[i] ? -1 : 1;
    return (a > 1) ? 1 : (a < -1) ? -1 : a;
  endfunction

  initial begin
    int ecx, exb;
    for (int k = 0; k < 256; k++) begin
      {hs, hn, vs, vn} = 8'(k);
      #1;
      sc_context(contrib(hs, hn), contrib(vs, vn), ecx, exb);
      checks++;
      if (int'(cx) != ecx || int'(xb) != exb) begin
        failures++;
        $display("FAIL k=%0d: cx=%0d xor=%0d expected %0d %0d", k, cx, xb, ecx, exb);
      end
    end
    // both horizontal neighbours negative, no vertical: context 12, xor 1
    hs = 2'b11; hn = 2'b11; vs = 0; vn = 0; #1;
    checks++; if (cx != 12 || xb != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
