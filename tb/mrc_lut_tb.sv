// mrc_lut_tb: checks the three magnitude-refinement contexts: 14 for a first
// refinement without significant neighbours, 15 with, 16 for later ones.
module mrc_lut_tb;
  logic refined, any_nbr;
  logic [4:0] cx;
  int checks = 0, failures = 0;
  int exp_cx [4] = '{14, 15, 16, 16};

  mrc_lut dut (.refined(refined), .any_nbr(any_nbr), .cx(cx));

  initial begin
    for (int k = 0; k < 4; k++) begin
      {refined, any_nbr} = 2'(k);
      #1;
      checks++;
      if (int'(cx) != exp_cx[k]) begin
        failures++;
        $display("FAIL refined=%0d any=%0d: %0d expected %0d", refined, any_nbr, cx, exp_cx[k]);
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
