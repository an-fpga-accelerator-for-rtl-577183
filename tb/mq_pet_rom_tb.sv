// mq_pet_rom_tb: reads all 47 probability states and compares Qe, NMPS,
// NLPS and Switch with the tables of the reference MQ model; Switch must be
// set exactly where Qe is 0x5601 and the state is a start state of a
// sequence (0, 6, 14).
module mq_pet_rom_tb;
  import t1_ref_pkg::*;
  logic [5:0] idx;
  logic [15:0] qe;
  logic [5:0] nmps, nlps;
  logic switch_o;
  int checks = 0, failures = 0;

  mq_pet_rom dut (.idx(idx), .qe(qe), .nmps(nmps), .nlps(nlps), .switch_o(switch_o));

  initial begin
    mq_ref m;
    m = new();
    for (int i = 0; i < 47; i++) begin
      idx = 6'(i);
      #1;
      checks++;
      if (32'(qe) != m.qe_t[i] || int'(nmps) != m.nmps_t[i] || int'(nlps) != m.nlps_t[i] ||
          switch_o != (i == 0 || i == 6 || i == 14)) begin
        failures++;
        $display("FAIL state %0d: %04x %0d %0d %0d", i, qe, nmps, nlps, switch_o);
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
