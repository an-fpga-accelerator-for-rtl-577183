// rlc_unit: run-length coding (RLC) decision for one stripe column.
//
// In the cleanup pass a full 4-sample column enters run mode when none of its
// samples is significant or already visited in this bit plane and none has a
// significant neighbour. In run mode the column is coded by one RL decision
// (1 = some sample becomes significant); if it is 1, the row of the first
// significant sample follows as two UNIFORM decisions, most significant bit
// first. This unit only makes the decision; cup_unit emits the pairs.
// Combinational. The design names the RLC primitive; the rule is the
// standard JPEG2000 run mode.
module rlc_unit
  import jp2k_pkg::*;
(
  input  col_info_t  ci,
  output logic       run_mode,   // column is coded in run mode
  output logic       hit,        // at least one magnitude bit is 1
  output logic [1:0] first_row   // row of the first 1 (valid when hit)
);
  always_comb begin
    run_mode = (ci.valid == 4'hF) && (ci.eta == 4'h0) && (ci.sig == '0);
    hit      = |ci.bit_v;
    first_row = 2'd0;
    for (int j = 3; j >= 0; j--)
      if (ci.bit_v[j]) first_row = 2'(j);
  end
endmodule
