// mrc_lut: magnitude-refinement (MRC) context primitive.
//
// A sample refined for the first time gets context 14 when none of its eight
// neighbours is significant and 15 otherwise; a sample that was refined
// before gets 16. Combinational. The design names the MRC primitive; the
// context rule is the standard JPEG2000 one.
module mrc_lut (
  input  logic       refined,   // sigma': refined in an earlier bit plane
  input  logic       any_nbr,   // at least one significant neighbour
  output logic [4:0] cx
);
  always_comb begin
    if (refined)      cx = 5'd16;
    else if (any_nbr) cx = 5'd15;
    else              cx = 5'd14;
  end
endmodule
