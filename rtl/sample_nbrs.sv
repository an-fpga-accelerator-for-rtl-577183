// sample_nbrs: neighbourhood of one sample of a stripe column.
//
// Given the column window and the current significance of the column being
// coded (which changes while the column is coded, top row first), returns for
// row ROW the counts of significant horizontal, vertical and diagonal
// neighbours and the significance and sign of the four direct neighbours
// that sign coding uses. Combinational helper of the pass units.
module sample_nbrs
  import jp2k_pkg::*;
#(
  parameter int unsigned ROW = 0     // 0..3, row inside the stripe
) (
  input  col_info_t  ci,
  input  logic [3:0] col_sig,         // current significance of rows 0..3
  output logic [1:0] h,
  output logic [1:0] v,
  output logic [2:0] d,
  output logic       any,
  output logic [1:0] h_sig, h_sgn,    // [0] left, [1] right
  output logic [1:0] v_sig, v_sgn     // [0] above, [1] below
);
  localparam int unsigned WR = ROW + 1;   // window row of this sample

  logic above, below;

  always_comb begin
    above = (ROW == 0) ? ci.sig[0][1] : col_sig[(ROW == 0) ? 0 : ROW - 1];
    below = (ROW == 3) ? ci.sig[5][1] : col_sig[(ROW == 3) ? 3 : ROW + 1];
    h_sig = {ci.sig[WR][2], ci.sig[WR][0]};
    h_sgn = {ci.sgn[WR][2], ci.sgn[WR][0]};
    v_sig = {below, above};
    v_sgn = {ci.sgn[WR+1][1], ci.sgn[WR-1][1]};
    h = {1'b0, h_sig[0]} + {1'b0, h_sig[1]};
    v = {1'b0, v_sig[0]} + {1'b0, v_sig[1]};
    d = {2'b0, ci.sig[WR-1][0]} + {2'b0, ci.sig[WR-1][2]}
      + {2'b0, ci.sig[WR+1][0]} + {2'b0, ci.sig[WR+1][2]};
    any = (h != 2'd0) || (v != 2'd0) || (d != 3'd0);
  end
endmodule
