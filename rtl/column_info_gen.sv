// column_info_gen: column information generator.
//
// Cuts column col out of the stripe window produced by stripe_generator and
// packs it with its left and right neighbour columns into a col_info_t: a
// 6 x 3 window of significance and sign, and for the four stripe samples the
// current magnitude bit, visited and refined flags and whether the row
// exists. Columns left of 0 and right of W-1 read as zero. Combinational.
module column_info_gen
  import jp2k_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0]  col,
  input  logic [5:0][W-1:0]     s_sig,
  input  logic [5:0][W-1:0]     s_sgn,
  input  logic [3:0][W-1:0]     s_bit,
  input  logic [3:0][W-1:0]     s_eta,
  input  logic [3:0][W-1:0]     s_refd,
  input  logic [5:0]            s_valid,
  output col_info_t             ci
);
  int c;

  always_comb begin
    ci = '0;
    for (int k = 0; k < 3; k++) begin
      c = int'(col) + k - 1;
      if (c >= 0 && c < int'(W)) begin
        for (int r = 0; r < 6; r++) begin
          ci.sig[r][k] = s_sig[r][c];
          ci.sgn[r][k] = s_sgn[r][c];
        end
      end
    end
    for (int j = 0; j < 4; j++) begin
      ci.bit_v[j] = s_bit[j][col];
      ci.eta[j]   = s_eta[j][col];
      ci.refd[j]  = s_refd[j][col];
      ci.valid[j] = s_valid[j+1];
    end
  end
endmodule
