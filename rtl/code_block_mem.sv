// code_block_mem: code block memory (bit-plane memory "Mem bp" and sign
// memory "Mem chi").
//
// Holds one H x W code block of quantised wavelet coefficients in
// sign-magnitude form: NBP magnitude bit planes plus one sign bit per sample
// (NBP+1 = 10 bits with the default sizes). Samples are written one per
// cycle through the load port. The coder reads six whole rows at once (a
// stripe and the rows just above and below it), sliced at the bit plane
// being coded, together with their sign bits: reads are combinational.
// While loading, the memory ORs all magnitudes together so that the
// controller knows the most significant non-zero bit plane (msb_plane) and
// whether the block holds any non-zero sample. clear restarts that
// accumulation for a new block. Write-first behaviour is not needed because
// loading and coding do not overlap.
module code_block_mem #(
  parameter int unsigned W   = 32,
  parameter int unsigned H   = 32,
  parameter int unsigned NBP = 9
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  // load port
  input  logic                         wr_en,
  input  logic [$clog2(H)-1:0]         wr_row,
  input  logic [$clog2(W)-1:0]         wr_col,
  input  logic                         wr_sign,
  input  logic [NBP-1:0]               wr_mag,
  // row read ports
  input  logic [$clog2(NBP)-1:0]       plane,
  input  logic [5:0][$clog2(H)-1:0]    rd_row,
  output logic [5:0][W-1:0]            bp_row,
  output logic [5:0][W-1:0]            sgn_row,
  // block summary
  output logic [$clog2(NBP)-1:0]       msb_plane,
  output logic                         nonzero
);
  logic [H-1:0][W-1:0][NBP-1:0] mag;
  logic [H-1:0][W-1:0]          sgn;
  logic [NBP-1:0]               mag_or;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mag[wr_row][wr_col] <= wr_mag;
      sgn[wr_row][wr_col] <= wr_sign;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mag_or <= '0;
    else if (clear)  mag_or <= '0;
    else if (wr_en)  mag_or <= mag_or | wr_mag;
  end

  always_comb begin
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < W; c++) begin
        bp_row[r][c]  = mag[rd_row[r]][c][plane];
        sgn_row[r][c] = sgn[rd_row[r]][c];
      end
    msb_plane = '0;
    for (int p = 0; p < NBP; p++)
      if (mag_or[p]) msb_plane = ($clog2(NBP))'(p);
    nonzero = |mag_or;
  end
endmodule
