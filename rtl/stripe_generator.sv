// stripe_generator: builds the stripe currently being coded.
//
// The code block is cut into H/4 horizontal stripes of four rows (Stripe1 ..
// Stripe8 for a 32-row block). For stripe s this unit addresses rows
// 4s-1 .. 4s+4 of the code block and state memories and returns them as a
// six-row window: row 0 is the row above the stripe, rows 1..4 the stripe,
// row 5 the row below. Rows outside the block are returned as zero
// (insignificant, positive) and flagged invalid, which gives the block
// boundary handling. Combinational.
module stripe_generator #(
  parameter int unsigned W = 32,
  parameter int unsigned H = 32
) (
  input  logic [$clog2(H)-3:0]        stripe,
  output logic [5:0][$clog2(H)-1:0]   rd_row,
  // raw rows from the memories
  input  logic [5:0][W-1:0]           bp_row,
  input  logic [5:0][W-1:0]           sgn_row,
  input  logic [5:0][W-1:0]           sig_row,
  input  logic [5:0][W-1:0]           eta_row,
  input  logic [5:0][W-1:0]           refd_row,
  // stripe window
  output logic [5:0][W-1:0]           s_sig,
  output logic [5:0][W-1:0]           s_sgn,
  output logic [3:0][W-1:0]           s_bit,
  output logic [3:0][W-1:0]           s_eta,
  output logic [3:0][W-1:0]           s_refd,
  output logic [5:0]                  s_valid
);
  int row;

  always_comb begin
    for (int r = 0; r < 6; r++) begin
      row        = int'(stripe) * 4 + r - 1;
      s_valid[r] = (row >= 0) && (row < int'(H));
      rd_row[r]  = s_valid[r] ? row[$clog2(H)-1:0] : '0;
      s_sig[r]   = s_valid[r] ? sig_row[r] : '0;
      s_sgn[r]   = s_valid[r] ? sgn_row[r] : '0;
    end
    for (int j = 0; j < 4; j++) begin
      s_bit[j]  = s_valid[j+1] ? bp_row[j+1]   : '0;
      s_eta[j]  = s_valid[j+1] ? eta_row[j+1]  : '0;
      s_refd[j] = s_valid[j+1] ? refd_row[j+1] : '0;
    end
  end
endmodule
