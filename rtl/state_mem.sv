// state_mem: state variable memories "Mem sigma", "Mem sigma'" and
// "Mem eta" of the bit-plane coder.
//
// sigma: sample is significant; sigma': sample has been refined at least
// once; eta: sample has been coded (visited) in the current bit plane.
// Each is one bit per sample of the H x W code block. clear_all zeroes all
// three at the start of a block, clear_eta zeroes eta at the start of each
// bit plane. Six rows can be read at once (combinational). One stripe column
// (4 rows at column wr_col of stripe wr_stripe) is written per cycle with
// its new sigma, eta and sigma' bits; rows past the bottom edge are ignored.
module state_mem #(
  parameter int unsigned W = 32,
  parameter int unsigned H = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear_all,
  input  logic                        clear_eta,
  input  logic                        wr_en,
  input  logic [$clog2(H)-3:0]        wr_stripe,
  input  logic [$clog2(W)-1:0]        wr_col,
  input  logic [3:0]                  wr_sig,
  input  logic [3:0]                  wr_eta,
  input  logic [3:0]                  wr_refd,
  input  logic [5:0][$clog2(H)-1:0]   rd_row,
  output logic [5:0][W-1:0]           sig_row,
  output logic [5:0][W-1:0]           eta_row,
  output logic [5:0][W-1:0]           refd_row
);
  logic [H-1:0][W-1:0] sig, eta, refd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig  <= '0;
      eta  <= '0;
      refd <= '0;
    end else if (clear_all) begin
      sig  <= '0;
      eta  <= '0;
      refd <= '0;
    end else begin
      if (clear_eta) eta <= '0;
      if (wr_en) begin
        for (int j = 0; j < 4; j++) begin
          if (int'(wr_stripe) * 4 + j < H) begin
            sig [int'(wr_stripe) * 4 + j][wr_col] <= wr_sig[j];
            eta [int'(wr_stripe) * 4 + j][wr_col] <= wr_eta[j];
            refd[int'(wr_stripe) * 4 + j][wr_col] <= wr_refd[j];
          end
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 6; r++) begin
      sig_row[r]  = sig[rd_row[r]];
      eta_row[r]  = eta[rd_row[r]];
      refd_row[r] = refd[rd_row[r]];
    end
  end
endmodule
