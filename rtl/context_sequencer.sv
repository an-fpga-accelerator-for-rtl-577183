// context_sequencer: puts the CX/D pairs of one column into the FIFO in
// coding order.
//
// The context modeller yields up to MAX_PAIRS pairs for a column in one
// cycle. The sequencer stores them and writes one per cycle into the CX/D
// FIFO, holding while the FIFO is full. It accepts the next column (in_ready)
// when it is empty or is writing its last pair in this cycle, so a column
// with n pairs occupies it for max(n,1) cycles and the controller is paused
// (the column is held) while it is busy. A column without pairs passes in
// one cycle. idle is high when nothing is waiting to be written.
module context_sequencer
  import jp2k_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  cxd_t [MAX_PAIRS-1:0]    in_pairs,
  input  logic [3:0]              in_npairs,
  output logic                    out_wr,
  output cxd_t                    out_pair,
  input  logic                    fifo_full,
  output logic                    idle
);
  cxd_t [MAX_PAIRS-1:0] buf_q;
  logic [3:0]           cnt_q, idx_q;
  logic                 busy, last;

  assign busy     = idx_q < cnt_q;
  assign out_wr   = busy && !fifo_full;
  assign out_pair = buf_q[idx_q];
  assign last     = (idx_q + 4'd1 == cnt_q);
  assign in_ready = !busy || (out_wr && last);
  assign idle     = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
      idx_q <= '0;
    end else if (in_valid && in_ready) begin
      buf_q <= in_pairs;
      cnt_q <= in_npairs;
      idx_q <= '0;
    end else if (out_wr) begin
      idx_q <= idx_q + 4'd1;
    end
  end

  a_npairs: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> in_npairs <= 4'(MAX_PAIRS));
endmodule
