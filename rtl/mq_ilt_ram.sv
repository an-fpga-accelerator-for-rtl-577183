// mq_ilt_ram: index lookup table (ILT) RAM of the MQ coder.
//
// Two small RAMs addressed by the context CX (0..18): the "Table d'index"
// holding each context's current probability state I(CX) (0..46) and the
// "Table MPS" holding its more probable symbol MPS(CX). Reads are
// combinational. The index entry is written when the coder renormalises
// (ren_out), the MPS entry only when a switch is required (lps_sw). init
// (or reset) loads the JPEG2000 start states: context 0 at state 4, the run
// length context 17 at state 3, the uniform context 18 at state 46, all
// others at state 0, every MPS 0.
module mq_ilt_ram
  import jp2k_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [4:0] cx,
  output logic [5:0] icx,
  output logic       mps,
  input  logic       ren_out,     // write new index
  input  logic [5:0] new_icx,
  input  logic       lps_sw,      // invert MPS
  input  logic [4:0] wr_cx
);
  logic [5:0] idx_tab [NUM_CX];
  logic       mps_tab [NUM_CX];

  function automatic logic [5:0] start_state(input int unsigned c);
    if (c == 0)        return 6'd4;
    else if (c == 17)  return 6'd3;
    else if (c == 18)  return 6'd46;
    else               return 6'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CX; c++) begin
        idx_tab[c] <= start_state(c);
        mps_tab[c] <= 1'b0;
      end
    end else if (init) begin
      for (int c = 0; c < NUM_CX; c++) begin
        idx_tab[c] <= start_state(c);
        mps_tab[c] <= 1'b0;
      end
    end else begin
      if (ren_out && wr_cx < 5'(NUM_CX)) idx_tab[wr_cx] <= new_icx;
      if (lps_sw  && wr_cx < 5'(NUM_CX)) mps_tab[wr_cx] <= ~mps_tab[wr_cx];
    end
  end

  assign icx = (cx < 5'(NUM_CX)) ? idx_tab[cx] : 6'd0;
  assign mps = (cx < 5'(NUM_CX)) ? mps_tab[cx] : 1'b0;
endmodule
