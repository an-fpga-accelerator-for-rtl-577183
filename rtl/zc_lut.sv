// zc_lut: zero-coding (ZC) context primitive.
//
// Maps the number of significant horizontal (h, 0..2), vertical (v, 0..2)
// and diagonal (d, 0..4) neighbours of a sample to one of the nine ZC
// contexts 0..8, following the JPEG2000 zero-coding table. LL and LH code
// blocks use the table as is, HL blocks swap the roles of h and v, HH blocks
// are keyed on the diagonal count first. Purely combinational.
// The design names the ZC primitive; the table is the standard one.
module zc_lut
  import jp2k_pkg::*;
(
  input  band_e      band,
  input  logic [1:0] h,
  input  logic [1:0] v,
  input  logic [2:0] d,
  output logic [4:0] cx
);
  logic [1:0] hh, vv;
  logic [2:0] hv;

  always_comb begin
    // HL swaps horizontal and vertical contributions
    hh = (band == BAND_HL) ? v : h;
    vv = (band == BAND_HL) ? h : v;
    hv = {1'b0, h} + {1'b0, v};
    cx = 5'd0;
    if (band == BAND_HH) begin
      if (d >= 3'd3)                    cx = 5'd8;
      else if (d == 3'd2) cx = (hv >= 3'd1) ? 5'd7 : 5'd6;
      else if (d == 3'd1) cx = (hv >= 3'd2) ? 5'd5 : (hv == 3'd1) ? 5'd4 : 5'd3;
      else                cx = (hv >= 3'd2) ? 5'd2 : (hv == 3'd1) ? 5'd1 : 5'd0;
    end else begin
      if (hh == 2'd2)                   cx = 5'd8;
      else if (hh == 2'd1) begin
        if (vv != 2'd0)                 cx = 5'd7;
        else if (d != 3'd0)             cx = 5'd6;
        else                            cx = 5'd5;
      end else begin
        if (vv == 2'd2)                 cx = 5'd4;
        else if (vv == 2'd1)            cx = 5'd3;
        else if (d >= 3'd2)             cx = 5'd2;
        else if (d == 3'd1)             cx = 5'd1;
        else                            cx = 5'd0;
      end
    end
  end
endmodule
