// spp_unit: significance propagation pass (SPP) for one stripe column.
//
// All four samples of the column are handled in the same cycle, top row
// first: a sample that is still insignificant but has at least one
// significant neighbour is coded with a ZC pair carrying its magnitude bit;
// if that bit is 1 the sample becomes significant and an SC pair carrying
// its sign follows. A sample that becomes significant is seen at once by the
// rows below it in the same column. Every coded sample is marked visited
// (eta) so that the cleanup pass skips it. Up to 8 pairs per column.
// Combinational; the caller writes sig_new/eta_new back when the column is
// accepted. The column-parallel organisation follows the design; the coding
// rules are those of JPEG2000.
module spp_unit
  import jp2k_pkg::*;
(
  input  band_e       band,
  input  col_info_t   ci,
  output col_result_t res
);
  logic [3:0] cs0, cs_end;             // column significance before/after
  logic [3:0] code, sig_bit;
  logic [4:0] zc_cx [4];
  logic [4:0] sc_cx [4];
  logic       sc_x  [4];

  assign cs0 = {ci.sig[4][1], ci.sig[3][1], ci.sig[2][1], ci.sig[1][1]};

  for (genvar j = 0; j < 4; j++) begin : g_row
    logic [1:0] h, v, hs, hn, vs, vn;
    logic [2:0] d;
    logic       any;
    logic [3:0] cs_in, cs_out;       // column significance before/after row j
    if (j == 0) begin : g_first
      assign cs_in = cs0;
    end else begin : g_next
      assign cs_in = g_row[j-1].cs_out;
    end
    if (j == 3) begin : g_last
      assign cs_end = cs_out;
    end
    sample_nbrs #(.ROW(j)) u_nb (
      .ci(ci), .col_sig(cs_in), .h(h), .v(v), .d(d), .any(any),
      .h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn));
    zc_lut u_zc (.band(band), .h(h), .v(v), .d(d), .cx(zc_cx[j]));
    sc_lut u_sc (.h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn),
                 .cx(sc_cx[j]), .xorbit(sc_x[j]));
    assign code[j]    = ci.valid[j] && !cs_in[j] && any;
    assign sig_bit[j] = code[j] && ci.bit_v[j];
    always_comb begin
      cs_out    = cs_in;
      cs_out[j] = cs_in[j] | sig_bit[j];
    end
  end

  always_comb begin
    res = '0;
    for (int j = 0; j < 4; j++) begin
      if (code[j]) begin
        res.pairs[res.npairs] = '{cx: zc_cx[j], d: ci.bit_v[j]};
        res.npairs = res.npairs + 4'd1;
        if (ci.bit_v[j]) begin
          res.pairs[res.npairs] = '{cx: sc_cx[j], d: ci.sgn[j+1][1] ^ sc_x[j]};
          res.npairs = res.npairs + 4'd1;
        end
      end
    end
    res.sig_new  = cs_end;
    res.eta_new  = ci.eta | code;
    res.refd_new = ci.refd;
  end
endmodule
