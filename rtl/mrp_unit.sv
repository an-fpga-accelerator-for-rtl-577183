// mrp_unit: magnitude refinement pass (MRP) for one stripe column.
//
// Each sample that was significant before this bit plane (significant and
// not visited by the significance propagation pass of this plane) emits one
// MRC pair carrying its magnitude bit, and is then marked as refined
// (sigma'). The four rows are handled in one cycle; the refinement pass does
// not change significance, so the rows are independent. Up to 4 pairs.
// Combinational. The organisation follows the design; the coding rule is
// that of JPEG2000.
module mrp_unit
  import jp2k_pkg::*;
(
  input  col_info_t   ci,
  output col_result_t res
);
  logic [3:0] cs;
  logic [3:0] code;
  logic [4:0] mr_cx [4];

  assign cs = {ci.sig[4][1], ci.sig[3][1], ci.sig[2][1], ci.sig[1][1]};

  for (genvar j = 0; j < 4; j++) begin : g_row
    logic [1:0] h, v, hs, hn, vs, vn;
    logic [2:0] d;
    logic       any;
    sample_nbrs #(.ROW(j)) u_nb (
      .ci(ci), .col_sig(cs), .h(h), .v(v), .d(d), .any(any),
      .h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn));
    mrc_lut u_mr (.refined(ci.refd[j]), .any_nbr(any), .cx(mr_cx[j]));
    assign code[j] = ci.valid[j] && cs[j] && !ci.eta[j];
  end

  always_comb begin
    res = '0;
    for (int j = 0; j < 4; j++) begin
      if (code[j]) begin
        res.pairs[res.npairs] = '{cx: mr_cx[j], d: ci.bit_v[j]};
        res.npairs = res.npairs + 4'd1;
      end
    end
    res.sig_new  = cs;
    res.eta_new  = ci.eta;
    res.refd_new = ci.refd | code;
  end
endmodule
