// cup_unit: cleanup pass (CUP) for one stripe column.
//
// Codes every sample of the column that is still insignificant and was not
// visited in this bit plane. A full column with no significant sample and no
// significant neighbour is coded in run mode (see rlc_unit): one RL pair;
// if a 1 is present, two UNIFORM pairs give its row, its sign follows as an
// SC pair, and the rows below it are coded normally. Otherwise each eligible
// sample gets a ZC pair and, if its bit is 1, an SC pair; new significance
// is passed down the column within the same cycle. Up to 10 pairs.
// Combinational. The RLC/SC/ZC organisation follows the design; the coding
// rules are those of JPEG2000.
module cup_unit
  import jp2k_pkg::*;
(
  input  band_e       band,
  input  col_info_t   ci,
  output col_result_t res,
  output logic        run_used    // column was coded in run mode
);
  logic [3:0] cs0, cs_end;
  logic [3:0] zc_code, sc_code;
  logic [4:0] zc_cx [4];
  logic [4:0] sc_cx [4];
  logic       sc_x  [4];
  logic       run_mode, hit;
  logic [1:0] first_row;

  rlc_unit u_rlc (.ci(ci), .run_mode(run_mode), .hit(hit), .first_row(first_row));

  assign cs0    = {ci.sig[4][1], ci.sig[3][1], ci.sig[2][1], ci.sig[1][1]};
  assign run_used = run_mode;

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
    logic       normal;
    sample_nbrs #(.ROW(j)) u_nb (
      .ci(ci), .col_sig(cs_in), .h(h), .v(v), .d(d), .any(any),
      .h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn));
    zc_lut u_zc (.band(band), .h(h), .v(v), .d(d), .cx(zc_cx[j]));
    sc_lut u_sc (.h_sig(hs), .h_sgn(hn), .v_sig(vs), .v_sgn(vn),
                 .cx(sc_cx[j]), .xorbit(sc_x[j]));
    always_comb begin
      if (run_mode)
        normal = hit && (2'(j) > first_row);
      else
        normal = ci.valid[j] && !cs_in[j] && !ci.eta[j];
      zc_code[j] = normal;
      // the row found by run mode codes only its sign
      sc_code[j] = (normal && ci.bit_v[j]) || (run_mode && hit && 2'(j) == first_row);
      cs_out    = cs_in;
      cs_out[j] = cs_in[j] | sc_code[j];
    end
  end

  always_comb begin
    res = '0;
    if (run_mode) begin
      res.pairs[0] = '{cx: CX_RL, d: hit};
      res.npairs   = 4'd1;
      if (hit) begin
        res.pairs[1] = '{cx: CX_UNI, d: first_row[1]};
        res.pairs[2] = '{cx: CX_UNI, d: first_row[0]};
        res.npairs   = 4'd3;
      end
    end
    for (int j = 0; j < 4; j++) begin
      if (zc_code[j]) begin
        res.pairs[res.npairs] = '{cx: zc_cx[j], d: ci.bit_v[j]};
        res.npairs = res.npairs + 4'd1;
      end
      if (sc_code[j]) begin
        res.pairs[res.npairs] = '{cx: sc_cx[j], d: ci.sgn[j+1][1] ^ sc_x[j]};
        res.npairs = res.npairs + 4'd1;
      end
    end
    res.sig_new  = cs_end;
    res.eta_new  = ci.eta;
    res.refd_new = ci.refd;
  end
endmodule
