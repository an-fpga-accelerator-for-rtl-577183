// sc_lut: sign-coding (SC) context primitive.
//
// Each of the two horizontal and two vertical neighbours contributes +1 when
// significant and positive, -1 when significant and negative. The sums are
// clipped to -1..1 per direction, and the pair (H, V) selects one of the five
// SC contexts 9..13 and the XOR bit; the coded decision is sign ^ xorbit.
// Combinational. The design names the SC primitive; the table is the
// standard JPEG2000 sign-context table.
module sc_lut (
  input  logic [1:0] h_sig,   // [0] left, [1] right
  input  logic [1:0] h_sgn,   // 1 = negative
  input  logic [1:0] v_sig,   // [0] above, [1] below
  input  logic [1:0] v_sgn,
  output logic [4:0] cx,
  output logic       xorbit
);
  // contribution of one direction: -1, 0 or +1, clipped
  function automatic logic signed [2:0] contrib(input logic [1:0] s, input logic [1:0] n);
    logic signed [2:0] acc;
    acc = 3'sd0;
    for (int i = 0; i < 2; i++)
      if (s[i]) acc = n[i] ? acc - 3'sd1 : acc + 3'sd1;
    if (acc > 3'sd1)  acc = 3'sd1;
    if (acc < -3'sd1) acc = -3'sd1;
    return acc;
  endfunction

  logic signed [2:0] hc, vc;

  always_comb begin
    hc = contrib(h_sig, h_sgn);
    vc = contrib(v_sig, v_sgn);
    xorbit = 1'b0;
    cx     = 5'd9;
    if (hc == 3'sd0) begin
      cx     = (vc == 3'sd0) ? 5'd9 : 5'd10;
      xorbit = (vc == -3'sd1);
    end else begin
      // H = +1 or -1: context from V relative to H, xorbit = (H < 0)
      xorbit = (hc == -3'sd1);
      if (vc == 3'sd0)     cx = 5'd12;
      else if (vc == hc)   cx = 5'd13;
      else                 cx = 5'd11;
    end
  end
endmodule
