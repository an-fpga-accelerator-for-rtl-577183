// mq_coder: MQ arithmetic coder (probability prediction + coding state
// machine).
//
// Prediction part: the context CX of the accepted pair addresses the ILT RAM
// (index and MPS per context); the index addresses the PET ROM (Qe, NMPS,
// NLPS, Switch). lps_en is high when the decision D differs from MPS(CX).
// Coding part: a state machine on the JPEG2000 encoder registers A
// (interval), C (code register), CT (bits to next byte) and B (byte waiting
// to be written):
//   S_IDLE     take a pair when one is offered, or start the flush once the
//              bit-plane coder has ended and no pair is left
//   S_CODE     CODEMPS / CODELPS: interval update, conditional exchange,
//              ILT update (index on renormalisation, MPS on switch), fused
//              with the first renormalisation step; unless a byte output
//              follows, the next pair is taken in the same cycle and coded
//              in the next one (one pair per cycle)
//   S_RENORM   renormalisation step resumed after a byte output
//   S_BYTEOUT  byte output with carry propagation and bit stuffing after 0xFF
//   S_FL_SET   flush: set the low bits of C (SETBITS)
//   S_FL_SH1/2 flush: C <<= CT before each of the two final byte outputs
//   S_FL_LAST  flush: write the last byte unless it is 0xFF
//   S_DONE     stream complete
// Renormalisation is fused: one step shifts A and C left by
// min(leading zeros of A, CT) bits at once, using a leading-zero count and
// a barrel shifter, so a step ends either with A normalised (next pair) or
// with CT = 0 (byte output, then another step if A is still below 0x8000).
// Cycle cost with a continuous input: 1 per pair, plus 1 per byte output,
// plus 1 per step resumed after a byte output, plus 1 to take the first pair
// and the first pair after each byte output, plus 5 for the flush (stalls
// on out_ready or input gaps add more).
// A byte is written whenever the byte pointer advances, except the very
// first time (the byte before the stream start). Bytes leave on
// out_valid/out_ready; the state machine waits while out_ready is low. The
// ILT RAM is written at the clock edge that ends S_CODE and read
// combinationally in the following S_CODE, so back-to-back pairs of the same
// context see the updated state without a bypass path.
// init (one cycle) resets registers and ILT RAM for a new code block.
// The ILT/PET organisation, the signal names and the fusing of interval
// update and renormalisation follow the published architecture; the exact
// state set (nine states) and the cycle split are this implementation's
// choice.
module mq_coder
  import jp2k_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  output logic       in_ready,
  input  cxd_t       in_pair,
  input  logic       end_i,      // no more pairs will come
  output logic       out_valid,
  output logic [7:0] out_byte,
  input  logic       out_ready,
  output logic       done,
  output logic       busy,
  // event strobes for monitoring
  output logic       ev_lps,
  output logic       ev_switch,
  output logic       ev_carry,
  output logic       ev_stuff
);
  typedef enum logic [3:0] {
    S_IDLE, S_CODE, S_RENORM, S_BYTEOUT,
    S_FL_SET, S_FL_SH1, S_FL_SH2, S_FL_LAST, S_DONE
  } state_e;
  typedef enum logic [1:0] {R_RENORM, R_FL2, R_FLLAST} ret_e;

  state_e      st;
  ret_e        ret;
  logic [15:0] a_q;
  logic [31:0] c_q;
  logic [3:0]  ct_q;
  logic [7:0]  b_q;
  logic        first_q;
  cxd_t        pair_q;

  // prediction
  logic [5:0]  icx, nmps, nlps;
  logic        mps, sw;
  logic [15:0] qe;
  logic        lps_en, ren_out, lps_sw;

  // code step
  logic [15:0] a_sub;
  logic [15:0] a_code;
  logic [31:0] c_code;

  // fused renormalisation step
  logic [15:0] rn_a, rn_a_sh;
  logic [31:0] rn_c, rn_c_sh;
  logic [3:0]  rn_lz, rn_k;
  logic        code_bo;     // this S_CODE step ends with a byte output

  // byte out
  logic        bo_emit;
  logic [7:0]  bo_byte, bo_b;
  logic [31:0] bo_c;
  logic [3:0]  bo_ct;
  logic        bo_carry, bo_stuff;

  mq_ilt_ram u_ilt (
    .clk(clk), .rst_n(rst_n), .init(init),
    .cx(pair_q.cx), .icx(icx), .mps(mps),
    .ren_out(ren_out), .new_icx(lps_en ? nlps : nmps),
    .lps_sw(lps_sw), .wr_cx(pair_q.cx));

  mq_pet_rom u_pet (.idx(icx), .qe(qe), .nmps(nmps), .nlps(nlps), .switch_o(sw));

  always_comb begin
    lps_en = (pair_q.d != mps);
    a_sub  = a_q - qe;
    a_code = a_sub;
    c_code = c_q;
    if (!lps_en) begin
      if (!a_sub[15]) begin
        if (a_sub < qe) a_code = qe;
        else            c_code = c_q + 32'(qe);
      end else begin
        c_code = c_q + 32'(qe);
      end
    end else begin
      if (a_sub < qe) c_code = c_q + 32'(qe);
      else            a_code = qe;
    end
    ren_out = (st == S_CODE) && (lps_en || !a_sub[15]);
    lps_sw  = (st == S_CODE) && lps_en && sw;
  end

  // Renormalisation step: from the freshly coded interval in S_CODE, from
  // the registers in S_RENORM. rn_k = min(leading zeros of A, CT) >= 1.
  always_comb begin
    rn_a  = (st == S_CODE) ? a_code : a_q;
    rn_c  = (st == S_CODE) ? c_code : c_q;
    rn_lz = 4'd15;
    for (int i = 0; i < 16; i++)
      if (rn_a[i]) rn_lz = 4'(15 - i);
    rn_k    = (rn_lz < ct_q) ? rn_lz : ct_q;
    rn_a_sh = rn_a << rn_k;
    rn_c_sh = rn_c << rn_k;
    code_bo = ren_out && (ct_q == rn_k);
  end

  // BYTEOUT procedure
  always_comb begin
    bo_carry = 1'b0;
    bo_stuff = 1'b0;
    bo_byte  = b_q;
    if (b_q == 8'hFF) begin
      bo_stuff = 1'b1;
      bo_b  = c_q[27:20];
      bo_c  = c_q & 32'h000F_FFFF;
      bo_ct = 4'd7;
    end else if (!c_q[27]) begin
      bo_b  = c_q[26:19];
      bo_c  = c_q & 32'h0007_FFFF;
      bo_ct = 4'd8;
    end else begin
      bo_carry = 1'b1;
      bo_byte  = b_q + 8'd1;
      if (bo_byte == 8'hFF) begin
        bo_stuff = 1'b1;
        bo_b  = {1'b0, c_q[26:20]};
        bo_c  = c_q & 32'h000F_FFFF;
        bo_ct = 4'd7;
      end else begin
        bo_b  = c_q[26:19];
        bo_c  = c_q & 32'h0007_FFFF;
        bo_ct = 4'd8;
      end
    end
    bo_emit = !first_q;
  end

  always_comb begin
    in_ready  = !init && ((st == S_IDLE) || (st == S_CODE && !code_bo));
    out_valid = 1'b0;
    out_byte  = bo_byte;
    if (st == S_BYTEOUT && bo_emit) out_valid = 1'b1;
    if (st == S_FL_LAST && b_q != 8'hFF) begin
      out_valid = 1'b1;
      out_byte  = b_q;
    end
    done      = (st == S_DONE);
    busy      = (st != S_IDLE) && (st != S_DONE);
    ev_lps    = (st == S_CODE) && lps_en;
    ev_switch = lps_sw;
    ev_carry  = (st == S_BYTEOUT) && bo_carry && (out_ready || !bo_emit);
    ev_stuff  = (st == S_BYTEOUT) && bo_stuff && (out_ready || !bo_emit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ret     <= R_RENORM;
      a_q     <= 16'h8000;
      c_q     <= '0;
      ct_q    <= 4'd12;
      b_q     <= '0;
      first_q <= 1'b1;
      pair_q  <= '0;
    end else if (init) begin
      st      <= S_IDLE;
      ret     <= R_RENORM;
      a_q     <= 16'h8000;
      c_q     <= '0;
      ct_q    <= 4'd12;
      b_q     <= '0;
      first_q <= 1'b1;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (in_valid) begin
            pair_q <= in_pair;
            st     <= S_CODE;
          end else if (end_i) begin
            st <= S_FL_SET;
          end
        end
        S_CODE: begin
          ret <= R_RENORM;
          if (ren_out) begin
            a_q  <= rn_a_sh;
            c_q  <= rn_c_sh;
            ct_q <= ct_q - rn_k;
          end else begin
            a_q <= a_code;
            c_q <= c_code;
          end
          if (code_bo) begin
            st <= S_BYTEOUT;
          end else if (in_valid) begin
            pair_q <= in_pair;
            st     <= S_CODE;
          end else begin
            st <= S_IDLE;
          end
        end
        S_RENORM: begin
          a_q  <= rn_a_sh;
          c_q  <= rn_c_sh;
          ct_q <= ct_q - rn_k;
          ret  <= R_RENORM;
          st   <= (ct_q == rn_k) ? S_BYTEOUT : S_IDLE;
        end
        S_BYTEOUT: begin
          if (!bo_emit || out_ready) begin
            b_q     <= bo_b;
            c_q     <= bo_c;
            ct_q    <= bo_ct;
            first_q <= 1'b0;
            unique case (ret)
              R_RENORM: st <= a_q[15] ? S_IDLE : S_RENORM;
              R_FL2:    st <= S_FL_SH2;
              default:  st <= S_FL_LAST;
            endcase
          end
        end
        S_FL_SET: begin
          // SETBITS: largest value with trailing ones inside [C, C+A)
          if ((c_q | 32'h0000_FFFF) >= (c_q + 32'(a_q)))
            c_q <= (c_q | 32'h0000_FFFF) - 32'h0000_8000;
          else
            c_q <= c_q | 32'h0000_FFFF;
          st <= S_FL_SH1;
        end
        S_FL_SH1: begin
          c_q <= c_q << ct_q;
          ret <= R_FL2;
          st  <= S_BYTEOUT;
        end
        S_FL_SH2: begin
          c_q <= c_q << ct_q;
          ret <= R_FLLAST;
          st  <= S_BYTEOUT;
        end
        S_FL_LAST: begin
          if (b_q == 8'hFF || out_ready) st <= S_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule
