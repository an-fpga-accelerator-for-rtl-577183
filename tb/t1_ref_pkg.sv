// t1_ref_pkg: software reference models used by the testbenches.
//
// ebcot_ref codes one code block sample by sample in the JPEG2000 order
// (bit planes from the most significant non-zero one, passes SPP/MRP/CUP,
// stripes, columns, rows) and returns the CX/D sequence. mq_ref is a plain
// sequential model of the JPEG2000 MQ encoder (INITENC, ENCODE, FLUSH) that
// returns the coded bytes. Both are written as ordinary procedural code,
// independent of the column-parallel RTL.
package t1_ref_pkg;

  localparam int MAXD = 64;

  typedef struct {
    int cx;
    int d;
  } pair_t;

  // ---------------------------------------------------------------- contexts
  function automatic int zc_context(int band, int h, int v, int d);
    int t;
    if (band == 1) begin t = h; h = v; v = t; end    // HL: swap
    if (band == 3) begin
      if (d >= 3) return 8;
      if (d == 2) return (h + v >= 1) ? 7 : 6;
      if (d == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
      return (h + v >= 2) ? 2 : (h + v == 1) ? 1 : 0;
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : (d >= 1) ? 6 : 5;
    if (v == 2) return 4;
    if (v == 1) return 3;
    if (d >= 2) return 2;
    return d;
  endfunction

  // sign context: index (hc+1)*3 + (vc+1) -> context and xor bit
  function automatic void sc_context(int hc, int vc, output int cx, output int xb);
    int ctab[9] = '{13, 12, 11, 10, 9, 10, 11, 12, 13};
    int xtab[9] = '{1, 1, 1, 1, 0, 0, 0, 0, 0};
    int k;
    k  = (hc + 1) * 3 + (vc + 1);
    cx = ctab[k];
    xb = xtab[k];
  endfunction

  class ebcot_ref;
    int W, H, band;
    int mag [MAXD][MAXD];
    int sgn [MAXD][MAXD];
    bit sig [MAXD][MAXD];
    bit eta [MAXD][MAXD];
    bit rfd [MAXD][MAXD];
    pair_t out[$];
    // statistics
    int n_spp, n_mrp, n_cup, n_run;

    function new(int w, int h, int b);
      W = w; H = h; band = b;
    endfunction

    function bit s(int r, int c);
      if (r < 0 || c < 0 || r >= H || c >= W) return 0;
      return sig[r][c];
    endfunction

    function int chi(int r, int c);  // +1, -1 or 0
      if (!s(r, c)) return 0;
      return sgn[r][c] ? -1 : 1;
    endfunction

    function int clip(int x);
      return (x > 1) ? 1 : (x < -1) ? -1 : x;
    endfunction

    function int nsum(int r, int c);
      return s(r,c-1) + s(r,c+1) + s(r-1,c) + s(r+1,c)
           + s(r-1,c-1) + s(r-1,c+1) + s(r+1,c-1) + s(r+1,c+1);
    endfunction

    function void emit(int cx, int d);
      pair_t p;
      p.cx = cx; p.d = d;
      out.push_back(p);
    endfunction

    function void code_zc(int r, int c, int p);
      int h, v, d;
      h = s(r,c-1) + s(r,c+1);
      v = s(r-1,c) + s(r+1,c);
      d = s(r-1,c-1) + s(r-1,c+1) + s(r+1,c-1) + s(r+1,c+1);
      emit(zc_context(band, h, v, d), (mag[r][c] >> p) & 1);
    endfunction

    function void code_sc(int r, int c);
      int cx, xb;
      sc_context(clip(chi(r,c-1) + chi(r,c+1)), clip(chi(r-1,c) + chi(r+1,c)), cx, xb);
      emit(cx, sgn[r][c] ^ xb);
      sig[r][c] = 1;
    endfunction

    // significance propagation over the column of rows r0..r0+3 at column c
    function void spp_col(int r0, int c, int p);
      int r;
      for (int j = 0; j < 4; j++) begin
        r = r0 + j;
        if (r >= H) continue;
        if (!sig[r][c] && nsum(r, c) > 0) begin
          n_spp++;
          code_zc(r, c, p);
          eta[r][c] = 1;
          if ((mag[r][c] >> p) & 1) code_sc(r, c);
        end
      end
    endfunction

    function void mrp_col(int r0, int c, int p);
      int r;
      for (int j = 0; j < 4; j++) begin
        r = r0 + j;
        if (r >= H) continue;
        if (sig[r][c] && !eta[r][c]) begin
          n_mrp++;
          emit(rfd[r][c] ? 16 : (nsum(r, c) > 0) ? 15 : 14, (mag[r][c] >> p) & 1);
          rfd[r][c] = 1;
        end
      end
    endfunction

    function void cup_col(int r0, int c, int p);
      int r, k, j0;
      bit run_ok;
      j0 = 0;
      run_ok = (r0 + 3 < H);
      for (int j = 0; j < 4 && run_ok; j++) begin
        r = r0 + j;
        if (sig[r][c] || eta[r][c] || nsum(r, c) > 0) run_ok = 0;
      end
      if (run_ok) begin
        n_run++;
        k = -1;
        for (int j = 3; j >= 0; j--) if ((mag[r0+j][c] >> p) & 1) k = j;
        if (k < 0) begin
          emit(17, 0);
          return;
        end
        emit(17, 1);
        emit(18, (k >> 1) & 1);
        emit(18, k & 1);
        code_sc(r0 + k, c);
        j0 = k + 1;
      end
      for (int j = j0; j < 4; j++) begin
        r = r0 + j;
        if (r >= H) continue;
        if (!sig[r][c] && !eta[r][c]) begin
          n_cup++;
          code_zc(r, c, p);
          if ((mag[r][c] >> p) & 1) code_sc(r, c);
        end
      end
    endfunction

    function void run();
      int msb, all_or;
      all_or = 0;
      for (int i = 0; i < H; i++)
        for (int c = 0; c < W; c++) begin
          all_or |= mag[i][c];
          sig[i][c] = 0; eta[i][c] = 0; rfd[i][c] = 0;
        end
      if (all_or == 0) return;
      msb = 0;
      for (int p = 0; p < 31; p++) if ((all_or >> p) & 1) msb = p;
      for (int p = msb; p >= 0; p--) begin
        for (int i = 0; i < H; i++) for (int c = 0; c < W; c++) eta[i][c] = 0;
        if (p != msb) begin
          for (int st = 0; st < (H + 3) / 4; st++)
            for (int c = 0; c < W; c++) spp_col(st * 4, c, p);
          for (int st = 0; st < (H + 3) / 4; st++)
            for (int c = 0; c < W; c++) mrp_col(st * 4, c, p);
        end
        for (int st = 0; st < (H + 3) / 4; st++)
          for (int c = 0; c < W; c++) cup_col(st * 4, c, p);
      end
    endfunction
  endclass

  // ---------------------------------------------------------------- MQ coder
  class mq_ref;
    int unsigned qe_t[47] = '{
      'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
      'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
      'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
      'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
      'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
    int nmps_t[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,
                       25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
    int nlps_t[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,
                       22,23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
    int I[19];
    int MPS[19];
    int unsigned A, C, CT;
    int B;
    bit started;       // false until the byte before the stream start is passed
    byte unsigned bytes[$];
    int n_lps, n_switch, n_carry, n_stuff;
    int n_shift, n_byteout;   // renormalisation shifts and byte-out steps
    int n_resume;             // byte-outs inside a renormalisation that
                              // leave A below 0x8000 (more shifts follow)
    int n_bo_pair;            // pairs whose coding included a byte-out
    bit last_bo;              // the last pair coded included a byte-out

    function new();
      for (int c = 0; c < 19; c++) begin I[c] = 0; MPS[c] = 0; end
      I[0] = 4; I[17] = 3; I[18] = 46;
      A = 'h8000; C = 0; CT = 12; B = 0; started = 0;
    endfunction

    function void put_byte();
      if (started) bytes.push_back(B[7:0]);
      started = 1;
    endfunction

    function void byteout();
      n_byteout++;
      if (B == 'hFF) begin
        n_stuff++;
        put_byte(); B = C >> 20; C &= 'hFFFFF; CT = 7;
      end else if (C < 'h8000000) begin
        put_byte(); B = C >> 19; C &= 'h7FFFF; CT = 8;
      end else begin
        n_carry++;
        B = B + 1;
        if (B == 'hFF) begin
          n_stuff++;
          C &= 'h7FFFFFF; put_byte(); B = C >> 20; C &= 'hFFFFF; CT = 7;
        end else begin
          put_byte(); B = (C >> 19) & 'hFF; C &= 'h7FFFF; CT = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        n_shift++;
        A = (A << 1) & 'hFFFF; C = C << 1; CT = CT - 1;
        if (CT == 0) begin
          byteout();
          if ((A & 'h8000) == 0) n_resume++;
        end
      end while ((A & 'h8000) == 0);
    endfunction

    function void encode(int cx, int d);
      int unsigned q;
      int bo0 = n_byteout;
      q = qe_t[I[cx]];
      if (d == MPS[cx]) begin
        A = A - q;
        if ((A & 'h8000) == 0) begin
          if (A < q) A = q; else C = C + q;
          I[cx] = nmps_t[I[cx]];
          renorm();
        end else C = C + q;
      end else begin
        n_lps++;
        A = A - q;
        if (A < q) C = C + q; else A = q;
        if (I[cx] == 0 || I[cx] == 6 || I[cx] == 14) begin MPS[cx] = 1 - MPS[cx]; n_switch++; end
        I[cx] = nlps_t[I[cx]];
        renorm();
      end
      last_bo = (n_byteout != bo0);
      if (last_bo) n_bo_pair++;
    endfunction

    function void flush();
      int unsigned t;
      t = C + A;
      C = C | 'hFFFF;
      if (C >= t) C = C - 'h8000;
      C = C << CT; byteout();
      C = C << CT; byteout();
      if (B != 'hFF) put_byte();
    endfunction
  endclass

endpackage
