// jp2k_ref_pkg - software reference of JPEG2000 block encoding for the
// testbenches: the MQ encoder procedures (INITENC, CODEMPS/CODELPS,
// RENORME, BYTEOUT, FLUSH) written as in the standard, with C held as a
// plain integer, and the three coding passes written as loops over a padded
// two-dimensional state array.  It shares no code with the RTL.
package jp2k_ref_pkg;

  // ------------------------------------------------------------------ MQ
  int unsigned qe_t   [47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                               'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                               'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                               'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                               'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
  int nmps_t [47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,30,
                      31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
  int nlps_t [47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,23,24,25,26,27,
                      28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
  int sw_t   [47] = '{1,0,0,0,0,0,1,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0};

  class mq_model;
    int unsigned a, c, ct, b;
    bit          first;
    int          idx [19];
    int          mps [19];
    byte unsigned out [$];
    int          renorms;

    function new();
      init();
    endfunction

    function void init();
      a = 'h8000; c = 0; ct = 12; b = 0; first = 1; out.delete(); renorms = 0;
      foreach (idx[i]) begin idx[i] = 0; mps[i] = 0; end
      idx[0] = 4; idx[17] = 3; idx[18] = 46;
    endfunction

    function void put(int unsigned v);
      if (!first) out.push_back(byte'(v));
      first = 0;
    endfunction

    function void byteout();
      if (b == 'hFF) begin
        put(b); b = c >> 20; c &= 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        put(b); b = c >> 19; c &= 'h7FFFF; ct = 8;
      end else begin
        b = b + 1;
        if (b == 'hFF) begin
          c &= 'h7FFFFFF; put(b); b = c >> 20; c &= 'hFFFFF; ct = 7;
        end else begin
          put(b); b = c >> 19; c &= 'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorme();
      renorms++;
      do begin
        a = (a << 1) & 'hFFFF; c = c << 1; ct--;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
    endfunction

    function void encode(int cx, int d);
      int unsigned q;
      q = qe_t[idx[cx]];
      if (d == mps[cx]) begin
        a = a - q;
        if ((a & 'h8000) == 0) begin
          if (a < q) a = q; else c = c + q;
          idx[cx] = nmps_t[idx[cx]];
          renorme();
        end else c = c + q;
      end else begin
        a = a - q;
        if (a < q) c = c + q; else a = q;
        if (sw_t[idx[cx]] != 0) mps[cx] = 1 - mps[cx];
        idx[cx] = nlps_t[idx[cx]];
        renorme();
      end
    endfunction

    function void flush();
      int unsigned tempc;
      tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c = c - 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      if (b != 'hFF) put(b);
    endfunction
  endclass

  // --------------------------------------------------------------- EBCOT
  // Block samples: sgn[y][x] (1 = negative), mag[y][x].  orient: 0 LL,
  // 1 HL, 2 LH, 3 HH.  Returns the symbol list as cx*2+d values and the
  // number of passes; nplanes_out is the number of coded planes.
  class ebcot_model;
    int w, h, orient;
    int sig  [][];   // padded by one on every side
    int sgn  [][];
    int vis  [][];
    int refd [][];
    int sym  [$];
    int passes, nplanes;
    int sym_sp, sym_mr, sym_cu, runs, run_breaks;

    function new(int w_, int h_, int o_);
      w = w_; h = h_; orient = o_;
      sig = new[h+2]; sgn = new[h+2]; vis = new[h+2]; refd = new[h+2];
      foreach (sig[i]) begin
        sig[i] = new[w+2]; sgn[i] = new[w+2]; vis[i] = new[w+2]; refd[i] = new[w+2];
      end
    endfunction

    function void emit(int cx, int d);
      sym.push_back(cx * 2 + d);
    endfunction

    function int zc(int y, int x);  // y, x padded coordinates
      int hh, vv, dd, t, hv;
      hh = sig[y][x-1] + sig[y][x+1];
      vv = sig[y-1][x] + sig[y+1][x];
      dd = sig[y-1][x-1] + sig[y-1][x+1] + sig[y+1][x-1] + sig[y+1][x+1];
      if (orient == 1) begin t = hh; hh = vv; vv = t; end
      if (orient == 3) begin
        hv = hh + vv;
        if (dd >= 3) return 8;
        if (dd == 2) return (hv >= 1) ? 7 : 6;
        if (dd == 1) return (hv >= 2) ? 5 : (hv == 1) ? 4 : 3;
        return (hv >= 2) ? 2 : (hv == 1) ? 1 : 0;
      end
      if (hh == 2) return 8;
      if (hh == 1) return (vv >= 1) ? 7 : (dd >= 1) ? 6 : 5;
      if (vv == 2) return 4;
      if (vv == 1) return 3;
      return (dd >= 2) ? 2 : (dd == 1) ? 1 : 0;
    endfunction

    function int contrib(int y, int x);
      if (sig[y][x] == 0) return 0;
      return (sgn[y][x] != 0) ? -1 : 1;
    endfunction

    function void code_sign(int y, int x, int s);
      int hc, vc, cx, xb;
      hc = contrib(y, x-1) + contrib(y, x+1);
      vc = contrib(y-1, x) + contrib(y+1, x);
      hc = (hc > 1) ? 1 : (hc < -1) ? -1 : hc;
      vc = (vc > 1) ? 1 : (vc < -1) ? -1 : vc;
      // Table of the standard, indexed by (H, V)
      if (hc == 1)       begin xb = 0; cx = (vc == 1) ? 13 : (vc == 0) ? 12 : 11; end
      else if (hc == -1) begin xb = 1; cx = (vc == -1) ? 13 : (vc == 0) ? 12 : 11; end
      else               begin xb = (vc == -1) ? 1 : 0; cx = (vc == 0) ? 9 : 10; end
      emit(cx, s ^ xb);
      sig[y][x] = 1; sgn[y][x] = s;
    endfunction

    function int nbsig(int y, int x);
      return sig[y-1][x-1] + sig[y-1][x] + sig[y-1][x+1] + sig[y][x-1] + sig[y][x+1]
           + sig[y+1][x-1] + sig[y+1][x] + sig[y+1][x+1];
    endfunction

    function void run(int s_in [][], int m_in [][], int max_passes);
      int mx, p, bit_, np;
      mx = 0;
      for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) mx |= m_in[y][x];
      np = 0;
      for (int i = 0; i < 31; i++) if (((mx >> i) & 1) != 0) np = i + 1;
      nplanes = np; passes = 0; sym.delete();
      sym_sp = 0; sym_mr = 0; sym_cu = 0; runs = 0; run_breaks = 0;
      for (p = np - 1; p >= 0; p--) begin
        for (int kind = (p == np - 1) ? 2 : 0; kind < 3; kind++) begin
          if (max_passes != 0 && passes == max_passes) return;
          for (int s0 = 0; s0 < h; s0 += 4)
            for (int x = 0; x < w; x++) begin
              int r0;
              r0 = 0;
              if (kind == 2) begin
                // run mode test on the stripe column
                bit ok;
                ok = 1;
                for (int r = 0; r < 4; r++)
                  if (sig[s0+r+1][x+1] != 0 || vis[s0+r+1][x+1] != 0 || nbsig(s0+r+1, x+1) != 0) ok = 0;
                if (ok) begin
                  int first1;
                  first1 = -1;
                  for (int r = 3; r >= 0; r--) if ((m_in[s0+r][x] >> p) & 1) first1 = r;
                  runs++;
                  if (first1 < 0) begin emit(17, 0); r0 = 4; end
                  else begin
                    run_breaks++;
                    emit(17, 1); emit(18, first1 / 2); emit(18, first1 % 2);
                    code_sign(s0+first1+1, x+1, s_in[s0+first1][x]);
                    r0 = first1 + 1;
                  end
                end
              end
              for (int r = r0; r < 4; r++) begin
                int yy, xx;
                yy = s0 + r + 1; xx = x + 1;
                bit_ = (m_in[s0+r][x] >> p) & 1;
                if (kind == 0) begin
                  if (!sig[yy][xx] && nbsig(yy, xx) != 0) begin
                    vis[yy][xx] = 1; sym_sp++;
                    emit(zc(yy, xx), bit_);
                    if (bit_) code_sign(yy, xx, s_in[s0+r][x]);
                  end
                end else if (kind == 1) begin
                  if (sig[yy][xx] && !vis[yy][xx]) begin
                    sym_mr++;
                    emit(refd[yy][xx] ? 16 : (nbsig(yy, xx) != 0 ? 15 : 14), bit_);
                    refd[yy][xx] = 1;
                  end
                end else begin
                  if (!sig[yy][xx] && !vis[yy][xx]) begin
                    sym_cu++;
                    emit(zc(yy, xx), bit_);
                    if (bit_) code_sign(yy, xx, s_in[s0+r][x]);
                  end
                end
              end
            end
          passes++;
          if (kind == 2) foreach (vis[i, j]) vis[i][j] = 0;
        end
      end
    endfunction
  endclass

endpackage
