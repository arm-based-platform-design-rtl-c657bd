// dbf_ref_pkg: reference model and stimulus helpers for the deblocking testbenches.
//
// Holds one macroblock's neighbourhood as plain pixel arrays and filters it
// the way the H.264/MPEG-4 AVC standard orders it: all vertical luma edges
// left to right over the full 16 rows, then all horizontal edges top to
// bottom, then chroma alike. The filter arithmetic is written out here
// independently of the RTL. It also knows the block transfer order of the
// accelerator's ports, so a testbench can play the CPU.
//
// Luma array  y[0..19][0..19]: rows 0..3 the top neighbour, columns 0..3 the
// left neighbour, [4..19][4..19] the current macroblock.
// Chroma arrays c[comp][0..11][0..11] alike with an 8x8 current block.
package dbf_ref_pkg;
  import dbf_pkg::*;

  typedef int unsigned uint_t;

  class mb_ctx;
    int y  [20][20];
    int c  [2][12][12];
    int y0 [20][20];
    int c0 [2][12][12];
    bs_t bs_v [4][4];   // [edge column][block row]
    bs_t bs_h [4][4];   // [edge row][block column]
    int qp_l[3];        // cur, left, top
    int qp_c[3];
    bit l, t, cur;

    // Pixels: a smooth ramp per 4x4 block plus small steps, so most edges filter.
    function void randomize_pixels(int step);
      int base;
      base = 40 + ($urandom % 150);
      for (int i = 0; i < 20; i++)
        for (int j = 0; j < 20; j++)
          y[i][j] = clip(base + ((i / 4) * 3 + (j / 4) * 2) * (int'($urandom % (step + 1)) - step / 2)
                         + int'($urandom % 3));
      for (int k = 0; k < 2; k++)
        for (int i = 0; i < 12; i++)
          for (int j = 0; j < 12; j++)
            c[k][i][j] = clip(base / 2 + 40 + ((i / 4) + (j / 4)) * (int'($urandom % (step + 1)) - step / 2)
                              + int'($urandom % 3));
      y0 = y;
      c0 = c;
    endfunction

    // bS values: non-zero only where the chosen flags allow, at least one per flag.
    function void randomize_bs(bit fl, bit ft, bit fc);
      for (int e = 0; e < 4; e++)
        for (int b = 0; b < 4; b++) begin
          bs_v[e][b] = 0;
          bs_h[e][b] = 0;
          if ((e == 0 && fl) || (e > 0 && fc)) bs_v[e][b] = pick_bs(e == 0);
          if ((e == 0 && ft) || (e > 0 && fc)) bs_h[e][b] = pick_bs(e == 0);
        end
      if (fl) bs_v[0][$urandom % 4] = (e0_intra() ? 3'd4 : 3'd2);
      if (ft) bs_h[0][$urandom % 4] = 3'd2;
      if (fc) bs_v[1 + $urandom % 3][$urandom % 4] = 3'd1;
      l = fl; t = ft; cur = fc;
    endfunction

    static function bit e0_intra();
      return ($urandom % 2) == 1;
    endfunction

    static function bs_t pick_bs(bit mb_edge);
      int r;
      r = $urandom % 6;
      if (r == 0) return 0;
      if (r == 5) return mb_edge ? 3'd4 : 3'd3;
      return bs_t'(r > 3 ? 3 : r);
    endfunction

    function void randomize_qp(int lo, int hi);
      for (int i = 0; i < 3; i++) begin
        qp_l[i] = lo + ($urandom % (hi - lo + 1));
        qp_c[i] = lo + ($urandom % (hi - lo + 1));
      end
    endfunction

    // ------------------------------------------------------------ reference filter
    static function int clip(int v);
      return v < 0 ? 0 : (v > 255 ? 255 : v);
    endfunction

    static function int clip3(int lo, int hi, int v);
      return v < lo ? lo : (v > hi ? hi : v);
    endfunction

    static function int iabs(int v);
      return v < 0 ? -v : v;
    endfunction

    // s[0..7] = p3 p2 p1 p0 q0 q1 q2 q3
    static function void filt(ref int s[8], input int bs, input int qp, input bit chroma);
      int a, b, tc0, tc, d, ap, aq, P[4], Q[4];
      for (int i = 0; i < 4; i++) begin P[i] = s[3 - i]; Q[i] = s[4 + i]; end
      a   = alpha_tab(qp_t'(qp));
      b   = beta_tab(qp_t'(qp));
      tc0 = tc0_tab(qp_t'(qp), bs_t'(bs));
      if (bs == 0) return;
      if (!(iabs(P[0] - Q[0]) < a && iabs(P[1] - P[0]) < b && iabs(Q[1] - Q[0]) < b)) return;
      ap = iabs(P[2] - P[0]);
      aq = iabs(Q[2] - Q[0]);
      if (bs < 4) begin
        if (chroma) tc = tc0 + 1;
        else tc = tc0 + (ap < b) + (aq < b);
        d = clip3(-tc, tc, ((Q[0] - P[0]) * 4 + (P[1] - Q[1]) + 4) >>> 3);
        s[3] = clip(P[0] + d);
        s[4] = clip(Q[0] - d);
        if (!chroma) begin
          if (ap < b) s[2] = P[1] + clip3(-tc0, tc0, (P[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * P[1]) >>> 1);
          if (aq < b) s[5] = Q[1] + clip3(-tc0, tc0, (Q[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * Q[1]) >>> 1);
        end
      end else begin
        bit strg;
        strg = iabs(P[0] - Q[0]) < ((a >> 2) + 2);
        if (!chroma && ap < b && strg) begin
          s[3] = (P[2] + 2 * P[1] + 2 * P[0] + 2 * Q[0] + Q[1] + 4) >> 3;
          s[2] = (P[2] + P[1] + P[0] + Q[0] + 2) >> 2;
          s[1] = (2 * P[3] + 3 * P[2] + P[1] + P[0] + Q[0] + 4) >> 3;
        end else s[3] = (2 * P[1] + P[0] + Q[1] + 2) >> 2;
        if (!chroma && aq < b && strg) begin
          s[4] = (P[1] + 2 * P[0] + 2 * Q[0] + 2 * Q[1] + Q[2] + 4) >> 3;
          s[5] = (P[0] + Q[0] + Q[1] + Q[2] + 2) >> 2;
          s[6] = (2 * Q[3] + 3 * Q[2] + Q[1] + Q[0] + P[0] + 4) >> 3;
        end else s[4] = (2 * Q[1] + Q[0] + P[1] + 2) >> 2;
      end
    endfunction

    static function int avg(int a, int b);
      return (a + b + 1) >> 1;
    endfunction

    // Filter the whole neighbourhood in standard order.
    function void run_reference();
      int s[8];
      for (int e = 0; e < 4; e++)
        for (int r = 0; r < 16; r++) begin
          for (int i = 0; i < 8; i++) s[i] = y[4 + r][4 * e + i];
          filt(s, bs_v[e][r / 4], e == 0 ? avg(qp_l[0], qp_l[1]) : qp_l[0], 0);
          for (int i = 0; i < 8; i++) y[4 + r][4 * e + i] = s[i];
        end
      for (int e = 0; e < 4; e++)
        for (int x = 0; x < 16; x++) begin
          for (int i = 0; i < 8; i++) s[i] = y[4 * e + i][4 + x];
          filt(s, bs_h[e][x / 4], e == 0 ? avg(qp_l[0], qp_l[2]) : qp_l[0], 0);
          for (int i = 0; i < 8; i++) y[4 * e + i][4 + x] = s[i];
        end
      for (int k = 0; k < 2; k++) begin
        for (int e = 0; e < 2; e++)
          for (int r = 0; r < 8; r++) begin
            for (int i = 0; i < 8; i++) s[i] = c[k][4 + r][4 * e + i];
            filt(s, bs_v[2 * e][r / 2], e == 0 ? avg(qp_c[0], qp_c[1]) : qp_c[0], 1);
            for (int i = 0; i < 8; i++) c[k][4 + r][4 * e + i] = s[i];
          end
        for (int e = 0; e < 2; e++)
          for (int x = 0; x < 8; x++) begin
            for (int i = 0; i < 8; i++) s[i] = c[k][4 * e + i][4 + x];
            filt(s, bs_h[2 * e][x / 2], e == 0 ? avg(qp_c[0], qp_c[2]) : qp_c[0], 1);
            for (int i = 0; i < 8; i++) c[k][4 * e + i][4 + x] = s[i];
          end
      end
    endfunction

    // ------------------------------------------------------------ transfer order
    function bit luma_present(int id);
      if (id < 16) return cur || (l && id % 4 == 0) || (t && id < 4);
      if (id < 20) return t;
      return l;
    endfunction

    function bit chroma_present(int cc);
      if (cc < 4) return cur || (l && cc % 2 == 0) || (t && cc < 2);
      if (cc < 6) return t;
      return l;
    endfunction

    static function void luma_origin(int id, output int r0, output int x0);
      if (id < 16)      begin r0 = 4 + 4 * (id / 4); x0 = 4 + 4 * (id % 4); end
      else if (id < 20) begin r0 = 0; x0 = 4 + 4 * (id - 16); end
      else              begin r0 = 4 + 4 * (id - 20); x0 = 0; end
    endfunction

    static function void chroma_origin(int cc, output int r0, output int x0);
      if (cc < 4)      begin r0 = 4 + 4 * (cc / 2); x0 = 4 + 4 * (cc % 2); end
      else if (cc < 6) begin r0 = 0; x0 = 4 + 4 * (cc - 4); end
      else             begin r0 = 4 + 4 * (cc - 6); x0 = 0; end
    endfunction

    // Row words of a block from the original (orig=1) or filtered pixels.
    function pix4_t luma_word(int id, int row, bit orig);
      int r0, x0;
      pix4_t w;
      luma_origin(id, r0, x0);
      for (int i = 0; i < 4; i++) w[i] = pix_t'(orig ? y0[r0 + row][x0 + i] : y[r0 + row][x0 + i]);
      return w;
    endfunction

    function pix4_t chroma_word(int k, int cc, int row, bit orig);
      int r0, x0;
      pix4_t w;
      chroma_origin(cc, r0, x0);
      for (int i = 0; i < 4; i++) w[i] = pix_t'(orig ? c0[k][r0 + row][x0 + i] : c[k][r0 + row][x0 + i]);
      return w;
    endfunction

    // Word streams: pass 0 luma in, 1 luma out, 2 chroma in, 3 chroma out.
    function void stream(int pass, output pix4_t q[$], input bit orig);
      int lh[24] = '{16,17,18,19, 20,0,1,2,3, 21,4,5,6,7, 22,8,9,10,11, 23,12,13,14,15};
      int lv[24] = '{16,0,4,8,12, 17,1,5,9,13, 18,2,6,10,14, 19,3,7,11,15, 20,21,22,23};
      int ch[8]  = '{4,5,6,0,1,7,2,3};
      int cv[8]  = '{4,0,2,5,1,3,6,7};
      q.delete();
      if (pass < 2) begin
        for (int n = 0; n < 24; n++) begin
          int id;
          id = (pass == 0) ? lh[n] : lv[n];
          if (luma_present(id))
            for (int r = 0; r < 4; r++) q.push_back(luma_word(id, r, orig));
        end
      end else begin
        for (int k = 0; k < 2; k++)
          for (int n = 0; n < 8; n++) begin
            int cc;
            cc = (pass == 2) ? ch[n] : cv[n];
            if (chroma_present(cc))
              for (int r = 0; r < 4; r++) q.push_back(chroma_word(k, cc, r, orig));
          end
      end
    endfunction

    function dbf_mode_e mode();
      return mode_of(l, t, cur);
    endfunction

    function logic [3:0][3:0][2:0] packed_bs_v();
      logic [3:0][3:0][2:0] r;
      for (int e = 0; e < 4; e++) for (int b = 0; b < 4; b++) r[e][b] = bs_v[e][b];
      return r;
    endfunction

    function logic [3:0][3:0][2:0] packed_bs_h();
      logic [3:0][3:0][2:0] r;
      for (int e = 0; e < 4; e++) for (int b = 0; b < 4; b++) r[e][b] = bs_h[e][b];
      return r;
    endfunction
  endclass

endpackage
