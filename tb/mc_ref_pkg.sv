// mc_ref_pkg: reference interpolation for the motion compensation testbenches.
//
// The standard's luma quarter-sample interpolation, written with its named
// sample positions (G, b, h, j, s, m and the quarter positions a..r), and
// its chroma eighth-sample bilinear interpolation, plus the packing of a
// reference window into the accelerator's memory words.
package mc_ref_pkg;

  function automatic int clip1(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int t6(int e, int f, int g, int h, int i, int j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction

  // luma sample at quarter position (fx, fy) for the pixel whose integer
  // sample G sits at window (r, c)
  function automatic int luma_ref(int w[9][9], int r, int c, int fx, int fy);
    int G, H, M, b, h, m, s, j, bb1[6];
    G = w[r][c]; H = w[r][c + 1]; M = w[r + 1][c];
    for (int k = 0; k < 6; k++)
      bb1[k] = t6(w[r - 2 + k][c - 2], w[r - 2 + k][c - 1], w[r - 2 + k][c],
                  w[r - 2 + k][c + 1], w[r - 2 + k][c + 2], w[r - 2 + k][c + 3]);
    b = clip1((bb1[2] + 16) >>> 5);
    s = clip1((bb1[3] + 16) >>> 5);
    h = clip1((t6(w[r-2][c], w[r-1][c], w[r][c], w[r+1][c], w[r+2][c], w[r+3][c]) + 16) >>> 5);
    m = clip1((t6(w[r-2][c+1], w[r-1][c+1], w[r][c+1], w[r+1][c+1], w[r+2][c+1], w[r+3][c+1]) + 16) >>> 5);
    j = clip1((t6(bb1[0], bb1[1], bb1[2], bb1[3], bb1[4], bb1[5]) + 512) >>> 10);
    case ({fy[1:0], fx[1:0]})
      4'b0000: return G;
      4'b0001: return (G + b + 1) >> 1;   // a
      4'b0010: return b;
      4'b0011: return (H + b + 1) >> 1;   // c
      4'b0100: return (G + h + 1) >> 1;   // d
      4'b0101: return (b + h + 1) >> 1;   // e
      4'b0110: return (b + j + 1) >> 1;   // f
      4'b0111: return (b + m + 1) >> 1;   // g
      4'b1000: return h;
      4'b1001: return (h + j + 1) >> 1;   // i
      4'b1010: return j;
      4'b1011: return (j + m + 1) >> 1;   // k
      4'b1100: return (M + h + 1) >> 1;   // n
      4'b1101: return (h + s + 1) >> 1;   // p
      4'b1110: return (j + s + 1) >> 1;   // q
      default: return (m + s + 1) >> 1;   // r
    endcase
  endfunction

  function automatic int chroma_ref(int cw[3][3], int y, int x, int dx, int dy);
    return ((8 - dx) * (8 - dy) * cw[y][x] + dx * (8 - dy) * cw[y][x + 1] +
            (8 - dx) * dy * cw[y + 1][x] + dx * dy * cw[y + 1][x + 1] + 32) >> 6;
  endfunction

  // 33 window words: luma rows of three words, then Cb and Cr rows
  function automatic void pack_window(int w[9][9], int cw[2][3][3], output logic [31:0] wq[$]);
    wq = {};
    for (int r = 0; r < 9; r++)
      for (int k = 0; k < 3; k++) begin
        logic [31:0] word;
        word = '0;
        for (int e = 0; e < 4; e++) if (4 * k + e < 9) word[8*e +: 8] = 8'(w[r][4 * k + e]);
        wq.push_back(word);
      end
    for (int k = 0; k < 2; k++)
      for (int r = 0; r < 3; r++)
        wq.push_back({8'd0, 8'(cw[k][r][2]), 8'(cw[k][r][1]), 8'(cw[k][r][0])});
  endfunction

endpackage
