// bs_calc: boundary strength (bS) of one edge between two adjacent 4x4 blocks P and Q.
//
// The document states the levels 0..4, that bS = 4 is chosen for intra
// blocks on a macroblock boundary and that bS = 0 means no filtering; its
// full decision flow follows the H.264/MPEG-4 AVC standard for the baseline
// profile (one motion vector per block, P slices), which is what this unit
// implements:
//   either block intra        -> 4 on a macroblock edge, 3 inside
//   either block has coeffs   -> 2
//   different reference, or a motion vector component differing by 4 or more
//   quarter pels              -> 1
//   otherwise                 -> 0
// An edge to a block that is not available (picture border) gets 0.
// Purely combinational.
module bs_calc
  import dbf_pkg::*;
(
  input  blk_info_t p,
  input  blk_info_t q,
  input  logic      mb_edge,
  output bs_t       bs
);

  logic signed [12:0] dx, dy;
  logic               mv_far;

  always_comb begin
    dx = 13'(p.mvx) - 13'(q.mvx);
    dy = 13'(p.mvy) - 13'(q.mvy);
    mv_far = (dx >= 13'sd4) || (dx <= -13'sd4) || (dy >= 13'sd4) || (dy <= -13'sd4);
    if (!p.avail || !q.avail)      bs = 3'd0;
    else if (p.intra || q.intra)   bs = mb_edge ? 3'd4 : 3'd3;
    else if (p.nz || q.nz)         bs = 3'd2;
    else if ((p.ref_id != q.ref_id) || mv_far) bs = 3'd1;
    else                           bs = 3'd0;
  end

endmodule
