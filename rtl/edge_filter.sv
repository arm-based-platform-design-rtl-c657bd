// edge_filter: the one-dimensional adaptive FIR filter of the deblocking accelerator.
//
// Takes the 8 pixels of one row (or column) that straddle an edge between two
// 4x4 blocks, p3 p2 p1 p0 | q0 q1 q2 q3, and returns the 8 filtered pixels. As
// the document describes, the filter is applied only when bS != 0 and
// |p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta (its Equation (1)); for
// bS < 4 at most p1 p0 q0 q1 change, for bS = 4 the strong filter may change
// up to three pixels per side. The filter taps, the clipping with tC and the
// alpha/beta/tC0 tables are those of the H.264/MPEG-4 AVC standard, which the
// document refers to but does not print. Chroma uses the chroma variant (only
// p0 and q0 change). FilterOffsetA/B are taken as 0.
//
// Interface: p_in is the word of the block on the left (above), so p0 is its
// element 3; q_in is the word of the block on the right (below), q0 is its
// element 0. qp is the averaged QP of the edge. Purely combinational; the
// accelerator registers around it.
module edge_filter
  import dbf_pkg::*;
(
  input  pix4_t p_in,
  input  pix4_t q_in,
  input  bs_t   bs,
  input  qp_t   qp,
  input  logic  chroma,
  output pix4_t p_out,
  output pix4_t q_out,
  output logic  filtered    // the edge passed the Equation (1) test
);

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    logic signed [31:0] p0, p1, p2, p3, q0, q1, q2, q3;
    logic signed [31:0] alpha, beta, tc0, tc, delta, ap, aq;
    p3 = int'(p_in[0]); p2 = int'(p_in[1]); p1 = int'(p_in[2]); p0 = int'(p_in[3]);
    q0 = int'(q_in[0]); q1 = int'(q_in[1]); q2 = int'(q_in[2]); q3 = int'(q_in[3]);
    alpha = int'(alpha_tab(qp));
    beta  = int'(beta_tab(qp));
    tc0   = int'(tc0_tab(qp, bs));
    ap    = absd(p2, p0);
    aq    = absd(q2, q0);
    p_out = p_in;
    q_out = q_in;
    filtered = (bs != 3'd0) && (absd(p0, q0) < alpha) &&
               (absd(p1, p0) < beta) && (absd(q1, q0) < beta);
    tc = 0;
    delta = 0;
    if (filtered) begin
      if (bs < 3'd4) begin
        tc = chroma ? tc0 + 1 : tc0 + ((ap < beta) ? 1 : 0) + ((aq < beta) ? 1 : 0);
        delta = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        p_out[3] = pix_t'(clip3(0, 255, p0 + delta));
        q_out[0] = pix_t'(clip3(0, 255, q0 - delta));
        if (!chroma && ap < beta)
          p_out[2] = pix_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - (p1 * 2)) >>> 1));
        if (!chroma && aq < beta)
          q_out[1] = pix_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - (q1 * 2)) >>> 1));
      end else begin
        if (!chroma && ap < beta && absd(p0, q0) < ((alpha >>> 2) + 2)) begin
          p_out[3] = pix_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          p_out[2] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          p_out[1] = pix_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          p_out[3] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        end
        if (!chroma && aq < beta && absd(p0, q0) < ((alpha >>> 2) + 2)) begin
          q_out[0] = pix_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          q_out[1] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          q_out[2] = pix_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          q_out[0] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
  end

endmodule
