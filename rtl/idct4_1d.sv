// idct4_1d: one-dimensional 4-point inverse integer transform of H.264/MPEG-4 AVC.
//
// Implements the butterfly form of the inverse transform matrix printed in
// the document (rows 1 1 1 1/2, 1 1/2 -1 -1, 1 -1/2 -1 1, 1 -1 1 -1/2):
//   e0 = d0 + d2,      e1 = d0 - d2,
//   e2 = (d1 >> 1) - d3, e3 = d1 + (d3 >> 1),
//   f0 = e0 + e3, f1 = e1 + e2, f2 = e1 - e2, f3 = e0 - e3.
// Only additions, subtractions and shifts, as the document notes. Element k of
// a vector is bits [16k +: 16], signed. Combinational.
module idct4_1d (
  input  logic [63:0] d,
  output logic [63:0] f
);

  logic signed [15:0] d0, d1, d2, d3, e0, e1, e2, e3;

  always_comb begin
    d0 = d[15:0];
    d1 = d[31:16];
    d2 = d[47:32];
    d3 = d[63:48];
    e0 = d0 + d2;
    e1 = d0 - d2;
    e2 = (d1 >>> 1) - d3;
    e3 = d1 + (d3 >>> 1);
    f  = {16'(e0 - e3), 16'(e1 - e2), 16'(e1 + e2), 16'(e0 + e3)};
  end

endmodule
