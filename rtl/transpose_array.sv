// transpose_array: 4x4 transposing register array without stalls (Reg2).
//
// A block enters as four words (rows) and leaves as four words that are its
// columns. As the document describes for Reg2, the array alternates between
// Horizontal-In-Vertical-Out and Vertical-In-Horizontal-Out: when word i of a
// new block is pushed, word i of the previous block's transpose is popped
// from the same physical slot (a column of the array in one orientation, a
// row in the other), so the new block fills exactly the space the old one
// frees and no cycle is lost. After every fourth push the orientation flips.
//
// Interface: push with word index push_idx (0..3, in order) and push_data;
// pop_data is combinational and is the transposed word push_idx of the block
// pushed before the current one. Element e of a word is bits [e*EW +: EW].
// The element width EW is a parameter: 8 for pixels, wider for transform
// values in the IQ-IDCT accelerator.
module transpose_array #(
  parameter int unsigned EW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  logic [1:0]      push_idx,
  input  logic [4*EW-1:0] push_data,
  output logic [4*EW-1:0] pop_data
);

  logic [EW-1:0] m [4][4];   // physical array m[row][col]
  logic          orient;     // 0: block stored row-wise, 1: column-wise

  always_comb begin
    for (int e = 0; e < 4; e++)
      pop_data[e*EW +: EW] = orient ? m[push_idx][e] : m[e][push_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orient <= 1'b0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) m[r][c] <= '0;
    end else if (push) begin
      for (int e = 0; e < 4; e++) begin
        if (orient) m[push_idx][e] <= push_data[e*EW +: EW];
        else        m[e][push_idx] <= push_data[e*EW +: EW];
      end
      if (push_idx == 2'd3) orient <= ~orient;
    end
  end

endmodule
