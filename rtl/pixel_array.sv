// pixel_array: the 4x4 pixel array Reg1 of the deblocking accelerator.
//
// Holds one 4x4 block as four row words. While an edge is filtered row by
// row, row i is read (the p side of the filter window) and, in the same
// clock edge, overwritten with the q-side intermediate result of the filter,
// so the array always holds the block the next edge will need. Read is
// combinational, write is synchronous. Word width is a parameter so the same
// array serves the 8-bit pixel datapath.
module pixel_array #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [1:0]   idx,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);

  logic [W-1:0] rows [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) rows[i] <= '0;
    end else if (we) begin
      rows[idx] <= wdata;
    end
  end

  assign rdata = rows[idx];

endmodule
