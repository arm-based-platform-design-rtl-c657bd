// sp_sram: single-ported local SRAM of the deblocking accelerator (96x32 bits).
//
// One access per cycle, read or write. A read returns the word on the next
// cycle (synchronous read, as an SRAM macro would); a write stores on the
// clock edge. Depth and width default to the document's 96x32. Written as
// an array so a synthesis tool maps it to a memory macro or block RAM; its
// contents are not reset.
module sp_sram #(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end

endmodule
