// ahb_decoder: AHB-Lite address decoder and read-back multiplexer for the accelerators.
//
// Each slave owns a 4 KB window: slave i answers at addresses whose bits
// 12 and up, within the accelerator region, equal i. The decoder drives one
// HSEL per slave in the address phase, registers the selection, and in the
// data phase routes the selected slave's HRDATA, HREADYOUT and HRESP back to
// the master. HREADY (the bus-wide ready that every slave sees) is the
// selected slave's HREADYOUT. An address outside every window goes to a
// built-in default slave, which answers an actual transfer with the
// two-cycle ERROR response of the AHB protocol and an idle transfer with a
// zero-wait OKAY.
// The document describes the decoder's role (decode the address, select a
// slave and its response signals); the 4 KB windows, their order and the
// default slave are this design's choices.
// HRESETn is also used in the disable condition of the one-hot assertion on
// HSEL, which lint reports as a reset used both synchronously and
// asynchronously; the flops themselves use it only asynchronously.
module ahb_decoder #(
  parameter int unsigned NS = 2     // number of slaves
) (
  input  logic                HCLK,
  input  logic                HRESETn,
  input  logic [31:0]         HADDR,
  input  logic [1:0]          HTRANS,
  output logic [NS-1:0]       HSEL,
  // from the slaves
  input  logic [NS-1:0][31:0] S_HRDATA,
  input  logic [NS-1:0]       S_HREADYOUT,
  input  logic [NS-1:0][1:0]  S_HRESP,
  // to the master and back to every slave
  output logic [31:0]         HRDATA,
  output logic                HREADY,
  output logic [1:0]          HRESP
);

  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic          hit;
  logic [SW-1:0] idx;
  logic [SW-1:0] dp_idx;
  logic          dp_hit;
  logic          def_err;    // default slave: ERROR response in progress
  logic          def_first;  // first cycle of that response

  always_comb begin
    idx  = HADDR[12 +: SW];
    hit  = (HADDR[31:12] < 20'(NS));
    HSEL = '0;
    if (hit) HSEL[idx] = 1'b1;
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_idx    <= '0;
      dp_hit    <= 1'b1;
      def_err   <= 1'b0;
      def_first <= 1'b0;
    end else begin
      if (HREADY) begin
        dp_idx    <= idx;
        dp_hit    <= hit;
        def_err   <= !hit && HTRANS[1];
        def_first <= !hit && HTRANS[1];
      end else if (def_first) begin
        def_first <= 1'b0;
      end
    end
  end

  always_comb begin
    if (dp_hit) begin
      HRDATA = S_HRDATA[dp_idx];
      HREADY = S_HREADYOUT[dp_idx];
      HRESP  = S_HRESP[dp_idx];
    end else begin
      HRDATA = '0;
      HREADY = !(def_err && def_first);
      HRESP  = def_err ? 2'b01 : 2'b00;
    end
  end

  // a selection always names an existing slave
  a_onehot: assert property (@(posedge HCLK) disable iff (!HRESETn) $onehot0(HSEL));

endmodule
