// dbf_accel: the bus-interleaved deblocking filter accelerator as an AHB slave.
//
// The CPU (bus master) drives one macroblock through it:
//   1. write the side information of the macroblock (QPs and one word per
//      4x4 block, see dbf_bs_unit) and set CTRL.calc; the bS unit computes
//      the 32 edge strengths and the filtering mode of the document's Table 8;
//   2. read STATUS for the mode, set CTRL.start, and stream in the blocks that
//      the mode needs (DIN) while reading the filtered words back (DOUT). In
//      skip mode nothing is transferred. Input and filtering overlap: a word
//      is filtered in the cycle after it arrives.
// The bS of the next macroblock may be computed while the current one is
// being filtered, since the filter takes a copy at start.
//
// Register map (byte offsets, 32-bit accesses):
//   0x000 DIN    write  pixel word into the input port (wait states when full)
//   0x004 DOUT   read   filtered pixel word (wait states until one is ready)
//   0x008 CTRL   write  bit0 start, bit1 calc bS, bit2 current blocks come
//                       from the reconstruction stream instead of DIN
//         STATUS read   bit0 filter busy, bit1 bS busy, bit2 bS done,
//                       bit3 macroblock done (sticky, cleared by start),
//                       bits 6:4 filtering mode
//   0x080 + 4*i  write  side information word i, i = 0..25
// The register map, the wait-state behaviour and the port FIFO depths are
// this design's choices; the document specifies a 32-bit AHB slave with an
// input and an output port. AHB-Lite subset: HRESP is always OKAY, HSIZE
// and HBURST are ignored (word accesses), bursts work as back-to-back beats.
// HRESETn is also used in the disable condition of the bus-rule assertions,
// which lint reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only asynchronously.
module dbf_accel
  import dbf_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 4,
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [11:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic [1:0]  HRESP,
  // reconstruction stream from the IQ-IDCT accelerator
  input  logic        cur_valid,
  input  pix4_t       cur_data,
  output logic        cur_ready,
  // status
  output logic        mb_done,
  output dbf_mode_e   mode,
  output logic        filt_event
);

  localparam logic [11:0] A_DIN  = 12'h000;
  localparam logic [11:0] A_DOUT = 12'h004;
  localparam logic [11:0] A_CTRL = 12'h008;

  // ------------------------------------------------------------ AHB data phase
  logic        dp_v, dp_w;
  logic [11:0] dp_a;
  logic        stall, complete;
  logic        in_full, in_empty, out_full, out_empty;
  logic [$clog2(IN_DEPTH):0]  in_cnt;
  logic [$clog2(OUT_DEPTH):0] out_cnt;
  pix4_t       in_head, out_head;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_v <= 1'b0;
      dp_w <= 1'b0;
      dp_a <= '0;
    end else if (HREADY) begin
      dp_v <= HSEL && HTRANS[1];
      dp_w <= HWRITE;
      dp_a <= {HADDR[11:2], 2'b00};
    end
  end

  assign stall     = dp_v && ((dp_w && dp_a == A_DIN && in_full) ||
                              (!dp_w && dp_a == A_DOUT && out_empty));
  assign complete  = dp_v && !stall;
  assign HREADYOUT = !stall;
  assign HRESP     = 2'b00;

  // ------------------------------------------------------------ control registers
  logic start, calc, cur_sel, done_sticky;
  logic core_busy, core_done, bs_busy, bs_done;
  logic wr_info;

  assign start   = complete && dp_w && dp_a == A_CTRL && HWDATA[0];
  assign calc    = complete && dp_w && dp_a == A_CTRL && HWDATA[1];
  assign wr_info = complete && dp_w && dp_a[11:7] == 5'b00001;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      cur_sel     <= 1'b0;
      done_sticky <= 1'b0;
    end else begin
      if (complete && dp_w && dp_a == A_CTRL) cur_sel <= HWDATA[2];
      if (start)          done_sticky <= 1'b0;
      else if (core_done) done_sticky <= 1'b1;
    end
  end

  always_comb begin
    unique case (dp_a)
      A_DOUT:  HRDATA = out_head;
      A_CTRL:  HRDATA = {25'd0, mode, done_sticky, bs_done, bs_busy, core_busy};
      default: HRDATA = '0;
    endcase
  end

  assign mb_done = core_done;

  // ------------------------------------------------------------ bS unit
  bs_t [3:0][3:0] bs_v, bs_h;
  qp_t [2:0]      qp_luma, qp_chroma;

  dbf_bs_unit u_bs (
    .clk       (HCLK),
    .rst_n     (HRESETn),
    .wr_en     (wr_info),
    .wr_idx    (dp_a[6:2]),
    .wr_data   (HWDATA),
    .calc      (calc),
    .busy      (bs_busy),
    .done      (bs_done),
    .bs_v, .bs_h, .qp_luma, .qp_chroma,
    .mode      (mode)
  );

  // ------------------------------------------------------------ ports and core
  logic  in_ready, out_valid, out_stall;
  pix4_t out_data;

  sync_fifo #(.W(32), .DEPTH(IN_DEPTH)) u_in (
    .clk (HCLK), .rst_n (HRESETn),
    .push  (complete && dp_w && dp_a == A_DIN),
    .wdata (HWDATA),
    .pop   (in_ready),
    .rdata (in_head),
    .full  (in_full), .empty (in_empty), .count (in_cnt)
  );

  sync_fifo #(.W(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk (HCLK), .rst_n (HRESETn),
    .push  (out_valid),
    .wdata (out_data),
    .pop   (complete && !dp_w && dp_a == A_DOUT),
    .rdata (out_head),
    .full  (out_full), .empty (out_empty), .count (out_cnt)
  );

  // the core issues a word one cycle before it reaches the output FIFO
  assign out_stall = out_cnt >= ($clog2(OUT_DEPTH)+1)'(OUT_DEPTH - 1);

  dbf_core u_core (
    .clk (HCLK), .rst_n (HRESETn),
    .start, .mode, .bs_v, .bs_h, .qp_luma, .qp_chroma,
    .cur_from_stream (start ? HWDATA[2] : cur_sel),
    .busy (core_busy), .done (core_done),
    .in_valid (!in_empty), .in_data (in_head), .in_ready,
    .cur_valid, .cur_data, .cur_ready,
    .out_stall, .out_valid, .out_data,
    .filt_event
  );

  a_out_no_overflow: assert property (@(posedge HCLK) disable iff (!HRESETn) !(out_valid && out_full));

endmodule
