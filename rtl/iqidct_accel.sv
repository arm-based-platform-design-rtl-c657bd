// iqidct_accel: bus-interleaved inverse quantisation, inverse transform and reconstruction.
//
// The CPU writes the quantised coefficients of a 4x4 block row by row; each
// row is dequantised and transformed horizontally by the first 1-D inverse
// transform in the cycle it leaves the input FIFO, and written into a 4x4
// transposing buffer. While the next block's rows go in, the previous block
// leaves the buffer column by column into the second 1-D inverse transform,
// so both transform units are busy every cycle, as the document describes.
// A second transposing buffer turns the result columns back into rows, to
// which the prediction is added (reconstruction, clipped to 0..255). Rows of
// the reconstructed block leave either on the stream port, which feeds the
// deblocking accelerator directly (no macroblock buffer in between), or into
// a FIFO the CPU reads.
//
// Throughput one row per cycle; a block's rows leave 8 cycles after they
// enter, so 24 blocks (one macroblock, 4:2:0) take 96 + 8 = 104 cycles when
// the bus keeps up, the figure the document gives.
//
// Register map (byte offsets):
//   0x000 COEF  write  one coefficient row: four signed 8-bit levels, level j in
//                      bits [8j+7:8j]; tagged with the current QP and route
//   0x004 PRED  write  one prediction row, four pixels
//   0x008 CTRL  write  bits 5:0 QP for following rows, bit 8 route to stream
//         STATUS read  bit0 busy (rows in flight), bits 15:8 rows read back available
//   0x00C RES   read   reconstructed row (wait states until one is ready)
// Dequantisation: d = level * v(QP%6, position) << (QP/6), flat scaling, as
// in the standard; intra 16x16 and chroma DC Hadamard stages are not part of
// this unit. The 8-bit level format, the register map and the route bit are
// this design's choices.
// HRESETn also reaches the disable condition of the FIFOs' assertions,
// which lint may report as a reset used both synchronously and asynchronously;
// the flops themselves use it only asynchronously.
module iqidct_accel
  import dbf_pkg::*;
#(
  parameter int unsigned COEF_DEPTH = 4,
  parameter int unsigned PRED_DEPTH = 16,
  parameter int unsigned RES_DEPTH  = 8
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
  // reconstructed rows to the deblocking accelerator
  output logic        rec_valid,
  output pix4_t       rec_data,
  input  logic        rec_ready
);

  localparam logic [11:0] A_COEF = 12'h000;
  localparam logic [11:0] A_PRED = 12'h004;
  localparam logic [11:0] A_CTRL = 12'h008;
  localparam logic [11:0] A_RES  = 12'h00C;

  // ------------------------------------------------------------ AHB data phase
  logic        dp_v, dp_w;
  logic [11:0] dp_a;
  logic        stall, complete;
  logic        coef_full, coef_empty, pred_full, pred_empty, res_full, res_empty;
  logic [$clog2(COEF_DEPTH):0] coef_cnt;
  logic [$clog2(PRED_DEPTH):0] pred_cnt;
  logic [$clog2(RES_DEPTH):0]  res_cnt;
  logic [38:0] coef_head;
  pix4_t       pred_head, res_head;
  qp_t         qp_reg;
  logic        route_reg;

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

  assign stall = dp_v && ((dp_w && dp_a == A_COEF && coef_full) ||
                          (dp_w && dp_a == A_PRED && pred_full) ||
                          (!dp_w && dp_a == A_RES && res_empty));
  assign complete  = dp_v && !stall;
  assign HREADYOUT = !stall;
  assign HRESP     = 2'b00;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      qp_reg    <= '0;
      route_reg <= 1'b0;
    end else if (complete && dp_w && dp_a == A_CTRL) begin
      qp_reg    <= HWDATA[5:0];
      route_reg <= HWDATA[8];
    end
  end

  // ------------------------------------------------------------ pipeline control
  logic       fire, blk_real, row_real;
  logic [1:0] row;
  logic       t1_v, t2_v, t1_route, t2_route;   // block held in each buffer is real / its route
  logic       t2_pop_v;
  logic       in_flight;

  assign in_flight = t1_v || t2_v || (row != 2'd0);
  // a block starts as real when a row is waiting, as a flush bubble when the
  // buffers still hold real blocks and nothing is waiting
  assign row_real = (row == 2'd0) ? !coef_empty : blk_real;
  assign t2_pop_v = t2_v;

  // can_go: everything but the stream's ready is in place; rec_valid is
  // derived from it so that valid never depends on ready
  logic out_ok, can_go;
  assign out_ok = !t2_pop_v || (!pred_empty && (t2_route || !res_full));

  always_comb begin
    if (row == 2'd0) can_go = (!coef_empty || t1_v || t2_v) && out_ok;
    else             can_go = (!blk_real || !coef_empty) && out_ok;
  end

  assign fire = can_go && (!(t2_pop_v && t2_route) || rec_ready);

  // ------------------------------------------------------------ stage 1: IQ + row transform
  logic [63:0] dq_row, row_f, col_in, col_f;
  qp_t         cur_qp;
  logic [2:0]  qdiv, qmod;

  assign cur_qp = coef_head[37:32];

  always_comb begin
    qdiv = 3'(cur_qp / 6);
    qmod = 3'(cur_qp % 6);
    for (int j = 0; j < 4; j++) begin
      logic signed [7:0]  lev;
      logic signed [31:0] dv;
      logic [1:0] cls;
      lev = coef_head[8*j +: 8];
      cls = (row[0] == 1'b0 && j % 2 == 0) ? 2'd0 : (row[0] == 1'b1 && j % 2 == 1) ? 2'd1 : 2'd2;
      dv  = (32'(lev) * $signed({27'd0, dq_scale(qmod, cls)})) <<< qdiv;
      dq_row[16*j +: 16] = row_real ? dv[15:0] : 16'd0;
    end
  end

  idct4_1d u_idct_row (.d(dq_row), .f(row_f));

  transpose_array #(.EW(16)) u_tbuf (
    .clk (HCLK), .rst_n (HRESETn),
    .push (fire), .push_idx (row), .push_data (row_f), .pop_data (col_in)
  );

  // ------------------------------------------------------------ stage 2: column transform
  idct4_1d u_idct_col (.d(col_in), .f(col_f));

  logic [63:0] res_col, res_row;
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic signed [15:0] v;
      v = col_f[16*j +: 16];
      res_col[16*j +: 16] = 16'((v + 16'sd32) >>> 6);
    end
  end

  transpose_array #(.EW(16)) u_rbuf (
    .clk (HCLK), .rst_n (HRESETn),
    .push (fire), .push_idx (row), .push_data (res_col), .pop_data (res_row)
  );

  // ------------------------------------------------------------ reconstruction
  pix4_t rec;
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic signed [16:0] s;
      s = 17'(signed'(res_row[16*j +: 16])) + 17'({9'd0, pred_head[j]});
      rec[j] = (s < 0) ? 8'd0 : (s > 17'sd255) ? 8'd255 : 8'(s);
    end
  end

  assign rec_valid = can_go && t2_pop_v && t2_route;
  assign rec_data  = rec;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      row      <= '0;
      blk_real <= 1'b0;
      t1_v <= 1'b0; t2_v <= 1'b0; t1_route <= 1'b0; t2_route <= 1'b0;
    end else if (fire) begin
      row <= row + 2'd1;
      if (row == 2'd0) blk_real <= !coef_empty;
      if (row == 2'd3) begin
        t2_v     <= t1_v;
        t2_route <= t1_route;
        t1_v     <= blk_real;
        t1_route <= coef_head[38];
      end
    end
  end

  // ------------------------------------------------------------ FIFOs
  sync_fifo #(.W(39), .DEPTH(COEF_DEPTH)) u_coef (
    .clk (HCLK), .rst_n (HRESETn),
    .push  (complete && dp_w && dp_a == A_COEF),
    .wdata ({route_reg, qp_reg, HWDATA}),
    .pop   (fire && row_real),
    .rdata (coef_head),
    .full  (coef_full), .empty (coef_empty), .count (coef_cnt)
  );

  sync_fifo #(.W(32), .DEPTH(PRED_DEPTH)) u_pred (
    .clk (HCLK), .rst_n (HRESETn),
    .push  (complete && dp_w && dp_a == A_PRED),
    .wdata (HWDATA),
    .pop   (fire && t2_pop_v),
    .rdata (pred_head),
    .full  (pred_full), .empty (pred_empty), .count (pred_cnt)
  );

  sync_fifo #(.W(32), .DEPTH(RES_DEPTH)) u_res (
    .clk (HCLK), .rst_n (HRESETn),
    .push  (fire && t2_pop_v && !t2_route),
    .wdata (rec),
    .pop   (complete && !dp_w && dp_a == A_RES),
    .rdata (res_head),
    .full  (res_full), .empty (res_empty), .count (res_cnt)
  );

  always_comb begin
    unique case (dp_a)
      A_RES:   HRDATA = res_head;
      A_CTRL:  HRDATA = {16'd0, 8'(res_cnt), 7'd0, in_flight};
      default: HRDATA = '0;
    endcase
  end

endmodule
