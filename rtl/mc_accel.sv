// mc_accel: quarter-pel motion compensation interpolation accelerator (AHB slave).
//
// The CPU places reference pixels in a local memory of 1500 integer pixels
// (375 words) and starts one iteration per 4x4 block, 16 iterations per
// macroblock. An iteration reads a window of 33 words from the memory into
// registers and then two engines work side by side, one output pixel per
// cycle each:
//   - luma engine: the 6-tap filter (1,-5,20,20,-5,1) for the half-pel
//     samples, applied horizontally on six rows, vertically on two columns
//     and once more on the horizontal intermediates for the centre sample,
//     then the bilinear average of two neighbouring samples for the
//     quarter-pel positions; the multiplications by 5 and 20 are hardwired
//     shifts and adds;
//   - chroma engine: eighth-pel bilinear interpolation of a 2x2 block of each
//     chroma component.
// The results, four luma rows and one word per chroma component, go to an
// output FIFO that the CPU reads.
//
// Window layout (word offsets from the start address given with the command):
//   0..26   luma rows 0..8, three words each, pixels 0..8 used; the 4x4
//           block's integer position is row 2, pixel 2 of the window
//   27..29  Cb rows 0..2, pixels 0..2 used
//   30..32  Cr rows 0..2
// Register map (byte offsets):
//   0x000 CMD    write  start an iteration: bits 8:0 window start word,
//                       10:9 luma x fraction, 12:11 luma y fraction (quarter
//                       pel), 15:13 chroma x fraction, 18:16 chroma y
//                       fraction (eighth pel); wait states while busy
//   0x004 OUT    read   result words in order luma rows 0..3, Cb, Cr; a chroma
//                       word holds pixels (0,0) (0,1) (1,0) (1,1) in bytes 0..3
//   0x008 STATUS read   bit0 busy, bits 11:8 words waiting in OUT
//   0x400 + 4*i  write  local memory word i, i = 0..374 (wait state while the
//                       engine reads the memory)
// An iteration takes 1 + 33 + 1 + 16 + 2 = 53 cycles, within the 80 cycles
// per 4x4 block that the document's worst case of 1280 cycles per macroblock
// allows.
// The document gives the 1500-pixel memory, the two engines, the 4x4 block
// granularity, 16 iterations per macroblock and the 6-tap and bilinear
// filters; the window layout, the register map, the one-pixel-per-cycle
// schedule and the FIFO are this design's choices. HRESETn is also used in
// an assertion's disable condition, which lint reports as a mixed reset.
module mc_accel
  import dbf_pkg::*;
#(
  parameter int unsigned MEM_PIXELS = 1500,
  parameter int unsigned OUT_DEPTH  = 8
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
  output logic [1:0]  HRESP
);

  localparam int unsigned MEM_WORDS = MEM_PIXELS / 4;
  localparam int unsigned MAW       = $clog2(MEM_WORDS);
  localparam int unsigned WIN_WORDS = 33;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CALC, S_CHROMA} state_e;

  // ------------------------------------------------------------ AHB data phase
  logic        dp_v, dp_w;
  logic [11:0] dp_a;
  logic        stall, complete;
  logic        wr_cmd, wr_mem, rd_out;
  state_e      state;
  logic        out_full, out_empty;
  logic [$clog2(OUT_DEPTH):0] out_cnt;
  logic [31:0] out_head;

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

  logic is_mem;
  assign is_mem = dp_a >= 12'h400 && dp_a < 12'h400 + 12'(4 * MEM_WORDS);

  assign stall = dp_v && ((dp_w && dp_a == 12'h000 && state != S_IDLE) ||
                          (dp_w && is_mem && state == S_LOAD) ||
                          (!dp_w && dp_a == 12'h004 && out_empty));
  assign complete  = dp_v && !stall;
  assign wr_cmd    = complete && dp_w && dp_a == 12'h000;
  assign wr_mem    = complete && dp_w && is_mem;
  assign rd_out    = complete && !dp_w && dp_a == 12'h004;
  assign HREADYOUT = !stall;
  assign HRESP     = 2'b00;

  always_comb begin
    unique case (dp_a)
      12'h004: HRDATA = out_head;
      12'h008: HRDATA = {20'd0, 4'(out_cnt), 7'd0, state != S_IDLE};
      default: HRDATA = '0;
    endcase
  end

  // ------------------------------------------------------------ local memory
  logic           mem_en, mem_we;
  logic [MAW-1:0] mem_addr, ld_addr;
  logic [31:0]    mem_rdata;

  assign mem_en   = wr_mem || state == S_LOAD;
  assign mem_we   = wr_mem;
  assign mem_addr = wr_mem ? MAW'((dp_a - 12'h400) >> 2) : ld_addr;

  sp_sram #(.DEPTH(MEM_WORDS), .WIDTH(32)) u_mem (
    .clk (HCLK), .en (mem_en), .we (mem_we), .addr (mem_addr), .wdata (HWDATA), .rdata (mem_rdata)
  );

  // ------------------------------------------------------------ iteration control
  logic [MAW-1:0] base;
  logic [1:0]     fx, fy;
  logic [2:0]     cdx, cdy;
  logic [5:0]     ld_cnt;      // words requested so far
  logic           ld_q;        // a read issued last cycle
  logic [5:0]     ld_idx;      // its window word index
  logic [3:0]     pix;         // output pixel index 0..15
  pix_t           win [27][4]; // luma window words
  pix_t           cwin [6][4]; // chroma window words
  pix_t           lrow [4];    // luma output row being assembled
  pix_t           crow [2][4]; // chroma outputs
  logic           push;
  logic [31:0]    push_data;

  assign ld_addr = base + MAW'(ld_cnt);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state  <= S_IDLE;
      base   <= '0;
      fx     <= '0;
      fy     <= '0;
      cdx    <= '0;
      cdy    <= '0;
      ld_cnt <= '0;
      ld_q   <= 1'b0;
      ld_idx <= '0;
      pix    <= '0;
    end else begin
      ld_q <= 1'b0;
      unique case (state)
        S_IDLE: if (wr_cmd) begin
          base   <= MAW'(HWDATA[8:0]);
          fx     <= HWDATA[10:9];
          fy     <= HWDATA[12:11];
          cdx    <= HWDATA[15:13];
          cdy    <= HWDATA[18:16];
          ld_cnt <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: begin
          if (ld_cnt < 6'(WIN_WORDS)) begin
            ld_q   <= 1'b1;
            ld_idx <= ld_cnt;
            ld_cnt <= ld_cnt + 6'd1;
          end else if (out_cnt <= ($clog2(OUT_DEPTH)+1)'(OUT_DEPTH - 6)) begin
            // last word arrives this cycle; start once six output slots are free
            pix   <= '0;
            state <= S_CALC;
          end
        end
        S_CALC: begin
          pix <= pix + 4'd1;
          if (pix == 4'd15) begin
            pix   <= '0;
            state <= S_CHROMA;
          end
        end
        S_CHROMA: begin
          pix <= pix + 4'd1;
          if (pix == 4'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // window registers fill from the memory read data
  always_ff @(posedge HCLK) begin
    if (ld_q) begin
      for (int e = 0; e < 4; e++) begin
        if (ld_idx < 6'd27) win[ld_idx[4:0]][e] <= mem_rdata[8*e +: 8];
        else                cwin[3'(ld_idx - 6'd27)][e] <= mem_rdata[8*e +: 8];
      end
    end
  end

  // ------------------------------------------------------------ luma engine
  function automatic pix_t lw(input int r, input int c);
    return win[3 * r + c / 4][c % 4];
  endfunction

  // 6-tap filter with hardwired coefficients 1, -5, 20, 20, -5, 1
  function automatic logic signed [19:0] tap6(input logic signed [19:0] a, b, c, d, e, f);
    logic signed [19:0] s0, s1;
    s0 = c + d;
    s1 = b + e;
    return (a + f) + (s0 <<< 4) + (s0 <<< 2) - (s1 <<< 2) - s1;
  endfunction

  function automatic pix_t clip_pix(input logic signed [19:0] v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : v[7:0];
  endfunction

  function automatic pix_t avg2(input pix_t a, input pix_t b);
    return pix_t'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  logic [1:0]         py, px;
  logic signed [19:0] b1 [6];
  logic signed [19:0] h1, m1, j1;
  pix_t               G, H, M, bb, ss, hh, mm, jj, lpix;

  assign py = pix[3:2];
  assign px = pix[1:0];

  always_comb begin
    int iy, ix;
    iy = int'(py);
    ix = int'(px);
    // 6x6 neighbourhood: window rows iy..iy+5, columns ix..ix+5; G at (2,2) of it
    for (int r = 0; r < 6; r++)
      b1[r] = tap6(20'(lw(iy + r, ix)),     20'(lw(iy + r, ix + 1)), 20'(lw(iy + r, ix + 2)),
                   20'(lw(iy + r, ix + 3)), 20'(lw(iy + r, ix + 4)), 20'(lw(iy + r, ix + 5)));
    h1 = tap6(20'(lw(iy, ix + 2)), 20'(lw(iy + 1, ix + 2)), 20'(lw(iy + 2, ix + 2)),
              20'(lw(iy + 3, ix + 2)), 20'(lw(iy + 4, ix + 2)), 20'(lw(iy + 5, ix + 2)));
    m1 = tap6(20'(lw(iy, ix + 3)), 20'(lw(iy + 1, ix + 3)), 20'(lw(iy + 2, ix + 3)),
              20'(lw(iy + 3, ix + 3)), 20'(lw(iy + 4, ix + 3)), 20'(lw(iy + 5, ix + 3)));
    j1 = tap6(b1[0], b1[1], b1[2], b1[3], b1[4], b1[5]);
    G  = lw(iy + 2, ix + 2);
    H  = lw(iy + 2, ix + 3);
    M  = lw(iy + 3, ix + 2);
    bb = clip_pix((b1[2] + 20'sd16) >>> 5);
    ss = clip_pix((b1[3] + 20'sd16) >>> 5);
    hh = clip_pix((h1 + 20'sd16) >>> 5);
    mm = clip_pix((m1 + 20'sd16) >>> 5);
    jj = clip_pix((j1 + 20'sd512) >>> 10);
    unique case ({fy, fx})
      4'b00_00: lpix = G;
      4'b00_01: lpix = avg2(G, bb);
      4'b00_10: lpix = bb;
      4'b00_11: lpix = avg2(H, bb);
      4'b01_00: lpix = avg2(G, hh);
      4'b01_01: lpix = avg2(bb, hh);
      4'b01_10: lpix = avg2(bb, jj);
      4'b01_11: lpix = avg2(bb, mm);
      4'b10_00: lpix = hh;
      4'b10_01: lpix = avg2(hh, jj);
      4'b10_10: lpix = jj;
      4'b10_11: lpix = avg2(jj, mm);
      4'b11_00: lpix = avg2(M, hh);
      4'b11_01: lpix = avg2(hh, ss);
      4'b11_10: lpix = avg2(jj, ss);
      default:  lpix = avg2(mm, ss);
    endcase
  end

  // ------------------------------------------------------------ chroma engine
  logic       ck;
  logic [1:0] cy, cx;
  pix_t       cpix;

  assign ck = pix[2];
  assign cy = {1'b0, pix[1]};
  assign cx = {1'b0, pix[0]};

  always_comb begin
    logic [15:0] acc;
    int          r0, c0;
    r0 = 3 * int'(ck) + int'(cy);
    c0 = int'(cx);
    acc = 16'(4'd8 - 4'(cdx)) * 16'(4'd8 - 4'(cdy)) * 16'(cwin[r0][c0])
        + 16'(cdx) * 16'(4'd8 - 4'(cdy)) * 16'(cwin[r0][c0 + 1])
        + 16'(4'd8 - 4'(cdx)) * 16'(cdy) * 16'(cwin[r0 + 1][c0])
        + 16'(cdx) * 16'(cdy) * 16'(cwin[r0 + 1][c0 + 1]) + 16'd32;
    cpix = acc[13:6];
  end

  always_ff @(posedge HCLK) begin
    if (state == S_CALC) begin
      lrow[px] <= lpix;
      if (!pix[3]) crow[ck][{cy[0], cx[0]}] <= cpix;
    end
  end

  // ------------------------------------------------------------ output FIFO
  logic       calc_d, chroma_d, k_d;
  logic [1:0] px_d;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      calc_d   <= 1'b0;
      chroma_d <= 1'b0;
      px_d     <= '0;
      k_d      <= 1'b0;
    end else begin
      calc_d   <= state == S_CALC;
      chroma_d <= state == S_CHROMA;
      px_d     <= px;
      k_d      <= pix[0];
    end
  end

  // a luma row is complete the cycle after its fourth pixel; the chroma words
  // follow the last row
  always_comb begin
    push      = 1'b0;
    push_data = '0;
    if (calc_d && px_d == 2'd3) begin
      push      = 1'b1;
      push_data = {lrow[3], lrow[2], lrow[1], lrow[0]};
    end else if (chroma_d) begin
      push      = 1'b1;
      push_data = {crow[k_d][3], crow[k_d][2], crow[k_d][1], crow[k_d][0]};
    end
  end

  sync_fifo #(.W(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk (HCLK), .rst_n (HRESETn),
    .push, .wdata (push_data), .pop (rd_out), .rdata (out_head),
    .full (out_full), .empty (out_empty), .count (out_cnt)
  );

  a_no_overflow: assert property (@(posedge HCLK) disable iff (!HRESETn) !(push && out_full));

endmodule
