// dbf_bs_unit: boundary-strength calculation ahead of filtering, and mode classification.
//
// The document computes bS in hardware and does it for the next macroblock
// while the current one is filtered, so that filtering never waits for bS.
// This unit holds the side information of one macroblock in 26 registers
// written by the CPU (word index):
//   0      luma QPs   {qp_top[17:12], qp_left[11:6], qp_cur[5:0]}
//   1      chroma QPs {qpc_top, qpc_left, qpc_cur}, same layout
//   2..17  current macroblock blocks 0..15 (raster order), blk_info_t
//   18..21 left neighbour blocks (right column of the left macroblock), rows 0..3
//   22..25 top neighbour blocks (bottom row of the top macroblock), columns 0..3
// A pulse on calc starts the computation: one vertical and one horizontal
// edge per cycle, 16 cycles for the 32 luma edge segments, after which done
// rises and stays high until the next calc. The results (bS, QPs and the
// filtering mode of the document's Table 8) stay stable until then, so the
// filter can take them while the CPU already writes the next macroblock.
// The register layout and the two-edges-per-cycle rate are this design's
// choices; the document gives the unit's role and the 50-cycle budget.
module dbf_bs_unit
  import dbf_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [4:0]      wr_idx,
  input  logic [31:0]     wr_data,
  input  logic            calc,
  output logic            busy,
  output logic            done,
  output bs_t [3:0][3:0]  bs_v,      // [edge column][block row]
  output bs_t [3:0][3:0]  bs_h,      // [edge row][block column]
  output qp_t [2:0]       qp_luma,   // {top, left, cur}
  output qp_t [2:0]       qp_chroma,
  output dbf_mode_e       mode
);

  logic [31:0] info [26];
  logic [3:0]  cnt;
  logic        run;
  bs_t         v_res, h_res;
  blk_info_t   vp, vq, hp, hq;
  logic [1:0]  cx, cy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 26; i++) info[i] <= '0;
    end else if (wr_en && wr_idx < 5'd26) begin
      info[wr_idx] <= wr_data;
    end
  end

  // Edge segment cnt: column/row index cx (edge position) and cy (block along it).
  assign cx = cnt[3:2];
  assign cy = cnt[1:0];

  always_comb begin
    // vertical edge at block column cx, block row cy
    vq = blk_info_t'(info[2 + 4*cy + cx]);
    vp = (cx == 2'd0) ? blk_info_t'(info[18 + int'(cy)]) : blk_info_t'(info[2 + 4*cy + cx - 1]);
    // horizontal edge at block row cx, block column cy
    hq = blk_info_t'(info[2 + 4*cx + cy]);
    hp = (cx == 2'd0) ? blk_info_t'(info[22 + int'(cy)]) : blk_info_t'(info[2 + 4*(cx - 1) + cy]);
  end

  bs_calc u_bs_v (.p(vp), .q(vq), .mb_edge(cx == 2'd0), .bs(v_res));
  bs_calc u_bs_h (.p(hp), .q(hq), .mb_edge(cx == 2'd0), .bs(h_res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      bs_v <= '0;
      bs_h <= '0;
      qp_luma   <= '0;
      qp_chroma <= '0;
    end else if (calc) begin
      run  <= 1'b1;
      done <= 1'b0;
      cnt  <= '0;
      qp_luma   <= {info[0][17:12], info[0][11:6], info[0][5:0]};
      qp_chroma <= {info[1][17:12], info[1][11:6], info[1][5:0]};
    end else if (run) begin
      bs_v[cx][cy] <= v_res;
      bs_h[cx][cy] <= h_res;
      cnt <= cnt + 4'd1;
      if (cnt == 4'd15) begin
        run  <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign busy = run;

  // Mode classification (document Table 8): which boundaries need filtering.
  logic need_l, need_t, need_c;
  always_comb begin
    need_l = 1'b0;
    need_t = 1'b0;
    need_c = 1'b0;
    for (int i = 0; i < 4; i++) begin
      need_l |= (bs_v[0][i] != 3'd0);
      need_t |= (bs_h[0][i] != 3'd0);
      for (int j = 1; j < 4; j++)
        need_c |= (bs_v[j][i] != 3'd0) || (bs_h[j][i] != 3'd0);
    end
    mode = mode_of(need_l, need_t, need_c);
  end

endmodule
