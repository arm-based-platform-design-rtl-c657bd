// tb_dbf_bs_unit: self-checking test of the boundary-strength unit.
//
// Writes random side information for a macroblock and its neighbours, starts
// the calculation and checks all 32 edge strengths, the QPs and the
// filtering mode against values worked out here, and that the unit takes 16
// cycles (two edges per cycle), well inside the 50-cycle bS budget the
// document allows per macroblock. It also rewrites the registers during a
// calculation's result hold to show the results stay until the next start.
module tb_dbf_bs_unit;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           wr_en, calc, busy, done;
  logic [4:0]     wr_idx;
  logic [31:0]    wr_data;
  bs_t [3:0][3:0] bs_v, bs_h;
  qp_t [2:0]      qp_luma, qp_chroma;
  dbf_mode_e      mode;

  dbf_bs_unit dut (.*);

  int checks = 0, failures = 0;
  int mode_seen [8];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_bs(blk_info_t p, blk_info_t q, bit mb_edge);
    int dx, dy;
    dx = int'(p.mvx) - int'(q.mvx);
    dy = int'(p.mvy) - int'(q.mvy);
    if (!p.avail || !q.avail) return 0;
    if (p.intra || q.intra) return mb_edge ? 4 : 3;
    if (p.nz || q.nz) return 2;
    if (p.ref_id != q.ref_id || dx >= 4 || dx <= -4 || dy >= 4 || dy <= -4) return 1;
    return 0;
  endfunction

  function automatic blk_info_t rnd(int style);
    blk_info_t b;
    b = '0;
    b.avail = 1'b1;
    if (style == 1) begin
      b.mvx = 12'($urandom % 9) - 12'd4;
      b.nz  = ($urandom % 5 == 0);
      b.intra = ($urandom % 20 == 0);
      b.avail = ($urandom % 10 != 0);
    end
    return b;
  endfunction

  initial begin
    logic [31:0] info [26];
    wr_en = 0; calc = 0; wr_idx = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int  t0, sty;
      bit  fl, ft, fc;
      int  ev [4][4], eh [4][4];
      blk_info_t cur [16], lft [4], top [4];
      sty = $urandom % 2;
      foreach (cur[i]) cur[i] = rnd(sty && ($urandom % 3 != 0));
      foreach (lft[i]) lft[i] = rnd($urandom % 2);
      foreach (top[i]) top[i] = rnd($urandom % 2);
      info[0] = $urandom & 32'h3_FFFF;
      info[1] = $urandom & 32'h3_FFFF;
      for (int i = 0; i < 16; i++) info[2 + i] = cur[i];
      for (int i = 0; i < 4; i++) begin info[18 + i] = lft[i]; info[22 + i] = top[i]; end
      for (int i = 0; i < 26; i++) begin
        @(negedge clk);
        wr_en = 1; wr_idx = 5'(i); wr_data = info[i];
      end
      @(negedge clk);
      wr_en = 0; calc = 1;
      @(negedge clk);
      calc = 0;
      t0 = 1;
      while (!done) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != 17) begin failures++; $display("bS took %0d cycles, expected 16 plus the start", t0); end
      // scribble over the registers: the results must not move
      @(negedge clk);
      wr_en = 1; wr_idx = 5'd2; wr_data = 32'h2000_0000 ^ info[2];
      @(negedge clk);
      wr_en = 0;
      fl = 0; ft = 0; fc = 0;
      for (int e = 0; e < 4; e++)
        for (int b = 0; b < 4; b++) begin
          ev[e][b] = ref_bs(e == 0 ? lft[b] : cur[4*b + e - 1], cur[4*b + e], e == 0);
          eh[e][b] = ref_bs(e == 0 ? top[b] : cur[4*(e-1) + b], cur[4*e + b], e == 0);
          if (ev[e][b] != 0) begin if (e == 0) fl = 1; else fc = 1; end
          if (eh[e][b] != 0) begin if (e == 0) ft = 1; else fc = 1; end
          checks += 2;
          if (bs_v[e][b] !== bs_t'(ev[e][b]) || bs_h[e][b] !== bs_t'(eh[e][b])) begin
            failures++;
            if (failures < 10) $display("edge %0d block %0d: v %0d/%0d h %0d/%0d", e, b,
                                        bs_v[e][b], ev[e][b], bs_h[e][b], eh[e][b]);
          end
        end
      checks += 3;
      if (qp_luma !== info[0][17:0] || qp_chroma !== info[1][17:0]) begin failures++; $display("QPs wrong"); end
      if (mode !== mode_of(fl, ft, fc)) begin failures++; $display("mode %0d expected %0d", mode, mode_of(fl, ft, fc)); end
      mode_seen[mode]++;
    end
    for (int i = 0; i < 8; i++) $display("mode %0d: %0d", i, mode_seen[i]);
    checks++;
    if (mode_seen[0] == 0 || mode_seen[1] == 0) begin failures++; $display("mode spread too narrow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
