// tb_avc_accel_top: end-to-end test of the accelerator module, all parameters at default.
//
// The test plays the decoder's CPU for one QCIF frame: 99 macroblocks (11 x 9),
// the picture size of the baseline level-1 test sequences. For each one it
// makes up side information for a chosen filtering mode, residual
// coefficients and a prediction, and then:
//   - has the deblocking bS unit compute the macroblock's edge strengths
//     while the previous macroblock is still being filtered,
//   - sends the residual blocks through the IQ-IDCT accelerator, either
//     straight into the deblocking filter (modes that filter the inner edges)
//     or back over the bus (the other modes),
//   - streams the neighbour blocks into the filter, reads the filtered words
//     back and compares them with a reference that reconstructs and filters
//     the macroblock in the standard's order.
// After each macroblock it also runs the 16 motion compensation iterations of
// a macroblock (one per 4x4 block) at random quarter-pel positions and checks
// every interpolated block. It reports the bus cycles the frame took and
// checks them against the level-1 rate of 1485 macroblocks per second with
// the accelerators clocked at 10 MHz (6734 cycles per macroblock), with the
// CPU's own software time left out.
// It counts each mechanism of the design and fails if one never happened:
// every filtering mode including skip, filtered edges, bus wait states,
// words on the direct reconstruction path, read-back reconstruction, bS
// computed during filtering, motion compensation iterations, and the
// decoder's error response.
module tb_avc_accel_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic        HWRITE, HREADY;
  logic        dbf_mb_done, dbf_filt_event;
  dbf_mode_e   dbf_mode;

  avc_accel_top dut (
    .HCLK (clk), .HRESETn (rst_n), .HADDR, .HTRANS, .HWRITE, .HWDATA,
    .HRDATA, .HREADY, .HRESP, .dbf_mb_done, .dbf_mode, .dbf_filt_event
  );

  ahb_master_bfm bfm (.clk, .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY);

  localparam logic [31:0] DBF = 32'h0000_0000;
  localparam logic [31:0] IQ  = 32'h0000_1000;
  localparam logic [31:0] MC  = 32'h0000_2000;

  int checks = 0, failures = 0;
  int cyc = 0, t_start, t_frame;
  always @(posedge clk) cyc <= cyc + 1;
  int n_filt = 0, n_wait = 0, n_direct = 0, n_readback = 0, n_overlap = 0, n_err = 0, n_done = 0, n_mc = 0;
  int mode_seen [8];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dbf_filt_event) n_filt++;
    if (!HREADY) n_wait++;
    if (dut.rec_valid && dut.rec_ready) n_direct++;
    if (dut.u_dbf.u_bs.busy && dut.u_dbf.core_busy) n_overlap++;
    if (HRESP == 2'b01) n_err++;
    if (dbf_mb_done) n_done++;
  end

  // ------------------------------------------------------------ reference pieces
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

  function automatic int vtab(int qm, int i, int j);
    int v0[6] = '{10,11,13,14,16,18};
    int v1[6] = '{16,18,20,23,25,29};
    int v2[6] = '{13,14,16,18,20,23};
    if (i % 2 == 0 && j % 2 == 0) return v0[qm];
    if (i % 2 == 1 && j % 2 == 1) return v1[qm];
    return v2[qm];
  endfunction

  // dequantise, inverse transform (matrix form), round, add prediction, clip
  function automatic void recon(int c[4][4], int qp, ref int p[4][4]);
    int d[4][4], h[4][4], f[4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) d[i][j] = (c[i][j] * vtab(qp % 6, i, j)) <<< (qp / 6);
    for (int i = 0; i < 4; i++) begin
      h[i][0] = d[i][0] + d[i][1] + d[i][2] + (d[i][3] >>> 1);
      h[i][1] = d[i][0] + (d[i][1] >>> 1) - d[i][2] - d[i][3];
      h[i][2] = d[i][0] - (d[i][1] >>> 1) - d[i][2] + d[i][3];
      h[i][3] = d[i][0] - d[i][1] + d[i][2] - (d[i][3] >>> 1);
    end
    for (int j = 0; j < 4; j++) begin
      f[0][j] = h[0][j] + h[1][j] + h[2][j] + (h[3][j] >>> 1);
      f[1][j] = h[0][j] + (h[1][j] >>> 1) - h[2][j] - h[3][j];
      f[2][j] = h[0][j] - (h[1][j] >>> 1) - h[2][j] + h[3][j];
      f[3][j] = h[0][j] - h[1][j] + h[2][j] - (h[3][j] >>> 1);
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) p[i][j] = mb_ctx::clip(p[i][j] + ((f[i][j] + 32) >>> 6));
  endfunction

  // ------------------------------------------------------------ one macroblock's stimulus
  class mb_job;
    mb_ctx       m;
    logic [31:0] info [26];
    int          qp;
    logic [31:0] coef [24][4];   // residual blocks: luma 0..15, Cb 0..3, Cr 0..3
    logic [31:0] pred [24][4];
    logic [31:0] rec  [24][4];
  endclass

  function automatic blk_info_t moving(bit avail);
    blk_info_t b;
    b = '0;
    b.avail  = avail;
    b.mvx    = 12'($urandom % 24) - 12'd12;
    b.mvy    = 12'($urandom % 24) - 12'd12;
    b.ref_id = 3'($urandom % 2);
    b.nz     = ($urandom % 3 == 0);
    return b;
  endfunction

  // Side information that yields the filtering mode with flags (fl, ft, fc).
  function automatic mb_job make_job(bit fl, bit ft, bit fc);
    mb_job     j;
    blk_info_t cur [16], lft [4], top [4], still;
    j = new();
    j.m = new();
    j.m.randomize_pixels(10);
    j.m.randomize_qp(20, 45);
    still = '0;
    still.avail = 1'b1;
    still.mvx = 12'($urandom % 3);
    foreach (cur[i]) cur[i] = fc ? moving(1'b1) : still;
    if (fc) cur[1].mvx = cur[0].mvx + 12'd8;          // at least one inner edge
    for (int b = 0; b < 4; b++) begin
      if (!fl) cur[4*b].nz = 1'b0;
      if (!ft) cur[b].nz = 1'b0;
    end
    for (int b = 0; b < 4; b++) begin
      if (fl) begin lft[b] = moving(1'b1); lft[b].intra = ($urandom % 2 == 0); lft[b].nz = 1'b1; end
      else begin lft[b] = cur[4*b]; if ($urandom % 3 == 0) lft[b].avail = 1'b0; end
      if (ft) begin top[b] = moving(1'b1); top[b].nz = 1'b1; end
      else begin top[b] = cur[b]; if ($urandom % 3 == 0) top[b].avail = 1'b0; end
    end
    for (int e = 0; e < 4; e++)
      for (int b = 0; b < 4; b++) begin
        j.m.bs_v[e][b] = bs_t'(ref_bs(e == 0 ? lft[b] : cur[4*b + e - 1], cur[4*b + e], e == 0));
        j.m.bs_h[e][b] = bs_t'(ref_bs(e == 0 ? top[b] : cur[4*(e-1) + b], cur[4*e + b], e == 0));
      end
    j.m.l = 0; j.m.t = 0; j.m.cur = 0;
    for (int b = 0; b < 4; b++) begin
      if (j.m.bs_v[0][b] != 0) j.m.l = 1;
      if (j.m.bs_h[0][b] != 0) j.m.t = 1;
      for (int e = 1; e < 4; e++) if (j.m.bs_v[e][b] != 0 || j.m.bs_h[e][b] != 0) j.m.cur = 1;
    end
    j.info[0] = {14'd0, 6'(j.m.qp_l[2]), 6'(j.m.qp_l[1]), 6'(j.m.qp_l[0])};
    j.info[1] = {14'd0, 6'(j.m.qp_c[2]), 6'(j.m.qp_c[1]), 6'(j.m.qp_c[0])};
    for (int i = 0; i < 16; i++) j.info[2 + i] = cur[i];
    for (int i = 0; i < 4; i++) begin
      j.info[18 + i] = lft[i];
      j.info[22 + i] = top[i];
    end
    // residual: predict from the smooth pixels, add a small random residual,
    // and put the reconstruction into the reference macroblock
    j.qp = 16 + $urandom % 16;
    for (int b = 0; b < 24; b++) begin
      int c[4][4], p[4][4], r0, x0, k;
      k = (b < 20) ? 0 : 1;
      if (b < 16) begin r0 = 4 + 4 * (b / 4); x0 = 4 + 4 * (b % 4); end
      else        begin r0 = 4 + 4 * (((b - 16) % 4) / 2); x0 = 4 + 4 * ((b - 16) % 2); end
      for (int i = 0; i < 4; i++)
        for (int jj = 0; jj < 4; jj++) begin
          c[i][jj] = ($urandom % 5 == 0) ? int'($urandom % 5) - 2 : 0;
          p[i][jj] = (b < 16) ? j.m.y0[r0 + i][x0 + jj] : j.m.c0[k][r0 + i][x0 + jj];
        end
      for (int i = 0; i < 4; i++)
        for (int jj = 0; jj < 4; jj++) begin
          j.coef[b][i][8*jj +: 8] = 8'(c[i][jj]);
          j.pred[b][i][8*jj +: 8] = 8'(p[i][jj]);
        end
      recon(c, j.qp, p);
      for (int i = 0; i < 4; i++)
        for (int jj = 0; jj < 4; jj++) begin
          j.rec[b][i][8*jj +: 8] = 8'(p[i][jj]);
          if (b < 16) begin j.m.y0[r0 + i][x0 + jj] = p[i][jj]; j.m.y[r0 + i][x0 + jj] = p[i][jj]; end
          else begin j.m.c0[k][r0 + i][x0 + jj] = p[i][jj]; j.m.c[k][r0 + i][x0 + jj] = p[i][jj]; end
        end
    end
    return j;
  endfunction

  // ------------------------------------------------------------ bus helpers
  task automatic wr_words(logic [31:0] addr, logic [31:0] w[$]);
    logic [31:0] rq[$];
    bfm.burst(1, addr, w.size(), w, rq);
  endtask

  task automatic rd_words(logic [31:0] addr, int n, output logic [31:0] rq[$]);
    logic [31:0] wq[$];
    bfm.burst(0, addr, n, wq, rq);
  endtask

  task automatic send_info(mb_job j);
    logic [31:0] w[$];
    for (int i = 0; i < 26; i++) bfm.write1(DBF + 32'h080 + 32'(4 * i), j.info[i]);
    bfm.write1(DBF + 32'h008, 32'h2);
  endtask

  // one residual block into the IQ-IDCT: prediction rows, then coefficient rows
  task automatic send_block(mb_job j, int b);
    logic [31:0] w[$];
    w = {};
    for (int r = 0; r < 4; r++) w.push_back(j.pred[b][r]);
    wr_words(IQ + 32'h004, w);
    w = {};
    for (int r = 0; r < 4; r++) w.push_back(j.coef[b][r]);
    wr_words(IQ + 32'h000, w);
  endtask

  task automatic compare(logic [31:0] got[$], pix4_t exp[$], string what);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("%s: %0d words, expected %0d", what, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("%s word %0d: %h expected %h", what, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic run_job(mb_job j, mb_job next);
    logic [31:0] st, w[$], rq[$];
    pix4_t       expq[$];
    dbf_mode_e   md;
    bit          direct;
    int lh[24] = '{16,17,18,19, 20,0,1,2,3, 21,4,5,6,7, 22,8,9,10,11, 23,12,13,14,15};
    int ch[8]  = '{4,5,6,0,1,7,2,3};

    do bfm.read1(DBF + 32'h008, st); while (!st[2]);
    md = dbf_mode_e'(st[6:4]);
    checks++;
    if (md != j.m.mode()) begin
      failures++;
      $display("mode %0d, expected %0d", md, j.m.mode());
    end
    mode_seen[md]++;
    direct = j.m.cur;   // every current block is filtered: send them straight across
    bfm.write1(IQ + 32'h008, (direct ? 32'h100 : 32'h0) | 32'(j.qp));
    if (!direct) begin
      // reconstruct over the bus and check the read-back rows
      for (int b = 0; b < 24; b++) begin
        send_block(j, b);
        rd_words(IQ + 32'h00C, 4, rq);
        n_readback += 4;
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (rq[r] !== j.rec[b][r]) begin
            failures++;
            $display("read-back block %0d row %0d: %h expected %h", b, r, rq[r], j.rec[b][r]);
          end
        end
      end
    end
    bfm.write1(DBF + 32'h008, direct ? 32'h5 : 32'h1);
    if (next != null) send_info(next);
    // luma: neighbour words over DIN, current blocks via the IQ-IDCT when direct
    foreach (lh[n]) if (j.m.luma_present(lh[n])) begin
      if (direct && lh[n] < 16) send_block(j, lh[n]);
      else begin
        w = {};
        for (int r = 0; r < 4; r++) w.push_back(j.m.luma_word(lh[n], r, 1));
        wr_words(DBF + 32'h000, w);
      end
    end
    j.m.run_reference();
    j.m.stream(1, expq, 0);
    rd_words(DBF + 32'h004, expq.size(), rq);
    compare(rq, expq, "luma");
    for (int k = 0; k < 2; k++)
      foreach (ch[n]) if (j.m.chroma_present(ch[n])) begin
        if (direct && ch[n] < 4) send_block(j, 16 + 4 * k + ch[n]);
        else begin
          w = {};
          for (int r = 0; r < 4; r++) w.push_back(j.m.chroma_word(k, ch[n], r, 1));
          wr_words(DBF + 32'h000, w);
        end
      end
    j.m.stream(3, expq, 0);
    rd_words(DBF + 32'h004, expq.size(), rq);
    compare(rq, expq, "chroma");
  endtask

  // one motion compensation iteration with a random window and fraction
  task automatic run_mc();
    int w[9][9], cw[2][3][3], fx, fy, dx, dy, base;
    logic [31:0] wq[$], rq[$];
    foreach (w[r, c]) w[r][c] = $urandom % 256;
    foreach (cw[k, r, c]) cw[k][r][c] = $urandom % 256;
    fx = $urandom % 4; fy = $urandom % 4; dx = $urandom % 8; dy = $urandom % 8;
    base = 33 * ($urandom % 11);
    pack_window(w, cw, wq);
    foreach (wq[i]) bfm.write1(MC + 32'h400 + 32'(4 * (base + i)), wq[i]);
    bfm.write1(MC, 32'(base) | 32'(fx) << 9 | 32'(fy) << 11 | 32'(dx) << 13 | 32'(dy) << 16);
    rd_words(MC + 32'h004, 6, rq);
    n_mc++;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (rq[y][8*x +: 8] !== 8'(luma_ref(w, 2 + y, 2 + x, fx, fy))) begin
          failures++;
          $display("MC luma (%0d,%0d) wrong", y, x);
        end
      end
    for (int k = 0; k < 2; k++)
      for (int y = 0; y < 2; y++)
        for (int x = 0; x < 2; x++) begin
          checks++;
          if (rq[4 + k][8 * (2 * y + x) +: 8] !== 8'(chroma_ref(cw[k], y, x, dx, dy))) begin
            failures++;
            $display("MC chroma %0d (%0d,%0d) wrong", k, y, x);
          end
        end
  endtask

  initial begin
    mb_job jobs[$];
    logic [31:0] st;
    int md;
    // every mode once (1..7, skip), then random ones
    for (int n = 0; n < 8; n++) begin
      md = (n + 1) % 8;
      jobs.push_back(make_job(md inside {1, 3, 5, 7}, md inside {1, 2, 5, 6}, md inside {1, 2, 3, 4}));
    end
    for (int n = 8; n < 99; n++) jobs.push_back(make_job($urandom % 2, $urandom % 2, $urandom % 2));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t_start = cyc;
    send_info(jobs[0]);
    foreach (jobs[n]) begin
      run_job(jobs[n], n + 1 < jobs.size() ? jobs[n + 1] : null);
      repeat (16) run_mc();
    end
    t_frame = cyc - t_start;
    $display("frame of %0d macroblocks: %0d cycles, %0d per macroblock (level-1 budget at 10 MHz: 6734)",
             jobs.size(), t_frame, t_frame / jobs.size());
    checks++;
    if (t_frame / jobs.size() > 6734) begin failures++; $display("frame too slow for level 1"); end
    repeat (20) @(posedge clk);
    // an address no accelerator answers gets the error response
    bfm.read1(32'h0000_8000, st);  // beyond the three 4 KB windows
    repeat (2) @(posedge clk);
    checks++;
    if (n_done != jobs.size()) begin
      failures++;
      $display("%0d macroblocks finished, expected %0d", n_done, jobs.size());
    end
    for (int i = 0; i < 8; i++) begin
      $display("mode %0d: %0d macroblocks", i, mode_seen[i]);
      checks++;
      if (mode_seen[i] == 0) begin failures++; $display("mode %0d never happened", i); end
    end
    $display("filtered edge rows %0d, wait-state cycles %0d, direct words %0d, read-back words %0d, bS/filter overlap cycles %0d, error cycles %0d, MC iterations %0d",
             n_filt, n_wait, n_direct, n_readback, n_overlap, n_err, n_mc);
    checks += 7;
    if (n_mc == 0)       begin failures++; $display("no motion compensation"); end
    if (n_filt == 0)     begin failures++; $display("no edge filtered"); end
    if (n_wait == 0)     begin failures++; $display("no wait state"); end
    if (n_direct == 0)   begin failures++; $display("direct reconstruction path unused"); end
    if (n_readback == 0) begin failures++; $display("read-back path unused"); end
    if (n_overlap == 0)  begin failures++; $display("bS never computed during filtering"); end
    if (n_err == 0)      begin failures++; $display("no error response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
