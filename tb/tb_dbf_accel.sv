// tb_dbf_accel: self-checking test of the deblocking accelerator through its AHB port.
//
// For each random macroblock the test makes up motion and coefficient side
// information, works out the 32 edge strengths and the filtering mode on its
// own, and drives the accelerator as the CPU would: side information, bS
// calculation, mode read-back, start, then luma in, luma out, chroma in,
// chroma out. The next macroblock's bS is computed while the current one is
// being filtered. Filtered words are compared with the standard-order
// reference of dbf_ref_pkg. Some macroblocks take their current blocks from
// the reconstruction stream port.
module tb_dbf_accel;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic        HWRITE, HREADYOUT;
  logic        cur_valid, cur_ready, mb_done, filt_event;
  pix4_t       cur_data;
  dbf_mode_e   mode;

  dbf_accel dut (
    .HCLK (clk), .HRESETn (rst_n), .HSEL (1'b1), .HADDR (HADDR[11:0]), .HTRANS, .HWRITE,
    .HWDATA, .HREADY (HREADYOUT), .HRDATA, .HREADYOUT, .HRESP,
    .cur_valid, .cur_data, .cur_ready, .mb_done, .mode, .filt_event
  );

  ahb_master_bfm bfm (.clk, .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY (HREADYOUT));

  int checks = 0, failures = 0, n_filt = 0, n_wait = 0;
  int mode_seen [8];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (filt_event) n_filt++;
    if (!HREADYOUT) n_wait++;
  end

  // reconstruction stream driven from a queue, with random gaps
  pix4_t curq[$];
  always @(negedge clk) begin
    cur_valid = curq.size() > 0 && ($urandom % 3 != 0);
    cur_data  = curq.size() > 0 ? curq[0] : '0;
  end
  always @(posedge clk) if (cur_valid && cur_ready) void'(curq.pop_front());

  // independent boundary-strength rule of the standard (baseline, P slices)
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

  // Random side information in the styles of real content: still, moving, intra, border.
  function automatic blk_info_t rand_blk(int style, bit avail);
    blk_info_t b;
    b = '0;
    b.avail = avail;
    unique case (style)
      0: ;                                            // static skipped area
      1: begin b.mvx = 12'($urandom % 3); b.nz = ($urandom % 8 == 0); end
      2: begin b.mvx = 12'($urandom % 24) - 12'd12; b.mvy = 12'($urandom % 24) - 12'd12;
               b.nz = ($urandom % 3 == 0); b.ref_id = 3'($urandom % 2); end
      default: b.intra = 1'b1;
    endcase
    return b;
  endfunction

  class mb_job;
    mb_ctx       m;
    logic [31:0] info [26];
    bit          use_cur;
  endclass

  function automatic mb_job make_job();
    mb_job     j;
    blk_info_t cur [16], lft [4], top [4];
    int        sc, sl, st;
    bit        al, at;
    j = new();
    j.m = new();
    j.m.randomize_pixels(10);
    j.m.randomize_qp(20, 45);
    j.use_cur = ($urandom % 3 == 0);
    sc = $urandom % 4; sl = $urandom % 4; st = $urandom % 4;
    if ($urandom % 6 == 0) sc = 3;
    al = ($urandom % 8 != 0);
    at = ($urandom % 8 != 0);
    if ($urandom % 4 == 0) begin sc = 0; sl = 0; st = 0; end     // still background
    foreach (cur[i]) cur[i] = rand_blk((sc != 0 && $urandom % 4 == 0) ? $urandom % 3 : sc, 1'b1);
    foreach (lft[i]) lft[i] = rand_blk(sl, al);
    foreach (top[i]) top[i] = rand_blk(st, at);
    if (sc == 3) foreach (cur[i]) cur[i].intra = 1'b1;
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
    return j;
  endfunction

  task automatic send_info(mb_job j);
    logic [31:0] rq[$];
    for (int i = 0; i < 26; i++) bfm.write1(32'h080 + 32'(4 * i), j.info[i]);
    bfm.write1(32'h008, 32'h2);
  endtask

  task automatic compare(pix4_t got[$], pix4_t exp[$], string what);
    foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("%s word %0d: %h expected %h", what, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic run_job(mb_job j, mb_job next);
    logic [31:0] st, wq[$], rq[$];
    pix4_t       q[$], expq[$];
    int          nl, nc;
    dbf_mode_e   md;
    // wait for this macroblock's bS
    do bfm.read1(32'h008, st); while (!st[2]);
    md = dbf_mode_e'(st[6:4]);
    checks++;
    if (md != j.m.mode()) begin
      failures++;
      $display("mode %0d, expected %0d", md, j.m.mode());
    end
    mode_seen[md]++;
    bfm.write1(32'h008, j.use_cur ? 32'h5 : 32'h1);
    // the next macroblock's bS is worked out while this one is filtered
    if (next != null) send_info(next);
    // luma
    j.m.stream(0, q, 1);
    nl = q.size();
    wq = {};
    foreach (q[i]) wq.push_back(q[i]);
    if (j.use_cur) split_cur(j, 0, wq);
    bfm.burst(1, 32'h000, wq.size(), wq, rq);
    bfm.burst(0, 32'h004, nl, wq, rq);
    j.m.run_reference();
    j.m.stream(1, expq, 0);
    q = {};
    foreach (rq[i]) q.push_back(rq[i]);
    compare(q, expq, "luma");
    // chroma
    j.m.stream(2, q, 1);
    nc = q.size();
    wq = {};
    foreach (q[i]) wq.push_back(q[i]);
    if (j.use_cur) split_cur(j, 1, wq);
    bfm.burst(1, 32'h000, wq.size(), wq, rq);
    bfm.burst(0, 32'h004, nc, wq, rq);
    j.m.stream(3, expq, 0);
    q = {};
    foreach (rq[i]) q.push_back(rq[i]);
    compare(q, expq, "chroma");
    repeat (12) @(posedge clk);
    bfm.read1(32'h008, st);
    checks++;
    if (st[0] || !st[3] || curq.size() != 0) begin
      failures++;
      $display("macroblock not finished: status %h, %0d stream words left", st, curq.size());
    end
  endtask

  // Move the current-macroblock words to the reconstruction stream, leaving
  // the neighbour words for DIN. The input order lists neighbours and current
  // blocks interleaved, so this rebuilds both lists from the block order.
  task automatic split_cur(mb_job j, bit chroma, ref logic [31:0] wq[$]);
    int lh[24] = '{16,17,18,19, 20,0,1,2,3, 21,4,5,6,7, 22,8,9,10,11, 23,12,13,14,15};
    int ch[8]  = '{4,5,6,0,1,7,2,3};
    wq = {};
    if (!chroma) begin
      foreach (lh[n]) if (j.m.luma_present(lh[n]))
        for (int r = 0; r < 4; r++)
          if (lh[n] < 16) curq.push_back(j.m.luma_word(lh[n], r, 1));
          else wq.push_back(j.m.luma_word(lh[n], r, 1));
    end else begin
      for (int k = 0; k < 2; k++)
        foreach (ch[n]) if (j.m.chroma_present(ch[n]))
          for (int r = 0; r < 4; r++)
            if (ch[n] < 4) curq.push_back(j.m.chroma_word(k, ch[n], r, 1));
            else wq.push_back(j.m.chroma_word(k, ch[n], r, 1));
    end
  endtask

  initial begin
    mb_job jobs[$];
    for (int n = 0; n < 40; n++) jobs.push_back(make_job());
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_info(jobs[0]);
    for (int n = 0; n < 40; n++) run_job(jobs[n], n < 39 ? jobs[n + 1] : null);
    for (int md = 0; md < 8; md++) $display("mode %0d: %0d macroblocks", md, mode_seen[md]);
    $display("filtered edge rows %0d, wait-state cycles %0d", n_filt, n_wait);
    checks++;
    if (n_filt == 0 || n_wait == 0 || mode_seen[0] == 0) begin
      failures++;
      $display("filtering, wait states or skip mode never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
