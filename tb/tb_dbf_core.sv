// tb_dbf_core: self-checking test of the deblocking data flow unit and datapath.
//
// For many random macroblocks in all eight filtering modes it feeds the
// transferred blocks in the port order, optionally takes the current blocks
// from the separate reconstruction stream, applies random input gaps and
// output back-pressure, and compares every output word with a standard-order
// reference filter. With no gaps it also checks the cycle count of a
// macroblock against 2 x words + 41 (four passes, each with a 10-cycle flush,
// plus start), and reports the document's per-mode latencies next to it.
module tb_dbf_core;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, cur_from_stream, busy, done;
  dbf_mode_e      mode;
  bs_t [3:0][3:0] bs_v, bs_h;
  qp_t [2:0]      qp_luma, qp_chroma;
  logic           in_valid, in_ready, cur_valid, cur_ready, out_stall, out_valid, filt_event;
  pix4_t          in_data, cur_data, out_data;

  dbf_core dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix4_t inq[$], curq[$], expq[$];
  bit    gaps;
  int    n_filt = 0;
  int    paper_lat [8] = '{50, 374, 310, 310, 246, 286, 182, 182};

  always @(posedge clk) if (filt_event) n_filt++;

  // Input side: present a word whenever one is queued (with random gaps).
  always @(negedge clk) begin
    in_valid  = (inq.size() > 0) && (!gaps || $urandom % 4 != 0);
    in_data   = inq.size() > 0 ? inq[0] : '0;
    cur_valid = (curq.size() > 0) && (!gaps || $urandom % 4 != 0);
    cur_data  = curq.size() > 0 ? curq[0] : '0;
    out_stall = gaps && ($urandom % 5 == 0);
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) void'(inq.pop_front());
    if (cur_valid && cur_ready) void'(curq.pop_front());
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output %h", out_data);
      end else begin
        if (out_data !== expq[0]) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h (remaining %0d)", out_data, expq[0], expq.size());
        end
        void'(expq.pop_front());
      end
    end
  end

  task automatic run_mb(bit fl, bit ft, bit fc, bit use_cur, bit with_gaps);
    mb_ctx m;
    pix4_t q[$];
    int t0, words, lat;
    m = new();
    m.randomize_pixels(10);
    m.randomize_bs(fl, ft, fc);
    m.randomize_qp(24, 45);
    gaps = with_gaps;
    // queues: luma in then chroma in; current blocks optionally on the other stream
    m.stream(0, q, 1);
    words = q.size();
    for (int p = 0; p < 2; p++) begin
      int lh[24] = '{16,17,18,19, 20,0,1,2,3, 21,4,5,6,7, 22,8,9,10,11, 23,12,13,14,15};
      int ch[8]  = '{4,5,6,0,1,7,2,3};
      if (p == 0) begin
        foreach (lh[n]) if (m.luma_present(lh[n]))
          for (int r = 0; r < 4; r++)
            if (use_cur && lh[n] < 16) curq.push_back(m.luma_word(lh[n], r, 1));
            else inq.push_back(m.luma_word(lh[n], r, 1));
      end else begin
        for (int k = 0; k < 2; k++)
          foreach (ch[n]) if (m.chroma_present(ch[n]))
            for (int r = 0; r < 4; r++)
              if (use_cur && ch[n] < 4) curq.push_back(m.chroma_word(k, ch[n], r, 1));
              else inq.push_back(m.chroma_word(k, ch[n], r, 1));
      end
    end
    m.stream(2, q, 1);
    words += q.size();
    m.run_reference();
    m.stream(1, q, 0);
    foreach (q[i]) expq.push_back(q[i]);
    m.stream(3, q, 0);
    foreach (q[i]) expq.push_back(q[i]);
    checks++;
    if (words != int'(mode_words(m.mode()))) begin
      failures++;
      $display("word count %0d differs from Table 8 (%0d) for mode %0d", words, mode_words(m.mode()), m.mode());
    end
    @(negedge clk);
    mode = m.mode();
    bs_v = m.packed_bs_v();
    bs_h = m.packed_bs_h();
    qp_luma   = {qp_t'(m.qp_l[2]), qp_t'(m.qp_l[1]), qp_t'(m.qp_l[0])};
    qp_chroma = {qp_t'(m.qp_c[2]), qp_t'(m.qp_c[1]), qp_t'(m.qp_c[0])};
    cur_from_stream = use_cur;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    repeat (2) @(negedge clk);
    checks++;
    if (expq.size() != 0 || inq.size() != 0 || curq.size() != 0) begin
      failures++;
      $display("mode %0d: %0d outputs missing, %0d/%0d inputs unread", m.mode(), expq.size(), inq.size(), curq.size());
      expq.delete(); inq.delete(); curq.delete();
    end
    if (!with_gaps) begin
      checks++;
      if (lat != (words == 0 ? 1 : 2 * words + 41)) begin
        failures++;
        $display("mode %0d latency %0d, expected %0d", m.mode(), lat, 2 * words + 41);
      end
      $display("mode %0d: %0d words each way, %0d cycles (document Table 10: %0d incl. bS)",
               m.mode(), words, lat, paper_lat[m.mode()]);
    end
  endtask

  initial begin
    start = 0; cur_from_stream = 0; mode = MODE_SKIP; bs_v = '0; bs_h = '0;
    qp_luma = '0; qp_chroma = '0; gaps = 0;
    in_valid = 0; cur_valid = 0; out_stall = 0; in_data = '0; cur_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // every mode once, clean timing
    for (int md = 7; md >= 0; md--) run_mb(md[2], md[1], md[0], 0, 0);
    // random modes, streams and stalls
    for (int n = 0; n < 60; n++) run_mb($urandom % 2, $urandom % 2, $urandom % 2, $urandom % 2, $urandom % 2);
    checks++;
    if (n_filt == 0) begin failures++; $display("no edge was ever filtered"); end
    $display("filtered edge rows: %0d", n_filt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
