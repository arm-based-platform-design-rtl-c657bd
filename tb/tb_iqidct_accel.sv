// tb_iqidct_accel: self-checking test of the IQ-IDCT and reconstruction accelerator.
//
// Random quantised blocks at random QPs go in over the AHB port; the
// reconstructed rows come back either through the read-back register or on
// the stream port (with random back-pressure) and are compared with a
// reference written from the standard's equations in matrix form. A last run
// of one macroblock's 24 blocks with the predictions preloaded checks the
// document's 104 cycles per macroblock.
module tb_iqidct_accel;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic        HWRITE, HREADYOUT;
  logic        rec_valid, rec_ready;
  pix4_t       rec_data;

  iqidct_accel #(.PRED_DEPTH(128)) dut (
    .HCLK (clk), .HRESETn (rst_n), .HSEL (1'b1), .HADDR (HADDR[11:0]), .HTRANS, .HWRITE,
    .HWDATA, .HREADY (HREADYOUT), .HRDATA, .HREADYOUT, .HRESP,
    .rec_valid, .rec_data, .rec_ready
  );

  ahb_master_bfm bfm (.clk, .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY (HREADYOUT));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int vtab(int qm, int i, int j);
    int v0[6] = '{10,11,13,14,16,18};
    int v1[6] = '{16,18,20,23,25,29};
    int v2[6] = '{13,14,16,18,20,23};
    if (i % 2 == 0 && j % 2 == 0) return v0[qm];
    if (i % 2 == 1 && j % 2 == 1) return v1[qm];
    return v2[qm];
  endfunction

  // reference reconstruction of one block
  function automatic void ref_block(int c[4][4], int qp, int p[4][4], output int r[4][4]);
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
      for (int j = 0; j < 4; j++) begin
        int v;
        v = p[i][j] + ((f[i][j] + 32) >>> 6);
        r[i][j] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
  endfunction

  logic [31:0] expq[$];
  bit          rand_ready;
  int          first_out, last_out, n_stream = 0;

  always @(negedge clk) rec_ready = !rand_ready || ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n && rec_valid && rec_ready) begin
    checks++;
    n_stream++;
    last_out = cyc;
    if (expq.size() == 0) begin failures++; $display("unexpected stream row"); end
    else begin
      if (rec_data !== expq[0]) begin
        failures++;
        $display("stream row %h expected %h", rec_data, expq[0]);
      end
      void'(expq.pop_front());
    end
  end

  // Build n blocks at one QP; returns coefficient and prediction rows, expected rows.
  // Largest level whose dequantised value keeps every transform sum within
  // 16 bits, as a conforming bitstream guarantees.
  function automatic int amp_for(int qp);
    int a;
    a = 2047 / (29 << (qp / 6));
    return a < 1 ? 1 : (a > 60 ? 60 : a);
  endfunction

  task automatic make_blocks(int n, int qp, output logic [31:0] cq[$], output logic [31:0] pq[$]);
    cq = {}; pq = {};
    for (int b = 0; b < n; b++) begin
      int c[4][4], p[4][4], r[4][4];
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          c[i][j] = ($urandom % 4 == 0) ? int'($urandom % (2 * amp_for(qp) + 1)) - amp_for(qp) : 0;
          p[i][j] = $urandom % 256;
        end
      ref_block(c, qp, p, r);
      for (int i = 0; i < 4; i++) begin
        logic [31:0] w, pw, rw;
        for (int j = 0; j < 4; j++) begin
          w[8*j +: 8]  = 8'(c[i][j]);
          pw[8*j +: 8] = 8'(p[i][j]);
          rw[8*j +: 8] = 8'(r[i][j]);
        end
        cq.push_back(w);
        pq.push_back(pw);
        expq.push_back(rw);
      end
    end
  endtask

  initial begin
    logic [31:0] cq[$], pq[$], rq[$], st;
    int t0;
    rand_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1. read-back route, random QPs, one block at a time
    for (int n = 0; n < 20; n++) begin
      int qp;
      qp = $urandom % 41;
      bfm.write1(32'h008, 32'(qp));
      make_blocks(1, qp, cq, pq);
      bfm.burst(1, 32'h004, 4, pq, rq);
      bfm.burst(1, 32'h000, 4, cq, rq);
      bfm.burst(0, 32'h00C, 4, cq, rq);
      foreach (rq[i]) begin
        checks++;
        if (rq[i] !== expq[0]) begin
          failures++;
          $display("read-back row %h expected %h (qp %0d)", rq[i], expq[0], qp);
        end
        void'(expq.pop_front());
      end
    end
    // 2. stream route with back-pressure, several blocks in a row
    rand_ready = 1;
    for (int n = 0; n < 5; n++) begin
      int qp;
      qp = 12 + $urandom % 29;
      bfm.write1(32'h008, 32'h100 | 32'(qp));
      make_blocks(6, qp, cq, pq);
      bfm.burst(1, 32'h004, pq.size(), pq, rq);
      bfm.burst(1, 32'h000, cq.size(), cq, rq);
      repeat (60) @(posedge clk);
    end
    // 3. one macroblock (24 blocks) at full rate: 104 cycles
    rand_ready = 0;
    bfm.write1(32'h008, 32'h100 | 32'd28);
    make_blocks(24, 28, cq, pq);
    bfm.burst(1, 32'h004, pq.size(), pq, rq);
    t0 = cyc;
    bfm.burst(1, 32'h000, cq.size(), cq, rq);
    repeat (20) @(posedge clk);
    bfm.read1(32'h008, st);
    checks++;
    if (expq.size() != 0 || st[0]) begin
      failures++;
      $display("%0d rows missing, busy=%0d", expq.size(), st[0]);
    end
    checks++;
    $display("macroblock transform: %0d cycles from first coefficient to last row (document: 104)", last_out - t0);
    if (last_out - t0 > 106) begin
      failures++;
      $display("macroblock took longer than the document's 104 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
