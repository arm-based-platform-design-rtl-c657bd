// tb_mc_accel: self-checking test of the motion compensation interpolation accelerator.
//
// Loads random reference windows (noisy and smooth) into the local memory at
// random places, runs iterations with every luma quarter-pel and chroma
// eighth-pel fraction, reads the six result words and compares them with the
// standard's interpolation written here with its named half- and quarter-
// sample positions. It also checks that one 4x4 iteration stays within the
// 80 cycles implied by the document's worst case of 1280 cycles for the 16
// iterations of a macroblock, and that the memory and command registers
// insert wait states while the engine is busy.
module tb_mc_accel;
  import dbf_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic        HWRITE, HREADYOUT;

  mc_accel dut (
    .HCLK (clk), .HRESETn (rst_n), .HSEL (1'b1), .HADDR (HADDR[11:0]), .HTRANS, .HWRITE,
    .HWDATA, .HREADY (HREADYOUT), .HRDATA, .HREADYOUT, .HRESP
  );

  ahb_master_bfm bfm (.clk, .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY (HREADYOUT));

  int checks = 0, failures = 0, n_wait = 0, busy_cyc = 0, max_busy = 0;
  int frac_seen [16];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!HREADYOUT) n_wait++;
    if (dut.state != 0) busy_cyc++;
    else begin
      if (busy_cyc > max_busy) max_busy = busy_cyc;
      busy_cyc = 0;
    end
  end

  initial begin
    logic [31:0] wq[$], rq[$], st;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 160; n++) begin
      int w[9][9], cw[2][3][3], base, fx, fy, dx, dy, smooth;
      smooth = $urandom % 2;
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          w[r][c] = smooth ? clip1(100 + 9 * r - 7 * c + int'($urandom % 9)) : $urandom % 256;
      foreach (cw[k, r, c]) cw[k][r][c] = $urandom % 256;
      base = $urandom % (375 - 33 + 1);
      fx = n % 4; fy = (n / 4) % 4;
      dx = $urandom % 8; dy = $urandom % 8;
      frac_seen[4 * fy + fx]++;
      // window into memory
      wq = {};
      for (int r = 0; r < 9; r++)
        for (int k = 0; k < 3; k++) begin
          logic [31:0] word;
          word = '0;
          for (int e = 0; e < 4; e++) if (4 * k + e < 9) word[8*e +: 8] = 8'(w[r][4 * k + e]);
          wq.push_back(word);
        end
      for (int k = 0; k < 2; k++)
        for (int r = 0; r < 3; r++)
          wq.push_back({8'd0, 8'(cw[k][r][2]), 8'(cw[k][r][1]), 8'(cw[k][r][0])});
      foreach (wq[i]) bfm.write1(32'h400 + 32'(4 * (base + i)), wq[i]);
      bfm.write1(32'h000, 32'(base) | 32'(fx) << 9 | 32'(fy) << 11 | 32'(dx) << 13 | 32'(dy) << 16);
      // a memory write and a second command during the iteration wait for the engine
      if (n % 8 == 7) begin
        bfm.write1(32'h400 + 32'(4 * ((base + 40) % 375)), 32'h0);
        bfm.write1(32'h000, 32'(base) | 32'(fx) << 9 | 32'(fy) << 11 | 32'(dx) << 13 | 32'(dy) << 16);
      end
      for (int rep = 0; rep < ((n % 8 == 7) ? 2 : 1); rep++) begin
        bfm.burst(0, 32'h004, 6, wq, rq);
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int e;
            e = luma_ref(w, 2 + y, 2 + x, fx, fy);
            checks++;
            if (rq[y][8*x +: 8] !== 8'(e)) begin
              failures++;
              if (failures < 10) $display("luma (%0d,%0d) frac %0d,%0d: %0d expected %0d", y, x, fx, fy, rq[y][8*x +: 8], e);
            end
          end
        for (int k = 0; k < 2; k++)
          for (int y = 0; y < 2; y++)
            for (int x = 0; x < 2; x++) begin
              int e;
              e = ((8 - dx) * (8 - dy) * cw[k][y][x] + dx * (8 - dy) * cw[k][y][x + 1] +
                   (8 - dx) * dy * cw[k][y + 1][x] + dx * dy * cw[k][y + 1][x + 1] + 32) >> 6;
              checks++;
              if (rq[4 + k][8 * (2 * y + x) +: 8] !== 8'(e)) begin
                failures++;
                if (failures < 10) $display("chroma %0d (%0d,%0d): %0d expected %0d", k, y, x, rq[4 + k][8 * (2 * y + x) +: 8], e);
              end
            end
      end
    end
    bfm.read1(32'h008, st);
    checks += 3;
    if (st[0] || st[11:8] != 0) begin failures++; $display("status %h after the last iteration", st); end
    $display("longest iteration %0d cycles (document: 1280 per 16 iterations = 80), wait cycles %0d", max_busy, n_wait);
    if (max_busy > 80 || max_busy == 0) begin failures++; $display("iteration too slow"); end
    if (n_wait == 0) begin failures++; $display("no wait state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
