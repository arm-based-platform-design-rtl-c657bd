// tb_bs_calc: self-checking test of the boundary-strength rule.
//
// Random pairs of block descriptions (intra, coefficients, reference,
// motion vectors near the 4-quarter-pel limit, availability) on inner and
// macroblock edges, compared with the standard's rule written out here.
module tb_bs_calc;
  import dbf_pkg::*;

  blk_info_t p, q;
  logic      mb_edge;
  bs_t       bs;

  bs_calc dut (.*);

  int checks = 0, failures = 0;
  int seen [5];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_info_t rnd();
    blk_info_t b;
    b = '0;
    b.avail  = ($urandom % 10 != 0);
    b.intra  = ($urandom % 6 == 0);
    b.nz     = ($urandom % 4 == 0);
    b.ref_id = 3'($urandom % 5 == 0);
    b.mvx    = 12'($urandom % 11) - 12'd5;
    b.mvy    = 12'($urandom % 11) - 12'd5;
    return b;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int exp_bs, dx, dy;
      p = rnd();
      q = ($urandom % 3 == 0) ? p : rnd();
      if ($urandom % 2) q.avail = 1'b1;
      mb_edge = $urandom % 2;
      dx = int'(p.mvx) - int'(q.mvx);
      dy = int'(p.mvy) - int'(q.mvy);
      if (dx < 0) dx = -dx;
      if (dy < 0) dy = -dy;
      if (!(p.avail && q.avail))            exp_bs = 0;
      else if (p.intra || q.intra)          exp_bs = mb_edge ? 4 : 3;
      else if (p.nz || q.nz)                exp_bs = 2;
      else if (p.ref_id != q.ref_id || dx >= 4 || dy >= 4) exp_bs = 1;
      else                                  exp_bs = 0;
      #1;
      checks++;
      seen[exp_bs]++;
      if (bs !== bs_t'(exp_bs)) begin
        failures++;
        if (failures < 10) $display("p %h q %h edge %0d: bS %0d expected %0d", p, q, mb_edge, bs, exp_bs);
      end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("bS %0d never occurred", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
