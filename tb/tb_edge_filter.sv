// tb_edge_filter: self-checking test of the one-dimensional deblocking filter.
//
// Drives random pixel rows across an edge (smooth sides with a step, so all
// filter branches occur), random bS 0..4, QP 0..51 and luma/chroma, and
// compares the eight outputs and the filter-on flag with the standard's
// equations as written in the reference model. A few fixed cases check the
// rules directly: bS 0 and a flat row leave pixels unchanged, and a step
// larger than alpha is kept as a real edge.
module tb_edge_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  pix4_t p_in, q_in, p_out, q_out;
  bs_t   bs;
  qp_t   qp;
  logic  chroma, filtered;

  edge_filter dut (.*);

  int checks = 0, failures = 0;
  int n_strong = 0, n_normal = 0, n_off = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int s[8], s0[8];
    bit exp_f;
    int a, b;
    for (int i = 0; i < 4; i++) begin s[i] = p_in[i]; s[4 + i] = q_in[i]; end
    s0 = s;
    mb_ctx::filt(s, bs, qp, chroma);
    a = alpha_tab(qp);
    b = beta_tab(qp);
    exp_f = (bs != 0) && mb_ctx::iabs(s0[3] - s0[4]) < a && mb_ctx::iabs(s0[2] - s0[3]) < b &&
            mb_ctx::iabs(s0[5] - s0[4]) < b;
    if (!exp_f) n_off++; else if (bs == 4) n_strong++; else n_normal++;
    #1;
    checks++;
    if (filtered !== exp_f) begin
      failures++;
      $display("flag %0d expected %0d (bs %0d qp %0d)", filtered, exp_f, bs, qp);
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (p_out[i] !== pix_t'(s[i]) || q_out[i] !== pix_t'(s[4 + i])) begin
        failures++;
        if (failures < 10)
          $display("bs %0d qp %0d chroma %0d in %p: got %h|%h expected %p", bs, qp, chroma, s0, p_out, q_out, s);
      end
    end
  endtask

  initial begin
    // fixed cases
    p_in = {4{8'd100}}; q_in = {4{8'd100}}; bs = 3'd4; qp = 6'd40; chroma = 1'b0;
    #1; checks++;
    if (p_out !== p_in || q_out !== q_in) begin failures++; $display("flat row changed"); end
    q_in = {4{8'd200}};
    #1; checks++;
    if (filtered || q_out !== q_in) begin failures++; $display("real edge was filtered"); end
    q_in = {4{8'd104}}; bs = 3'd0;
    #1; checks++;
    if (filtered || q_out !== q_in || p_out !== p_in) begin failures++; $display("bS 0 filtered"); end
    // random cases
    for (int n = 0; n < 20000; n++) begin
      int base, step, slope;
      base  = 20 + $urandom % 216;
      step  = int'($urandom % 41) - 20;
      slope = int'($urandom % 5) - 2;
      for (int i = 0; i < 4; i++) begin
        p_in[i] = pix_t'(mb_ctx::clip(base + slope * (i - 3) + int'($urandom % 3)));
        q_in[i] = pix_t'(mb_ctx::clip(base + step + slope * i + int'($urandom % 3)));
      end
      bs = bs_t'($urandom % 5);
      qp = qp_t'($urandom % 52);
      chroma = $urandom % 2;
      check_one();
    end
    $display("strong %0d, normal %0d, not filtered %0d", n_strong, n_normal, n_off);
    checks++;
    if (n_strong == 0 || n_normal == 0 || n_off == 0) begin failures++; $display("a branch never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
