// tb_ahb_decoder: self-checking test of the AHB address decoder and response multiplexer.
//
// Two model slaves with random wait states and distinct read data sit
// behind the decoder. A model master issues random transfers, including to
// unmapped addresses, and the test checks the slave selects in the address
// phase, that the data-phase response comes from the slave that was
// addressed, and the default slave's two-cycle ERROR response.
module tb_ahb_decoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]      HADDR, HRDATA;
  logic [1:0]       HTRANS, HRESP;
  logic [1:0]       HSEL;
  logic [1:0][31:0] S_HRDATA;
  logic [1:0]       S_HREADYOUT;
  logic [1:0][1:0]  S_HRESP;
  logic             HREADY;

  ahb_decoder dut (.HCLK (clk), .HRESETn (rst_n), .*);

  int checks = 0, failures = 0, n_err = 0, n_wait = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model slaves: random wait states, read data tagged with slave and address
  logic [1:0]       s_dp;
  logic [1:0][11:0] s_addr;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) s_dp <= '0;
    else if (HREADY)
      for (int s = 0; s < 2; s++) begin
        s_dp[s]   <= HSEL[s] && HTRANS[1];
        s_addr[s] <= HADDR[11:0];
      end
  always @(negedge clk)
    for (int s = 0; s < 2; s++) begin
      S_HREADYOUT[s] = !s_dp[s] || ($urandom % 3 != 0);
      S_HRDATA[s]    = S_HREADYOUT[s] ? {4'(s + 1), 16'h0, s_addr[s]} : 32'hDEAD_BEEF;  // valid only when ready
      S_HRESP[s]     = 2'b00;
    end

  initial begin
    HADDR = '0; HTRANS = 2'b00;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      int          exp_s, r;
      r = $urandom % 8;
      a = (r == 0) ? 32'h0001_0000 + $urandom % 32'h1000 : {19'd0, 1'($urandom % 2), 10'($urandom), 2'b00};
      exp_s = (r == 0) ? -1 : int'(a[12]);
      // address phase
      @(negedge clk);
      HADDR = a; HTRANS = ($urandom % 5 == 0) ? 2'b00 : 2'b10;
      #1;
      checks++;
      if (HSEL !== ((exp_s < 0) ? 2'b00 : 2'(1 << exp_s))) begin
        failures++;
        $display("address %h: HSEL %b", a, HSEL);
      end
      while (!HREADY) begin @(negedge clk); #1; end
      // data phase
      begin
        bit active;
        active = HTRANS[1];
        @(negedge clk);
        HTRANS = 2'b00;
        #1;
        if (active && exp_s < 0) begin
          checks += 3;
          if (HREADY || HRESP != 2'b01) begin failures++; $display("no first ERROR cycle"); end
          @(negedge clk); #1;
          if (!HREADY || HRESP != 2'b01) begin failures++; $display("no second ERROR cycle"); end
          n_err++;
        end else if (active) begin
          while (!HREADY) begin n_wait++; @(negedge clk); #1; end
          checks++;
          if (HRDATA !== {4'(exp_s + 1), 16'h0, a[11:0]} || HRESP !== 2'b00) begin
            failures++;
            if (failures < 10) $display("address %h: read %h", a, HRDATA);
          end
        end
      end
    end
    $display("error responses %0d, wait cycles %0d", n_err, n_wait);
    checks++;
    if (n_err == 0 || n_wait == 0) begin failures++; $display("no error response or no wait state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
