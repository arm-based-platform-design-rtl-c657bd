// tb_sp_sram: self-checking test of the single-ported local SRAM.
//
// Fills all 96 words, then runs random reads and writes against a model,
// checking the one-cycle read latency and that a disabled cycle neither
// writes nor changes the read data.
module tb_sp_sram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [6:0]  addr;
  logic [31:0] wdata, rdata;

  sp_sram dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [96];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q, held;
    bit          rd_pending;
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < 96; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 7'(a); wdata = $urandom;
      model[a] = wdata;
    end
    rd_pending = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (rd_pending) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("read %h expected %h", rdata, expect_q);
        end
      end
      held = rdata;
      en = ($urandom % 4 != 0); we = $urandom % 2; addr = 7'($urandom % 96); wdata = $urandom;
      rd_pending = en && !we;
      expect_q = model[addr];
      if (en && we) model[addr] = wdata;
      if (!en) begin
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("read data changed while disabled"); end
        en = 0;
        rd_pending = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
