// tb_pixel_array: self-checking test of the 4x4 pixel array (Reg1).
//
// Random writes and reads, including reading a row and overwriting it in the
// same cycle as the filter does, compared with a plain model. Checks reset.
module tb_pixel_array;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        we;
  logic [1:0]  idx;
  logic [31:0] wdata, rdata;

  pixel_array dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); idx = 2'(i); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("row %0d not reset", i); end
      model[i] = '0;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom % 2; idx = 2'($urandom % 4); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[idx]) begin
        failures++;
        if (failures < 10) $display("row %0d: %h expected %h", idx, rdata, model[idx]);
      end
      @(posedge clk);
      if (we) model[idx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
