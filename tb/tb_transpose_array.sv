// tb_transpose_array: self-checking test of the stall-free 4x4 transposing array (Reg2).
//
// Pushes a run of random blocks row by row with no gap between them, and
// also with random idle cycles, and checks that while block k enters, the
// words leaving are the columns of block k-1 in order. Runs long enough for
// the orientation to flip many times. Uses the default 8-bit element and a
// 16-bit element as the IQ-IDCT accelerator does.
module tb_transpose_array;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        push;
  logic [1:0]  push_idx;
  logic [31:0] push_data, pop_data;
  logic [63:0] push_data16, pop_data16;

  transpose_array dut (.clk, .rst_n, .push, .push_idx, .push_data, .pop_data);
  transpose_array #(.EW(16)) dut16 (.clk, .rst_n, .push, .push_idx, .push_data (push_data16),
                                    .pop_data (pop_data16));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prev [4][4], cur [4][4];
    push = 0; push_idx = '0; push_data = '0; push_data16 = '0;
    foreach (prev[i, j]) prev[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 400; blk++) begin
      foreach (cur[i, j]) cur[i][j] = 16'($urandom);
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        push = 1; push_idx = 2'(r);
        for (int e = 0; e < 4; e++) begin
          push_data[8*e +: 8]     = cur[r][e][7:0];
          push_data16[16*e +: 16] = cur[r][e];
        end
        #1;
        for (int e = 0; e < 4; e++) begin
          checks += 2;
          if (pop_data[8*e +: 8] !== prev[e][r][7:0] || pop_data16[16*e +: 16] !== prev[e][r]) begin
            failures++;
            if (failures < 10) $display("block %0d word %0d element %0d: %h/%h expected %h", blk, r, e,
                                        pop_data[8*e +: 8], pop_data16[16*e +: 16], prev[e][r]);
          end
        end
        if (blk > 200 && $urandom % 3 == 0) begin
          @(negedge clk); push = 0;
        end
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
