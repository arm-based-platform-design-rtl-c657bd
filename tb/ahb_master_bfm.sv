// ahb_master_bfm: AHB-Lite master model standing in for the CPU in testbenches.
//
// burst() performs n back-to-back single-word transfers to one address,
// pipelined as AHB allows (address phase of beat k+1 during the data phase of
// beat k), and honours wait states through HREADY. Signals are driven on the
// falling clock edge; read data is taken when a data phase completes.
module ahb_master_bfm (
  input  logic        clk,
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [31:0] HWDATA,
  input  logic [31:0] HRDATA,
  input  logic        HREADY
);

  initial begin
    HADDR  = '0;
    HTRANS = 2'b00;
    HWRITE = 1'b0;
    HWDATA = '0;
  end

  task automatic burst(input bit wr, input logic [31:0] addr, input int n,
                       input logic [31:0] wq[$], output logic [31:0] rq[$]);
    int issued, completed, cur_d;
    bit rdy, addr_on;
    issued = 0; completed = 0; cur_d = -1; rdy = 0; addr_on = 0;
    rq = {};
    forever begin
      @(negedge clk);
      if (rdy) begin
        if (cur_d >= 0) completed++;
        cur_d = addr_on ? issued : -1;
        if (addr_on) issued++;
      end
      addr_on = (issued < n);
      HTRANS  = addr_on ? 2'b10 : 2'b00;
      HADDR   = addr;
      HWRITE  = wr;
      HWDATA  = (wr && cur_d >= 0) ? wq[cur_d] : '0;
      if (completed == n) break;
      #1;
      rdy = HREADY;
      if (rdy && !wr && cur_d >= 0) rq.push_back(HRDATA);
    end
  endtask

  task automatic write1(input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] wq[$], rq[$];
    wq.push_back(d);
    burst(1'b1, addr, 1, wq, rq);
  endtask

  task automatic read1(input logic [31:0] addr, output logic [31:0] d);
    logic [31:0] wq[$], rq[$];
    burst(1'b0, addr, 1, wq, rq);
    d = rq[0];
  endtask

endmodule
