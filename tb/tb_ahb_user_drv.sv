// tb_ahb_user_drv: testbench driver for one master's command port.
//
// run() waits until the master is idle, presents one command for one clock,
// then feeds the write beats one by one (advancing after each u_wnext) and
// collects the read beats (one per u_rvalid) until u_done. It returns the
// number of clock edges from the edge that took the command to the edge at
// which the transfer ended. Inputs of the design change 1 time unit after a
// rising edge; outputs are sampled on the falling edge before the edge they
// act on.
module tb_ahb_user_drv
  import ahb_pkg::*;
(
  input  logic              clk,
  output logic              u_req,
  output logic              u_write,
  output logic [ADDR_W-1:0] u_addr,
  output hburst_t           u_burst,
  output logic [DATA_W-1:0] u_wdata,
  input  logic              u_wnext,
  input  logic [DATA_W-1:0] u_rdata,
  input  logic              u_rvalid,
  input  logic              u_done,
  input  logic              u_busy
);

  initial begin
    u_req   = 1'b0;
    u_write = 1'b0;
    u_addr  = '0;
    u_burst = HBURST_SINGLE;
    u_wdata = '0;
  end

  task automatic run(input bit wr, input logic [ADDR_W-1:0] addr, input hburst_t b,
                     input logic [DATA_W-1:0] wdata [16],
                     output logic [DATA_W-1:0] rdata [16], output int n_rd,
                     output int n_wr, output int cycles);
    logic rv, wn, dn;
    logic [DATA_W-1:0] rd;
    int i;
    for (int k = 0; k < 16; k++) rdata[k] = '0;
    n_rd = 0; n_wr = 0; cycles = 0; i = 0;
    @(negedge clk);
    while (u_busy) @(negedge clk);
    u_req = 1'b1; u_write = wr; u_addr = addr; u_burst = b; u_wdata = wdata[0];
    @(posedge clk);
    #1 u_req = 1'b0;
    forever begin
      @(negedge clk);
      rv = u_rvalid; wn = u_wnext; dn = u_done; rd = u_rdata;
      @(posedge clk);
      cycles++;
      #1;
      if (rv) begin
        if (n_rd < 16) rdata[n_rd] = rd;
        n_rd++;
      end
      if (wn) begin
        n_wr++;
        i++;
        u_wdata = wdata[(i < 16) ? i : 15];
      end
      if (dn) break;
    end
  endtask

endmodule
