// tb_ahb_slave: drives pipelined AHB bursts straight into two slaves, one
// with no wait states (the reference configuration) and one with two. Each
// test writes a burst, reads it back and compares with a model memory; a
// write with HSEL=0 and an IDLE transfer must not change the memory. It also
// checks HRESP=OKAY on every beat and that the wait-state slave holds HREADY
// low for exactly WAIT_STATES cycles per beat (the other never lowers it).
module tb_ahb_slave;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic              hsel [2];
  ahb_ctrl_t         ctrl [2];
  logic [DATA_W-1:0] hwdata [2];
  ahb_resp_t         resp [2];

  ahb_slave                   s0 (.clk, .rst_n, .hsel(hsel[0]), .ctrl(ctrl[0]),
                                  .hready(resp[0].hready), .hwdata(hwdata[0]), .resp(resp[0]));
  ahb_slave #(.WAIT_STATES(2)) s1 (.clk, .rst_n, .hsel(hsel[1]), .ctrl(ctrl[1]),
                                  .hready(resp[1].hready), .hwdata(hwdata[1]), .resp(resp[1]));

  logic [DATA_W-1:0] model [2][256];
  bit                valid [2][256];

  // one burst of n beats on slave s; returns the number of HREADY=0 cycles
  task automatic burst(input int s, input bit wr, input bit sel, input logic [7:0] a,
                       input int n, output int n_wait);
    logic [DATA_W-1:0] data [16];
    int idx, dp;
    bit rdy;
    n_wait = 0;
    for (int i = 0; i < n; i++) data[i] = $urandom();
    idx = 0; dp = -1;
    forever begin
      // address phase of beat idx (or IDLE), write data of beat dp
      ctrl[s] = '0;
      hsel[s] = sel;
      if (idx < n) begin
        ctrl[s].haddr  = ADDR_W'(a) + ADDR_W'(2 * idx);
        ctrl[s].htrans = (idx == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        ctrl[s].hwrite = wr;
        ctrl[s].hsize  = 3'd2;
        ctrl[s].hburst = HBURST_INCR16;
      end
      hwdata[s] = (dp >= 0 && wr) ? data[dp] : '0;
      @(negedge clk);
      rdy = resp[s].hready;
      if (!rdy) n_wait++;
      if (dp >= 0 && rdy) begin
        check(resp[s].hresp == HRESP_OKAY, "response not OKAY");
        if (!wr && valid[s][a + 8'(2 * dp)])
          check(resp[s].hrdata == model[s][a + 8'(2 * dp)],
                $sformatf("slave %0d read at %0d: %h expected %h", s, a + 2 * dp,
                          resp[s].hrdata, model[s][a + 8'(2 * dp)]));
        if (wr && sel) begin
          model[s][a + 8'(2 * dp)] = data[dp];
          valid[s][a + 8'(2 * dp)] = 1'b1;
        end
      end
      @(posedge clk);
      #1;
      if (rdy) begin
        if (dp >= 0 && idx >= n) break;
        dp  = (idx < n) ? idx : -1;
        idx = idx + 1;
      end
    end
    ctrl[s] = '0;
    hwdata[s] = '0;
  endtask

  initial begin
    int w, n;
    logic [7:0] a;
    for (int s = 0; s < 2; s++) begin
      hsel[s] = 1'b0; ctrl[s] = '0; hwdata[s] = '0;
      for (int i = 0; i < 256; i++) valid[s][i] = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      for (int r = 0; r < 20; r++) begin
        n = (r % 4 == 0) ? 1 : (4 << (r % 3));
        a = 8'(2 * $urandom_range(0, 127 - n));
        burst(s, 1'b1, 1'b1, a, n, w);
        check(w == ((s == 1) ? 2 * n : 0), $sformatf("slave %0d write: %0d wait cycles", s, w));
        burst(s, 1'b1, 1'b0, a, n, w);   // not selected: memory unchanged
        burst(s, 1'b0, 1'b1, a, n, w);
        check(w == ((s == 1) ? 2 * n : 0), $sformatf("slave %0d read: %0d wait cycles", s, w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
