// tb_ahb_top_full: the AHB system at its default parameters running the four
// reference transfers, each written and then read back:
//   master 3 -> slave 1, 4-beat incrementing burst from address 160
//   master 1 -> slave 2, 8-beat incrementing burst from address 416
//   master 2 -> slave 3, 16-beat incrementing burst from address 672
//   master 1 -> slave 4, single transfer at address 928
// The 8- and 16-beat transfers use the data of the reference waveforms
// (30, 32, .. and 45, 47, ..); the 4-beat and single ones use 10, 12, .. and
// 60. For every transfer it checks the read data, the number of beats, the
// latency (k beats end k+3 edges after the command is taken: REQ, GRANT, k
// address phases, TRANS_END), and, from a bus monitor, each address phase's
// HADDR, HMASTER, HSEL and HTRANS (NONSEQ first, SEQ after). Finally all
// three masters request at once and the grants must come in priority order
// 1, 2, 3.
module tb_ahb_top_full;
  import ahb_pkg::*;

  localparam int NM = 3;
  localparam int NS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              u_req   [NM];
  logic              u_write [NM];
  logic [ADDR_W-1:0] u_addr  [NM];
  hburst_t           u_burst [NM];
  logic [DATA_W-1:0] u_wdata [NM];
  logic              u_wnext [NM];
  logic [DATA_W-1:0] u_rdata [NM];
  logic              u_rvalid[NM];
  logic              u_done  [NM];
  logic              u_err   [NM];
  logic              u_busy  [NM];
  mst_state_t        m_state [NM];
  logic [NM-1:0]     hbusreq, hgrant;
  logic [1:0]        hmaster;
  ahb_ctrl_t         bus_ctrl;
  logic [NS-1:0]     hsel;
  logic [DATA_W-1:0] hwdata;
  ahb_resp_t         bus_resp;

  ahb_top dut (.*);

  tb_ahb_user_drv drv0 (.clk, .u_req(u_req[0]), .u_write(u_write[0]), .u_addr(u_addr[0]),
    .u_burst(u_burst[0]), .u_wdata(u_wdata[0]), .u_wnext(u_wnext[0]), .u_rdata(u_rdata[0]),
    .u_rvalid(u_rvalid[0]), .u_done(u_done[0]), .u_busy(u_busy[0]));
  tb_ahb_user_drv drv1 (.clk, .u_req(u_req[1]), .u_write(u_write[1]), .u_addr(u_addr[1]),
    .u_burst(u_burst[1]), .u_wdata(u_wdata[1]), .u_wnext(u_wnext[1]), .u_rdata(u_rdata[1]),
    .u_rvalid(u_rvalid[1]), .u_done(u_done[1]), .u_busy(u_busy[1]));
  tb_ahb_user_drv drv2 (.clk, .u_req(u_req[2]), .u_write(u_write[2]), .u_addr(u_addr[2]),
    .u_burst(u_burst[2]), .u_wdata(u_wdata[2]), .u_wnext(u_wnext[2]), .u_rdata(u_rdata[2]),
    .u_rvalid(u_rvalid[2]), .u_done(u_done[2]), .u_busy(u_busy[2]));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus monitor: every accepted address phase
  logic [ADDR_W-1:0] mon_addr [$];
  logic [1:0]        mon_master [$];
  logic [NS-1:0]     mon_sel [$];
  htrans_t           mon_trans [$];
  always @(negedge clk) begin
    if (rst_n && bus_resp.hready &&
        (bus_ctrl.htrans == HTRANS_NONSEQ || bus_ctrl.htrans == HTRANS_SEQ)) begin
      mon_addr.push_back(bus_ctrl.haddr);
      mon_master.push_back(hmaster);
      mon_sel.push_back(hsel);
      mon_trans.push_back(bus_ctrl.htrans);
    end
  end

  task automatic run_on(input int m, input bit wr, input logic [ADDR_W-1:0] addr,
                        input hburst_t b, input logic [DATA_W-1:0] wd [16],
                        output logic [DATA_W-1:0] rd [16], output int nr, output int nw,
                        output int cyc);
    case (m)
      0: drv0.run(wr, addr, b, wd, rd, nr, nw, cyc);
      1: drv1.run(wr, addr, b, wd, rd, nr, nw, cyc);
      default: drv2.run(wr, addr, b, wd, rd, nr, nw, cyc);
    endcase
  endtask

  task automatic workload(input int m, input int slave, input logic [ADDR_W-1:0] addr,
                          input hburst_t b, input int d0);
    logic [DATA_W-1:0] wd [16];
    logic [DATA_W-1:0] rd [16];
    int nr, nw, cyc, k;
    k = int'(burst_beats(b));
    for (int i = 0; i < 16; i++) wd[i] = DATA_W'(d0 + 2 * i);
    for (int pass = 0; pass < 2; pass++) begin
      mon_addr.delete(); mon_master.delete(); mon_sel.delete(); mon_trans.delete();
      run_on(m, pass == 0, addr, b, wd, rd, nr, nw, cyc);
      check(cyc == k + 3, $sformatf("M%0d S%0d pass %0d: latency %0d, expected %0d",
                                    m + 1, slave, pass, cyc, k + 3));
      check(nw == ((pass == 0) ? k : 0) && nr == ((pass == 0) ? 0 : k),
            $sformatf("M%0d pass %0d: %0d writes %0d reads", m + 1, pass, nw, nr));
      check(mon_addr.size() == k, $sformatf("M%0d pass %0d: %0d address phases",
                                            m + 1, pass, mon_addr.size()));
      for (int i = 0; i < k && i < mon_addr.size(); i++) begin
        check(mon_addr[i] == addr + ADDR_W'(2 * i),
              $sformatf("beat %0d addr %0d expected %0d", i, mon_addr[i], addr + 2 * i));
        check(mon_master[i] == 2'(m + 1), $sformatf("beat %0d hmaster %0d", i, mon_master[i]));
        check(mon_sel[i] == NS'(1 << (slave - 1)), $sformatf("beat %0d hsel %b", i, mon_sel[i]));
        check(mon_trans[i] == ((i == 0) ? HTRANS_NONSEQ : HTRANS_SEQ),
              $sformatf("beat %0d htrans %0d", i, mon_trans[i]));
      end
      if (pass == 1)
        for (int i = 0; i < k; i++)
          check(rd[i] == wd[i], $sformatf("M%0d S%0d read beat %0d: %0d expected %0d",
                                          m + 1, slave, i, rd[i], wd[i]));
    end
    check(!u_err[m], "error response");
  endtask

  // all three masters ask at the same time: the bus must go to 1, 2, 3
  task automatic priority_test();
    logic [DATA_W-1:0] wd0 [16], wd1 [16], wd2 [16];
    logic [DATA_W-1:0] rd0 [16], rd1 [16], rd2 [16];
    int nr0, nw0, c0, nr1, nw1, c1, nr2, nw2, c2;
    logic [1:0] order [$];
    for (int i = 0; i < 16; i++) begin
      wd0[i] = DATA_W'(100 + i); wd1[i] = DATA_W'(200 + i); wd2[i] = DATA_W'(300 + i);
    end
    mon_addr.delete(); mon_master.delete(); mon_sel.delete(); mon_trans.delete();
    fork
      drv0.run(1'b1, 32'd0,   HBURST_INCR4, wd0, rd0, nr0, nw0, c0);
      drv1.run(1'b1, 32'd300, HBURST_INCR4, wd1, rd1, nr1, nw1, c1);
      drv2.run(1'b1, 32'd600, HBURST_INCR4, wd2, rd2, nr2, nw2, c2);
    join
    foreach (mon_trans[i]) if (mon_trans[i] == HTRANS_NONSEQ) order.push_back(mon_master[i]);
    check(order.size() == 3, $sformatf("%0d bursts seen", order.size()));
    if (order.size() == 3)
      check(order[0] == 2'd1 && order[1] == 2'd2 && order[2] == 2'd3,
            $sformatf("grant order %0d %0d %0d", order[0], order[1], order[2]));
    check(c0 == 7 && c1 > c0 && c2 > c1, $sformatf("latencies %0d %0d %0d", c0, c1, c2));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    workload(2, 1, 32'd160, HBURST_INCR4,  10);
    workload(0, 2, 32'd416, HBURST_INCR8,  30);
    workload(1, 3, 32'd672, HBURST_INCR16, 45);
    workload(0, 4, 32'd928, HBURST_SINGLE, 60);
    priority_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
