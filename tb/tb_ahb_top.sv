// tb_ahb_top: end-to-end test of the AHB system with slaves that insert two
// wait states per beat. The three masters run at the same time, each doing
// random writes and read-backs (all four burst kinds, random slave) inside an
// address window of its own, so a reference memory in the testbench can
// predict every read. The test counts how often each mechanism of the design
// occurred and fails if one never did: each burst kind read and written,
// HREADY=0 stalls, bus handover between masters, a request that had to wait
// because another master held the bus, and a higher-priority master waiting
// for a lower-priority master's burst to end.
module tb_ahb_top;
  import ahb_pkg::*;

  localparam int NM = 3;
  localparam int NS = 4;
  localparam int ROUNDS = 24;

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

  ahb_top #(.SLAVE_WAIT(2)) dut (.*);

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

  // mechanism counters
  int n_burst_wr [4];
  int n_burst_rd [4];
  int n_stall = 0;
  int n_handover = 0;
  int n_wait_busy = 0;
  int n_prio_wait = 0;
  logic [1:0] last_owner = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (!bus_resp.hready) n_stall++;
      if (bus_ctrl.htrans == HTRANS_NONSEQ && bus_resp.hready) begin
        if (last_owner != 2'd0 && last_owner != hmaster) n_handover++;
        last_owner = hmaster;
      end
      for (int m = 0; m < NM; m++)
        if (m_state[m] == ST_GRANT && !hgrant[m] && hgrant != '0) begin
          n_wait_busy++;
          for (int o = m + 1; o < NM; o++) if (hgrant[o]) n_prio_wait++;
        end
    end
  end

  // reference memory over the whole 1024-unit map
  logic [DATA_W-1:0] ref_mem [1024];
  bit                ref_ok  [1024];

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

  // master m uses offsets m*64 .. m*64+63 of every slave's region
  task automatic traffic(input int m);
    logic [DATA_W-1:0] wd [16];
    logic [DATA_W-1:0] rd [16];
    int nr, nw, cyc, k, slot, slave;
    logic [ADDR_W-1:0] addr;
    hburst_t b;
    for (int r = 0; r < ROUNDS; r++) begin
      b     = hburst_t'(r % 4);
      k     = int'(burst_beats(b));
      slave = int'($urandom_range(0, NS - 1));
      slot  = int'($urandom_range(0, 32 - k));
      addr  = ADDR_W'(slave * 256 + m * 64 + 2 * slot);
      for (int i = 0; i < 16; i++) wd[i] = $urandom();
      run_on(m, 1'b1, addr, b, wd, rd, nr, nw, cyc);
      check(nw == k, $sformatf("M%0d wrote %0d beats, expected %0d", m + 1, nw, k));
      for (int i = 0; i < k; i++) begin
        ref_mem[addr + 2 * i] = wd[i];
        ref_ok[addr + 2 * i]  = 1'b1;
      end
      n_burst_wr[b]++;
      // read back the same burst, sometimes shifted to cover older data
      if (r % 3 == 2) addr = ADDR_W'(slave * 256 + m * 64 + 2 * int'($urandom_range(0, 32 - k)));
      run_on(m, 1'b0, addr, b, wd, rd, nr, nw, cyc);
      check(nr == k, $sformatf("M%0d read %0d beats, expected %0d", m + 1, nr, k));
      for (int i = 0; i < k; i++)
        if (ref_ok[addr + 2 * i])
          check(rd[i] == ref_mem[addr + 2 * i],
                $sformatf("M%0d read %0d at %0d: %h expected %h", m + 1, i, addr + 2 * i,
                          rd[i], ref_mem[addr + 2 * i]));
      n_burst_rd[b]++;
      check(!u_err[m], $sformatf("M%0d error response", m + 1));
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      ref_mem[i] = '0;
      ref_ok[i]  = 1'b0;
    end
    for (int i = 0; i < 4; i++) begin
      n_burst_wr[i] = 0;
      n_burst_rd[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      traffic(0);
      traffic(1);
      traffic(2);
    join
    for (int i = 0; i < 4; i++) begin
      check(n_burst_wr[i] > 0, $sformatf("no write burst of kind %0d", i));
      check(n_burst_rd[i] > 0, $sformatf("no read burst of kind %0d", i));
    end
    check(n_stall > 0, "no HREADY stall");
    check(n_handover > 0, "no bus handover");
    check(n_wait_busy > 0, "no request waited for a busy bus");
    check(n_prio_wait > 0, "no higher-priority master waited for a burst");
    $display("mechanisms: stalls=%0d handovers=%0d waits=%0d priority_waits=%0d",
             n_stall, n_handover, n_wait_busy, n_prio_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
