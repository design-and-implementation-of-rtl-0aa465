// tb_ahb_master: one master on a model bus. The testbench plays the arbiter
// (grants a few cycles after HBUSREQ rises, withdraws the grant when it
// falls) and a memory slave with random wait states. For writes and reads of
// every burst kind it checks: the state sequence IDLE, REQ, GRANT, WRITE or
// READ, TRANS_WRITE or TRANS_READ per further beat, TRANS_END, IDLE; the
// address phases (first NONSEQ, then SEQ, addresses 2 apart); the data that
// reached the model memory; the read data; that the master waits in GRANT
// until both HGRANT and HREADY are 1; the latency k+3 on a bus without wait
// states; and that an ERROR response sets u_err.
module tb_ahb_master;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              u_req, u_write, u_wnext, u_rvalid, u_done, u_err, u_busy;
  logic [ADDR_W-1:0] u_addr;
  hburst_t           u_burst;
  logic [DATA_W-1:0] u_wdata, u_rdata;
  mst_state_t        state;
  logic              hbusreq, hgrant, hready;
  hresp_t            hresp;
  logic [DATA_W-1:0] hrdata, hwdata;
  ahb_ctrl_t         ctrl;

  ahb_master dut (.*);

  tb_ahb_user_drv drv (.clk, .u_req, .u_write, .u_addr, .u_burst, .u_wdata, .u_wnext,
                       .u_rdata, .u_rvalid, .u_done, .u_busy);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus model knobs
  int  grant_delay = 2;
  bit  random_wait = 1'b0;
  bit  inject_error = 1'b0;

  // arbiter model
  int req_cnt = 0;
  // bus model outputs change 2 time units after a rising edge, so that they
  // are settled when the driver samples on the falling edge
  always @(posedge clk) begin
    #2;
    if (!hbusreq) begin
      req_cnt = 0;
      hgrant  = 1'b0;
    end else begin
      req_cnt++;
      if (req_cnt > grant_delay) hgrant = 1'b1;
    end
  end

  // slave model
  logic [DATA_W-1:0] mem [1024];
  logic              dp_valid = 1'b0, dp_write = 1'b0;
  logic [9:0]        dp_addr = '0;
  logic [ADDR_W-1:0] seen_addr [$];
  htrans_t           seen_trans [$];
  mst_state_t        seen_state [$];
  int                n_wait_grant = 0;

  always @(posedge clk) begin
    #2;
    hready = random_wait ? ($urandom_range(0, 2) != 0) : 1'b1;
    hresp  = (inject_error && dp_valid) ? HRESP_ERROR : HRESP_OKAY;
  end
  assign hrdata = (dp_valid && !dp_write) ? mem[dp_addr] : '0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (seen_state.size() == 0 || seen_state[$] != state) seen_state.push_back(state);
      if (state == ST_GRANT && !(hgrant && hready)) n_wait_grant++;
      if (hready) begin
        if (dp_valid && dp_write) mem[dp_addr] = hwdata;
        dp_valid = (ctrl.htrans == HTRANS_NONSEQ || ctrl.htrans == HTRANS_SEQ);
        if (dp_valid) begin
          dp_write = ctrl.hwrite;
          dp_addr  = ctrl.haddr[9:0];
          seen_addr.push_back(ctrl.haddr);
          seen_trans.push_back(ctrl.htrans);
          checks++;
          if (ctrl.hsize != 3'd2 || ctrl.hburst != u_burst_latched) begin
            failures++;
            $display("FAIL: hsize %0d hburst %0d", ctrl.hsize, ctrl.hburst);
          end
        end
      end
    end
  end

  hburst_t u_burst_latched = HBURST_SINGLE;

  task automatic xfer(input bit wr, input logic [ADDR_W-1:0] a, input hburst_t b,
                      input logic [DATA_W-1:0] wd [16], input bit check_latency);
    logic [DATA_W-1:0] rd [16];
    mst_state_t exp_st [$];
    int nr, nw, cyc, k;
    k = int'(burst_beats(b));
    u_burst_latched = b;
    seen_addr.delete(); seen_trans.delete(); seen_state.delete();
    drv.run(wr, a, b, wd, rd, nr, nw, cyc);
    @(posedge clk);
    #1;
    check(nw == (wr ? k : 0) && nr == (wr ? 0 : k),
          $sformatf("%0d writes %0d reads for %0d beats", nw, nr, k));
    check(seen_addr.size() == k, $sformatf("%0d address phases", seen_addr.size()));
    for (int i = 0; i < k && i < seen_addr.size(); i++) begin
      check(seen_addr[i] == a + ADDR_W'(2 * i), $sformatf("beat %0d addr %0d", i, seen_addr[i]));
      check(seen_trans[i] == ((i == 0) ? HTRANS_NONSEQ : HTRANS_SEQ),
            $sformatf("beat %0d htrans %0d", i, seen_trans[i]));
    end
    for (int i = 0; i < k; i++) begin
      if (wr) check(mem[a[9:0] + 10'(2 * i)] == wd[i], $sformatf("write beat %0d", i));
      else    check(rd[i] == mem[a[9:0] + 10'(2 * i)], $sformatf("read beat %0d: %h", i, rd[i]));
    end
    exp_st = '{ST_IDLE, ST_REQ, ST_GRANT, wr ? ST_WRITE : ST_READ};
    if (k > 1) exp_st.push_back(wr ? ST_TRANS_WRITE : ST_TRANS_READ);
    exp_st.push_back(ST_TRANS_END);
    exp_st.push_back(ST_IDLE);
    check(seen_state.size() == exp_st.size(), $sformatf("%0d states visited", seen_state.size()));
    foreach (exp_st[i])
      if (i < seen_state.size())
        check(seen_state[i] == exp_st[i],
              $sformatf("state %0d is %0d, expected %0d", i, seen_state[i], exp_st[i]));
    if (check_latency) check(cyc == k + 3, $sformatf("latency %0d, expected %0d", cyc, k + 3));
  endtask

  initial begin
    logic [DATA_W-1:0] wd [16];
    hgrant = 1'b0; hready = 1'b1; hresp = HRESP_OKAY;
    for (int i = 0; i < 1024; i++) mem[i] = DATA_W'(i * 7);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // no wait states, grant at once: reference latency
    grant_delay = 0;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 16; i++) wd[i] = $urandom();
      xfer(1'b1, ADDR_W'(160 + 256 * b), hburst_t'(b), wd, 1'b1);
      xfer(1'b0, ADDR_W'(160 + 256 * b), hburst_t'(b), wd, 1'b1);
    end
    // late grant and random wait states
    grant_delay = 4;
    random_wait = 1'b1;
    for (int r = 0; r < 12; r++) begin
      for (int i = 0; i < 16; i++) wd[i] = $urandom();
      xfer(1'b1, ADDR_W'(2 * $urandom_range(0, 400)), hburst_t'(r % 4), wd, 1'b0);
      xfer(1'b0, ADDR_W'(2 * $urandom_range(0, 400)), hburst_t'(r % 4), wd, 1'b0);
    end
    check(n_wait_grant > 0, "master never waited in GRANT");
    check(!u_err, "error flag without an error");
    // error response
    random_wait = 1'b0;
    inject_error = 1'b1;
    xfer(1'b0, 32'd40, HBURST_INCR4, wd, 1'b0);
    check(u_err, "ERROR response not flagged");
    inject_error = 1'b0;
    xfer(1'b0, 32'd40, HBURST_SINGLE, wd, 1'b0);
    check(!u_err, "error flag not cleared by the next command");
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
