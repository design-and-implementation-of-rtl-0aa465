// tb_ahb_arbiter: checks the fixed-priority arbiter against a model:
//  - simultaneous requests are granted to master 1, then 2, then 3;
//  - an owner keeps the grant while its request stays high, even if a
//    higher-priority master asks meanwhile;
//  - the grant does not move on a cycle with HREADY=0;
//  - HMASTER follows the grant one HREADY cycle later; nobody is granted
//    without requests.
// The directed part is followed by 500 random cycles compared with the model.
module tb_ahb_arbiter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] hbusreq, hgrant;
  logic       hready;
  logic [1:0] hmaster;
  logic [1:0] m_gnt, m_hmaster;
  int checks = 0;
  int failures = 0;

  ahb_arbiter dut (.clk, .rst_n, .hbusreq, .hready, .hgrant, .hmaster);

  // model, updated on each rising edge
  always @(posedge clk) begin
    if (!rst_n) begin
      m_gnt     <= '0;
      m_hmaster <= '0;
    end else if (hready) begin
      m_hmaster <= m_gnt;
      if (m_gnt != 0 && hbusreq[m_gnt - 1]) m_gnt <= m_gnt;
      else if (hbusreq[0]) m_gnt <= 2'd1;
      else if (hbusreq[1]) m_gnt <= 2'd2;
      else if (hbusreq[2]) m_gnt <= 2'd3;
      else m_gnt <= 2'd0;
    end
  end

  task automatic cycle(input logic [2:0] req, input logic rdy);
    @(negedge clk);
    hbusreq = req;
    hready  = rdy;
    #1;
    checks++;
    if (hgrant != ((m_gnt == 0) ? 3'b000 : 3'(1 << (m_gnt - 1))) || hmaster != m_hmaster) begin
      failures++;
      $display("FAIL: req %b hgrant %b hmaster %0d, model grant %0d hmaster %0d",
               req, hgrant, hmaster, m_gnt, m_hmaster);
    end
  endtask

  task automatic expect_grant(input logic [2:0] g, input string what);
    checks++;
    if (hgrant != g) begin
      failures++;
      $display("FAIL: %s: hgrant %b expected %b", what, hgrant, g);
    end
  endtask

  initial begin
    hbusreq = '0; hready = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cycle(3'b000, 1); expect_grant(3'b000, "no request");
    cycle(3'b111, 1); cycle(3'b111, 1); expect_grant(3'b001, "all ask: master 1");
    cycle(3'b110, 1); cycle(3'b110, 1); expect_grant(3'b010, "then master 2");
    cycle(3'b100, 1); cycle(3'b100, 1); expect_grant(3'b100, "then master 3");
    cycle(3'b101, 1); cycle(3'b101, 1); expect_grant(3'b100, "owner 3 keeps bus");
    cycle(3'b001, 0); cycle(3'b001, 0); expect_grant(3'b100, "no change while HREADY=0");
    cycle(3'b001, 1); cycle(3'b001, 1); expect_grant(3'b001, "master 1 after release");
    cycle(3'b000, 1); cycle(3'b000, 1); expect_grant(3'b000, "released");
    for (int r = 0; r < 500; r++) cycle(3'($urandom_range(0, 7)), ($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
