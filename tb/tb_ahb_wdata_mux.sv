// tb_ahb_wdata_mux: drives a random HMASTER and HREADY sequence and checks
// that HWDATA always comes from the master that owned the address phase one
// HREADY cycle earlier (a model register in the testbench), and that the
// owner is held while HREADY=0.
module tb_ahb_wdata_mux;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              hready;
  logic [1:0]        hmaster, hmaster_dp, model_dp;
  logic [DATA_W-1:0] m_hwdata [3];
  logic [DATA_W-1:0] hwdata, expect_d;
  int checks = 0;
  int failures = 0;

  ahb_wdata_mux dut (.clk, .rst_n, .hready, .hmaster, .m_hwdata, .hwdata, .hmaster_dp);

  initial begin
    hready = 1'b1; hmaster = '0; model_dp = '0;
    for (int m = 0; m < 3; m++) m_hwdata[m] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      for (int m = 0; m < 3; m++) m_hwdata[m] = $urandom();
      #1;
      expect_d = (model_dp == 2'd0) ? '0 : m_hwdata[model_dp - 1];
      checks++;
      if (hwdata != expect_d || hmaster_dp != model_dp) begin
        failures++;
        $display("FAIL: cycle %0d hwdata %h expected %h (owner %0d/%0d)", r, hwdata, expect_d,
                 hmaster_dp, model_dp);
      end
      hready  = ($urandom_range(0, 3) != 0);
      hmaster = 2'($urandom_range(0, 3));
      @(posedge clk);
      if (hready) model_dp = hmaster;
    end
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
