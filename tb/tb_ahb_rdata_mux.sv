// tb_ahb_rdata_mux: four model slave responses with random data, HREADY and
// HRESP; a random decoder selection each cycle. Checks that the mux returns
// the response of the slave selected on the last edge where its own HREADY
// output was 1 (a model register in the testbench).
module tb_ahb_rdata_mux;
  import ahb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] sel, model_dp;
  ahb_resp_t  s_resp [4];
  ahb_resp_t  resp;
  logic       ready_now;
  int checks = 0;
  int failures = 0;
  int n_stall = 0;

  ahb_rdata_mux dut (.clk, .rst_n, .sel, .s_resp, .resp);

  initial begin
    sel = '0; model_dp = '0;
    for (int s = 0; s < 4; s++) s_resp[s] = '{hrdata: '0, hready: 1'b1, hresp: HRESP_OKAY};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      for (int s = 0; s < 4; s++) begin
        s_resp[s].hrdata = $urandom();
        s_resp[s].hready = ($urandom_range(0, 3) != 0);
        s_resp[s].hresp  = hresp_t'($urandom_range(0, 1));
      end
      sel = 2'($urandom_range(0, 3));
      #1;
      checks++;
      if (resp != s_resp[model_dp]) begin
        failures++;
        $display("FAIL: cycle %0d resp %h expected slave %0d %h", r, resp, model_dp,
                 s_resp[model_dp]);
      end
      ready_now = s_resp[model_dp].hready;
      if (!ready_now) n_stall++;
      @(posedge clk);
      if (ready_now) model_dp = sel;
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: no stalled cycle");
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
