// tb_ahb_addr_mux: gives each master a random address/control bundle and
// checks, for every HMASTER value, that the bus carries the owner's bundle,
// or an IDLE transfer at address 0 when nobody owns the bus.
module tb_ahb_addr_mux;
  import ahb_pkg::*;

  logic [1:0] hmaster;
  ahb_ctrl_t  m_ctrl [3];
  ahb_ctrl_t  ctrl;
  int checks = 0;
  int failures = 0;

  ahb_addr_mux dut (.hmaster, .m_ctrl, .ctrl);

  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int m = 0; m < 3; m++) begin
        m_ctrl[m].haddr  = $urandom();
        m_ctrl[m].htrans = htrans_t'($urandom_range(0, 3));
        m_ctrl[m].hwrite = 1'($urandom_range(0, 1));
        m_ctrl[m].hsize  = 3'($urandom_range(0, 7));
        m_ctrl[m].hburst = hburst_t'($urandom_range(0, 3));
      end
      for (int h = 0; h < 4; h++) begin
        hmaster = 2'(h);
        #1;
        checks++;
        if ((h == 0 && (ctrl.htrans != HTRANS_IDLE || ctrl.haddr != '0)) ||
            (h != 0 && ctrl != m_ctrl[h - 1])) begin
          failures++;
          $display("FAIL: hmaster %0d ctrl %h", h, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
