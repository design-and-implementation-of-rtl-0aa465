// tb_ahb_decoder: drives every address of the 1024-unit map plus random
// high address bits and checks that exactly the slave owning the address's
// 256-unit region is selected (slave = address / 256 mod 4), including the
// reference burst start addresses 160, 416, 672 and 928.
module tb_ahb_decoder;
  import ahb_pkg::*;

  logic [ADDR_W-1:0] haddr;
  logic [3:0]        hsel;
  logic [1:0]        sel;
  int checks = 0;
  int failures = 0;

  ahb_decoder dut (.haddr, .hsel, .sel);

  task automatic check_addr(input logic [ADDR_W-1:0] a);
    int exp_s;
    haddr = a;
    #1;
    exp_s = int'((a / 256) % 4);
    checks++;
    if (sel != 2'(exp_s) || hsel != 4'(1 << exp_s)) begin
      failures++;
      $display("FAIL: addr %0d sel %0d hsel %b expected slave %0d", a, sel, hsel, exp_s + 1);
    end
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) check_addr(ADDR_W'(a));
    for (int i = 0; i < 200; i++) check_addr($urandom());
    check_addr(32'd160);
    check_addr(32'd416);
    check_addr(32'd672);
    check_addr(32'd928);
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
