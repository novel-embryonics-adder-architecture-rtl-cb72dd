// tb_config_reg: self-checking test of the configuration bitstream register.
// After reset the 26 bits must read 10_111_110_101_100_011_010_001_000
// (data bits '1','0', then selection codes 7 down to 0); random writes must
// appear the cycle after we, and nothing may change while we is low.
module tb_config_reg;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [25:0] wdata = '0, q, expect_q;
  int checks = 0, failures = 0;

  config_reg dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("%s: q=%b expected %b", what, q, expect_q);
    end
  endtask

  initial begin
    expect_q = 26'b10_111_110_101_100_011_010_001_000;
    #12 check("reset");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 check("hold after reset");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      wdata = 26'($urandom);
      @(posedge clk);
      #1;
      if (we) expect_q = wdata;
      check("write");
    end
    rst_n = 0;
    #1 expect_q = 26'b10_111_110_101_100_011_010_001_000;
    check("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
