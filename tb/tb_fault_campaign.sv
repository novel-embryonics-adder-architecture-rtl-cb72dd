// tb_fault_campaign: single-bit fault-injection campaign on the embryonic
// adder at its default size: 30 iterations, each injecting one bit flip on
// a function-selection line of a random working cell, then adding random
// operands. An iteration counts as recovered when the sum and carry-out are
// right, exactly the faulty cell is marked dead, and the addition took one
// extra cycle (8 + 1). Every iteration must recover (100% recovery).
module tb_fault_campaign;
  import emb_pkg::*;
  localparam int ITER = 30;

  logic        clk = 0, rst_n = 0, start = 0, cfg_we = 0;
  logic [7:0]  a = 0, b = 0, sum;
  logic [25:0] cfg_wdata = 0;
  cell_fault_t cell_fault [10];
  logic [15:0] lut_flip [3];
  ctrl_state_e state;
  logic        cout, busy, done, fail, error, tmr_mismatch;
  logic [9:0]  dead;
  logic [3:0]  active_cell;
  int checks = 0, failures = 0, recovered = 0;

  embryonic_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int victim, cyc;
    logic [7:0] x, y;
    logic [8:0] ref_sum;
    lut_flip = '{default: 16'h0};
    for (int it = 0; it < ITER; it++) begin
      foreach (cell_fault[k]) cell_fault[k] = '0;
      rst_n = 0;
      #12 rst_n = 1;
      victim = $urandom_range(7);
      cell_fault[victim] = cell_fault_t'(2'($urandom_range(2, 1)));
      x = 8'($urandom); y = 8'($urandom);
      @(negedge clk);
      a = x; b = y; start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0;
      while (!done && !fail && cyc < 100) begin
        @(posedge clk); #1 cyc++;
      end
      ref_sum = {1'b0, x} + {1'b0, y};
      checks++;
      if (done && {cout, sum} == ref_sum && dead == 10'(1 << victim) && cyc == 9)
        recovered++;
      else begin
        failures++;
        $display("iteration %0d: victim %0d fault %b, %h+%h got %b/%h dead=%b in %0d cycles",
                 it, victim, cell_fault[victim], x, y, cout, sum, dead, cyc);
      end
    end
    $display("recovered %0d of %0d injected faults", recovered, ITER);
    checks++;
    if (recovered != ITER) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
