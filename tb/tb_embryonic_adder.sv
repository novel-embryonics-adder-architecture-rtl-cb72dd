// tb_embryonic_adder: end-to-end test of the embryonic adder at its default
// size (8-bit adder, 8 working + 2 spare cells).
//
// Runs random additions and compares {cout, sum} with a + b computed here,
// and the latency with 8 cycles plus one per detected fault. Along the way
// it makes each mechanism of the design happen and counts it:
//   fault found and bit redone on the next cell (error signal),
//   spare cell 1 and spare cell 2 doing work,
//   dead cells staying skipped in later additions,
//   a single-lane LUT upset outvoted by the TMR self-check,
//   the adder failing once a third cell dies,
//   a configuration register rewrite,
// and counts a failure for any mechanism that never happened.
module tb_embryonic_adder;
  import emb_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, cfg_we = 0;
  logic [7:0]  a = 0, b = 0, sum;
  logic [25:0] cfg_wdata = 0;
  cell_fault_t cell_fault [10];
  logic [15:0] lut_flip [3];
  ctrl_state_e state;
  logic        cout, busy, done, fail, error, tmr_mismatch;
  logic [9:0]  dead;
  logic [3:0]  active_cell;
  int checks = 0, failures = 0;
  int n_retry = 0, n_spare1 = 0, n_spare2 = 0, n_tmr = 0, n_fail = 0, n_cfg = 0;
  int n_skip = 0;

  embryonic_adder dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (error) n_retry++;
    if (busy && active_cell == 4'd8) n_spare1++;
    if (busy && active_cell == 4'd9) n_spare2++;
    if (tmr_mismatch) n_tmr++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input logic [7:0] x, y, input int exp_faults, input bit exp_fail);
    int cyc;
    logic [8:0] ref_sum;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(posedge clk);
    #1 start = 0; a = 8'($urandom); b = 8'($urandom);
    cyc = 0;
    while (!done && !fail && cyc < 100) begin
      @(posedge clk); #1 cyc++;
    end
    ref_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if (exp_fail) begin
      if (fail) n_fail++;
      else begin failures++; $display("expected the adder to fail, state %s", state.name()); end
    end else if (!done || {cout, sum} !== ref_sum || cyc != 8 + exp_faults) begin
      failures++;
      $display("%h+%h: got %b/%h exp %h in %0d cycles, exp %0d", x, y, cout, sum,
               ref_sum, cyc, 8 + exp_faults);
    end
  endtask

  task automatic expect_dead(input logic [9:0] d);
    checks++;
    if (dead !== d) begin failures++; $display("dead=%b exp %b", dead, d); end
  endtask

  initial begin
    foreach (cell_fault[k]) cell_fault[k] = '0;
    lut_flip = '{default: 16'h0};
    #12 rst_n = 1;

    // Fault-free: all spares idle.
    for (int i = 0; i < 50; i++) add(8'($urandom), 8'($urandom), 0, 0);
    add(8'hff, 8'hff, 0, 0);
    add(8'h00, 8'h00, 0, 0);
    expect_dead('0);
    checks++;
    if (n_spare1 + n_spare2 != 0) begin failures++; $display("spare used without fault"); end

    // Rewrite the configuration register with its own contents.
    @(negedge clk);
    cfg_we = 1; cfg_wdata = 26'b10_111_110_101_100_011_010_001_000;
    @(negedge clk);
    cfg_we = 0; n_cfg++;
    add(8'h96, 8'h69, 0, 0);

    // TMR: upsets in one lane's LUTs change nothing.
    lut_flip[1] = 16'hffff;
    for (int i = 0; i < 10; i++) add(8'($urandom), 8'($urandom), 0, 0);
    lut_flip[1] = 16'h0;
    lut_flip[2] = 16'h00f0;
    for (int i = 0; i < 10; i++) add(8'($urandom), 8'($urandom), 0, 0);
    lut_flip[2] = 16'h0;
    expect_dead('0);

    // Upset in cell 3's function MUX: cell 3 dies, spare 1 takes the last bit.
    cell_fault[3].flip_a = 1;
    add(8'h5a, 8'h33, 1, 0);
    expect_dead(10'b00_0000_1000);
    n_skip = n_retry;
    for (int i = 0; i < 20; i++) add(8'($urandom), 8'($urandom), 0, 0);
    checks++;
    if (n_retry != n_skip) begin failures++; $display("dead cell used again"); end
    else n_skip = 1;

    // Second upset, in cell 6: spare 2 comes into use.
    cell_fault[6].flip_b = 1;
    add(8'hc3, 8'h7e, 1, 0);
    expect_dead(10'b00_0100_1000);
    for (int i = 0; i < 20; i++) add(8'($urandom), 8'($urandom), 0, 0);

    // Third upset, in spare 1: no cell is left.
    cell_fault[8] = '{flip_a: 1'b1, flip_b: 1'b1};
    add(8'h10, 8'h20, 0, 1);

    // Reset revives the cells; with the upsets gone it works again.
    foreach (cell_fault[k]) cell_fault[k] = '0;
    rst_n = 0; #12 rst_n = 1;
    add(8'h7f, 8'h01, 0, 0);
    expect_dead('0);

    $display("mechanisms: retry=%0d spare1=%0d spare2=%0d skip=%0d tmr=%0d fail=%0d cfg=%0d",
             n_retry, n_spare1, n_spare2, n_skip, n_tmr, n_fail, n_cfg);
    if (n_retry == 0) begin failures++; $display("no fault was repaired"); end
    if (n_spare1 == 0) begin failures++; $display("spare 1 never worked"); end
    if (n_spare2 == 0) begin failures++; $display("spare 2 never worked"); end
    if (n_skip == 0) begin failures++; $display("dead cells never skipped"); end
    if (n_tmr == 0) begin failures++; $display("TMR never masked a lane"); end
    if (n_fail == 0) begin failures++; $display("never ran out of cells"); end
    if (n_cfg == 0) begin failures++; $display("configuration never written"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
