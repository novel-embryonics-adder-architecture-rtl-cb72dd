// tb_control_unit: self-checking test of the embryonic control unit.
// The cells and the self-check unit are modelled here: a modelled cell
// returns the correct full-adder bit unless the test marks it faulty (then
// its sum is inverted), and the modelled checker flags any difference from
// a + b + cin. Checks per addition: the sum and carry-out, the cycle count
// (W + faults found), the dead-cell vector, that only live cells work, that
// the selection bits follow the configuration register, and that the unit
// fails when more cells are faulty than there are spares.
module tb_control_unit;
  import emb_pkg::*;
  localparam int W = 8, N = 10;

  logic          clk = 0, rst_n = 0, start = 0, load;
  logic [25:0]   cfg;
  logic [W-1:0]  a_reg, b_reg, result;
  logic [N-1:0]  cell_en, cell_sum, cell_carry, dead;
  logic [2:0]    sel;
  logic          cin, chk_a, chk_b, chk_cin, chk_sum, chk_carry, chk_err;
  logic [1:0]    data_bits;
  ctrl_state_e   state;
  logic          busy, done, fail, error, cout;
  logic [3:0]    active_cell;
  logic [N-1:0]  faulty;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // Cell and checker models.
  always_comb begin
    int s, c;
    for (int k = 0; k < N; k++) begin
      s = (int'(a_reg[sel]) + int'(b_reg[sel]) + int'(cin)) % 2;
      c = (int'(a_reg[sel]) + int'(b_reg[sel]) + int'(cin)) / 2;
      cell_sum[k]   = cell_en[k] & (1'(s) ^ faulty[k]);
      cell_carry[k] = cell_en[k] & 1'(c);
    end
    chk_err = (int'(chk_sum) != (int'(chk_a) + int'(chk_b) + int'(chk_cin)) % 2) ||
              (int'(chk_carry) != (int'(chk_a) + int'(chk_b) + int'(chk_cin)) / 2);
  end

  // Every cycle: only live cells work, selection follows the counter.
  int bitpos;
  always @(posedge clk) if (rst_n && busy) begin
    checks++;
    if ((cell_en & dead) != 0 || cell_en == 0 || sel != cfg[3*bitpos +: 3] ||
        data_bits != cfg[25:24]) begin
      failures++;
      $display("routing: en=%b dead=%b sel=%0d bit=%0d", cell_en, dead, sel, bitpos);
    end
    if (!error) bitpos++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start an addition of x and y and wait for its end. ref_sum is the
  // expected {cout, sum}; add() uses x + y.
  task automatic add_ref(input logic [W-1:0] x, y, input logic [W:0] ref_sum,
                         input int exp_faults, input bit exp_fail);
    int cyc;
    @(negedge clk);
    start = 1;
    a_reg_next = x; b_reg_next = y;
    @(posedge clk);
    #1 start = 0;
    bitpos = 0;
    cyc = 0;
    while (!done && !fail && cyc < 100) begin
      @(posedge clk); #1 cyc++;
    end
    checks++;
    if (exp_fail) begin
      if (!fail) begin failures++; $display("expected fail, state=%s", state.name()); end
    end else if (!done || {cout, result} !== ref_sum || cyc != W + exp_faults) begin
      failures++;
      $display("%h+%h: got %b/%h exp %h, cycles %0d exp %0d", x, y, cout, result,
               ref_sum, cyc, W + exp_faults);
    end
  endtask

  task automatic add(input logic [W-1:0] x, y, input int exp_faults, input bit exp_fail);
    add_ref(x, y, {1'b0, x} + {1'b0, y}, exp_faults, exp_fail);
  endtask

  // Operand registers as in the top level.
  logic [W-1:0] a_reg_next, b_reg_next;
  always_ff @(posedge clk) if (load) begin a_reg <= a_reg_next; b_reg <= b_reg_next; end

  initial begin
    logic [N-1:0] exp_dead;
    for (int i = 0; i < 8; i++) cfg[3*i +: 3] = 3'(i);
    cfg[25:24] = 2'b10;
    faulty = '0;
    a_reg_next = '0; b_reg_next = '0;
    #12 rst_n = 1;
    // Fault-free additions: W cycles each.
    for (int i = 0; i < 40; i++) add(8'($urandom), 8'($urandom), 0, 0);
    add(8'hff, 8'h01, 0, 0);
    add(8'hff, 8'hff, 0, 0);
    checks++;
    if (dead != 0) begin failures++; $display("dead cells without faults: %b", dead); end
    // One faulty working cell: one retry, one dead cell, spare 1 used.
    faulty[3] = 1;
    add(8'h5a, 8'h33, 1, 0);
    exp_dead = 10'b00_0000_1000;
    checks++;
    if (dead != exp_dead) begin failures++; $display("dead=%b exp %b", dead, exp_dead); end
    for (int i = 0; i < 10; i++) add(8'($urandom), 8'($urandom), 0, 0);
    // A second one: spare 2 used.
    faulty[8] = 1;
    add(8'hc3, 8'h7e, 1, 0);
    exp_dead = 10'b01_0000_1000;
    checks++;
    if (dead != exp_dead) begin failures++; $display("dead=%b exp %b", dead, exp_dead); end
    for (int i = 0; i < 10; i++) add(8'($urandom), 8'($urandom), 0, 0);
    // A third one: no cell is left.
    faulty[0] = 1;
    add(8'h01, 8'h02, 0, 1);
    // Reset revives all cells; two faults in one addition are both repaired.
    faulty = '0;
    faulty[1] = 1; faulty[6] = 1;
    rst_n = 0; #12 rst_n = 1;
    add(8'h81, 8'h7f, 2, 0);
    exp_dead = 10'b00_0100_0010;
    checks++;
    if (dead != exp_dead) begin failures++; $display("dead=%b exp %b", dead, exp_dead); end
    // Other selection codes: bit i of the result then comes from operand bit
    // cfg[i]; a reversed configuration adds the bit-reversed operands.
    for (int i = 0; i < 8; i++) cfg[3*i +: 3] = 3'(7 - i);
    begin
      logic [7:0] x, y, xr, yr;
      x = 8'h3c; y = 8'h61;
      for (int i = 0; i < 8; i++) begin xr[i] = x[7-i]; yr[i] = y[7-i]; end
      add_ref(x, y, {1'b0, xr} + {1'b0, yr}, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
