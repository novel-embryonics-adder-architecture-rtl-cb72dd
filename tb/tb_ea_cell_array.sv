// tb_ea_cell_array: self-checking test of the cells unit (8 + 2 cells).
// Enables one cell at a time (or none) with random operands, selection,
// carry-in and a random injected fault on one random cell; checks that only
// the enabled cell drives a result, that it is the full-adder result of the
// selected bits, and that it is wrong exactly when that cell is the faulty one.
module tb_ea_cell_array;
  import emb_pkg::*;
  localparam int N = 10;

  logic [7:0]  a_reg, b_reg;
  logic [2:0]  sel;
  logic        cin;
  logic [1:0]  data_bits;
  logic [N-1:0] en, sum, carry;
  cell_fault_t fault [N];
  int checks = 0, failures = 0;

  ea_cell_array dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int act, bad, ai, bi, s, c;
    data_bits = 2'b10;
    for (int it = 0; it < 2000; it++) begin
      a_reg = 8'($urandom); b_reg = 8'($urandom);
      sel = 3'($urandom); cin = 1'($urandom);
      act = $urandom_range(N);          // N means no cell enabled
      bad = $urandom_range(N - 1);
      en = '0;
      if (act < N) en[act] = 1'b1;
      foreach (fault[k]) fault[k] = '0;
      fault[bad] = cell_fault_t'(2'($urandom_range(3, 1)));
      #1;
      for (int k = 0; k < N; k++) begin
        ai = (a_reg >> sel) & 1; bi = (b_reg >> sel) & 1;
        if (k == bad) begin ai ^= int'(fault[k].flip_a); bi ^= int'(fault[k].flip_b); end
        s = (ai + bi + int'(cin)) % 2;
        c = (ai + bi + int'(cin)) / 2;
        if (k != act) begin s = 0; c = 0; end
        checks++;
        if (int'(sum[k]) != s || int'(carry[k]) != c) begin
          failures++;
          if (failures < 10) $display("cell %0d act=%0d bad=%0d got %b%b exp %0d%0d",
                                      k, act, bad, sum[k], carry[k], s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
