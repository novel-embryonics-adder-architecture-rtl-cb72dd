// tb_ea_cell: self-checking test of one embryonics adder cell.
// Sweeps every selection code, carry-in, enable and injected select-line
// flip over random operands, and compares sum/carry with a full adder
// computed here from the selected operand bits (the carry MUX data bits are
// also swept, so the carry for a == b must equal the chosen data bit).
module tb_ea_cell;
  import emb_pkg::*;

  logic [7:0] a_reg, b_reg;
  logic [2:0] sel;
  logic       cin, en, sum, carry;
  logic [1:0] data_bits;
  cell_fault_t fault;
  int checks = 0, failures = 0;

  ea_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ai, bi, es, ec;
    for (int rep = 0; rep < 20; rep++) begin
      a_reg = 8'($urandom);
      b_reg = 8'($urandom);
      for (int v = 0; v < 8 * 2 * 2 * 4 * 4; v++) begin
        {sel, cin, en, fault, data_bits} = 12'(v);
        #1;
        ai = ((a_reg >> sel) & 8'd1) != 0;
        bi = ((b_reg >> sel) & 8'd1) != 0;
        ai = ai ^ fault.flip_a;
        bi = bi ^ fault.flip_b;
        es = en && ((ai + bi + cin) % 2 == 1);
        if (ai == bi) ec = en && (ai ? data_bits[1] : data_bits[0]);
        else          ec = en && cin;
        checks++;
        if (sum !== es || carry !== ec) begin
          failures++;
          if (failures < 10)
            $display("mismatch a=%h b=%h sel=%0d cin=%b en=%b f=%b d=%b: got %b%b exp %b%b",
                     a_reg, b_reg, sel, cin, en, fault, data_bits, sum, carry, es, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
