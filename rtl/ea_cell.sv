// ea_cell: one embryonics adder cell, a full adder built only from MUXes.
//
// Two WIDTH:1 input-selection MUXes pick a_i = a_reg[sel] and b_i =
// b_reg[sel]. These two bits are the select lines of two 4:1 function MUXes:
//   sum MUX,   data (00,01,10,11) = (cin, ~cin, ~cin, cin)
//   carry MUX, data (00,01,10,11) = (data0, cin, cin, data1)
// With data0 = 0 and data1 = 1 from the configuration register this is
// sum = a^b^cin and carry = majority(a,b,cin). The MUX structure, the Cin
// and inverted Cin on the sum MUX and the '0'/'1' data bits of the carry MUX
// follow the architecture; the order of the MUX data inputs is the one that
// makes a full adder.
//
// A cell works only while en is high (the control unit's active cell); an
// idle or dead cell drives sum = carry = 0. fault flips one select line of
// the function MUXes, a single-bit upset used to test the repair.
//
// Purely combinational: sum and carry follow the inputs in the same cycle.
module ea_cell
  import emb_pkg::*;
#(
  parameter int unsigned W     = WIDTH,
  parameter int unsigned SEL_B = $clog2(W)
) (
  input  logic [W-1:0]     a_reg,      // input-1 register (operand A)
  input  logic [W-1:0]     b_reg,      // input-2 register (operand B)
  input  logic [SEL_B-1:0] sel,        // input-selection bits
  input  logic             cin,        // carry from the previous bit
  input  logic [1:0]       data_bits,  // {data1, data0} of the carry MUX
  input  logic             en,         // cell is the active working cell
  input  cell_fault_t      fault,      // injected upset
  output logic             sum,
  output logic             carry
);

  logic       a_i, b_i;       // outputs of the input-selection MUXes
  logic [1:0] fsel;           // function-MUX select lines
  logic [3:0] sum_data, carry_data;

  always_comb begin
    a_i        = a_reg[sel];
    b_i        = b_reg[sel];
    fsel       = {a_i ^ fault.flip_a, b_i ^ fault.flip_b};
    sum_data   = {cin, ~cin, ~cin, cin};
    carry_data = {data_bits[1], cin, cin, data_bits[0]};
    sum        = en & sum_data[fsel];
    carry      = en & carry_data[fsel];
  end

endmodule
