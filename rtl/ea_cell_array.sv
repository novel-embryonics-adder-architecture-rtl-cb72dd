// ea_cell_array: the embryonics adder cells unit, W working cells followed by
// N_SP spare cells (8 + 2 = 10 cells, laid out as a 2 x 5 matrix in the
// architecture: row 1 = cells 1..5, row 2 = cells 6..8 and spares 1..2).
//
// All cells are clones of one another: they share the operand registers, the
// input-selection bits, the carry-in and the carry-MUX data bits, and each
// has its own enable from the control unit. The control unit enables one
// cell at a time and routes carry and selection bits from cell to cell, so
// the chain of the architecture's neighbour links is carried here by the
// shared lines plus the control unit's carry register; that split is this
// design's choice. Spares are ordinary cells at indices W .. W+N_SP-1 and
// stay idle (outputs 0) until the control unit forwards work to them.
//
// Combinational; per-cell outputs are valid in the cycle their enable is high.
module ea_cell_array
  import emb_pkg::*;
#(
  parameter int unsigned W     = WIDTH,
  parameter int unsigned N_SP  = N_SPARE,
  parameter int unsigned N     = W + N_SP,
  parameter int unsigned SEL_B = $clog2(W)
) (
  input  logic [W-1:0]     a_reg,
  input  logic [W-1:0]     b_reg,
  input  logic [SEL_B-1:0] sel,
  input  logic             cin,
  input  logic [1:0]       data_bits,
  input  logic [N-1:0]     en,          // one-hot active cell, or all 0
  input  cell_fault_t      fault [N],   // injected upset per cell
  output logic [N-1:0]     sum,
  output logic [N-1:0]     carry
);

  for (genvar c = 0; c < N; c++) begin : g_cell
    ea_cell #(.W(W), .SEL_B(SEL_B)) u_cell (
      .a_reg     (a_reg),
      .b_reg     (b_reg),
      .sel       (sel),
      .cin       (cin),
      .data_bits (data_bits),
      .en        (en[c]),
      .fault     (fault[c]),
      .sum       (sum[c]),
      .carry     (carry[c])
    );
  end

endmodule
