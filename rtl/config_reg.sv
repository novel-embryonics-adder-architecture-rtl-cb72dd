// config_reg: the configuration bitstream register shared by all cells.
//
// Holds, for each of the W bit positions, the SEL_B input-selection bits the
// cell computing that position uses, and the two data bits of the carry MUX
// ('0' and '1'); 8 x 3 + 2 = 26 bits for the 8-bit adder. Layout (see
// emb_pkg): cfg[SEL_B*i +: SEL_B] = selection of bit i, then data0, data1.
//
// Reset loads the architecture's contents (selection codes 0..W-1, data bits
// 0 and 1). A synchronous write port (we/wdata) lets the configuration be
// reloaded; reset value and write port are this design's choice, the
// register's size and contents follow the architecture. Output q is the
// register itself, so a write is seen from the next cycle on.
module config_reg
  import emb_pkg::*;
#(
  parameter int unsigned W     = WIDTH,
  parameter int unsigned SEL_B = $clog2(W),
  parameter int unsigned CW    = W * SEL_B + 2
) (
  input  logic          clk,
  input  logic          rst_n,   // asynchronous, active low
  input  logic          we,
  input  logic [CW-1:0] wdata,
  output logic [CW-1:0] q
);

  function automatic logic [CW-1:0] reset_value();
    logic [CW-1:0] c;
    c = '0;
    for (int i = 0; i < W; i++) c[i*SEL_B +: SEL_B] = SEL_B'(i);
    c[W*SEL_B]     = 1'b0;
    c[W*SEL_B + 1] = 1'b1;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= reset_value();
    else if (we) q <= wdata;
  end

endmodule
