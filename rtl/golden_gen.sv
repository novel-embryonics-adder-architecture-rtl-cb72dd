// golden_gen: golden output generator of the self-check unit.
//
// Two 8-entry look-up tables hold the full adder's sum and carry truth
// tables; the current adder input bits {a, b, cin} address both, giving the
// reference sum and carry of the bit being checked. The LUT contents are
// constants (emb_pkg::SUM_LUT / CARRY_LUT). lut_flip inverts stored LUT bits
// ([7:0] sum LUT, [15:8] carry LUT) to model upsets in this copy; it is 0 in
// normal use. The two LUTs follow the architecture; the flip port is this
// design's test hook. Combinational.
module golden_gen
  import emb_pkg::*;
(
  input  logic        a,
  input  logic        b,
  input  logic        cin,
  input  logic [15:0] lut_flip,
  output logic        gsum,
  output logic        gcarry
);

  logic [7:0] sum_lut, carry_lut;
  logic [2:0] idx;

  always_comb begin
    sum_lut   = SUM_LUT   ^ lut_flip[7:0];
    carry_lut = CARRY_LUT ^ lut_flip[15:8];
    idx       = {a, b, cin};
    gsum      = sum_lut[idx];
    gcarry    = carry_lut[idx];
  end

endmodule
