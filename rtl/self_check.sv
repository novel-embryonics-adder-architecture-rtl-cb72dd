// self_check: the unicellular self-check unit, one for all adder cells.
//
// Each of three identical lanes has a golden output generator, an XOR gate
// comparing the cell's sum with the golden sum, an XOR gate comparing the
// carries, and an OR gate joining the two: the lane reports 1 if either bit
// is wrong, 0 if both match. A majority voter over the three lanes gives err,
// so an upset in any one lane (its LUTs, for instance) is outvoted. The
// architecture applies TMR both to the golden output generator and to the
// self-check unit; triplicating the whole lane covers both. lane_mismatch is
// high when the lanes disagree, i.e. when the voter masked a lane.
//
// Combinational: err follows the inputs in the same cycle.
module self_check
  import emb_pkg::*;
(
  input  logic        a,            // adder input bits of the checked position
  input  logic        b,
  input  logic        cin,
  input  logic        sum,          // result of the active cell
  input  logic        carry,
  input  logic [15:0] lut_flip [3], // per-lane LUT upsets, 0 in normal use
  output logic        err,          // 1: the cell's result is wrong
  output logic        lane_mismatch
);

  logic [2:0] gsum, gcarry, lane_err;

  for (genvar l = 0; l < 3; l++) begin : g_lane
    golden_gen u_gold (
      .a        (a),
      .b        (b),
      .cin      (cin),
      .lut_flip (lut_flip[l]),
      .gsum     (gsum[l]),
      .gcarry   (gcarry[l])
    );
    assign lane_err[l] = (sum ^ gsum[l]) | (carry ^ gcarry[l]);
  end

  assign err = (lane_err[0] & lane_err[1]) | (lane_err[0] & lane_err[2]) |
               (lane_err[1] & lane_err[2]);
  assign lane_mismatch = ~(&lane_err) & (|lane_err);

endmodule
