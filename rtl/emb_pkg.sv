// emb_pkg: types and constants shared by the embryonic adder.
//
// The adder is bit-serial: one full-adder cell at a time computes one bit
// position, chosen by a 3-bit input-selection field read from a 26-bit
// configuration bitstream register. That register (config_reg) has this
// layout and these contents after reset:
//   cfg[3*i +: 3]  input-selection bits of bit position i (i = 0..7),
//                  holding i itself (000, 001, ... 111, as in the
//                  architecture's configuration register);
//   cfg[24]        carry-MUX data bit '0';
//   cfg[25]        carry-MUX data bit '1'.
// The field order and the positions of the two data bits are this design's
// choice; the 26-bit size, the eight selection codes and the two data bits
// follow the architecture. The package holds the default sizes, the fault
// injection type, the full-adder truth tables used by the golden output
// generator and the control unit's state type.
package emb_pkg;

  localparam int unsigned WIDTH   = 8;              // adder bit length
  localparam int unsigned N_SPARE = 2;              // spare cells

  // Fault injection into one cell: a single-bit flip on one select line of
  // the cell's function (sum/carry) MUXes. flip_a inverts the bit coming
  // from the input-1 MUX, flip_b the bit from the input-2 MUX.
  typedef struct packed {
    logic flip_a;
    logic flip_b;
  } cell_fault_t;

  // Full-adder truth tables, indexed by {a, b, cin}.
  localparam logic [7:0] SUM_LUT   = 8'b1001_0110;
  localparam logic [7:0] CARRY_LUT = 8'b1110_1000;

  // Control unit states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // waiting for start
    ST_RUN  = 2'd1,   // one bit position per cycle (plus retries)
    ST_DONE = 2'd2,   // result valid
    ST_FAIL = 2'd3    // no working cell left
  } ctrl_state_e;

endpackage
