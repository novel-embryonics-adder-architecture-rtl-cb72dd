// embryonic_adder: fault-tolerant W-bit adder in an embryonics architecture
// with one shared (unicellular) self-check unit.
//
// Blocks: operand registers (input-1 / input-2), the configuration bitstream
// register (config_reg), the cells unit with W working and N_SP spare MUX
// cells (ea_cell_array), the control unit (control_unit) and the TMR
// self-check unit (self_check). Configuration register, control unit and
// self-check unit exist once for all cells, which is the point of the
// architecture.
//
// Operation: pulse start with operands a and b (taken when not busy). The
// sum is built one bit per cycle by successive cells; a cell whose result the
// self-check unit rejects is made dead and its bit is redone on the next
// cell. done rises W + (faults found) cycles after the start edge, with
// sum/cout valid; fail rises instead when no cell is left. dead shows which
// cells have been retired (they stay retired until reset).
//
// Test hooks, 0 in normal use: cell_fault flips one function-MUX select line
// of a cell, lut_flip flips LUT bits of one self-check lane.
module embryonic_adder
  import emb_pkg::*;
#(
  parameter int unsigned W     = WIDTH,
  parameter int unsigned N_SP  = N_SPARE,
  parameter int unsigned N     = W + N_SP,
  parameter int unsigned SEL_B = $clog2(W),
  parameter int unsigned CW    = W * SEL_B + 2,
  parameter int unsigned PTR_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  logic             cfg_we,
  input  logic [CW-1:0]    cfg_wdata,
  input  cell_fault_t      cell_fault [N],
  input  logic [15:0]      lut_flip [3],
  output logic [W-1:0]     sum,
  output logic             cout,
  output ctrl_state_e      state,
  output logic             busy,
  output logic             done,
  output logic             fail,
  output logic             error,
  output logic             tmr_mismatch,
  output logic [N-1:0]     dead,
  output logic [PTR_W-1:0] active_cell
);

  logic [W-1:0]     a_reg, b_reg;
  logic [CW-1:0]    cfg;
  logic             load;
  logic [N-1:0]     cell_en, cell_sum, cell_carry;
  logic [SEL_B-1:0] sel;
  logic             cin;
  logic [1:0]       data_bits;
  logic             chk_a, chk_b, chk_cin, chk_sum, chk_carry, chk_err;
  logic             mismatch;

  // Input-1 and input-2 operand registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
    end else if (load) begin
      a_reg <= a;
      b_reg <= b;
    end
  end

  config_reg #(.W(W), .SEL_B(SEL_B), .CW(CW)) u_cfg (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we),
    .wdata (cfg_wdata),
    .q     (cfg)
  );

  ea_cell_array #(.W(W), .N_SP(N_SP), .N(N), .SEL_B(SEL_B)) u_cells (
    .a_reg     (a_reg),
    .b_reg     (b_reg),
    .sel       (sel),
    .cin       (cin),
    .data_bits (data_bits),
    .en        (cell_en),
    .fault     (cell_fault),
    .sum       (cell_sum),
    .carry     (cell_carry)
  );

  control_unit #(.W(W), .N_SP(N_SP), .N(N), .SEL_B(SEL_B), .CW(CW),
                 .PTR_W(PTR_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .load        (load),
    .cfg         (cfg),
    .a_reg       (a_reg),
    .b_reg       (b_reg),
    .cell_en     (cell_en),
    .sel         (sel),
    .cin         (cin),
    .data_bits   (data_bits),
    .cell_sum    (cell_sum),
    .cell_carry  (cell_carry),
    .chk_a       (chk_a),
    .chk_b       (chk_b),
    .chk_cin     (chk_cin),
    .chk_sum     (chk_sum),
    .chk_carry   (chk_carry),
    .chk_err     (chk_err),
    .state       (state),
    .busy        (busy),
    .done        (done),
    .fail        (fail),
    .error       (error),
    .dead        (dead),
    .active_cell (active_cell),
    .result      (sum),
    .cout        (cout)
  );

  self_check u_chk (
    .a             (chk_a),
    .b             (chk_b),
    .cin           (chk_cin),
    .sum           (chk_sum),
    .carry         (chk_carry),
    .lut_flip      (lut_flip),
    .err           (chk_err),
    .lane_mismatch (mismatch)
  );

  // Only meaningful while a cell is being checked.
  assign tmr_mismatch = busy & mismatch;

endmodule
