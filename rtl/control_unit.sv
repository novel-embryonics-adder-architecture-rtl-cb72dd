// control_unit: the embryonic control unit shared by all adder cells.
//
// It runs one addition bit-serially. A bit counter walks the positions
// 0 .. W-1; for each position a 3-bit register is loaded from that
// position's field of the configuration register. One cell at a time, the
// active cell pointed to by ptr, is enabled with these selection bits, the
// carry register as carry-in and the carry-MUX data bits. Its sum and carry
// are routed to the self-check unit together with the operand bits and
// carry-in that the golden generator needs.
//
//   check passes: the sum bit goes into the output register, the carry into
//     the carry register, the counter advances and the selection register
//     takes the next position's bits; ptr moves to the next cell not dead.
//   check fails (error signal): the active cell is marked dead, ptr moves to
//     the next cell not dead and the same bit position is computed again
//     there with the same selection bits and carry-in (cell forwarding).
//
// Dead cells stay dead until reset, so later additions skip them; with W + S
// cells, S cells may fail in all. If no cell is left, the unit stops in
// ST_FAIL. The sequencing above follows the architecture; the start/done
// handshake, the zero carry into bit 0, the permanence of dead marks and the
// fail state are this design's choices.
//
// Timing: start is taken in any state but ST_RUN (load pulses in that
// cycle, for the operand registers). The unit then spends one cycle per bit
// plus one per detected fault in ST_RUN, and done rises in the cycle after
// the last bit: W + faults cycles after the start edge. result/cout hold
// until the next start.
module control_unit
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
  input  logic             rst_n,        // asynchronous, active low
  input  logic             start,
  output logic             load,         // start accepted this cycle
  // configuration register
  input  logic [CW-1:0]    cfg,
  // operand registers (for the self-check unit's input bits)
  input  logic [W-1:0]     a_reg,
  input  logic [W-1:0]     b_reg,
  // to / from the cells unit
  output logic [N-1:0]     cell_en,
  output logic [SEL_B-1:0] sel,
  output logic             cin,
  output logic [1:0]       data_bits,
  input  logic [N-1:0]     cell_sum,
  input  logic [N-1:0]     cell_carry,
  // to / from the self-check unit
  output logic             chk_a,
  output logic             chk_b,
  output logic             chk_cin,
  output logic             chk_sum,
  output logic             chk_carry,
  input  logic             chk_err,
  // status and result
  output ctrl_state_e      state,
  output logic             busy,
  output logic             done,
  output logic             fail,
  output logic             error,        // error signal: a fault was found
  output logic [N-1:0]     dead,
  output logic [PTR_W-1:0] active_cell,
  output logic [W-1:0]     result,
  output logic             cout
);

  localparam int unsigned CNT_W = $clog2(W);

  logic [CNT_W-1:0] count;
  logic [SEL_B-1:0] sel_reg;
  logic [PTR_W-1:0] ptr;
  logic             carry_q;

  // First cell at or above 'from' that is not dead.
  function automatic logic [PTR_W:0] find_alive(logic [N-1:0] d, int from);
    logic [PTR_W:0] r;
    r = {1'b0, PTR_W'(0)};
    for (int c = N - 1; c >= 0; c--)
      if (c >= from && !d[c]) r = {1'b1, PTR_W'(c)};
    return r;
  endfunction

  logic [PTR_W:0] first_alive, next_alive;
  logic           run;

  always_comb begin
    first_alive = find_alive(dead, 0);
    next_alive  = find_alive(dead, int'(ptr) + 1);
    run         = (state == ST_RUN);
    load        = start && !run;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      count   <= '0;
      sel_reg <= '0;
      ptr     <= '0;
      carry_q <= 1'b0;
      dead    <= '0;
      result  <= '0;
      cout    <= 1'b0;
    end else if (load) begin
      count   <= '0;
      sel_reg <= cfg[0 +: SEL_B];
      carry_q <= 1'b0;
      ptr     <= first_alive[PTR_W-1:0];
      state   <= first_alive[PTR_W] ? ST_RUN : ST_FAIL;
    end else if (run) begin
      if (chk_err) begin
        // Error signal: the active cell becomes a dead cell and its
        // selection bits and carry-in are forwarded to the next cell.
        dead[ptr] <= 1'b1;
        ptr       <= next_alive[PTR_W-1:0];
        if (!next_alive[PTR_W]) state <= ST_FAIL;
      end else begin
        result[count] <= chk_sum;
        carry_q       <= chk_carry;
        if (count == CNT_W'(W - 1)) begin
          cout  <= chk_carry;
          state <= ST_DONE;
        end else begin
          count   <= count + 1'b1;
          sel_reg <= cfg[(int'(count) + 1) * SEL_B +: SEL_B];
          ptr     <= next_alive[PTR_W-1:0];
          if (!next_alive[PTR_W]) state <= ST_FAIL;
        end
      end
    end
  end

  // Routing: only the active cell works; its result goes to the checker.
  always_comb begin
    cell_en     = '0;
    if (run) cell_en[ptr] = 1'b1;
    sel         = sel_reg;
    cin         = carry_q;
    data_bits   = cfg[W*SEL_B +: 2];
    chk_a       = a_reg[sel_reg];
    chk_b       = b_reg[sel_reg];
    chk_cin     = carry_q;
    chk_sum     = cell_sum[ptr];
    chk_carry   = cell_carry[ptr];
    busy        = run;
    done        = (state == ST_DONE);
    fail        = (state == ST_FAIL);
    error       = run && chk_err;
    active_cell = ptr;
  end

  // The active cell is never a dead one, and at most one cell works.
  a_ptr_alive: assert property (@(posedge clk) disable iff (!rst_n)
                                run |-> !dead[ptr]);
  a_onehot:    assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0(cell_en));

endmodule
