// tu_controller: state-table controller transformed for a telescopic unit.
//
// The fixed-latency controller is a table of control steps S_0 .. S_{N-1},
// each with its load and steering outputs, started from an idle state by
// `start`. A step leaves to the next step, or, if it is a conditional step
// whose condition input `cond` is 1, to its branch target; the last step
// without a taken branch returns to idle and pulses `done`.
// For every step in which the telescopic unit works (tu_active), the
// transformation adds hold states and three rules:
//   * S_j -> successor when fh = 0, with the step's outputs unchanged;
//   * S_j -> SH_j,k when fh = 1, with all load signals inactive and the
//     steering signals unchanged, so the unit's operands stay constant.
//     There is one hold state per out-going edge k: the edge is chosen
//     from `cond` in S_j and remembered in the hold state;
//   * SH_j,k -> the successor on edge k unconditionally, with the step's
//     original outputs. Neither fh nor cond is sampled there, because the
//     unit needs at most two cycles.
// Steps without the unit behave as in the original table.
// With L_MAX > 2 the unit has one hold input per extra cycle (fh[j-1]: the
// unit needs j+1 cycles) and a step may spend up to L_MAX-1 cycles in its
// hold state: loads stay off until the last of them. The default, L_MAX = 2,
// is the plain scheme above with fh[0] as the only hold input.
//
// The steering outputs come straight from a register that is loaded with
// the steering of the state being entered. They therefore cannot glitch when
// the controller moves from S_j to SH_j,k, where their value stays the same;
// a glitch there would disturb the unit's inputs while it is still settling.
//
// Interface: clk, rst_n (active-low asynchronous), start, cond, fh
// (L_MAX-1 bits) in;
// steer, ld, busy, in_hold (the current state is a hold state) and done out.
// Timing: steer is a register output; ld and done are Mealy outputs that
// depend on fh, so the path steer -> unit -> fh -> ld must fit in one
// shortened cycle.
// The three transformation rules, the hold state per out-going edge, the
// longer hold for L_MAX > 2 and the need for glitch-free steering come from
// the source; the idle state, the
// start/done handshake, the branch format (one target per step, same
// outputs on both edges), the state encoding (step index, hold bit and
// remembered successor) and the registered steering are this design's.
module tu_controller
  import tu_pkg::*;
#(
  parameter int unsigned N_STEPS = DEFAULT_STEPS,
  parameter step_t [N_STEPS-1:0] PROGRAM = DEFAULT_PROGRAM,
  parameter int unsigned L_MAX = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   cond,
  input  logic [L_MAX-2:0] fh,
  output steer_t steer,
  output ld_t    ld,
  output logic   busy,
  output logic   in_hold,
  output logic   done
);

  if (N_STEPS < 1 || N_STEPS > 2 ** STEP_W) begin : g_bad_steps
    $error("tu_controller: N_STEPS must lie in 1..2**STEP_W");
  end
  if (L_MAX < 2) begin : g_bad_lmax
    $error("tu_controller: L_MAX must be at least 2");
  end

  localparam int unsigned CW = (L_MAX > 2) ? $clog2(L_MAX - 1) : 1;
  typedef logic [CW-1:0] cnt_t;

  typedef struct packed {
    logic      busy;  // 0: idle
    logic      sh;    // 1: hold state of step `step`
    logic      fin;   // hold state only: the remembered edge leads to idle
    cnt_t      left;  // hold state only: hold cycles still to come after this
    step_idx_t step;
    step_idx_t succ;  // hold state only: the remembered successor step
  } state_t;

  state_t    state_q, state_d;
  step_t     cur;
  logic      to_idle;   // out-going edge chosen in this S state ends the run
  step_idx_t succ;      // its destination step otherwise
  steer_t    steer_q;
  cnt_t      extra_m1;  // extra cycles the unit asks for, minus one
  logic      hold_req;

  // Highest hold input that is set: the unit needs that many extra cycles.
  always_comb begin
    hold_req = |fh;
    extra_m1 = '0;
    for (int j = 0; j < int'(L_MAX) - 1; j++)
      if (fh[j]) extra_m1 = cnt_t'(j);
  end

  assign cur     = PROGRAM[state_q.step];
  assign busy    = state_q.busy;
  assign in_hold = state_q.busy & state_q.sh;
  assign steer   = steer_q;

  // Out-going edge of the current S state.
  always_comb begin
    to_idle = 1'b0;
    succ    = state_q.step + 1'b1;
    if (cur.branch && cond)                                   succ = cur.target;
    else if (state_q.step == step_idx_t'(N_STEPS - 1))        to_idle = 1'b1;
  end

  always_comb begin
    state_d = state_q;
    ld      = LD_NONE;
    done    = 1'b0;
    if (!state_q.busy) begin
      if (start) state_d = '{busy: 1'b1, sh: 1'b0, fin: 1'b0, left: '0, step: '0, succ: '0};
    end else if (state_q.sh && state_q.left != '0) begin
      // Further hold cycle of a unit that needs more than two cycles.
      state_d.left = state_q.left - 1'b1;
    end else if (state_q.sh) begin
      // SH_j,k -> successor on edge k, outputs of the original transition.
      ld = cur.ld;
      if (state_q.fin) begin
        state_d = '0;
        done    = 1'b1;
      end else begin
        state_d = '{busy: 1'b1, sh: 1'b0, fin: 1'b0, left: '0, step: state_q.succ, succ: '0};
      end
    end else if (cur.tu_active && hold_req) begin
      // S_j -> SH_j,k: loads off, steering kept, edge remembered.
      state_d.sh   = 1'b1;
      state_d.fin  = to_idle;
      state_d.succ = succ;
      state_d.left = extra_m1;
    end else begin
      // S_j -> successor.
      ld = cur.ld;
      if (to_idle) begin
        state_d = '0;
        done    = 1'b1;
      end else begin
        state_d = '{busy: 1'b1, sh: 1'b0, fin: 1'b0, left: '0, step: succ, succ: '0};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      steer_q <= '0;
    end else begin
      state_q <= state_d;
      steer_q <= state_d.busy ? PROGRAM[state_d.step].steer : '0;
    end
  end

  // The steering must not change while the unit finishes in a hold state.
  a_steer_held: assert property (@(posedge clk) disable iff (!rst_n)
    in_hold |-> steer == $past(steer))
    else $error("tu_controller: steering changed on entering a hold state");

  // The last hold cycle is always followed by an S state or idle.
  a_hold_ends: assert property (@(posedge clk) disable iff (!rst_n)
    (in_hold && state_q.left == '0) |=> !in_hold);

endmodule
