// tu_pkg: types and constants shared by the telescopic-unit design.
//
// A telescopic unit is a single-cycle combinational block that is clocked
// faster than its worst-case delay. A hold circuit flags the operand patterns
// that still need the old (longer) delay; for those the unit is given two
// cycles. This package defines:
//   * bdd_node_t   - one node of a BDD, used to describe a hold function that
//                    is mapped onto a multiplexer network (hold_bdd_mux);
//   * steer_t/ld_t - the steering (multiplexer select) and load (register
//                    enable) fields that the controller drives into the data
//                    path, named after the m1..m4 and ld_x1/ld_r1 signals of
//                    the controller example this design follows;
//   * step_t       - one control step of the state table (outputs plus a flag
//                    saying whether the telescopic unit works in that step);
//   * DEFAULT_PROGRAM - the control steps the top runs by default.
// The field widths and the register set are this design's choice; the source
// only prints the signal names and the values m1=1, m2=3, m3=1, m4=1.
package tu_pkg;

  // ---------------------------------------------------------------- BDD
  // Node indices: 0 is the constant-0 leaf, 1 the constant-1 leaf, internal
  // node k (k = 0..NNODES-1) has index k+2. A node's children must have a
  // smaller index than the node itself; the root is the last node.
  typedef logic [7:0] bdd_idx_t;
  localparam bdd_idx_t BDD_ZERO = 8'd0;
  localparam bdd_idx_t BDD_ONE  = 8'd1;

  typedef struct packed {
    logic [7:0] var_idx;  // input variable that selects between the children
    bdd_idx_t   lo;       // child taken when the variable is 0
    bdd_idx_t   hi;       // child taken when the variable is 1
  } bdd_node_t;

  // ------------------------------------------------------ controller outputs
  // Steering signals (multiplexer selects).
  typedef struct packed {
    logic [1:0] m1;  // operand A of the telescopic unit: 0 x1, 1 x2, 2 r1, 3 r2
    logic [1:0] m2;  // operand B of the telescopic unit: same coding as m1
    logic       m3;  // write data of x1/x2: 0 external data, 1 unit result
    logic       m4;  // write data of r1/r2: 0 external data, 1 unit result
  } steer_t;

  // Load signals (register write enables, active high).
  typedef struct packed {
    logic ld_x1;
    logic ld_x2;
    logic ld_r1;
    logic ld_r2;
  } ld_t;

  localparam ld_t LD_NONE = '0;

  // Control-step index; a program holds at most 2**STEP_W steps.
  localparam int unsigned STEP_W = 4;
  typedef logic [STEP_W-1:0] step_idx_t;

  // One control step of the (fixed-latency) state table. A step has two
  // out-going edges when `branch` is set: to `target` if the controller's
  // condition input is 1, else to the next step. Both edges carry the same
  // outputs.
  typedef struct packed {
    logic      tu_active;  // the telescopic unit computes in this step
    logic      branch;     // conditional step
    step_idx_t target;     // destination of the taken branch
    steer_t    steer;
    ld_t       ld;
  } step_t;

  // Default program, step 0 first:
  //   0: r2 <= din
  //   1: x2 <= din
  //   2: x1, r1 <= x2 + r2      (the step of the controller example:
  //                              m1=1 m2=3 m3=1 m4=1 ld_x1 ld_r1)
  //   3: r2 <= x1 + x2
  //   4: x2 <= r2 + x2, then back to step 3 while the condition input is 1
  localparam int unsigned DEFAULT_STEPS = 5;
  localparam step_t [DEFAULT_STEPS-1:0] DEFAULT_PROGRAM = '{
    // index 4
    '{tu_active: 1'b1, branch: 1'b1, target: 4'd3, steer: '{m1: 2'd3, m2: 2'd1, m3: 1'b1, m4: 1'b0},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b1, ld_r1: 1'b0, ld_r2: 1'b0}},
    // index 3
    '{tu_active: 1'b1, branch: 1'b0, target: 4'd0, steer: '{m1: 2'd0, m2: 2'd1, m3: 1'b0, m4: 1'b1},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b0, ld_r1: 1'b0, ld_r2: 1'b1}},
    // index 2
    '{tu_active: 1'b1, branch: 1'b0, target: 4'd0, steer: '{m1: 2'd1, m2: 2'd3, m3: 1'b1, m4: 1'b1},
      ld: '{ld_x1: 1'b1, ld_x2: 1'b0, ld_r1: 1'b1, ld_r2: 1'b0}},
    // index 1
    '{tu_active: 1'b0, branch: 1'b0, target: 4'd0, steer: '{m1: 2'd0, m2: 2'd0, m3: 1'b0, m4: 1'b0},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b1, ld_r1: 1'b0, ld_r2: 1'b0}},
    // index 0
    '{tu_active: 1'b0, branch: 1'b0, target: 4'd0, steer: '{m1: 2'd0, m2: 2'd0, m3: 1'b0, m4: 1'b0},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b0, ld_r1: 1'b0, ld_r2: 1'b1}}
  };

endpackage
