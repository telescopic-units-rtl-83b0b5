// hold_bdd_mux: hold circuit built as a multiplexer network from a BDD.
//
// Every internal BDD node becomes one 2:1 multiplexer whose select is the
// node's input variable; the leaves are the constants 0 and 1, and the root
// drives the hold output fh. Before mapping, the BDD is "superset": each node
// whose level (longest path from the root, in nodes) exceeds LAMBDA_MAX is
// replaced by the constant 1. This bounds the depth of the network to
// LAMBDA_MAX+1 multiplexers, so fh settles within the shortened cycle, at
// the price of asserting hold for some patterns that would not need it
// (the resulting function is always >= the original one). Levels are
// computed when the module is elaborated.
//
// Interface: x[N_IN-1:0] in, fh out; purely combinational, no clock.
// NODES lists the internal nodes, children before parents, root last (see
// tu_pkg for the index convention). The node-per-multiplexer mapping, the
// level definition and the replace-by-1 rule follow the source; the table
// format is this design's own. The default table is the hold function of the
// source's three-input worked example: arrival times 1/3/4 for inputs
// (a,b,c), cycle T* = 3, hold where the arrival time is greater than T*,
// which gives fh = a & c (x[0] = a, x[1] = b, x[2] = c). LAMBDA_MAX = 3 is
// floor(Kt*T*/d_mux) with Kt = 1 and unit multiplexer delay.
module hold_bdd_mux
  import tu_pkg::*;
#(
  parameter int unsigned N_IN       = 3,
  parameter int unsigned NNODES     = 2,
  parameter bdd_node_t [NNODES-1:0] NODES = '{
    '{var_idx: 8'd0, lo: BDD_ZERO, hi: 8'd2},   // node 1 (root): a
    '{var_idx: 8'd2, lo: BDD_ZERO, hi: BDD_ONE} // node 0: c
  },
  parameter int unsigned LAMBDA_MAX = 3
) (
  input  logic [N_IN-1:0] x,
  output logic            fh
);

  // Level of every internal node: longest distance from the root.
  typedef int unsigned level_arr_t [NNODES];

  function automatic level_arr_t compute_levels();
    level_arr_t lv;
    for (int k = 0; k < int'(NNODES); k++) lv[k] = 0;
    // Parents have larger indices than children: one sweep from the root
    // downward sees every parent before its children.
    for (int k = int'(NNODES) - 1; k >= 0; k--) begin
      for (int c = 0; c < 2; c++) begin
        int ch;
        ch = (c == 0) ? int'(NODES[k].lo) : int'(NODES[k].hi);
        if (ch >= 2 && lv[ch - 2] < lv[k] + 1) lv[ch - 2] = lv[k] + 1;
      end
    end
    return lv;
  endfunction

  localparam level_arr_t LEVEL = compute_levels();

  // val[0] and val[1] are the leaves, val[k+2] the output of node k.
  logic [NNODES+1:0] val;
  assign val[0] = 1'b0;
  assign val[1] = 1'b1;

  for (genvar k = 0; k < int'(NNODES); k++) begin : g_node
    localparam bdd_node_t N = NODES[k];
    localparam int VI = int'(N.var_idx);
    localparam int LO = int'(N.lo);
    localparam int HI = int'(N.hi);
    if (VI >= int'(N_IN) || LO >= k + 2 || HI >= k + 2) begin : g_bad_node
      $error("hold_bdd_mux: node %0d refers to a missing variable or a later node", k);
    end
    if (LEVEL[k] > LAMBDA_MAX) begin : g_superset
      assign val[k+2] = 1'b1;  // supersetting: node replaced by constant 1
    end else begin : g_mux
      assign val[k+2] = x[VI] ? val[HI] : val[LO];
    end
  end

  assign fh = val[NNODES+1];

endmodule
