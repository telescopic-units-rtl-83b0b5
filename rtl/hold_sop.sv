// hold_sop: hold circuit built from a sum of products of the complement.
//
// The hold function fh is implemented through a partial cover of its
// complement: a list of N_CUBE cubes (product terms) each of which only
// contains patterns that are known to finish in one cycle. Each cube is an
// AND of at most N_MAX literals (the product trees), the cubes are ORed (the
// sum tree), and the result is inverted to give fh. Any pattern that no cube
// covers raises fh, so the circuit holds for every slow pattern and possibly
// for some fast ones; the fewer and larger the cubes, the shallower the
// trees. Delay is about Ks*ceil(log2 N_CUBE) + Kp*ceil(log2 N_MAX) + Kin.
//
// Interface: x[N_IN-1:0] in, fh out; purely combinational, no clock.
// Cube c covers x when (x & CUBE_MASK[c]) == (CUBE_VAL[c] & CUBE_MASK[c]):
// a set mask bit is a specified literal, its value bit the literal's phase.
// The complement-cover structure and the n_cube/n_max bounds follow the
// source; the mask/value encoding is this design's own. The default is the
// source's three-input worked example with T* = 3, whose hold function is
// fh = a & c, covered in complement by the cubes a' and c'
// (x[0] = a, x[1] = b, x[2] = c).
module hold_sop #(
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_CUBE = 2,
  parameter int unsigned N_MAX  = 1,
  parameter logic [N_CUBE-1:0][N_IN-1:0] CUBE_MASK = '{3'b100, 3'b001},
  parameter logic [N_CUBE-1:0][N_IN-1:0] CUBE_VAL  = '{3'b000, 3'b000}
) (
  input  logic [N_IN-1:0] x,
  output logic            fh
);

  logic [N_CUBE-1:0] cube_hit;

  // Product trees: one AND over the specified literals of each cube.
  for (genvar c = 0; c < int'(N_CUBE); c++) begin : g_cube
    if ($countones(CUBE_MASK[c]) > N_MAX) begin : g_bad_cube
      $error("hold_sop: cube %0d has more than N_MAX literals", c);
    end
    assign cube_hit[c] = &(~(x ^ CUBE_VAL[c]) | ~CUBE_MASK[c]);
  end

  // Sum tree, then the output inverter.
  assign fh = ~|cube_hit;

endmodule
