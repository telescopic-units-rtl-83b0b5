// tu_top: a data path with one telescopic unit and its transformed
// controller, next to the two hold-circuit styles on a small example.
//
// Main part: tu_controller runs its program of control steps on tu_datapath,
// whose adder is a telescopic unit. When the unit's hold output fh is high
// in a step that uses the unit, the controller inserts one hold cycle
// (no loads, steering unchanged) before moving on, so each such step takes
// one or two cycles of the shortened clock (up to L_MAX cycles, with one fh
// bit per extra cycle, when L_MAX is raised above 2). The default program loads two
// words from din, adds them, and then repeats a two-addition loop for as
// long as `cond` is 1 in its conditional step (see tu_pkg).
// Side part: the three-input worked example's hold function implemented
// twice, as a BDD multiplexer network (hold_bdd_mux) and as an inverted
// sum of products of its complement (hold_sop); both must agree.
//
// Interface: clk, rst_n, start, cond, din, cin in; x1, x2, r1, r2, busy, in_hold,
// done, fh and the unit's result out (main part); ex_in[2:0] in (a, b, c), ex_fh_bdd and ex_fh_sop
// out (side part).
// Timing: as tu_controller and tu_datapath; the side part is combinational.
module tu_top
  import tu_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned RUN_K = 8,
  parameter int unsigned L_MAX = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             cond,
  input  logic [WIDTH-1:0] din,
  input  logic             cin,
  output logic [WIDTH-1:0] x1,
  output logic [WIDTH-1:0] x2,
  output logic [WIDTH-1:0] r1,
  output logic [WIDTH-1:0] r2,
  output logic             busy,
  output logic             in_hold,
  output logic             done,
  output logic [L_MAX-2:0] fh,
  output logic [WIDTH-1:0] result,
  output logic             result_cout,
  input  logic [2:0]       ex_in,
  output logic             ex_fh_bdd,
  output logic             ex_fh_sop
);

  steer_t steer;
  ld_t    ld;

  tu_controller #(.L_MAX(L_MAX)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .cond   (cond),
    .fh     (fh),
    .steer  (steer),
    .ld     (ld),
    .busy   (busy),
    .in_hold(in_hold),
    .done   (done)
  );

  tu_datapath #(.WIDTH(WIDTH), .RUN_K(RUN_K), .L_MAX(L_MAX)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .din        (din),
    .cin        (cin),
    .steer      (steer),
    .ld         (ld),
    .fh         (fh),
    .x1         (x1),
    .x2         (x2),
    .r1         (r1),
    .r2         (r2),
    .result     (result),
    .result_cout(result_cout)
  );

  hold_bdd_mux u_ex_bdd (.x(ex_in), .fh(ex_fh_bdd));
  hold_sop     u_ex_sop (.x(ex_in), .fh(ex_fh_sop));

endmodule
