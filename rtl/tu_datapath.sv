// tu_datapath: registers and steering around one telescopic unit.
//
// Four registers x1, x2, r1, r2 feed the telescopic adder through two
// operand multiplexers (steering signals m1 for operand A and m2 for
// operand B, each picking one of the four registers). The adder result goes
// back to the registers: m3 selects the write data of x1/x2 (external data
// or the result) and m4 that of r1/r2. Each register loads when its load
// signal is high and holds otherwise. The hold output fh of the unit is
// passed straight to the controller, which keeps the steering steady and
// withholds the loads for one extra cycle when fh is high. With L_MAX > 2
// fh has one bit per extra cycle the unit may need (see telescopic_adder).
//
// Interface: clk, rst_n (active-low asynchronous reset to zero), din and
// cin data in, steer/ld from the controller, fh to the controller, the four
// register values and the unit's result out.
// Timing: fh and the result are combinational from the registers and the
// steering signals; registers update on the rising clock edge.
// The signal names m1..m4, ld_x1, ld_r1 and the value m2 = 3 come from the
// source's controller example; the register set, the multiplexer codings,
// the data width and the reset are this design's choices.
module tu_datapath
  import tu_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned RUN_K = 8,
  parameter int unsigned L_MAX = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             cin,
  input  steer_t           steer,
  input  ld_t              ld,
  output logic [L_MAX-2:0] fh,
  output logic [WIDTH-1:0] x1,
  output logic [WIDTH-1:0] x2,
  output logic [WIDTH-1:0] r1,
  output logic [WIDTH-1:0] r2,
  output logic [WIDTH-1:0] result,
  output logic             result_cout
);

  logic [WIDTH-1:0] op_a, op_b, wx, wr;

  function automatic logic [WIDTH-1:0] pick(
      input logic [1:0] sel, input logic [WIDTH-1:0] v0, v1, v2, v3);
    unique case (sel)
      2'd0: return v0;
      2'd1: return v1;
      2'd2: return v2;
      default: return v3;
    endcase
  endfunction

  // Operand steering at the unit inputs.
  assign op_a = pick(steer.m1, x1, x2, r1, r2);
  assign op_b = pick(steer.m2, x1, x2, r1, r2);

  telescopic_adder #(.WIDTH(WIDTH), .RUN_K(RUN_K), .L_MAX(L_MAX)) u_unit (
    .a   (op_a),
    .b   (op_b),
    .cin (cin),
    .sum (result),
    .cout(result_cout),
    .fh  (fh)
  );

  // Result steering at the register inputs.
  assign wx = steer.m3 ? result : din;
  assign wr = steer.m4 ? result : din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      r1 <= '0;
      r2 <= '0;
    end else begin
      if (ld.ld_x1) x1 <= wx;
      if (ld.ld_x2) x2 <= wx;
      if (ld.ld_r1) r1 <= wr;
      if (ld.ld_r2) r2 <= wr;
    end
  end

endmodule
