// telescopic_adder: a ripple-carry adder turned into a telescopic unit.
//
// The unit is the original single-cycle adder (sum = a + b + cin, with carry
// out) plus a hold circuit. In a ripple-carry adder the slow patterns are
// those whose carry must travel through a long run of "propagate" positions
// (a[i] ^ b[i] = 1). The hold circuit raises fh whenever any RUN_K
// consecutive bit positions all propagate; then no carry travels more than
// RUN_K-1 propagate positions when fh = 0, and the result is complete in one
// shortened cycle. When fh = 1 the surrounding controller gives the unit a
// second cycle, keeping its operands steady. The hold output only ever
// over-approximates the slow patterns (runs that start at a "kill" position
// also raise it), which keeps the hold circuit a shallow OR of ANDs.
//
// With L_MAX > 2 the unit may take up to L_MAX cycles and has L_MAX-1 hold
// outputs: fh[j-1] is 1 when the operands need exactly j+1 cycles, i.e. the
// longest propagate run is at least j*RUN_K but (for j < L_MAX-1) shorter
// than (j+1)*RUN_K. At most one fh bit is 1. The default, L_MAX = 2, is the
// plain two-cycle unit with a single hold output fh[0]. The top bit covers
// every longer run, so L_MAX*RUN_K should exceed WIDTH for L_MAX > 2.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout, fh
// (L_MAX-1 bits) out. Purely combinational; fh and the sum settle from the
// same operands, which are held in registers outside the unit.
// The adder size follows the 33-input, 17-output adder benchmark the source
// evaluates (16-bit operands plus carry in), and the one-hot hold signals for
// L_MAX > 2 follow its description of longer units. RUN_K = 8 is this
// design's choice: with about two unit gate delays per ripple position, the
// benchmark's cycle time of 18 against a full delay of 34 leaves room for a
// carry run of about eight positions. The run-window form of the hold
// function is also this design's own.
module telescopic_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned RUN_K = 8,
  parameter int unsigned L_MAX = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [L_MAX-2:0] fh
);

  if (L_MAX < 2 || RUN_K < 1 || RUN_K * (L_MAX - 1) > WIDTH) begin : g_bad_run
    $error("telescopic_adder: need L_MAX >= 2 and 1 <= RUN_K*(L_MAX-1) <= WIDTH");
  end

  // Combinational logic block: ripple-carry adder.
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] prop;

  assign carry[0] = cin;
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    assign prop[i]    = a[i] ^ b[i];
    assign sum[i]     = prop[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (prop[i] & carry[i]);
  end
  assign cout = carry[WIDTH];

  // Hold circuit. run_ge[m-1]: some window of m*RUN_K positions all
  // propagate (one AND per window, ORed together).
  logic [L_MAX-2:0] run_ge;

  for (genvar m = 1; m < int'(L_MAX); m++) begin : g_level
    localparam int unsigned LEN  = m * RUN_K;
    localparam int unsigned NWIN = WIDTH - LEN + 1;
    logic [NWIN-1:0] win_all_prop;
    for (genvar w = 0; w < int'(NWIN); w++) begin : g_win
      assign win_all_prop[w] = &prop[w +: LEN];
    end
    assign run_ge[m-1] = |win_all_prop;
  end

  // One-hot: exactly j+1 cycles needed.
  for (genvar j = 1; j < int'(L_MAX); j++) begin : g_fh
    if (j == int'(L_MAX) - 1) begin : g_top
      assign fh[j-1] = run_ge[j-1];
    end else begin : g_mid
      assign fh[j-1] = run_ge[j-1] & ~run_ge[j];
    end
  end

endmodule
