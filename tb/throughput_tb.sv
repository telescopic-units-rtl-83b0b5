// throughput_tb: measures the throughput gain of the telescopic adder.
//
// A controller and data path run a stream of additions of uniformly random
// 16-bit words:
//   step 0: x1 <= din    step 1: r1 <= din
//   step 2: r2 <= x1 + r1 (telescopic step), back to step 0 while cond = 1
// The testbench counts the cycles spent in step 2 (one, or two when the
// unit holds). The average latency L of the addition gives the measured
// hold probability L - 1 and the average throughput P* = 1 / (L * T*).
// These are compared with the analytical hold probability of the adder's
// hold function for uniform operands (0.0195, no run of 8 propagate
// positions in 16) and with the single-cycle adder's throughput 1/T, using
// the adder benchmark's T = 34 and T* = 18 unit delays. Every sum is
// checked too. The worked example's hold function (fh = a & c, T = 4,
// T* = 3) is measured the same way over uniformly distributed inputs:
// Prob(fh) must be 0.25 and P* = 0.292 > 0.25.
module throughput_tb;
  import tu_pkg::*;

  localparam int W = 16;
  localparam int K = 8;
  localparam int N_ADD = 60000;
  localparam real T_FULL = 34.0;
  localparam real T_STAR = 18.0;
  localparam real P_FH_EXPECTED = 0.01953125;

  localparam step_t [2:0] STREAM = '{
    '{tu_active: 1'b1, branch: 1'b1, target: 4'd0,
      steer: '{m1: 2'd0, m2: 2'd2, m3: 1'b0, m4: 1'b1},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b0, ld_r1: 1'b0, ld_r2: 1'b1}},
    '{tu_active: 1'b0, branch: 1'b0, target: 4'd0,
      steer: '{m1: 2'd0, m2: 2'd0, m3: 1'b0, m4: 1'b0},
      ld: '{ld_x1: 1'b0, ld_x2: 1'b0, ld_r1: 1'b1, ld_r2: 1'b0}},
    '{tu_active: 1'b0, branch: 1'b0, target: 4'd0,
      steer: '{m1: 2'd0, m2: 2'd0, m3: 1'b0, m4: 1'b0},
      ld: '{ld_x1: 1'b1, ld_x2: 1'b0, ld_r1: 1'b0, ld_r2: 1'b0}}
  };

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cond = 1'b1;
  logic [W-1:0] din = '0;
  steer_t steer;
  ld_t ld;
  logic fh, busy, in_hold, done, result_cout;
  logic [W-1:0] x1, x2, r1, r2, result;
  logic [2:0] ex_x;
  logic ex_fh_bdd, ex_fh_sop;

  tu_controller #(.N_STEPS(3), .PROGRAM(STREAM)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .cond(cond), .fh(fh),
    .steer(steer), .ld(ld), .busy(busy), .in_hold(in_hold), .done(done));
  tu_datapath #(.WIDTH(W), .RUN_K(K)) u_dp (
    .clk(clk), .rst_n(rst_n), .din(din), .cin(1'b0), .steer(steer), .ld(ld),
    .fh(fh), .x1(x1), .x2(x2), .r1(r1), .r2(r2), .result(result),
    .result_cout(result_cout));
  hold_bdd_mux u_ex_bdd (.x(ex_x), .fh(ex_fh_bdd));
  hold_sop     u_ex_sop (.x(ex_x), .fh(ex_fh_sop));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b;
    int unit_cycles = 0, holds = 0, ex_holds = 0;
    real p_fh, lat, p_star, p_orig, ex_p, ex_pstar;

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int n = 0; n < N_ADD; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      din = a;                       // step 0
      @(posedge clk);
      #1 din = b;                    // step 1
      @(posedge clk);
      #1;                            // step 2, first cycle
      if (n == N_ADD - 1) cond = 1'b0;
      unit_cycles++;
      if (in_hold || fh) begin
        @(posedge clk);
        #1 unit_cycles++;
        holds++;
        checks++;
        if (!in_hold) begin failures++; $display("FAIL no hold state after fh"); end
      end
      @(posedge clk);
      #1;
      checks++;
      if (r2 !== a + b) begin
        failures++;
        $display("FAIL sum %h + %h: got %h", a, b, r2);
      end
    end

    lat    = real'(unit_cycles) / real'(N_ADD);
    p_fh   = lat - 1.0;
    p_star = 1.0 / (lat * T_STAR);
    p_orig = 1.0 / T_FULL;
    $display("adder: Prob(fh) %0.5f (analytical %0.5f), latency %0.4f cycles",
             p_fh, P_FH_EXPECTED, lat);
    $display("adder: P = %0.4f, P* = %0.4f, gain %0.1f%%",
             p_orig, p_star, 100.0 * (p_star / p_orig - 1.0));
    checks++;
    if (p_fh < P_FH_EXPECTED - 0.004 || p_fh > P_FH_EXPECTED + 0.004) begin
      failures++;
      $display("FAIL measured hold probability off the analytical value");
    end
    checks++;
    if (!(p_star > p_orig)) begin failures++; $display("FAIL no throughput gain"); end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL no hold in the stream"); end

    // Worked example: uniform inputs, T = 4, T* = 3.
    for (int n = 0; n < 800; n++) begin
      ex_x = 3'(n);
      #1;
      checks++;
      if (ex_fh_bdd !== ex_fh_sop) begin failures++; $display("FAIL example styles differ"); end
      if (ex_fh_bdd) ex_holds++;
    end
    ex_p     = real'(ex_holds) / 800.0;
    ex_pstar = ex_p / (2.0 * 3.0) + (1.0 - ex_p) / 3.0;
    $display("example: Prob(fh) %0.4f, P = %0.4f, P* = %0.4f", ex_p, 0.25, ex_pstar);
    checks++;
    if (ex_holds != 200 || !(ex_pstar > 0.25)) begin
      failures++;
      $display("FAIL example hold probability or throughput");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
