// multicycle_throughput_tb: a telescopic adder clocked below half its delay.
//
// With a shortened cycle T* < T/2 an addition may need three or more
// cycles, so the unit has one hold output per extra cycle (L_MAX = 4,
// RUN_K = 5: fh[j-1] = 1 when the longest propagate run has 5j .. 5j+4
// positions, the top bit for 15 or more). The controller and data path run
// a stream of additions of uniformly random 16-bit words:
//   step 0: x1 <= din    step 1: r1 <= din
//   step 2: r2 <= x1 + r1 (telescopic step), back to step 0 while cond = 1
// For every addition the testbench works out from the operands how many
// cycles step 2 must take, and checks the hold cycles, the moment the
// result is loaded and the sum. It then compares the measured share of
// additions needing 1, 2, 3 and 4 cycles with the exact shares, found by
// counting the longest run over all 2^16 propagate patterns, and evaluates
// the average throughput for the adder benchmark's T = 34 unit delays.
// Every 50th addition has operands built with a long propagate run, so that
// three- and four-cycle additions surely occur; these are checked like the
// others but left out of the statistics.
// T* is taken as 11.25, the 18-unit cycle of the two-cycle setting scaled
// from runs below 8 to runs below 5 (an estimate; gate delays are not
// modelled). Two throughput figures are printed: the mean of the per-
// operation rates, sum over j of Prob(j+1 cycles) / ((j+1) T*), and the
// stream rate 1 / (mean latency * T*). Both must exceed 1/T.
module multicycle_throughput_tb;
  import tu_pkg::*;

  localparam int W = 16;
  localparam int K = 5;
  localparam int LM = 4;
  localparam int N_ADD = 30000;
  localparam real T_FULL = 34.0;
  localparam real T_STAR = 11.25;

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
  logic [LM-2:0] fh;
  logic busy, in_hold, done, result_cout;
  logic [W-1:0] x1, x2, r1, r2, result;

  tu_controller #(.N_STEPS(3), .PROGRAM(STREAM), .L_MAX(LM)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .cond(cond), .fh(fh),
    .steer(steer), .ld(ld), .busy(busy), .in_hold(in_hold), .done(done));
  tu_datapath #(.WIDTH(W), .RUN_K(K), .L_MAX(LM)) u_dp (
    .clk(clk), .rst_n(rst_n), .din(din), .cin(1'b0), .steer(steer), .ld(ld),
    .fh(fh), .x1(x1), .x2(x2), .r1(r1), .r2(r2), .result(result),
    .result_cout(result_cout));

  always #5 clk = ~clk;

  function automatic int longest_run(input logic [W-1:0] p);
    int run = 0, best = 0;
    for (int i = 0; i < W; i++) begin
      run  = p[i] ? run + 1 : 0;
      best = (run > best) ? run : best;
    end
    return best;
  endfunction

  function automatic int cycles_needed(input logic [W-1:0] p);
    int c = longest_run(p) / K + 1;
    return (c > LM) ? LM : c;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b;
    int seen[1:LM];
    int forced[1:LM];
    int n_uniform;
    int exact[1:LM];
    int total_cycles;
    real p_meas, p_exact, rate_mean, rate_stream, p_orig, lat;

    total_cycles = 0;
    n_uniform = 0;
    foreach (forced[c]) forced[c] = 0;
    foreach (seen[c]) seen[c] = 0;
    foreach (exact[c]) exact[c] = 0;
    for (int p = 0; p < 2 ** W; p++) exact[cycles_needed(W'(p))]++;

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int n = 0; n < N_ADD; n++) begin
      int need;
      logic long_run;
      long_run = (n % 50 == 49);
      a = W'($urandom);
      b = long_run ? ~a ^ (W'(1) << ($urandom % W)) : W'($urandom);
      need = cycles_needed(a ^ b);
      din = a;                       // step 0
      @(posedge clk);
      #1 din = b;                    // step 1
      @(posedge clk);
      #1;                            // step 2, first cycle
      if (n == N_ADD - 1) cond = 1'b0;
      checks++;
      if (in_hold || (need == 1) != (fh == '0) || (ld.ld_r2 != (need == 1)))
        fail($sformatf("%h + %h: first cycle, fh=%b ld_r2=%b, needs %0d cycles",
                       a, b, fh, ld.ld_r2, need));
      for (int c = 2; c <= need; c++) begin
        @(posedge clk);
        #1;
        checks++;
        if (!in_hold || ld.ld_r2 != (c == need))
          fail($sformatf("%h + %h: cycle %0d of %0d, in_hold=%b ld_r2=%b",
                         a, b, c, need, in_hold, ld.ld_r2));
      end
      if (long_run) forced[need]++;
      else begin
        seen[need]++;
        total_cycles += need;
        n_uniform++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (in_hold || r2 !== a + b) fail($sformatf("sum %h + %h: got %h", a, b, r2));
    end

    rate_mean = 0.0;
    for (int c = 1; c <= LM; c++) begin
      p_meas  = real'(seen[c]) / real'(n_uniform);
      p_exact = real'(exact[c]) / real'(2 ** W);
      rate_mean += p_exact / (real'(c) * T_STAR);
      $display("%0d cycles: measured %0.5f, exact %0.5f", c, p_meas, p_exact);
      checks++;
      if (seen[c] + forced[c] == 0) fail($sformatf("no addition needed %0d cycles", c));
      checks++;
      if (p_meas < p_exact - 0.01 || p_meas > p_exact + 0.01)
        fail($sformatf("share of %0d-cycle additions off the exact value", c));
    end
    lat         = real'(total_cycles) / real'(n_uniform);
    rate_stream = 1.0 / (lat * T_STAR);
    p_orig      = 1.0 / T_FULL;
    $display("mean latency %0.4f cycles; P = %0.4f, P* (mean of rates) = %0.4f, P* (stream) = %0.4f",
             lat, p_orig, rate_mean, rate_stream);
    checks++;
    if (!(rate_mean > p_orig && rate_stream > p_orig)) fail("no throughput gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
