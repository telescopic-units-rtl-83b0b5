// tu_top_tb: end-to-end test of the telescopic-unit design at its default
// size (16-bit data, hold on runs of 8 propagate positions).
//
// Each run loads two random words through din, then lets the controller run
// the additions of the default program on the telescopic adder:
//   r2 <= v0, x2 <= v1, x1 = r1 <= x2 + r2, then L+1 times
//   { r2 <= x1 + x2, x2 <= r2 + x2 }
// (each addition also adds cin), where the loop is repeated by holding the
// condition input at 1 in the conditional step; L is 0, 1 or 2 at random. The testbench computes the final register
// values, which steps must hold (operands with a run of at least 8
// propagate positions) and so the run length in cycles (5 plus one per
// hold and two per extra loop), and compares all of them with the design. Whenever the unit's
// result is loaded after a single cycle, a delay model of the ripple adder
// (a carry crossing 8 or more propagate positions is not yet there) must
// give the final value already. About a quarter of the runs use words built
// to contain long runs so that holds occur. The side part (the worked
// example's hold function in two circuit styles) is checked over all inputs.
// Counted mechanisms, each of which must occur: a hold state, a unit step
// done in one cycle, a run without any hold, a taken branch, and each
// example hold output at 0 and at 1.
module tu_top_tb;
  localparam int W = 16;
  localparam int K = 8;
  localparam int RUNS = 400;

  int checks = 0, failures = 0;
  int n_hold_states = 0, n_fast_steps = 0, n_runs_no_hold = 0;
  int n_ex_one = 0, n_ex_zero = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cin = 1'b0, cond = 1'b0;
  int loops = 0, loops_done = 0, n_branches = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] x1, x2, r1, r2, result;
  logic busy, in_hold, done, fh, result_cout;
  logic [2:0] ex_in = '0;
  logic ex_fh_bdd, ex_fh_sop;

  tu_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cond(cond), .din(din), .cin(cin),
    .x1(x1), .x2(x2), .r1(r1), .r2(r2), .busy(busy), .in_hold(in_hold),
    .done(done), .fh(fh), .result(result), .result_cout(result_cout),
    .ex_in(ex_in), .ex_fh_bdd(ex_fh_bdd), .ex_fh_sop(ex_fh_sop));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic logic has_run(input logic [W-1:0] a, b);
    int run = 0;
    for (int i = 0; i < W; i++) begin
      run = (a[i] != b[i]) ? run + 1 : 0;
      if (run >= K) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Adder output after one shortened cycle (see telescopic_adder_tb).
  function automatic logic [W:0] one_cycle_value(input logic [W-1:0] a, b, input logic c_i);
    logic [W:0] res;
    logic c = c_i;
    int run = 0;
    for (int i = 0; i <= W; i++) begin
      logic c_seen = (run >= K) ? ~c : c;
      if (i == W) res[W] = c_seen;
      else begin
        res[i] = a[i] ^ b[i] ^ c_seen;
        run = (a[i] != b[i]) ? run + 1 : 0;
        c = (a[i] & b[i]) | ((a[i] ^ b[i]) & c);
      end
    end
    return res;
  endfunction

  // Timing contract, checked on every cycle that ends a unit step in one
  // cycle: the step loads a result and the controller is not in a hold state.
  always @(negedge clk) begin
    if (rst_n && busy && !in_hold && !fh && dut.u_ctrl.cur.tu_active) begin
      n_fast_steps++;
      checks++;
      if (one_cycle_value(dut.u_dp.op_a, dut.u_dp.op_b, cin) !== {result_cout, result}) begin
        failures++;
        $display("FAIL single-cycle step t=%0t: result not settled", $time);
      end
    end
    if (rst_n && in_hold) n_hold_states++;
    // The conditional step (step 4) samples cond in its S state.
    if (rst_n && busy && !in_hold && dut.u_ctrl.state_q.step == 4 && cond) begin
      loops_done++;
      n_branches++;
    end
  end

  // Ask for `loops` extra passes through the loop of steps 3 and 4.
  always @(posedge clk) #1 cond = (loops_done < loops);

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v0, v1, e_x1, e_x2, e_r1, e_r2;
    int exp_holds, cycles;
    // Side part: the worked example's hold function, both circuit styles.
    for (int v = 0; v < 8; v++) begin
      ex_in = 3'(v);
      #1;
      check($sformatf("example bdd x=%03b", ex_in), W'(ex_fh_bdd), W'(ex_in[0] & ex_in[2]));
      check($sformatf("example sop x=%03b", ex_in), W'(ex_fh_sop), W'(ex_in[0] & ex_in[2]));
      if (ex_fh_bdd && ex_fh_sop) n_ex_one++;
      if (!ex_fh_bdd && !ex_fh_sop) n_ex_zero++;
    end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      v0 = W'($urandom);
      v1 = W'($urandom);
      if (run % 4 == 1) v1 = ~v0 ^ W'(1 << ($urandom % W));
      cin = 1'($urandom);
      // Expected results and holds.
      e_r2 = v0;
      e_x2 = v1;
      exp_holds = 0;
      exp_holds += int'(has_run(e_x2, e_r2));
      e_x1 = e_x2 + e_r2 + W'(cin);
      e_r1 = e_x1;
      loops = $urandom % 3;
      loops_done = 0;
      for (int l = 0; l <= loops; l++) begin
        exp_holds += int'(has_run(e_x1, e_x2));
        e_r2 = e_x1 + e_x2 + W'(cin);
        exp_holds += int'(has_run(e_r2, e_x2));
        e_x2 = e_r2 + e_x2 + W'(cin);
      end

      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      din = v0;             // step 0: r2 <= din
      @(posedge clk);
      #1 din = v1;          // step 1: x2 <= din
      cycles = 2;           // steps 0 and 1
      while (!done) begin
        @(posedge clk);
        #1 cycles++;
        if (cycles > 60) break;
      end
      // done is high in the last step's final cycle.
      @(posedge clk);
      #1;
      check("x1", x1, e_x1);
      check("x2", x2, e_x2);
      check("r1", r1, e_r1);
      check("r2", r2, e_r2);
      check("cycles", W'(cycles), W'(5 + 2 * loops + exp_holds));
      if (exp_holds == 0) n_runs_no_hold++;
      din = W'($urandom);
    end

    checks += 6;
    if (n_branches == 0) begin failures++; $display("FAIL loop branch never taken"); end
    if (n_hold_states == 0) begin failures++; $display("FAIL no hold state"); end
    if (n_fast_steps == 0) begin failures++; $display("FAIL no single-cycle unit step"); end
    if (n_runs_no_hold == 0) begin failures++; $display("FAIL no run without hold"); end
    if (n_ex_one == 0) begin failures++; $display("FAIL example hold never 1"); end
    if (n_ex_zero == 0) begin failures++; $display("FAIL example hold never 0"); end
    $display("hold states %0d, single-cycle unit steps %0d, runs without hold %0d, branches %0d",
             n_hold_states, n_fast_steps, n_runs_no_hold, n_branches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
