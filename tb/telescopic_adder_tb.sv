// telescopic_adder_tb: self-checking test of the telescopic adder.
//
// For directed and random operands the testbench checks
//   * the sum and carry out against a plain integer addition;
//   * fh against the longest run of propagate positions, found by a scan;
//   * the timing contract: a cycle-level delay model of the ripple adder
//     in which the carry into a position is settled after one shortened
//     cycle only if it passed fewer than RUN_K propagate positions. Whenever
//     fh = 0 this one-cycle value must already equal the full sum.
// A second adder with RUN_K = 5 and L_MAX = 4 (three hold outputs) is checked
// the same way: its one-hot fh must name the number of cycles the operands
// need, and the value after that many cycles must equal the full sum.
// It also counts operands with and without hold, and fails if either case
// never occurred, or if some hold length of the second adder never occurred.
module telescopic_adder_tb;

  localparam int W = 16;
  localparam int K = 8;
  localparam int K3 = 5;   // second adder: run length per extra cycle
  localparam int L3 = 4;   // second adder: most cycles an addition may take

  int checks = 0, failures = 0;
  int n_hold = 0, n_fast = 0;
  int n_len[1:L3];

  logic [W-1:0] a, b, sum;
  logic cin, cout, fh;
  logic [W-1:0] sum3;
  logic cout3;
  logic [L3-2:0] fh3;

  telescopic_adder #(.WIDTH(W), .RUN_K(K)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .fh(fh));

  telescopic_adder #(.WIDTH(W), .RUN_K(K3), .L_MAX(L3)) dut3 (
    .a(a), .b(b), .cin(cin), .sum(sum3), .cout(cout3), .fh(fh3));

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%0b got %h expected %h", what, a, b, cin, got, exp);
    end
  endtask

  // Longest run of consecutive positions with a[i] != b[i].
  function automatic int longest_run(input logic [W-1:0] a_i, b_i);
    int run = 0, best = 0;
    for (int i = 0; i < W; i++) begin
      run  = (a_i[i] != b_i[i]) ? run + 1 : 0;
      best = (run > best) ? run : best;
    end
    return best;
  endfunction

  // Result after a given time: a carry that has crossed `lim` or more
  // propagate positions has not arrived yet (lim = K for one shortened
  // cycle); the stale value is taken as
  // the inverse of the final carry so that an early capture is visible.
  function automatic logic [W:0] one_cycle_value(input logic [W-1:0] a_i, b_i, input logic c_i,
                                               input int lim);
    logic [W:0] res;
    logic c = c_i;
    int run = 0;
    for (int i = 0; i <= W; i++) begin
      logic c_seen = (run >= lim) ? ~c : c;
      if (i == W) res[W] = c_seen;
      else begin
        res[i] = a_i[i] ^ b_i[i] ^ c_seen;
        run = (a_i[i] != b_i[i]) ? run + 1 : 0;
        c = (a_i[i] & b_i[i]) | ((a_i[i] ^ b_i[i]) & c);
      end
    end
    return res;
  endfunction

  task automatic apply(input logic [W-1:0] a_i, b_i, input logic c_i);
    logic [W:0] full;
    a = a_i; b = b_i; cin = c_i;
    #1;
    full = {1'b0, a_i} + {1'b0, b_i} + (W+1)'(c_i);
    check("sum", {cout, sum}, full);
    check("fh", (W+1)'(fh), (W+1)'(longest_run(a_i, b_i) >= K));
    if (!fh) begin
      n_fast++;
      check("one-cycle result", one_cycle_value(a_i, b_i, c_i, K), full);
    end else n_hold++;
    // Second adder: number of cycles needed and the one-hot hold outputs.
    begin
      int run = longest_run(a_i, b_i);
      int cyc = (run / K3 + 1 > L3) ? L3 : run / K3 + 1;
      logic [L3-2:0] exp_fh = (cyc == 1) ? '0 : (L3-1)'(1) << (cyc - 2);
      check("sum (L_MAX=4)", {cout3, sum3}, full);
      check("fh (L_MAX=4)", (W+1)'(fh3), (W+1)'(exp_fh));
      check("result after granted cycles", one_cycle_value(a_i, b_i, c_i, K3 * cyc), full);
      n_len[cyc]++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_len[c]) n_len[c] = 0;
    // Directed: runs just below and at the hold length, carry in through a run.
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h007F, 16'h0000, 1'b1);   // run of 7 from cin: no hold
    apply(16'h00FF, 16'h0000, 1'b1);   // run of 8 from cin: hold
    apply(16'h7F00, 16'h0080, 1'b0);   // generate at 7, run 8..14: 7 long
    apply(16'hFF00, 16'h0080, 1'b0);   // generate at 7, run 8..15 into cout
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b1);   // full-length propagate run
    // Random, with some operands built to contain long runs.
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      if (n % 4 == 0) rb = ~ra ^ (W'(1) << ($urandom % W));
      apply(ra, rb, 1'($urandom));
    end
    for (int c = 1; c <= L3; c++) begin
      checks++;
      if (n_len[c] == 0) begin
        failures++;
        $display("FAIL second adder: no operands needing %0d cycles", c);
      end
    end
    $display("second adder: cycles 1..4 seen %0d %0d %0d %0d", n_len[1], n_len[2], n_len[3], n_len[4]);
    checks++;
    if (n_hold == 0 || n_fast == 0) begin
      failures++;
      $display("FAIL hold seen %0d times, no hold %0d times", n_hold, n_fast);
    end
    $display("hold %0d, single cycle %0d", n_hold, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
