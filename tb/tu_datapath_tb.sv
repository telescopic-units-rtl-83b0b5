// tu_datapath_tb: self-checking test of the data path.
//
// The testbench drives random steering and load signals and data, and keeps
// its own copy of the four registers. Each cycle it checks the unit result
// (operands picked by m1/m2, added with carry in), the hold output (a run of
// at least RUN_K positions where the operands differ), and after the clock
// edge the registers (loaded from external data or the result as m3/m4
// select, or held). Reset must clear all four registers.
module tu_datapath_tb;
  import tu_pkg::*;

  localparam int W = 16;
  localparam int K = 8;

  int checks = 0, failures = 0;
  int n_hold = 0;

  logic clk = 1'b0, rst_n = 1'b0, cin = 1'b0;
  logic [W-1:0] din = '0;
  steer_t steer = '0;
  ld_t ld = LD_NONE;
  logic fh, result_cout;
  logic [W-1:0] x1, x2, r1, r2, result;
  logic [W-1:0] m [4];   // model: x1, x2, r1, r2

  tu_datapath #(.WIDTH(W), .RUN_K(K)) dut (.clk(clk), .rst_n(rst_n), .din(din), .cin(cin),
    .steer(steer), .ld(ld), .fh(fh), .x1(x1), .x2(x2), .r1(r1), .r2(r2),
    .result(result), .result_cout(result_cout));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
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

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, wx, wr;
    logic [W:0] s;
    repeat (2) @(posedge clk);
    #1;
    check("x1 reset", {1'b0, x1}, '0);
    check("r2 reset", {1'b0, r2}, '0);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) m[i] = '0;
    for (int n = 0; n < 5000; n++) begin
      steer = steer_t'($urandom);
      ld    = ld_t'($urandom);
      din   = W'($urandom);
      if (n % 3 == 0) din = ~m[$urandom % 4] ^ W'($urandom % 4);  // long runs
      cin   = 1'($urandom);
      #1;
      a = m[steer.m1];
      b = m[steer.m2];
      s = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      check("result", {result_cout, result}, s);
      check("fh", (W+1)'(fh), (W+1)'(has_run(a, b)));
      if (fh) n_hold++;
      wx = steer.m3 ? s[W-1:0] : din;
      wr = steer.m4 ? s[W-1:0] : din;
      @(posedge clk);
      if (ld.ld_x1) m[0] = wx;
      if (ld.ld_x2) m[1] = wx;
      if (ld.ld_r1) m[2] = wr;
      if (ld.ld_r2) m[3] = wr;
      #1;
      check("x1", {1'b0, x1}, {1'b0, m[0]});
      check("x2", {1'b0, x2}, {1'b0, m[1]});
      check("r1", {1'b0, r1}, {1'b0, m[2]});
      check("r2", {1'b0, r2}, {1'b0, m[3]});
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL hold never raised"); end
    $display("hold raised %0d times", n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
