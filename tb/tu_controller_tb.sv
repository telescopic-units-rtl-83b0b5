// tu_controller_tb: self-checking test of the transformed controller.
//
// The testbench runs the default program many times with random hold
// inputs and a random condition input, and walks through the expected
// control sequence itself, including the conditional step's branch:
// for a step that uses the telescopic unit and sees a hold request it
// expects the step's steering with no loads, then the hold cycles (in_hold),
// the last of them with the step's full outputs; otherwise it expects the
// step's outputs and a move to the next step. It checks the outputs every
// cycle, the done pulse, and that the controller is idle after the last
// step. The hold inputs and cond are changed in every hold state, where
// they must be ignored (the edge chosen in S_j must be kept).
// Two controllers are tested in turn: the default one (L_MAX = 2, one hold
// input, one hold cycle) and one with L_MAX = 3 (two hold inputs; the
// higher one set asks for two hold cycles). It counts holds of each length,
// single-cycle unit steps and taken branches, and fails if any never
// occurred.
module tu_controller_tb;
  import tu_pkg::*;

  localparam int N = DEFAULT_STEPS;
  localparam step_t [N-1:0] PROG = DEFAULT_PROGRAM;

  int checks = 0, failures = 0;
  int n_hold1 = 0, n_hold2 = 0, n_pass = 0, n_branch = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cond = 1'b0;
  logic [1:0] fhv = '0;
  logic sel = 1'b0;   // 0: default controller, 1: the L_MAX = 3 one

  steer_t steer_a, steer_b, steer;
  ld_t ld_a, ld_b, ld;
  logic busy_a, in_hold_a, done_a, busy_b, in_hold_b, done_b;
  logic busy, in_hold, done;

  tu_controller dut_a (.clk(clk), .rst_n(rst_n), .start(start & ~sel), .cond(cond),
    .fh(fhv[0]), .steer(steer_a), .ld(ld_a), .busy(busy_a), .in_hold(in_hold_a),
    .done(done_a));

  tu_controller #(.L_MAX(3)) dut_b (.clk(clk), .rst_n(rst_n), .start(start & sel),
    .cond(cond), .fh(fhv), .steer(steer_b), .ld(ld_b), .busy(busy_b),
    .in_hold(in_hold_b), .done(done_b));

  assign steer   = sel ? steer_b   : steer_a;
  assign ld      = sel ? ld_b      : ld_a;
  assign busy    = sel ? busy_b    : busy_a;
  assign in_hold = sel ? in_hold_b : in_hold_a;
  assign done    = sel ? done_b    : done_a;

  always #5 clk = ~clk;

  task automatic expect_out(input string what, input steer_t s, input ld_t l,
                            input logic h, input logic d);
    checks++;
    if (steer !== s || ld !== l || in_hold !== h || done !== d || busy !== 1'b1) begin
      failures++;
      $display("FAIL %s (L_MAX=%0d) t=%0t: steer=%h ld=%b hold=%b done=%b busy=%b, expected steer=%h ld=%b hold=%b done=%b",
               what, sel ? 3 : 2, $time, steer, ld, in_hold, done, busy, s, l, h, d);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, holds;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (busy_a || busy_b) begin failures++; $display("FAIL busy after reset"); end
    for (int run = 0; run < 600; run++) begin
      int j, extra;
      logic fin;
      int nxt;
      #1 sel = (run >= 300);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cycles = 0;
      holds  = 0;
      j = 0;
      fin = 1'b0;
      while (!fin) begin
        fhv  = 2'($urandom);
        cond = 1'($urandom);
        #1;
        cycles++;
        // Hold cycles the applied hold inputs ask for.
        if (!sel) extra = fhv[0] ? 1 : 0;
        else      extra = fhv[1] ? 2 : (fhv[0] ? 1 : 0);
        // Out-going edge of S_j.
        if (PROG[j].branch && cond) begin
          nxt = int'(PROG[j].target);
          n_branch++;
        end else if (j == N - 1) begin
          fin = 1'b1;
        end else nxt = j + 1;
        if (PROG[j].tu_active && extra > 0) begin
          expect_out($sformatf("S%0d with hold", j), PROG[j].steer, LD_NONE, 1'b0, 1'b0);
          for (int h = 1; h <= extra; h++) begin
            @(posedge clk);
            #1 fhv = 2'($urandom);   // hold inputs and cond are ignored in SH
            cond = ~cond;
            #1;
            cycles++;
            holds++;
            if (h < extra)
              expect_out($sformatf("SH%0d, early cycle", j), PROG[j].steer, LD_NONE, 1'b1, 1'b0);
            else
              expect_out($sformatf("SH%0d", j), PROG[j].steer, PROG[j].ld, 1'b1, fin);
          end
          if (extra == 1) n_hold1++; else n_hold2++;
        end else begin
          if (PROG[j].tu_active) n_pass++;
          expect_out($sformatf("S%0d", j), PROG[j].steer, PROG[j].ld, 1'b0, fin);
        end
        @(posedge clk);
        #1;
        j = nxt;
      end
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL run %0d: still busy after %0d cycles, %0d hold cycles", run, cycles, holds);
      end
    end
    checks++;
    if (n_hold1 == 0 || n_hold2 == 0 || n_pass == 0 || n_branch == 0) begin
      failures++;
      $display("FAIL one-cycle holds %0d, two-cycle holds %0d, single-cycle unit steps %0d, branches %0d",
               n_hold1, n_hold2, n_pass, n_branch);
    end
    $display("one-cycle holds %0d, two-cycle holds %0d, single-cycle unit steps %0d, branches taken %0d",
             n_hold1, n_hold2, n_pass, n_branch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
