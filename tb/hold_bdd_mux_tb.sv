// hold_bdd_mux_tb: self-checking test of the BDD multiplexer hold circuit.
//
// Three instances are checked exhaustively against hold functions written
// out by hand:
//   * the default (three-input worked example): fh = a & c;
//   * a four-input AND chain x0&x1&x2&x3 with LAMBDA_MAX = 3: no node is
//     deep enough to be superset, so fh is the full AND;
//   * the same chain with LAMBDA_MAX = 1: the nodes for x2 and x3 sit at
//     levels 2 and 3 and become constant 1, so fh = x0 & x1, which must
//     also cover every pattern of the original function;
//   * the BDD of the telescopic adder's hold function (6 bits, runs of 3),
//     built by a constant function below, over all 4096 operand pairs:
//     without supersetting it must equal the adder's own fh; cut at
//     LAMBDA_MAX = 5 it must cover fh and hold for some extra patterns.
module hold_bdd_mux_tb;
  import tu_pkg::*;

  int checks = 0, failures = 0, n_extra = 0;

  // Chain BDD: root tests x0, then x1, x2, x3; every 0-edge goes to leaf 0.
  localparam bdd_node_t [3:0] CHAIN = '{
    '{var_idx: 8'd0, lo: BDD_ZERO, hi: 8'd4},  // index 5, root
    '{var_idx: 8'd1, lo: BDD_ZERO, hi: 8'd3},  // index 4
    '{var_idx: 8'd2, lo: BDD_ZERO, hi: 8'd2},  // index 3
    '{var_idx: 8'd3, lo: BDD_ZERO, hi: BDD_ONE} // index 2
  };

  // BDD of the telescopic adder's hold function (a run of AK propagate
  // positions among AW), variable order a0, b0, a1, b1, ... (x[2i] = a[i],
  // x[2i+1] = b[i]). For bit i and current run length r there is one node
  // testing a[i] and two testing b[i] (one per value of a[i]). Built from
  // the last bit upward so that children come first; the root (bit 0,
  // run 0) is the last node.
  localparam int AW = 6;
  localparam int AK = 3;
  localparam int ANN = 3 * AK * (AW - 1) + 3;
  typedef bdd_node_t [ANN-1:0] adder_bdd_t;

  function automatic adder_bdd_t build_adder_bdd();
    adder_bdd_t t;
    int a_idx [AW*AK];
    int n = 0;
    for (int i = AW - 1; i >= 0; i--) begin
      for (int r = 0; r < AK; r++) begin
        int nxt_run, nxt_zero, b0, b1;
        if (i == 0 && r != 0) continue;
        nxt_run  = (r + 1 >= AK) ? 1 : (i + 1 == AW) ? 0 : a_idx[(i+1)*AK+r+1];
        nxt_zero = (i + 1 == AW) ? 0 : a_idx[(i+1)*AK];
        // a[i] = 0: b[i] = 1 propagates.
        t[n] = '{var_idx: 8'(2*i+1), lo: 8'(nxt_zero), hi: 8'(nxt_run)};
        b0 = n + 2; n++;
        // a[i] = 1: b[i] = 0 propagates.
        t[n] = '{var_idx: 8'(2*i+1), lo: 8'(nxt_run), hi: 8'(nxt_zero)};
        b1 = n + 2; n++;
        t[n] = '{var_idx: 8'(2*i), lo: 8'(b0), hi: 8'(b1)};
        a_idx[i*AK+r] = n + 2; n++;
      end
    end
    return t;
  endfunction

  localparam adder_bdd_t ADDER_BDD = build_adder_bdd();

  logic [2*AW-1:0] xa;
  logic [AW-1:0] aa, ab, asum;
  logic acout, fh_adder, fh_abdd, fh_abdd_cut;

  always_comb for (int i = 0; i < AW; i++) begin
    aa[i] = xa[2*i];
    ab[i] = xa[2*i+1];
  end

  telescopic_adder #(.WIDTH(AW), .RUN_K(AK)) adder (
    .a(aa), .b(ab), .cin(1'b0), .sum(asum), .cout(acout), .fh(fh_adder));
  hold_bdd_mux #(.N_IN(2*AW), .NNODES(ANN), .NODES(ADDER_BDD), .LAMBDA_MAX(2*AW))
    dut_adder (.x(xa), .fh(fh_abdd));
  hold_bdd_mux #(.N_IN(2*AW), .NNODES(ANN), .NODES(ADDER_BDD), .LAMBDA_MAX(5))
    dut_adder_cut (.x(xa), .fh(fh_abdd_cut));

  logic [2:0] x3;
  logic [3:0] x4;
  logic fh_ex, fh_full, fh_cut;

  hold_bdd_mux dut_ex (.x(x3), .fh(fh_ex));
  hold_bdd_mux #(.N_IN(4), .NNODES(4), .NODES(CHAIN), .LAMBDA_MAX(3))
    dut_full (.x(x4), .fh(fh_full));
  hold_bdd_mux #(.N_IN(4), .NNODES(4), .NODES(CHAIN), .LAMBDA_MAX(1))
    dut_cut (.x(x4), .fh(fh_cut));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      check($sformatf("example x=%03b", x3), fh_ex, x3[0] & x3[2]);
    end
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      check($sformatf("full chain x=%04b", x4), fh_full, &x4);
      check($sformatf("superset chain x=%04b", x4), fh_cut, x4[0] & x4[1]);
      // Supersetting may only add hold patterns, never drop one.
      check($sformatf("superset covers x=%04b", x4), fh_cut | ~fh_full, 1'b1);
    end
    // Adder hold function: the full network equals the adder's own hold
    // output; the network cut at level 5 covers it and holds more often.
    for (int v = 0; v < 2 ** (2*AW); v++) begin
      xa = (2*AW)'(v);
      #1;
      check($sformatf("adder bdd x=%h", xa), fh_abdd, fh_adder);
      check($sformatf("adder cut covers x=%h", xa), fh_abdd_cut | ~fh_adder, 1'b1);
      if (fh_abdd_cut && !fh_adder) n_extra++;
    end
    checks++;
    if (n_extra == 0) begin
      failures++;
      $display("FAIL supersetting the adder BDD added no hold pattern");
    end
    $display("superset adder BDD holds for %0d extra patterns of %0d", n_extra, 2 ** (2*AW));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
