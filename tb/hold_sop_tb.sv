// hold_sop_tb: self-checking test of the sum-of-products hold circuit.
//
// The default instance (three-input worked example, cubes a' and c') must
// give fh = a & c. A second instance with five inputs and three cubes of at
// most two literals is compared, for every input pattern, with the
// complement of the cube cover evaluated literal by literal in the
// testbench.
module hold_sop_tb;

  int checks = 0, failures = 0;

  // Cubes over x[4:0]: x0'x1 , x2 x3' , x4
  localparam logic [2:0][4:0] MASK = '{5'b10000, 5'b01100, 5'b00011};
  localparam logic [2:0][4:0] VAL  = '{5'b10000, 5'b00100, 5'b00010};

  logic [2:0] x3;
  logic [4:0] x5;
  logic fh_ex, fh5;

  hold_sop dut_ex (.x(x3), .fh(fh_ex));
  hold_sop #(.N_IN(5), .N_CUBE(3), .N_MAX(2), .CUBE_MASK(MASK), .CUBE_VAL(VAL))
    dut5 (.x(x5), .fh(fh5));

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
    logic covered;
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      check($sformatf("example x=%03b", x3), fh_ex, x3[0] & x3[2]);
    end
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      covered = (!x5[0] && x5[1]) || (x5[2] && !x5[3]) || x5[4];
      #1;
      check($sformatf("five-input x=%05b", x5), fh5, !covered);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
