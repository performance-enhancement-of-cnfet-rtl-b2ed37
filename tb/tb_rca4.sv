// tb_rca4: exhaustive self-checking testbench for the 4-bit ripple-carry
// adder.
//
// Applies all 512 combinations of a, b and cin and compares {cout, s} with
// a + b + cin computed as an integer. A watchdog ends the run with a failure
// if the loop does not finish.
module tb_rca4;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [3:0] a, b, s;
  logic cin, cout;
  int expected;

  rca4 #(.N(4)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, b, a} = 9'(i);
      #1;
      expected = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'({cout, s}) != expected) begin
        failures++;
        $display("mismatch: a=%0d b=%0d cin=%0d got=%0d expected=%0d", a, b, cin, {cout, s}, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
