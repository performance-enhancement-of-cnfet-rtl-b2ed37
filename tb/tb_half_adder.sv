// tb_half_adder: exhaustive self-checking testbench for half_adder.
//
// Applies all 4 input combinations, waits 1 ns for the combinational outputs
// to settle and compares them with the expected value, computed here with
// plain integer arithmetic: the two-bit count of ones. A watchdog ends the
// run with a failure if the stimulus loop does not finish.
module tb_half_adder;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [7:0] v;
  logic s, c;
  half_adder dut (.a(v[0]), .b(v[1]), .sum(s), .cout(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      v = 8'(i);
      #1;
      checks++;
      if (({c, s}) !== (2'(v[0] + v[1]))) begin
        failures++;
        $display("mismatch: inputs=%b got=%b expected=%b", v, {c, s}, 2'(v[0] + v[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
