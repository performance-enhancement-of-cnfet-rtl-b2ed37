// tb_approx_compressor_4_2: exhaustive self-checking testbench for approx_compressor_4_2.
//
// Applies all 8 input combinations, waits 1 ns for the combinational outputs
// to settle and compares them with the expected value, computed here with
// plain integer arithmetic: the compressor's defining rule (carry when x1
// and at least one of x3, x4 are 1; sum always 1). A watchdog ends the run
// with a failure if the stimulus loop does not finish.
module tb_approx_compressor_4_2;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [7:0] v;
  logic s, c;
  approx_compressor_4_2 dut (.x1(v[0]), .x3(v[1]), .x4(v[2]), .sum(s), .carry(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      v = 8'(i);
      #1;
      checks++;
      if (({c, s}) !== ({1'(v[0] == 1 && (v[1] + v[2]) > 0), 1'b1})) begin
        failures++;
        $display("mismatch: inputs=%b got=%b expected=%b", v, {c, s}, {1'(v[0] == 1 && (v[1] + v[2]) > 0), 1'b1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
