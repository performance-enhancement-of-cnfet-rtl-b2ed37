// tb_mgdi_and2: exhaustive self-checking testbench for mgdi_and2.
//
// Applies all 4 input combinations, waits 1 ns for the combinational outputs
// to settle and compares them with the expected value, computed here with
// plain integer arithmetic: the product of the two bits. A watchdog ends the
// run with a failure if the stimulus loop does not finish.
module tb_mgdi_and2;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [7:0] v;
  logic y;
  mgdi_and2 dut (.a(v[0]), .b(v[1]), .y(y));

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
      if ((y) !== (1'(v[0] * v[1]))) begin
        failures++;
        $display("mismatch: inputs=%b got=%b expected=%b", v, y, 1'(v[0] * v[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
