// tb_exact_compressor_4_2: exhaustive self-checking testbench for the exact
// 4:2 compressor.
//
// For all 32 input combinations it checks that sum + 2*(carry + cout) equals
// the number of ones among x1..x4 and cin, that sum is their parity, and
// that cout is the majority of x1, x2 and x3 (so it never depends on cin).
// Expected values are computed with integer arithmetic. A watchdog ends the
// run with a failure if the loop does not finish.
module tb_exact_compressor_4_2;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [4:0] v;
  logic s, c, co;
  int ones, maj;

  exact_compressor_4_2 dut (.x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .cin(v[4]),
                            .sum(s), .carry(c), .cout(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      v = 5'(i);
      #1;
      ones = v[0] + v[1] + v[2] + v[3] + v[4];
      maj  = (v[0] + v[1] + v[2]) >= 2 ? 1 : 0;
      checks++;
      if (s + 2 * (c + co) != ones) begin
        failures++;
        $display("count mismatch: in=%b sum=%b carry=%b cout=%b", v, s, c, co);
      end
      checks++;
      if (s != 1'(ones % 2)) begin
        failures++;
        $display("parity mismatch: in=%b sum=%b", v, s);
      end
      checks++;
      if (co != 1'(maj)) begin
        failures++;
        $display("cout mismatch: in=%b cout=%b expected=%0d", v, co, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
