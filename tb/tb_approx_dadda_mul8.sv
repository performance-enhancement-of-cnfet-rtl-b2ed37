// tb_approx_dadda_mul8: exhaustive end-to-end testbench for the approximate
// 8x8 Dadda multiplier, at its default (and only) size.
//
// All 65,536 operand pairs are applied. The expected output is computed
// arithmetically, not gate by gate: the value of every bit that enters the
// multiplier's reduction (formed partial products, approximate-compressor
// carries and constant-1 bits, each with its weight) is summed as an integer,
// and bits 15..4 of that sum must equal p. Because the stage-2 and stage-3
// adders are exact, this pins down the whole circuit.
//
// The testbench also counts how often each mechanism of the design occurs
// and fails if one never does: each of the four approximate compressors
// producing a carry, the column-11 exact compressor passing a carry to the
// column-12 one, the final ripple chain carrying out of column 5,
// product bit 15 being set, and an output that differs from the exact
// product. It prints the mean error distance and the mean relative
// error of p*16 against a*b for information. A watchdog ends the run with a
// failure if the loop does not finish.
module tb_approx_dadda_mul8;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [7:0]  a, b;
  logic [11:0] p;

  // mechanism counters
  int unsigned n_ac [4];
  int unsigned n_ec_chain = 0, n_c5 = 0, n_bit15 = 0, n_inexact = 0;
  real sum_ed = 0.0, sum_red = 0.0;
  int unsigned n_nonzero = 0;

  approx_dadda_mul8 dut (.a(a), .b(b), .p(p));

  function automatic int ppb(input logic [7:0] x, input logic [7:0] y, input int col, input int row);
    return (x[col - row] && y[row]) ? 1 : 0;
  endfunction

  function automatic int acc(input int x1, input int x3, input int x4);
    return (x1 == 1 && (x3 + x4) > 0) ? 1 : 0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ac [4];
    int value, low, exact, col11;
    foreach (n_ac[i]) n_ac[i] = 0;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      ac[0] = acc(ppb(a, b, 7, 0),  ppb(a, b, 7, 2),  ppb(a, b, 7, 3));
      ac[1] = acc(ppb(a, b, 8, 1),  ppb(a, b, 8, 3),  ppb(a, b, 8, 4));
      ac[2] = acc(ppb(a, b, 10, 3), ppb(a, b, 10, 5), ppb(a, b, 10, 6));
      ac[3] = acc(ppb(a, b, 4, 2),  ppb(a, b, 4, 3),  ppb(a, b, 4, 4));
      // approximate columns 4..10
      low = 16                                   // column-4 compressor sum
          + 32 * (ac[3] + ppb(a, b, 5, 4) + 1)   // column 5
          + 64 * (ppb(a, b, 6, 6) + 1)           // column 6
          + 128 * 2                              // column 7: two bits at 1
          + 256 * (ac[0] + 1)                    // column 8
          + 512 * (ac[1] + 1)                    // column 9
          + 1024 * (ppb(a, b, 10, 7) + 1);       // column 10
      // accurate columns 11..14, every partial product kept
      value = low + 2048 * ac[2];
      for (int k = 11; k <= 14; k++)
        for (int r = k - 7; r <= 7; r++)
          value += ppb(a, b, k, r) << k;
      exact = int'(a) * int'(b);

      checks++;
      if (value >= 65536) begin
        failures++;
        $display("reference exceeds 16 bits: a=%0d b=%0d value=%0d", a, b, value);
      end
      checks++;
      if (int'(p) != (value >> 4)) begin
        failures++;
        if (failures < 20)
          $display("mismatch: a=%0d b=%0d p=%0d expected=%0d", a, b, p, value >> 4);
      end

      // mechanisms
      foreach (ac[j]) if (ac[j] == 1) n_ac[j]++;
      col11 = ppb(a, b, 11, 4) ^ ppb(a, b, 11, 5);          // half-adder sum
      if (col11 + ppb(a, b, 11, 6) + ppb(a, b, 11, 7) >= 2) n_ec_chain++;
      if (ac[3] + ppb(a, b, 5, 4) + 1 >= 2) n_c5++;
      if (p[11]) n_bit15++;
      if ((int'(p) << 4) != exact) n_inexact++;
      sum_ed += (exact > (int'(p) << 4)) ? real'(exact - (int'(p) << 4))
                                         : real'((int'(p) << 4) - exact);
      if (exact != 0) begin
        n_nonzero++;
        sum_red += ((exact > (int'(p) << 4)) ? real'(exact - (int'(p) << 4))
                                             : real'((int'(p) << 4) - exact)) / real'(exact);
      end

      // printed example of the published simulation: a=00011000, b=00011101
      if (a == 8'b0001_1000 && b == 8'b0001_1101)
        $display("example a=%b b=%b -> p=%b (exact product %0d)", a, b, p, exact);
    end

    foreach (n_ac[j]) begin
      checks++;
      $display("approximate compressor %0d produced a carry %0d times", j + 1, n_ac[j]);
      if (n_ac[j] == 0) failures++;
    end
    checks++;
    $display("column-11 compressor carried into column 12: %0d times", n_ec_chain);
    if (n_ec_chain == 0) failures++;
    checks++;
    $display("final chain carried out of column 5: %0d times", n_c5);
    if (n_c5 == 0) failures++;
    checks++;
    $display("product bit 15 set: %0d times", n_bit15);
    if (n_bit15 == 0) failures++;
    checks++;
    $display("outputs differing from the exact product: %0d", n_inexact);
    if (n_inexact == 0) failures++;
    $display("mean error distance %0.1f, mean relative error %0.4f",
             sum_ed / 65536.0, sum_red / real'(n_nonzero));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
