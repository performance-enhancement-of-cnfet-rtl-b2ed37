// fa_const1: full adder with one input tied to logic 1.
//
// Computes a + b + 1 as {cout, sum}: sum = ~(a ^ b) and cout = a | b. The
// multiplier's final ripple-carry stage uses it in the approximate columns,
// where each column holds one data bit, one constant-1 bit and the ripple
// carry. The gate split (XOR plus inversion for the sum, OR for the carry) is
// this design's own choice. Combinational.
//
// Ports: a, b -> sum (weight 1), cout (weight 2).
module fa_const1 (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  logic x;

  mgdi_xor2 u_xor (.a(a), .b(b), .y(x));
  mgdi_or2  u_or  (.a(a), .b(b), .y(cout));
  assign sum = ~x;
endmodule
