// exact_compressor_4_2: exact 4:2 compressor from two full adders.
//
// Counts five bits of equal weight: x1 + x2 + x3 + x4 + cin =
// sum + 2 * (carry + cout). The first full adder adds x1, x2 and x3; its
// carry leaves as cout towards the compressor one column higher, so cout never
// depends on cin and no carry ripples along a row of compressors. The second
// full adder adds the first one's sum, x4 and cin, giving sum and carry.
// Combinational, no clock.
//
// Ports: x1..x4, cin -> sum (weight 1), carry and cout (weight 2 each).
module exact_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .cin(x3),  .sum(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .cin(cin), .sum(sum), .cout(carry));
endmodule
