// half_adder: adds two bits.
//
// sum = a ^ b (an XOR cell), cout = a & b (an AND cell). In the multiplier
// one half adder compresses two partial products of column 11 in the first
// reduction stage. The gate-level split into one XOR and one AND cell is the
// usual one; the transistor-level cell is not modelled. Combinational.
//
// Ports: a, b -> sum (weight 1), cout (weight 2).
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  mgdi_xor2 u_xor (.a(a), .b(b), .y(sum));
  mgdi_and2 u_and (.a(a), .b(b), .y(cout));
endmodule
