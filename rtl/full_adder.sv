// full_adder: adds three bits, multiplexer-based carry.
//
// Two XOR cells form sum = a ^ b ^ cin. The carry comes from a 2:1
// multiplexer steered by p = a ^ b: when a and b differ the carry equals cin,
// when they agree it equals a (which then equals b). This is the optimized
// full adder used inside the exact 4:2 compressor and in the accurate
// columns of the final adder. Combinational, no clock.
//
// Ports: a, b, cin -> sum (weight 1), cout (weight 2).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  mgdi_xor2 u_xor_p   (.a(a), .b(b),   .y(p));
  mgdi_xor2 u_xor_s   (.a(p), .b(cin), .y(sum));
  mgdi_mux2 u_mux_c   (.d0(a), .d1(cin), .sel(p), .y(cout));
endmodule
